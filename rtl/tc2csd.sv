// tc2csd: pipelined two's complement to CSD recoder with a fault tolerant
// carry chain.
//
// A run of 1s from bit i to i+j-1 is replaced by +1 at bit i+j and -1 at bit
// i. This needs the carry c(i+1) = x(i+1)x(i) + (x(i+1)+x(i))c(i), which is
// the carry of a full adder fed with x(i+1), x(i) and c(i). The chain is
// therefore an FTFA ripple-carry adder of x>>1 and x, whose sum bits
// s(i) = x(i+1)^x(i)^c(i) feed the second logic level:
//   t(i) = s(i) ^ x(i+1) = x(i) ^ c(i)
//   y(i).d = ~x(i+1) & t(i)   (digit +1)
//   y(i).s =  x(i+1) & t(i)   (digit -1)
// Digit i is non-zero exactly when x(i)^c(i) = 1, and then c(i+1) = x(i+1),
// which forces digit i+1 to zero: the output is non-adjacent.
//
// Value: sum y(i)2^i = x[N-1:0] + cin - 2^N*cout. With x[N] = x[N-1] (a
// sign-extended N-bit number) and cin = 0 the digits equal the two's
// complement value of x[N-1:0]. x[N] is the look-ahead bit of digit N-1.
//
// Timing: the digits, the final carry and the per-bit fault flags of the
// FTFAs are registered together on the rising clock edge: latency one
// cycle, one result per cycle. The asynchronous active-low reset, the
// registered flags and the fault test input are this design's choices.
module tc2csd
  import csd_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic      [N:0]      x,
  input  logic                 cin,
  input  fa_fault_t [N-1:0]    fault,
  output sd_digit_t [N-1:0]    y,
  output logic                 cout,
  output logic      [N-1:0]    fs,
  output logic      [N-1:0]    fc
);

  logic      [N-1:0] s;
  logic              c_n;
  logic      [N-1:0] fs_d, fc_d;
  sd_digit_t [N-1:0] y_d;

  // first level: carry chain of fault tolerant full adders
  ftfa_rca #(.N(N)) u_chain (
    .a     (x[N:1]),
    .b     (x[N-1:0]),
    .cin   (cin),
    .fault (fault),
    .sum   (s),
    .cout  (c_n),
    .fs    (fs_d),
    .fc    (fc_d)
  );

  // second level: one dual-output function per digit
  always_comb begin
    for (int i = 0; i < N; i++) begin
      y_d[i].d = ~x[i+1] & (s[i] ^ x[i+1]);
      y_d[i].s =  x[i+1] & (s[i] ^ x[i+1]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y    <= '0;
      cout <= 1'b0;
      fs   <= '0;
      fc   <= '0;
    end else begin
      y    <= y_d;
      cout <= c_n;
      fs   <= fs_d;
      fc   <= fc_d;
    end
  end

endmodule
