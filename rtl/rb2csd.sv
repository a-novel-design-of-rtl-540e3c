// rb2csd: three-stage pipelined redundant binary to CSD recoder.
//
// Stage 1 registers the N+1 input RB digits. Stage 2 converts them to an
// (N+1)-bit two's complement number with rb2tc and registers it. Stage 3 is
// the tc2csd recoder, whose fault tolerant carry chain works on the
// registered number and whose output register holds the N CSD digits, the
// final carry and the per-bit fault flags. Only the recoder's adders are
// fault tolerant; the converter is the unprotected one.
//
// Value: with X = (D - S) mod 2^(N+1), sum y(i)2^i = X[N-1:0] - 2^N*cout;
// when the RB number fits in N-bit two's complement the digits equal its
// value. Latency three cycles, one result per cycle, no stalls. The fault
// input acts on the recoder in the cycle its registered X is recoded, i.e.
// on the result that appears one cycle later. The recoder's initial carry is
// 0 and the reset is asynchronous active-low; both are this design's choice.
module rb2csd
  import csd_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  sd_digit_t [N:0]      rb,
  input  fa_fault_t [N-1:0]    fault,
  output sd_digit_t [N-1:0]    y,
  output logic                 cout,
  output logic      [N-1:0]    fs,
  output logic      [N-1:0]    fc
);

  sd_digit_t [N:0] rb_q;
  logic      [N:0] x_d, x_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rb_q <= '0;
      x_q  <= '0;
    end else begin
      rb_q <= rb;
      x_q  <= x_d;
    end
  end

  // an RB digit (1,1) has no meaning and is not a legal input
  logic rb_illegal;

  always_comb begin
    rb_illegal = 1'b0;
    for (int i = 0; i <= N; i++)
      rb_illegal |= rb[i].s & rb[i].d;
  end

  a_legal_rb_digits : assert property (@(posedge clk) disable iff (!rst_n) !rb_illegal)
    else $error("rb2csd: illegal RB digit (1,1) at the input");

  rb2tc #(.W(N+1)) u_conv (
    .rb (rb_q),
    .x  (x_d)
  );

  tc2csd #(.N(N)) u_recode (
    .clk   (clk),
    .rst_n (rst_n),
    .x     (x_q),
    .cin   (1'b0),
    .fault (fault),
    .y     (y),
    .cout  (cout),
    .fs    (fs),
    .fc    (fc)
  );

endmodule
