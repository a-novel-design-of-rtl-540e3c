// ftfa_rca: N-bit ripple-carry adder made of fault tolerant full adders.
//
// Bit i adds a[i], b[i] and the corrected carry of bit i-1; each stage
// repairs its own sum and carry before the carry ripples on, so a fault in
// one stage does not spread. fs[i]/fc[i] give the location of a detected
// fault. Purely combinational; delay is N stages. Width 4 follows the size
// of the adder evaluated for this design; the ripple structure is the
// "RC" scheme the recoders use.
module ftfa_rca
  import csd_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic      [N-1:0] a,
  input  logic      [N-1:0] b,
  input  logic              cin,
  input  fa_fault_t [N-1:0] fault,
  output logic      [N-1:0] sum,
  output logic              cout,
  output logic      [N-1:0] fs,
  output logic      [N-1:0] fc
);

  logic [N:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < N; i++) begin : g_bit
    ftfa u_ftfa (
      .a     (a[i]),
      .b     (b[i]),
      .cin   (c[i]),
      .fault (fault[i]),
      .sumf  (sum[i]),
      .coutf (c[i+1]),
      .fs    (fs[i]),
      .fc    (fc[i])
    );
  end

  assign cout = c[N];

endmodule
