// rb2tc: redundant binary (RB) signed digits to two's complement.
//
// An RB digit (s, d) stands for d - s, so the number is D - S = D + ~S + 1:
// a ripple-carry adder of D and ~S with initial carry e(0) = 1. For the
// three legal digits this gives
//   e(i+1) = ~s(i)d(i) + e(i)~(s(i)+d(i)),   x(i) = ~(s(i)+d(i)) ^ e(i).
// The result is (D - S) mod 2^W; the carry out of the top digit is dropped.
// The adders are plain full adders, as this converter is not protected.
// Purely combinational. The digit (1,1) is illegal.
module rb2tc
  import csd_pkg::*;
#(
  parameter int unsigned W = 5
) (
  input  sd_digit_t [W-1:0] rb,
  output logic      [W-1:0] x
);

  logic [W:0] e;

  assign e[0] = 1'b1;

  for (genvar i = 0; i < W; i++) begin : g_digit
    full_adder u_fa (
      .a    (rb[i].d),
      .b    (~rb[i].s),
      .cin  (e[i]),
      .sum  (x[i]),
      .cout (e[i+1])
    );
  end

endmodule
