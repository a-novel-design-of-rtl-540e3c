// fa_dft: full adder with an on-line checker for sum and carry faults.
//
// The checker uses the fact that, in a working adder, sum ^ b equals a ^ cin
// and cout differs from b only when a == cin != b. Gates:
//   X1 = a ^ cin            X2 = ~(sum ^ b)
//   X3 = ~(cout ^ b)        F1 = a b' cin + a' b cin'
//   fs = ~(X1 ^ X2)         fc = ~(X3 ^ F1)
// fs (fc) is 0 while the sum (carry) is right and 1 when it is wrong, so a
// fault on either output, or on both at once, is detected and located.
//
// The fault input is this design's addition: it forces the inner adder's
// sum and/or carry net to a stuck value so that the checker can be tested.
// The checker gates are assumed fault free. Purely combinational.
module fa_dft
  import csd_pkg::*;
(
  input  logic      a,
  input  logic      b,
  input  logic      cin,
  input  fa_fault_t fault,
  output logic      sum,
  output logic      cout,
  output logic      fs,
  output logic      fc
);

  logic sum_raw, cout_raw;
  logic x1, x2, x3, f1;

  full_adder u_fa (
    .a    (a),
    .b    (b),
    .cin  (cin),
    .sum  (sum_raw),
    .cout (cout_raw)
  );

  always_comb begin
    // stuck-at fault model on the adder's output nets
    sum  = fault.sum_en  ? fault.sum_val  : sum_raw;
    cout = fault.cout_en ? fault.cout_val : cout_raw;

    x1 = a ^ cin;
    x2 = ~(sum ^ b);
    x3 = ~(cout ^ b);
    f1 = (a & ~b & cin) | (~a & b & ~cin);
    fs = ~(x1 ^ x2);
    fc = ~(x3 ^ f1);
  end

endmodule
