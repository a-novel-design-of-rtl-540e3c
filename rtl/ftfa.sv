// ftfa: fault tolerant full adder.
//
// A fa_dft (full adder plus checker) followed by two 2:1 multiplexers. When
// the sum flag fs is 0 the adder's sum is passed on, when it is 1 the
// inverted sum is; the carry is treated the same way under fc. A one-bit
// output can only be wrong by being inverted, so a stuck sum, a stuck carry
// or both (a double fault) are repaired, while fs/fc report where the fault
// was. Passing the inverted sum for fs=1 mirrors what is stated for the
// carry. Purely combinational; fault is the test input of fa_dft.
module ftfa
  import csd_pkg::*;
(
  input  logic      a,
  input  logic      b,
  input  logic      cin,
  input  fa_fault_t fault,
  output logic      sumf,
  output logic      coutf,
  output logic      fs,
  output logic      fc
);

  logic sum, cout;

  fa_dft u_dft (
    .a     (a),
    .b     (b),
    .cin   (cin),
    .fault (fault),
    .sum   (sum),
    .cout  (cout),
    .fs    (fs),
    .fc    (fc)
  );

  always_comb begin
    sumf  = fs ? ~sum  : sum;
    coutf = fc ? ~cout : cout;
  end

endmodule
