// full_adder: ordinary one-bit full adder.
//
// sum = a ^ b ^ cin and cout = majority(a, b, cin), purely combinational.
// It is the adder that the fault tolerant full adder checks and corrects,
// and the cell of the redundant binary to two's complement converter, which
// keeps unprotected adders. The gate-level form is this design's choice.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);

  always_comb begin
    sum  = a ^ b ^ cin;
    cout = (a & b) | (a & cin) | (b & cin);
  end

endmodule
