// full_adder: one-bit full adder (the "F" cell of the group drawings).
//
// sum = a XOR b XOR cin; the carry is a AND b, or cin AND (a XOR b). The
// gate-level form is this design's choice; only the function of the cell is
// fixed. Purely combinational; no clock.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);

  logic p;

  always_comb begin
    p    = a ^ b;
    sum  = p ^ cin;
    cout = (a & b) | (cin & p);
  end

endmodule
