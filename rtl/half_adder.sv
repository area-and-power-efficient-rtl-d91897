// half_adder: one-bit half adder (the "H" cell of the group drawings).
//
// sum = a XOR b, cout = a AND b. It sits in bit 0 of every carry-in-0
// ripple-carry adder, where the carry input is known to be 0. Purely
// combinational; no clock.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic cout
);

  always_comb begin
    sum  = a ^ b;
    cout = a & b;
  end

endmodule
