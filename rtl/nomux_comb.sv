// nomux_comb: the AND/XOR circuit that replaces the carry-in-1 adder and the
// multiplexer of a conventional carry select group.
//
// Input b (N bits) and b_carry are the sum and carry out of the group's
// carry-in-0 ripple-carry adder; carry is the carry arriving from the group
// below. The circuit adds that carry to b with an incrementer chain:
//   x[0] = b[0] ^ carry,  s[0] = b[0] & carry,
//   x[i] = b[i] ^ s[i-1], s[i] = b[i] & s[i-1],
// and the group carry out is b_carry ^ s[N-1]. With carry = 0 the output is
// b unchanged; with carry = 1 it is b + 1, so {carry_out, x} equals
// {b_carry, b} + carry. b_carry and an all-ones b cannot both come from an
// adder, so the final XOR acts as an OR. These equations and the XOR on the
// carry follow the published circuit; the port names are this design's own.
// Purely combinational: the carry passes through N AND gates.
module nomux_comb #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] b,
  input  logic         b_carry,
  input  logic         carry,
  output logic [N-1:0] x,
  output logic         carry_out
);

  logic [N:0] s;  // s[i]: carry into bit i of the increment chain

  assign s[0] = carry;

  for (genvar i = 0; i < N; i++) begin : g_bit
    assign x[i]   = b[i] ^ s[i];
    assign s[i+1] = b[i] & s[i];
  end

  assign carry_out = b_carry ^ s[N];

endmodule
