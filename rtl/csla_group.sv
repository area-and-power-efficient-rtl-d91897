// csla_group: one upper group of the multiplexer-free carry select adder.
//
// An N-bit ripple-carry adder with carry in 0 (rca_cin0) computes the group
// sum as if no carry arrived from below. When the carry from the group below
// (cin) settles, nomux_comb adds it to that (N+1)-bit result with an AND/XOR
// chain, giving the group sum and the carry out. This is the structure of
// groups 2 to 5 of the proposed 16-bit adder (N = 2, 3, 4, 5). Purely
// combinational: the carry-in-0 sum is formed in parallel with the lower
// groups, and cin then passes through N AND gates and one XOR. A deferred
// assertion checks that the carry-in-0 adder never produces an all-ones sum
// together with a carry out, the property that lets the correction circuit
// combine the two carries with an XOR.
module csla_group #(
  parameter int unsigned N = 2
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);

  logic [N-1:0] sum0;
  logic         cout0;

  rca_cin0 #(.N(N)) u_rca0 (
    .a   (a),
    .b   (b),
    .sum (sum0),
    .cout(cout0)
  );

  nomux_comb #(.N(N)) u_comb (
    .b        (sum0),
    .b_carry  (cout0),
    .carry    (cin),
    .x        (sum),
    .carry_out(cout)
  );

  // An N-bit sum with carry in 0 is at most 2^(N+1) - 2, so an all-ones sum
  // never comes with a carry out. nomux_comb relies on this to merge the two
  // carries with an XOR.
  always_comb begin
    assert final (!(cout0 && (&sum0)))
      else $error("carry-in-0 adder gave an all-ones sum with a carry out");
  end

endmodule
