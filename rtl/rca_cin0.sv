// rca_cin0: N-bit ripple-carry adder whose carry input is tied to 0.
//
// Because the carry into bit 0 is always 0, bit 0 is a half adder and bits
// 1..N-1 are full adders, as in the group drawings (H on the right, F to its
// left). The result is the group's sum for an incoming carry of 0, plus its
// carry out; the carry-select correction is done afterwards by nomux_comb.
// Purely combinational.
module rca_cin0 #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] sum,
  output logic         cout
);

  logic [N:0] c;

  assign c[0] = 1'b0;

  half_adder u_ha (
    .a   (a[0]),
    .b   (b[0]),
    .sum (sum[0]),
    .cout(c[1])
  );

  for (genvar i = 1; i < N; i++) begin : g_bit
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (c[i]),
      .sum (sum[i]),
      .cout(c[i+1])
    );
  end

  assign cout = c[N];

endmodule
