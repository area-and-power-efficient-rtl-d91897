// rca: N-bit ripple-carry adder with a carry input.
//
// A chain of N full adders, bit 0 taking cin and each bit passing its carry
// to the next. It forms the lowest group of the carry select adder (bits
// [1:0] with the adder's external carry in). Purely combinational: the carry
// ripples through all N cells.
module rca #(
  parameter int unsigned N = 2
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);

  logic [N:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < N; i++) begin : g_bit
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
