// csla_nomux: square-root carry select adder without multiplexers.
//
// sum/carry = a + b + cin over WIDTH bits. The operands are cut into groups
// of growing width (csla_pkg): for WIDTH = 16 the groups are [1:0], [3:2],
// [6:4], [10:7] and [15:11]. The lowest group is a plain ripple-carry adder
// fed by cin. Each upper group adds its bits with carry in 0, in parallel
// with everything else, and then adds the carry from the group below with an
// AND/XOR chain instead of a second carry-in-1 adder and a multiplexer. The
// group carries ripple from group to group through those chains.
//
// The 16-bit grouping and every group's structure follow the published
// design. The default width is the 16-bit design that is drawn in full;
// other widths (8, 32 and 64 bits were also evaluated) continue the same
// grouping rule with the last group clipped, which is this design's own
// choice. Purely combinational: no clock, no reset, no registers.
module csla_nomux
  import csla_pkg::*;
#(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             carry
);

  localparam int unsigned NG = num_groups(WIDTH);

  // c[g]: carry out of group g-1 (c[0] is the external carry in).
  logic [NG:0] c;

  assign c[0] = cin;

  for (genvar g = 0; g < NG; g++) begin : g_group
    localparam int unsigned LO = group_lo(WIDTH, g);
    localparam int unsigned W  = group_w(WIDTH, g);

    if (g == 0) begin : g_first
      rca #(.N(W)) u_rca (
        .a   (a[LO +: W]),
        .b   (b[LO +: W]),
        .cin (c[g]),
        .sum (sum[LO +: W]),
        .cout(c[g+1])
      );
    end else begin : g_select
      csla_group #(.N(W)) u_group (
        .a   (a[LO +: W]),
        .b   (b[LO +: W]),
        .cin (c[g]),
        .sum (sum[LO +: W]),
        .cout(c[g+1])
      );
    end
  end

  assign carry = c[NG];

endmodule
