// csla_pkg: group layout of the square-root carry select adder.
//
// The adder is cut into groups whose widths grow by one bit per group, so
// that the carry-in-0 sum of a wider group is ready about when the carry from
// the groups below it arrives. Group 0 is 2 bits wide and group g (g >= 1) is
// g+1 bits wide: 2, 2, 3, 4, 5 for the 16-bit adder, exactly the split
// [1:0], [3:2], [6:4], [10:7], [15:11] of the proposed 16-bit design. For
// other widths the same rule is continued and the last group is clipped to
// fit; that extension is this design's own choice, as only the 16-bit split
// is drawn. All functions are constant functions used at elaboration time.
package csla_pkg;

  localparam int unsigned FIRST_GROUP_W = 2;

  // Nominal width of group g before clipping.
  function automatic int unsigned nominal_w(int unsigned g);
    return (g == 0) ? FIRST_GROUP_W : g + 1;
  endfunction

  // Lowest bit of group g in an adder of the given width.
  function automatic int unsigned group_lo(int unsigned width, int unsigned g);
    int unsigned lo;
    lo = 0;
    for (int unsigned i = 0; i < g; i++) begin
      lo += nominal_w(i);
    end
    return (lo > width) ? width : lo;
  endfunction

  // Width of group g, clipped to the adder width.
  function automatic int unsigned group_w(int unsigned width, int unsigned g);
    int unsigned lo;
    int unsigned hi;
    lo = group_lo(width, g);
    hi = lo + nominal_w(g);
    if (hi > width) hi = width;
    return hi - lo;
  endfunction

  // Number of groups needed to cover the given width.
  function automatic int unsigned num_groups(int unsigned width);
    int unsigned n;
    n = 0;
    while (group_lo(width, n) < width) n++;
    return n;
  endfunction

endpackage
