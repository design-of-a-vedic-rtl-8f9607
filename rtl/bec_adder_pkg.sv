// bec_adder_pkg: group partition of the BEC carry-select adder.
//
// The adder is cut into groups that grow by one bit each, as in a
// square-root carry-select adder: bits [1:0], [3:2], [6:4], [10:7], [15:11]
// for 16 bits (sizes 2, 2, 3, 4, 5), continuing 6, 7, ... for wider adders.
// The last group is cut short so that the groups cover exactly W bits
// (24 bits: 2, 2, 3, 4, 5, 6, 2). The functions are constant functions,
// evaluated at elaboration.
package bec_adder_pkg;

  // Nominal size of group g before truncation: 2, 2, 3, 4, 5, ...
  function automatic int unsigned grp_nominal(input int unsigned g);
    return (g < 2) ? 2 : g + 1;
  endfunction

  // Lowest bit of group g.
  function automatic int unsigned grp_lo(input int unsigned g);
    int unsigned lo = 0;
    for (int unsigned k = 0; k < g; k++) lo += grp_nominal(k);
    return lo;
  endfunction

  // Number of groups needed to cover w bits.
  function automatic int unsigned num_groups(input int unsigned w);
    int unsigned g = 0;
    while (grp_lo(g) < w) g++;
    return g;
  endfunction

  // Size of group g in a w-bit adder, the last group truncated.
  function automatic int unsigned grp_size(input int unsigned g, input int unsigned w);
    int unsigned lo = grp_lo(g);
    int unsigned n  = grp_nominal(g);
    return (lo + n > w) ? w - lo : n;
  endfunction

endpackage
