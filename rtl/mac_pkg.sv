// mac_pkg: shared elaboration-time helpers for the square-root carry-select
// adder (SQRT CSLA).
//
// The SQRT CSLA splits a WIDTH-bit addition into groups whose sizes grow by
// one bit per group: a 2-bit ripple carry group first, then groups of 2, 3,
// 4, 5, ... bits. For 16 bits this gives the partition [1:0] [3:2] [6:4]
// [10:7] [15:11]. For other widths the same growing sequence is continued
// and the last group is cut short so that the groups end exactly at WIDTH;
// that extension beyond 16 bits is this design's own choice.
//
// Group g (g >= 1) has g+1 bits and starts at bit 2 + (g-1)(g+2)/2.
//
// It also holds the layout of the partial-product bus of the Vedic
// multiplier tree (see vedic_mult).
package mac_pkg;

  // First bit of group g.
  function automatic int unsigned csla_group_start(input int unsigned g);
    if (g == 0) return 0;
    return 2 + ((g - 1) * (g + 2)) / 2;
  endfunction

  // Number of groups needed to cover w bits (w >= 1).
  function automatic int unsigned csla_num_groups(input int unsigned w);
    int unsigned g;
    g = 1;
    while (csla_group_start(g) < w) g++;
    return g;
  endfunction

  // Width of group g inside a w-bit adder (last group truncated to fit).
  function automatic int unsigned csla_group_size(input int unsigned g,
                                                  input int unsigned w);
    int unsigned hi;
    hi = csla_group_start(g + 1);
    if (hi > w) hi = w;
    return hi - csla_group_start(g);
  endfunction

  // Vedic multiplier tree of an n x n multiplier: level k (k = 1 .. log2 n)
  // holds (n/2^k)^2 products of 2^k x 2^k bits, each 2^(k+1) bits wide, so
  // the level is 2*n*n/2^k bits. Levels are packed one after another, level 1
  // at bit 0; this returns the first bit of level k.
  function automatic int unsigned vedic_level_base(input int unsigned n,
                                                   input int unsigned k);
    int unsigned base;
    base = 0;
    for (int unsigned j = 1; j < k; j++) base += (2 * n * n) >> j;
    return base;
  endfunction

endpackage
