// rr_arb_pkg: shared constants and tree-planning functions for the
// round-robin arbiters.
//
// A hierarchical MxM switch arbiter (M a power of two) is a tree of small
// switch-arbiter blocks. The planning rule prefers 4-input blocks on every
// level and uses a single 2-input block only where log2(M) is odd; that block
// is placed at the root, as in the 32x32 arrangement (two levels of 4x4
// ack-req blocks under a 2x2 root). With use4 = 0 every level is 2-input,
// which gives the all-2x2 arrangement (for example a 4x4 arbiter built from
// two 2x2 ack-req blocks and a 2x2 root). The functions below are evaluated
// at elaboration time only.
package rr_arb_pkg;

  // Number of levels in the tree, the root level included.
  function automatic int unsigned num_levels(int unsigned m, bit use4);
    int unsigned l2;
    l2 = $clog2(m);
    return use4 ? (l2 + 1) / 2 : l2;
  endfunction

  // Fan-in of the blocks of level lvl (0 = leaves, num_levels-1 = root).
  function automatic int unsigned level_fanin(int unsigned m, bit use4, int unsigned lvl);
    int unsigned l2;
    l2 = $clog2(m);
    if (!use4) return 2;
    if ((l2 % 2 == 1) && (lvl == num_levels(m, use4) - 1)) return 2;
    return 4;
  endfunction

  // Number of request lines that enter level lvl.
  function automatic int unsigned level_width(int unsigned m, bit use4, int unsigned lvl);
    int unsigned w;
    w = m;
    for (int unsigned i = 0; i < lvl; i++) w = w / level_fanin(m, use4, i);
    return w;
  endfunction

endpackage
