// bta_pkg -- shared sizes and helper functions of the multi-operand binary
// tree adder (BTA).
//
// The tree adds K operands pairwise, halving the operand count at every
// level, so it needs ceil(log2 K) levels. Every level's adders are one bit
// wider than their inputs (the carry-out becomes the new MSB), so the final
// sum is OPERAND_WIDTH + ceil(log2 K) bits wide and can never overflow.
//
// The defaults are the configuration simulated in the source design: eight
// operands of 32 bits each. The level count follows the adder-tree rule of
// log2 K levels; the bit-growth rule is this design's own choice.
package bta_pkg;

  // Default number of operands added by one tree.
  localparam int unsigned DEFAULT_NUM_OPERANDS  = 8;
  // Default width of each operand in bits.
  localparam int unsigned DEFAULT_OPERAND_WIDTH = 32;

  // Number of adder levels for k operands: ceil(log2 k), at least 1.
  function automatic int unsigned tree_levels(int unsigned k);
    return (k <= 2) ? 1 : $clog2(k);
  endfunction

  // Number of leaves after padding k up to a power of two.
  function automatic int unsigned tree_leaves(int unsigned k);
    return 1 << tree_levels(k);
  endfunction

  // Width of the full-precision sum of k operands of w bits each.
  function automatic int unsigned sum_width(int unsigned k, int unsigned w);
    return w + tree_levels(k);
  endfunction

endpackage
