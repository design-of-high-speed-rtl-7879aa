// peres_bta -- multi-operand binary tree adder (BTA) of Peres-gate RCAs.
//
// NUM_OPERANDS unsigned operands are added in a balanced binary tree. Level 0
// pairs the operands and adds each pair with a ripple carry adder built from
// reversible Peres-gate full adders; every following level pairs the sums of
// the level above, so the operand count halves per level and the tree has
// ceil(log2 NUM_OPERANDS) levels (3 for the default 8 operands: 4 + 2 + 1 = 7
// adders). The tree structure, the operand count and the reversible
// full-adder cell follow the source design.
//
// This design's own choices: every adder at level l is OPERAND_WIDTH + l bits
// wide and its carry-out becomes the MSB of its result, so the final sum is
// exact (OPERAND_WIDTH + levels bits); all adder carry-ins are 0; an operand
// count that is not a power of two is padded with zero leaves.
//
// Interface: operands[NUM_OPERANDS] of OPERAND_WIDTH bits in, sum out.
// Timing: purely combinational, no clock or reset. The longest path runs
// through the LSB of level 0 and then along the carry chains, roughly
// OPERAND_WIDTH + levels full-adder carry stages in total.
module peres_bta
  import bta_pkg::*;
#(
  parameter int unsigned NUM_OPERANDS  = DEFAULT_NUM_OPERANDS,
  parameter int unsigned OPERAND_WIDTH = DEFAULT_OPERAND_WIDTH,
  localparam int unsigned LEVELS = tree_levels(NUM_OPERANDS),
  localparam int unsigned SUM_W  = sum_width(NUM_OPERANDS, OPERAND_WIDTH)
) (
  input  logic [OPERAND_WIDTH-1:0] operands [NUM_OPERANDS],
  output logic [SUM_W-1:0]         sum
);

  localparam int unsigned LEAVES = tree_leaves(NUM_OPERANDS);

  // Leaves: the operands, zero-padded to a power of two.
  logic [OPERAND_WIDTH-1:0] leaf [LEAVES];
  for (genvar j = 0; j < LEAVES; j++) begin : g_leaf
    if (j < NUM_OPERANDS) begin : g_op
      assign leaf[j] = operands[j];
    end else begin : g_pad
      assign leaf[j] = '0;
    end
  end

  // Level l holds LEAVES >> (l+1) adders of OPERAND_WIDTH + l bits. Its
  // inputs (vin) are the leaves or the results (vout) of level l-1; every
  // result is one bit wider than the inputs, the carry-out being its MSB.
  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    localparam int unsigned W     = OPERAND_WIDTH + l;
    localparam int unsigned NODES = LEAVES >> (l + 1);
    logic [W-1:0] vin  [2*NODES];
    logic [W:0]   vout [NODES];

    if (l == 0) begin : g_from_leaves
      assign vin = leaf;
    end else begin : g_from_level
      assign vin = g_level[l-1].vout;
    end

    for (genvar j = 0; j < NODES; j++) begin : g_node
      peres_rca #(.WIDTH(W)) u_rca (
        .a    (vin[2*j]),
        .b    (vin[2*j+1]),
        .cin  (1'b0),
        .s    (vout[j][W-1:0]),
        .cout (vout[j][W])
      );
    end
  end

  assign sum = g_level[LEVELS-1].vout[0];

endmodule
