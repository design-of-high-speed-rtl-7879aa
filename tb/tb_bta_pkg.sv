// tb_bta_pkg -- checks the size helpers of bta_pkg against hand-worked
// values: levels = ceil(log2 k) (at least 1), leaves = next power of two,
// sum width = operand width + levels, and the default 8 x 32-bit size.
module tb_bta_pkg;
  import bta_pkg::*;

  int checks   = 0;
  int failures = 0;

  task automatic expect_eq(string what, int unsigned got, int unsigned exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    expect_eq("levels(2)",  tree_levels(2),  1);
    expect_eq("levels(3)",  tree_levels(3),  2);
    expect_eq("levels(4)",  tree_levels(4),  2);
    expect_eq("levels(5)",  tree_levels(5),  3);
    expect_eq("levels(8)",  tree_levels(8),  3);
    expect_eq("levels(9)",  tree_levels(9),  4);
    expect_eq("levels(16)", tree_levels(16), 4);
    expect_eq("leaves(5)",  tree_leaves(5),  8);
    expect_eq("leaves(8)",  tree_leaves(8),  8);
    expect_eq("leaves(3)",  tree_leaves(3),  4);
    expect_eq("sumw(8,32)", sum_width(8, 32), 35);
    expect_eq("sumw(8,4)",  sum_width(8, 4),  7);
    expect_eq("sumw(2,16)", sum_width(2, 16), 17);
    expect_eq("default K",  DEFAULT_NUM_OPERANDS,  8);
    expect_eq("default W",  DEFAULT_OPERAND_WIDTH, 32);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
