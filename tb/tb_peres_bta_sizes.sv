// tb_peres_bta_sizes -- runs the binary tree adder at other sizes than its
// default: the 8 x 4-bit tree drawn in the structure diagram of the design
// (checked over random operand sets plus the all-ones maximum 8 x 15 = 120),
// a 5-operand tree (padded internally to 8 leaves with zeros) and a
// 2-operand tree (a single adder). Reference: software sum of the operands.
module tb_peres_bta_sizes;

  int checks   = 0;
  int failures = 0;

  logic [3:0] ops8x4 [8];
  logic [6:0] sum8x4;
  logic [7:0] ops5x8 [5];
  logic [10:0] sum5x8;
  logic [15:0] ops2x16 [2];
  logic [16:0] sum2x16;

  peres_bta #(.NUM_OPERANDS(8), .OPERAND_WIDTH(4))  dut8x4  (.operands(ops8x4),  .sum(sum8x4));
  peres_bta #(.NUM_OPERANDS(5), .OPERAND_WIDTH(8))  dut5x8  (.operands(ops5x8),  .sum(sum5x8));
  peres_bta #(.NUM_OPERANDS(2), .OPERAND_WIDTH(16)) dut2x16 (.operands(ops2x16), .sum(sum2x16));

  task automatic check(string tag, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: sum=%0d expected %0d", tag, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e8, e5, e2;
    for (int i = 0; i < 8; i++) ops8x4[i] = 4'hF;
    for (int i = 0; i < 5; i++) ops5x8[i] = 8'hFF;
    for (int i = 0; i < 2; i++) ops2x16[i] = 16'hFFFF;
    #1;
    check("8x4 all ones", int'(sum8x4), 120);
    check("5x8 all ones", int'(sum5x8), 5 * 255);
    check("2x16 all ones", int'(sum2x16), 2 * 65535);
    for (int n = 0; n < 3000; n++) begin
      e8 = 0; e5 = 0; e2 = 0;
      for (int i = 0; i < 8; i++) begin ops8x4[i]  = 4'($urandom);  e8 += int'(ops8x4[i]);  end
      for (int i = 0; i < 5; i++) begin ops5x8[i]  = 8'($urandom);  e5 += int'(ops5x8[i]);  end
      for (int i = 0; i < 2; i++) begin ops2x16[i] = 16'($urandom); e2 += int'(ops2x16[i]); end
      #1;
      check("8x4 random", int'(sum8x4), e8);
      check("5x8 random", int'(sum5x8), e5);
      check("2x16 random", int'(sum2x16), e2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
