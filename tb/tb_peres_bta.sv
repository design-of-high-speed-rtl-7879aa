// tb_peres_bta -- end-to-end test of the binary tree adder at its default
// size (8 operands of 32 bits, 35-bit sum). It applies the two operand sets
// of the reference waveform (10..80 summing to 360, then c = 44 and g = 97
// summing to 401), extreme operands and random operand sets, and compares
// the sum with a 64-bit software sum. It also counts how often the tree's
// mechanisms occur: a level-0 pair whose sum carries out of the operand width
// (the carry becomes the extra MSB), a carry rippling across a whole 32-bit
// adder, and a final sum that needs the bits above the operand width. Each
// must occur at least once.
module tb_peres_bta;
  localparam int K = 8;
  localparam int W = 32;

  int checks   = 0;
  int failures = 0;
  int n_pair_carry   = 0;
  int n_full_ripple  = 0;
  int n_sum_overflow = 0;

  logic [W-1:0] ops [K];
  logic [W+2:0] sum;

  peres_bta dut (.operands(ops), .sum(sum));

  task automatic apply(string tag);
    longint unsigned exp;
    exp = 0;
    for (int i = 0; i < K; i++) exp += longint'(ops[i]);
    for (int j = 0; j < K / 2; j++) begin
      longint unsigned pair;
      pair = longint'(ops[2*j]) + longint'(ops[2*j+1]);
      if (pair >> W != 0) n_pair_carry++;
      // a carry generated at bit 0 and propagated through bits 1..W-1
      if (ops[2*j][0] & ops[2*j+1][0] && ((ops[2*j] ^ ops[2*j+1]) >> 1) == {1'b0, {(W-1){1'b1}}})
        n_full_ripple++;
    end
    if (exp >> W != 0) n_sum_overflow++;
    #1;
    checks++;
    if (64'(sum) !== exp) begin
      failures++;
      $display("FAIL %s: sum=%0d expected %0d", tag, sum, exp);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Operand sets of the reference waveform.
    for (int i = 0; i < K; i++) ops[i] = W'(10 * (i + 1));
    apply("waveform set 1");
    checks++;
    if (sum !== 35'd360) begin failures++; $display("FAIL waveform set 1 not 360"); end
    ops[2] = 44;
    ops[6] = 97;
    apply("waveform set 2");
    checks++;
    if (sum !== 35'd401) begin failures++; $display("FAIL waveform set 2 not 401"); end

    // Extremes.
    for (int i = 0; i < K; i++) ops[i] = '0;
    apply("all zero");
    for (int i = 0; i < K; i++) ops[i] = '1;
    apply("all ones");
    for (int i = 0; i < K; i++) ops[i] = (i % 2 == 0) ? 32'h0000_0001 : 32'hFFFF_FFFF;
    apply("full ripple");
    for (int i = 0; i < K; i++) ops[i] = 32'h8000_0000;
    apply("msb only");

    // Each single operand alone, to catch a miswired leaf.
    for (int k = 0; k < K; k++) begin
      for (int i = 0; i < K; i++) ops[i] = '0;
      ops[k] = 32'hDEAD_BEEF ^ W'(k);
      apply("single operand");
    end

    // Random operand sets, with some drawn near the top of the range.
    for (int n = 0; n < 3000; n++) begin
      for (int i = 0; i < K; i++)
        ops[i] = (n % 3 == 0) ? ~W'($urandom_range(0, 1000)) : W'($urandom);
      apply("random");
    end

    $display("mechanisms: pair_carry=%0d full_ripple=%0d sum_overflow=%0d",
             n_pair_carry, n_full_ripple, n_sum_overflow);
    checks++;
    if (n_pair_carry == 0 || n_full_ripple == 0 || n_sum_overflow == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
