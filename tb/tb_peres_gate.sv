// tb_peres_gate -- exhaustive check of the 3x3 Peres gate against its truth
// table, written out row by row (A B C -> P Q R), and a check that the eight
// output patterns are all distinct (the gate is reversible).
module tb_peres_gate;

  int checks   = 0;
  int failures = 0;

  logic a, b, c, p, q, r;

  peres_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  // Expected {P,Q,R} indexed by {A,B,C}.
  localparam logic [2:0] TABLE [8] = '{
    3'b000, 3'b001, 3'b010, 3'b011, 3'b110, 3'b111, 3'b101, 3'b100
  };

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] seen;
    seen = '0;
    for (int i = 0; i < 8; i++) begin
      {a, b, c} = 3'(i);
      #1;
      checks++;
      if ({p, q, r} !== TABLE[i]) begin
        failures++;
        $display("FAIL ABC=%03b: PQR=%03b expected %03b", 3'(i), {p, q, r}, TABLE[i]);
      end
      seen[{p, q, r}] = 1'b1;
    end
    checks++;
    if (seen !== 8'hFF) begin
      failures++;
      $display("FAIL outputs are not a permutation: seen=%08b", seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
