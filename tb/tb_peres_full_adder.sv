// tb_peres_full_adder -- exhaustive check of the two-Peres-gate full adder:
// for all eight (a, b, cin), {cout, s} must equal a + b + cin, and the
// garbage outputs must be G1 = a and G2 = a xor b.
module tb_peres_full_adder;

  int checks   = 0;
  int failures = 0;

  logic a, b, cin, g1, g2, s, cout;

  peres_full_adder dut (.a(a), .b(b), .cin(cin), .g1(g1), .g2(g2), .s(s), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int total;
    for (int i = 0; i < 8; i++) begin
      {a, b, cin} = 3'(i);
      #1;
      total = int'(a) + int'(b) + int'(cin);
      checks++;
      if ({cout, s} !== 2'(total)) begin
        failures++;
        $display("FAIL a=%0b b=%0b cin=%0b: cout,s=%02b expected %0d", a, b, cin, {cout, s}, total);
      end
      checks++;
      if (g1 !== a || g2 !== (a != b)) begin
        failures++;
        $display("FAIL garbage a=%0b b=%0b: g1=%0b g2=%0b", a, b, g1, g2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
