// tb_peres_rca -- checks the ripple carry adder at its default width (32
// bits) with corner cases (a carry rippling the whole width, all ones, both
// carry-in values) and random operands, and a 4-bit instance exhaustively
// (all 512 combinations of a, b, cin). Reference: the built-in + operator.
module tb_peres_rca;

  int checks   = 0;
  int failures = 0;

  logic [31:0] a32, b32, s32;
  logic        cin32, cout32;
  logic [3:0]  a4, b4, s4;
  logic        cin4, cout4;

  peres_rca dut32 (.a(a32), .b(b32), .cin(cin32), .s(s32), .cout(cout32));
  peres_rca #(.WIDTH(4)) dut4 (.a(a4), .b(b4), .cin(cin4), .s(s4), .cout(cout4));

  task automatic check32(logic [31:0] x, logic [31:0] y, logic ci);
    logic [32:0] exp;
    a32 = x; b32 = y; cin32 = ci;
    #1;
    exp = {1'b0, x} + {1'b0, y} + 33'(ci);
    checks++;
    if ({cout32, s32} !== exp) begin
      failures++;
      $display("FAIL 32b %h + %h + %0b = %h expected %h", x, y, ci, {cout32, s32}, exp);
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
    check32(32'h0, 32'h0, 1'b0);
    check32(32'h0, 32'h0, 1'b1);
    check32(32'hFFFF_FFFF, 32'h0, 1'b1);        // carry through all 32 bits
    check32(32'hFFFF_FFFF, 32'h1, 1'b0);
    check32(32'hFFFF_FFFF, 32'hFFFF_FFFF, 1'b1);
    check32(32'h8000_0000, 32'h8000_0000, 1'b0);
    check32(32'h5555_5555, 32'hAAAA_AAAA, 1'b1);
    check32(32'd10, 32'd20, 1'b0);
    for (int i = 0; i < 2000; i++)
      check32($urandom, $urandom, 1'($urandom));
    for (int i = 0; i < 512; i++) begin
      {a4, b4, cin4} = 9'(i);
      #1;
      checks++;
      if ({cout4, s4} !== 5'(int'(a4) + int'(b4) + int'(cin4))) begin
        failures++;
        $display("FAIL 4b %0d + %0d + %0d = %0d", a4, b4, cin4, {cout4, s4});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
