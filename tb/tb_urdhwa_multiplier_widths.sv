// tb_urdhwa_multiplier_widths: self-checking test of the multiplier at
// other operand widths: 2 and 4 bits exhaustively, and 9 bits (the largest
// width whose columns fit one 7:2 compressor) with 20,000 random operand
// pairs plus the extreme values.
module tb_urdhwa_multiplier_widths;
  logic [1:0]  a2, b2;
  logic [3:0]  p2;
  logic [3:0]  a4, b4;
  logic [7:0]  p4;
  logic [8:0]  a9, b9;
  logic [17:0] p9;
  int checks = 0, failures = 0;

  urdhwa_multiplier #(.WIDTH(2)) dut2 (.a(a2), .b(b2), .p(p2));
  urdhwa_multiplier #(.WIDTH(4)) dut4 (.a(a4), .b(b4), .p(p4));
  urdhwa_multiplier #(.WIDTH(9)) dut9 (.a(a9), .b(b9), .p(p9));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int unsigned got, input int unsigned exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        a2 = 2'(i); b2 = 2'(j); #1;
        check(p2, i * j, "2x2");
      end
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        a4 = 4'(i); b4 = 4'(j); #1;
        check(p4, i * j, "4x4");
      end
    a9 = '1; b9 = '1; #1;
    check(p9, 511 * 511, "9x9 max");
    for (int n = 0; n < 20000; n++) begin
      a9 = 9'($urandom); b9 = 9'($urandom); #1;
      check(p9, int'(a9) * int'(b9), "9x9");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
