// tb_compressor_4_2: exhaustive self-checking test of the 4:2 compressor.
// For all 32 input patterns it checks
//   * the counting identity x1+x2+x3+x4+cin = sum + 2*(carry + cout),
//   * each output against its defining equation (sum is the five-input
//     parity, carry = parity(x1..x4) ? cin : x4, cout = (x1^x2) ? x3 : x1),
//   * that cout does not change with cin (no rippling carry).
module tb_compressor_4_2;
  logic x1, x2, x3, x4, cin, sum, carry, cout;
  int checks = 0, failures = 0;

  compressor_4_2 dut (.x1(x1), .x2(x2), .x3(x3), .x4(x4), .cin(cin),
                      .sum(sum), .carry(carry), .cout(cout));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: x=%b%b%b%b cin=%b -> sum=%b carry=%b cout=%b",
               what, x1, x2, x3, x4, cin, sum, carry, cout);
    end
  endtask

  initial begin
    logic cout_cin0;
    for (int v = 0; v < 16; v++) begin
      for (int c = 0; c < 2; c++) begin
        {x1, x2, x3, x4} = 4'(v);
        cin = 1'(c);
        #1;
        check(int'(sum) + 2 * (int'(carry) + int'(cout)) == $countones(v) + c, "count");
        check(sum == (^4'(v) ^ cin), "sum");
        check(carry == ((^4'(v)) ? cin : x4), "carry");
        check(cout == ((x1 ^ x2) ? x3 : x1), "cout");
        if (c == 0) cout_cin0 = cout;
        else check(cout == cout_cin0, "cout independent of cin");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
