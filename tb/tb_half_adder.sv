// tb_half_adder: exhaustive self-checking test of the half adder.
// For all four input pairs, checks that sum + 2*carry equals the
// arithmetic sum of the inputs.
module tb_half_adder;
  logic a, b, sum, carry;
  int checks = 0, failures = 0;

  half_adder dut (.a(a), .b(b), .sum(sum), .carry(carry));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if (int'(sum) + 2 * int'(carry) != int'(a) + int'(b)) begin
        failures++;
        $display("FAIL a=%b b=%b got sum=%b carry=%b", a, b, sum, carry);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
