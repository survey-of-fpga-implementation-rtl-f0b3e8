// tb_full_adder: exhaustive self-checking test of the full adder.
// For all eight input combinations, checks that sum + 2*carry equals the
// number of input bits that are set.
module tb_full_adder;
  logic a, b, c, sum, carry;
  int checks = 0, failures = 0;

  full_adder dut (.a(a), .b(b), .c(c), .sum(sum), .carry(carry));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if (int'(sum) + 2 * int'(carry) != $countones(v)) begin
        failures++;
        $display("FAIL a=%b b=%b c=%b got sum=%b carry=%b", a, b, c, sum, carry);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
