// tb_xor_xnor2: exhaustive self-checking test of the XOR-XNOR cell.
// Applies all four input pairs and compares both outputs with the
// truth table of XOR and of its complement.
module tb_xor_xnor2;
  logic a, b, y_xor, y_xnor;
  int checks = 0, failures = 0;

  xor_xnor2 dut (.a(a), .b(b), .y_xor(y_xor), .y_xnor(y_xnor));

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
      if (y_xor !== (a != b)) begin
        failures++;
        $display("FAIL xor a=%b b=%b got %b", a, b, y_xor);
      end
      checks++;
      if (y_xnor !== (a == b)) begin
        failures++;
        $display("FAIL xnor a=%b b=%b got %b", a, b, y_xnor);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
