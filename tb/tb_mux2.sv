// tb_mux2: exhaustive self-checking test of the 2:1 multiplexer.
// Applies all eight input combinations and checks that the output equals
// d1 when sel is set and d0 otherwise.
module tb_mux2;
  logic d0, d1, sel, y;
  int checks = 0, failures = 0;

  mux2 dut (.d0(d0), .d1(d1), .sel(sel), .y(y));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {sel, d1, d0} = 3'(v);
      #1;
      checks++;
      if (y !== (v >= 4 ? ((v >> 1) & 1) : (v & 1))) begin
        failures++;
        $display("FAIL sel=%b d1=%b d0=%b got %b", sel, d1, d0, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
