// tb_urdhwa_multiplier: end-to-end self-checking test of the multiplier at
// its default size (8 x 8 bits).
//
// Applies all 65,536 operand pairs and compares the product with a * b
// computed by the simulator. It also counts how often each mechanism of the
// design is exercised, and counts a failure for any that never happens:
//   * a column holding more than seven partial products, so the 7:2
//     compressor's carry inputs carry operand bits,
//   * a 7:2 compressor setting its second weight-4 output,
//   * a 4:2 compressor receiving cin = 1 from its neighbour,
//   * the final carry-propagate adder propagating a carry.
module tb_urdhwa_multiplier;
  localparam int unsigned W = 8;

  logic [W-1:0]   a, b;
  logic [2*W-1:0] p;
  int checks = 0, failures = 0;
  int n_deep_column = 0, n_c72_cout2 = 0, n_c42_cin = 0, n_final_carry = 0;

  urdhwa_multiplier dut (.a(a), .b(b), .p(p));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference 4:2 compressor: returns {sum, carry, cout}.
  function automatic logic [2:0] ref42(logic x1, logic x2, logic x3, logic x4, logic ci);
    int n;
    logic co;
    n = int'(x1) + int'(x2) + int'(x3) + int'(x4) + int'(ci);
    co = (x1 ^ x2) ? x3 : x1;
    // sum and carry follow from the count once cout is fixed
    return {1'(n & 1), 1'((n - 2 * int'(co)) >> 1), co};
  endfunction

  // Reference model of the column schedule; updates the mechanism counters.
  task automatic model(input logic [W-1:0] ma, input logic [W-1:0] mb);
    logic [8:0]     col;
    logic [2*W+1:0] s7, c7, d7a, d7b, s4, c4, co4;
    logic [2:0]     ra, rb, r4;
    logic           hs3, t;
    s7 = '0; c7 = '0; d7a = '0; d7b = '0; s4 = '0; c4 = '0; co4 = '0;
    for (int k = 0; k < 2 * W; k++) begin
      col = '0;
      for (int i = 0; i < W; i++)
        if (k - i >= 0 && k - i < W) col[i] = ma[i] & mb[k-i];
      if (col[7]) n_deep_column++;
      ra = ref42(col[0], col[1], col[2], col[3], col[7]);
      rb = ref42(col[4], col[5], col[6], 1'b0, col[8]);
      s7[k]  = ra[2] ^ rb[2];
      hs3    = ra[2] & rb[2];
      t      = hs3 ^ ra[1] ^ rb[1];
      d7a[k] = (hs3 & ra[1]) | (hs3 & rb[1]) | (ra[1] & rb[1]);
      c7[k]  = t ^ ra[0] ^ rb[0];
      d7b[k] = (t & ra[0]) | (t & rb[0]) | (ra[0] & rb[0]);
      if (d7b[k]) n_c72_cout2++;
    end
    for (int k = 0; k < 2 * W; k++) begin
      r4 = ref42(s7[k], k >= 1 ? c7[k-1] : 1'b0, k >= 2 ? d7a[k-2] : 1'b0,
                 k >= 2 ? d7b[k-2] : 1'b0, k >= 1 ? co4[k-1] : 1'b0);
      s4[k] = r4[2];
      c4[k] = r4[1];
      co4[k] = r4[0];
      if (k >= 1 && co4[k-1]) n_c42_cin++;
    end
    if ((s4 & (c4 << 1)) != '0) n_final_carry++;
    if ((2*W)'(s4 + (c4 << 1)) != (2*W)'(int'(ma) * int'(mb))) begin
      failures++;
      $display("FAIL reference model is inconsistent for %0d * %0d", ma, mb);
    end
  endtask

  task automatic mechanism(input int count, input string what);
    checks++;
    $display("%-40s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    logic [2*W-1:0] expected;
    for (int i = 0; i < (1 << W); i++) begin
      for (int j = 0; j < (1 << W); j++) begin
        a = W'(i);
        b = W'(j);
        #1;
        expected = (2*W)'(i * j);
        checks++;
        if (p !== expected) begin
          failures++;
          if (failures < 10) $display("FAIL %0d * %0d: got %0d expected %0d", i, j, p, expected);
        end
        model(a, b);
      end
    end
    mechanism(n_deep_column, "column with eight partial products");
    mechanism(n_c72_cout2,   "7:2 second weight-4 output set");
    mechanism(n_c42_cin,     "4:2 carry-in from neighbour");
    mechanism(n_final_carry, "final adder carry propagation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
