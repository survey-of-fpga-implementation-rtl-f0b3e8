// tb_compressor_7_2: exhaustive self-checking test of the 7:2 compressor.
// For all 512 patterns of x[6:0], cin1, cin2 it checks
//   * the counting identity popcount(x)+cin1+cin2 = sum + 2*carry + 4*(cout1+cout2),
//   * sum against the parity of all nine inputs,
//   * every output against a reference model of the structure written with
//     plain operators (4:2 equations, half adder, two full adders).
module tb_compressor_7_2;
  logic [6:0] x;
  logic cin1, cin2, sum, carry, cout1, cout2;
  int checks = 0, failures = 0;

  compressor_7_2 dut (.x(x), .cin1(cin1), .cin2(cin2),
                      .sum(sum), .carry(carry), .cout1(cout1), .cout2(cout2));

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
      $display("FAIL %s: x=%b cin1=%b cin2=%b -> sum=%b carry=%b cout1=%b cout2=%b",
               what, x, cin1, cin2, sum, carry, cout1, cout2);
    end
  endtask

  // Reference 4:2 compressor: returns {sum, carry, cout}.
  function automatic logic [2:0] ref42(logic a, logic b, logic c, logic d, logic ci);
    logic p;
    p = a ^ b ^ c ^ d;
    return {p ^ ci, p ? ci : d, (a ^ b) ? c : a};
  endfunction

  initial begin
    logic [2:0] ra, rb;
    logic s3, t, e_carry, e_cout1, e_cout2;
    for (int v = 0; v < 512; v++) begin
      {cin2, cin1, x} = 9'(v);
      #1;
      ra = ref42(x[0], x[1], x[2], x[3], cin1);
      rb = ref42(x[4], x[5], x[6], 1'b0, cin2);
      s3 = ra[2] & rb[2];
      t = s3 ^ ra[1] ^ rb[1];
      e_cout1 = (s3 & ra[1]) | (s3 & rb[1]) | (ra[1] & rb[1]);
      e_carry = t ^ ra[0] ^ rb[0];
      e_cout2 = (t & ra[0]) | (t & rb[0]) | (ra[0] & rb[0]);
      check(int'(sum) + 2 * int'(carry) + 4 * (int'(cout1) + int'(cout2)) == $countones(v),
            "count");
      check(sum == ^9'(v), "sum");
      check(carry == e_carry, "carry");
      check(cout1 == e_cout1, "cout1");
      check(cout2 == e_cout2, "cout2");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
