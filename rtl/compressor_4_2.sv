// compressor_4_2: 4:2 compressor built from XOR-XNOR cells and multiplexers.
//
// Adds four bits x1..x4 and a carry-in of equal weight:
//     x1 + x2 + x3 + x4 + cin = sum + 2*(carry + cout)
// Two XOR-XNOR cells form x1^x2 and x3^x4 together with their complements.
// A multiplexer steered by x3^x4 picks x1^x2 or its complement, giving the
// four-input parity p = x1^x2^x3^x4 (a second one gives ~p). The outputs are
// then all multiplexers:
//     cout  = (x1^x2) ? x3  : x1     (independent of cin)
//     carry = p       ? cin : x4
//     sum   = cin     ? ~p  : p      (= p ^ cin)
// Because cout does not depend on cin, a row of these compressors chained
// cout -> cin of the next more significant one has no rippling carry.
//
// The arrangement (XOR-XNOR cells, multiplexers for cout, carry and sum, the
// sum multiplexer selected by the early-arriving cin) follows the published
// XOR-XNOR architecture. The multiplexer data inputs of cout and the second
// multiplexer that makes ~p are this design's choices, taken so that the
// counting identity above holds for all 32 input patterns.
// Purely combinational, no clock.
module compressor_4_2 (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  input  logic cin,    // from the cout of the next less significant compressor
  output logic sum,    // weight 1
  output logic carry,  // weight 2
  output logic cout    // weight 2, to the cin of the next more significant compressor
);
  logic p12, n12, p34, n34;  // x1^x2, ~(x1^x2), x3^x4, ~(x3^x4)
  logic p1234, n1234;        // x1^x2^x3^x4 and its complement

  xor_xnor2 u_xx12 (.a(x1), .b(x2), .y_xor(p12), .y_xnor(n12));
  xor_xnor2 u_xx34 (.a(x3), .b(x4), .y_xor(p34), .y_xnor(n34));

  // Four-input parity and its complement.
  mux2 u_mux_p (.d0(p12), .d1(n12), .sel(p34), .y(p1234));
  mux2 u_mux_n (.d0(n12), .d1(p12), .sel(p34), .y(n1234));

  // Outputs.
  mux2 u_mux_cout  (.d0(x1),    .d1(x3),    .sel(p12),   .y(cout));
  mux2 u_mux_carry (.d0(x4),    .d1(cin),   .sel(p1234), .y(carry));
  mux2 u_mux_sum   (.d0(p1234), .d1(n1234), .sel(cin),   .y(sum));

  // n34 is the cell's complementary output; the parity multiplexers only need
  // the x3^x4 polarity as their select.
  logic unused_n34;
  assign unused_n34 = n34;
endmodule
