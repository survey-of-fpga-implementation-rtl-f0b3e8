// compressor_7_2: 7:2 compressor made of two 4:2 compressors, a half adder
// and two full adders.
//
// Counts seven input bits x[6:0] and two carry bits cin1, cin2, all of the
// same weight:
//     popcount(x) + cin1 + cin2 = sum + 2*carry + 4*(cout1 + cout2)
// Structure:
//   * 4:2 compressor A adds x[3:0] with cin1      -> S1, C1 (carry), C2 (cout)
//   * 4:2 compressor B adds x[6:4], 0 with cin2   -> S2, C21 (carry), C22 (cout)
//   * half adder on S1, S2                          -> sum = S1^S2, S3
//   * full adder 1 on S3, C1, C21                   -> T, C3
//   * full adder 2 on T, C2, C22                    -> carry, C4
//   * cout1 = C3, cout2 = C4 (both of weight 4)
// The two 4:2 compressors, the half adder giving sum = S1^S2 and the first
// full adder on S3, C1, C21 follow the published 7:2 compressor. There the
// second full adder adds C3 to C2 and C22; but C3 carries twice the weight of
// C2 and C22, so the count would be lost whenever C3 is set. Here the second
// full adder instead takes the first one's sum bit together with C2 and C22,
// which keeps the identity above exact; carry is therefore the parity of
// S3, C1, C21, C2 and C22 rather than of S3, C1, C21 alone. The unused fourth
// input of compressor B is tied to 0, as the block takes seven bits and two
// carries. Purely combinational, no clock.
module compressor_7_2 (
  input  logic [6:0] x,      // seven operand bits
  input  logic       cin1,   // carry in, into compressor A
  input  logic       cin2,   // carry in, into compressor B
  output logic       sum,    // weight 1
  output logic       carry,  // weight 2
  output logic       cout1,  // weight 4
  output logic       cout2   // weight 4
);
  logic s1, c1, c2;     // compressor A: sum, carry, cout
  logic s2, c21, c22;   // compressor B: sum, carry, cout
  logic s3;             // half adder carry
  logic t;              // full adder 1 sum

  compressor_4_2 u_c42_a (.x1(x[0]), .x2(x[1]), .x3(x[2]), .x4(x[3]), .cin(cin1),
                          .sum(s1), .carry(c1), .cout(c2));
  compressor_4_2 u_c42_b (.x1(x[4]), .x2(x[5]), .x3(x[6]), .x4(1'b0), .cin(cin2),
                          .sum(s2), .carry(c21), .cout(c22));

  half_adder u_ha  (.a(s1), .b(s2), .sum(sum), .carry(s3));
  full_adder u_fa1 (.a(s3), .b(c1), .c(c21), .sum(t), .carry(cout1));
  full_adder u_fa2 (.a(t),  .b(c2), .c(c22), .sum(carry), .carry(cout2));
endmodule
