// half_adder: one-bit half adder.
//
// Adds two bits of equal weight: a + b = sum + 2*carry. Used by the 7:2
// compressor to combine the sum outputs of its two 4:2 compressors.
// Purely combinational, no clock.
//
//   a, b : operand bits
//   sum  : a ^ b       (same weight as the inputs)
//   carry: a & b       (twice the weight)
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);
  always_comb begin
    sum   = a ^ b;
    carry = a & b;
  end
endmodule
