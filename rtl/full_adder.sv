// full_adder: one-bit full adder (3:2 counter).
//
// Adds three bits of equal weight: a + b + c = sum + 2*carry. The carry is
// the majority of the three inputs. Used by the 7:2 compressor. Purely
// combinational, no clock.
//
//   a, b, c: operand bits
//   sum    : a ^ b ^ c                 (same weight as the inputs)
//   carry  : ab + bc + ca              (twice the weight)
module full_adder (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic sum,
  output logic carry
);
  always_comb begin
    sum   = a ^ b ^ c;
    carry = (a & b) | (b & c) | (a & c);
  end
endmodule
