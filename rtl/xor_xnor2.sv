// xor_xnor2: two-input XOR gate with a complementary XNOR output.
//
// This is the combined XOR-XNOR cell that the proposed 4:2 compressor is
// built from. Producing both polarities at once lets the following 2:1
// multiplexers pick a true or an inverted value without a separate inverter
// in the path. Purely combinational, no clock.
//
//   a, b  : operand bits
//   y_xor : a ^ b
//   y_xnor: ~(a ^ b)
module xor_xnor2 (
  input  logic a,
  input  logic b,
  output logic y_xor,
  output logic y_xnor
);
  always_comb begin
    y_xor  = a ^ b;
    y_xnor = ~(a ^ b);
  end
endmodule
