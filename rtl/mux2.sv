// mux2: one-bit 2:1 multiplexer.
//
// The selecting element of the multiplexer-based 4:2 compressor. When sel is
// 0 the output follows d0, when sel is 1 it follows d1. Purely
// combinational, no clock.
//
//   d0, d1: data inputs
//   sel   : select
//   y     : sel ? d1 : d0
module mux2 (
  input  logic d0,
  input  logic d1,
  input  logic sel,
  output logic y
);
  always_comb y = sel ? d1 : d0;
endmodule
