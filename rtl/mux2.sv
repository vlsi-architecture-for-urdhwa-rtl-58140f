// mux2: one-bit 2:1 multiplexer, the basic cell of the XOR-XNOR compressor.
//
// y = d1 when s is 1, d0 when s is 0. Purely combinational, no clock.
// The compressor uses it both as a data selector (s is a data-dependent
// XOR) and, with a true/complement pair on d0/d1, as an XOR gate.
//
// Ports: d0, d1 data inputs; s select; y output.
module mux2 (
  input  logic d0,
  input  logic d1,
  input  logic s,
  output logic y
);
  always_comb y = s ? d1 : d0;
endmodule
