// xor_xnor: two-input XOR-XNOR cell.
//
// Gives the exclusive-OR of its inputs and, from the same cell, the
// complement (exclusive-NOR). Having both rails lets the 4:2 compressor
// drive its multiplexers with a true/complement pair instead of adding a
// separate inverter. Purely combinational, no clock.
//
// The cell name and its use in pairs come from the compressor diagram;
// the document does not give the transistor-level circuit, so the cell is
// written behaviourally as two gates.
//
// Ports: a, b inputs; x = a ^ b; xn = ~(a ^ b).
module xor_xnor (
  input  logic a,
  input  logic b,
  output logic x,
  output logic xn
);
  always_comb begin
    x  = a ^ b;
    xn = ~(a ^ b);
  end
endmodule
