// full_adder: one-bit full adder, a + b + c = s + 2*co.
//
// Used in the 7:2 compressor to merge carry bits and in the final
// carry-propagate adder of the multiplier. Purely combinational, no clock.
//
// Ports: a, b, c inputs; s = a ^ b ^ c; co = majority(a, b, c).
module full_adder (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic s,
  output logic co
);
  always_comb begin
    s  = a ^ b ^ c;
    co = (a & b) | (b & c) | (a & c);
  end
endmodule
