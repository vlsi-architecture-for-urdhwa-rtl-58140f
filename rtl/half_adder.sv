// half_adder: one-bit half adder, a + b = s + 2*co.
//
// Used in the 7:2 compressor to add the sum outputs of its two 4:2
// compressors. Purely combinational, no clock.
//
// Ports: a, b inputs; s = a ^ b; co = a & b.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic co
);
  always_comb begin
    s  = a ^ b;
    co = a & b;
  end
endmodule
