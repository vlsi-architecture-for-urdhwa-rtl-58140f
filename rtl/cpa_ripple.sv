// cpa_ripple: W-bit ripple-carry adder of full adders, y = (a + b) mod 2^W.
//
// The final carry-propagate adder of the multiplier: it adds the two rows
// left after compression. The carry out of the top bit is dropped, since
// the multiplier's product always fits in W bits. The document does not
// describe this adder; a ripple chain of its full-adder cell is the
// simplest one that does the job. Purely combinational, no clock.
//
// Parameters: W width (default 16, the product width of an 8 x 8 multiply).
// Ports: a, b addends; y sum modulo 2^W.
module cpa_ripple #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y
);
  logic [W:0] c;
  assign c[0] = 1'b0;

  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (.a(a[i]), .b(b[i]), .c(c[i]), .s(y[i]), .co(c[i+1]));
  end

  // The carry out of the top bit has weight 2^W and is not part of y.
  logic unused_cout;
  assign unused_cout = c[W];
endmodule
