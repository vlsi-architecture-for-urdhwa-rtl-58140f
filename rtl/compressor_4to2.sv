// compressor_4to2: 4:2 compressor built from XOR-XNOR cells and 2:1 muxes.
//
// Adds four bits of one column and a carry-in from the next less
// significant compressor:  x1 + x2 + x3 + x4 + cin = sum + 2*(carry + cout).
// cout does not depend on cin, so a row of these compressors chained
// through cin/cout has no ripple path longer than one cell.
//
// Structure (follows the document's XOR-XNOR compressor):
//   cell A: p = x1 ^ x2 and its complement pn
//   cell B: q = x3 ^ x4 and its complement qn
//   cout  = p ? x3 : x1                 (mux selected by p)
//   t     = q ? pn : p   = x1^x2^x3^x4 (mux selected by q)
//   carry = t ? cin : x4                (mux selected by t)
//   sum   = cin ? tn : t = t ^ cin      (mux selected by cin)
// The document's own choice is this use of muxes in place of XOR gates,
// which takes the XOR-XNOR pair (x1,x2) as the select of the cout mux
// and of the parity path. This design's own choice: the complement tn
// of the four-input parity is made by a second mux fed with the opposite
// rails (tn = q ? p : pn), so that the sum mux is a mux with a
// true/complement data pair, like the parity mux.
//
// Purely combinational, no clock.
// Ports: x1..x4 column bits (weight 1); cin carry-in (weight 1);
//        sum (weight 1); carry and cout (weight 2 each).
module compressor_4to2 (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  input  logic cin,
  output logic sum,
  output logic carry,
  output logic cout
);
  logic p, pn, q, qn, t, tn;

  xor_xnor u_xx12 (.a(x1), .b(x2), .x(p), .xn(pn));
  xor_xnor u_xx34 (.a(x3), .b(x4), .x(q), .xn(qn));

  // Carry-out to the next column: x1 when x1 == x2 (both agree), else x3.
  mux2 u_mux_cout  (.d0(x1), .d1(x3), .s(p), .y(cout));

  // Parity of the four inputs and its complement.
  mux2 u_mux_t     (.d0(p),  .d1(pn), .s(q), .y(t));
  mux2 u_mux_tn    (.d0(pn), .d1(p),  .s(q), .y(tn));

  // Carry: cin when an odd number of x are set, else x4.
  mux2 u_mux_carry (.d0(x4), .d1(cin), .s(t), .y(carry));

  // Sum: parity of all five inputs.
  mux2 u_mux_sum   (.d0(t),  .d1(tn), .s(cin), .y(sum));

  // qn is the unused rail of cell B; q alone steers the parity muxes.
  logic unused_qn;
  assign unused_qn = qn;
endmodule
