// compressor_7to2: 7:2 compressor from two 4:2 compressors, a half adder
// and two full adders.
//
// Adds seven bits of one column and two carry-ins:
//   x[0] + ... + x[6] + cin1 + cin2 = sum + 2*carry + 4*(cout1 + cout2)
// In a row of these compressors, cout1/cout2 of column k feed cin1/cin2
// of column k+2.
//
// Structure:
//   R = 4:2(x[0], x[1], x[2], x[3], cin = cin1) -> S1, C1 (carry), C2 (cout)
//   L = 4:2(x[4], x[5], x[6], 0,    cin = cin2) -> S2, C21 (carry), C22 (cout)
//   HA(S1, S2)            -> sum = S1 ^ S2,  S3 (weight 2)
//   FA(S3, C1, C21)       -> K = S3 ^ C1 ^ C21 (weight 2), C3 (weight 4)
//   FA(K, C2, C22)        -> carry (weight 2), cout2 (weight 4)
//   cout1 = C3
// The cell count (two 4:2, one HA, two FA), the sum equation and the
// first full adder follow the document. The document's last full adder
// adds C3 to the two compressor carry-outs C2 and C22 as equals, but C3
// is worth twice as much as they are; here the last full adder instead
// takes K (the first full adder's sum) with C2 and C22, and C3 leaves the
// cell directly as cout1. This keeps the column sum exact. The ninth
// compressor input, left free by seven bits plus two carry-ins, is tied
// to 0 (x4 of the second 4:2 compressor).
//
// Purely combinational, no clock.
// Ports: x[6:0] column bits (weight 1); cin1, cin2 carry-ins (weight 1);
//        sum (weight 1); carry (weight 2); cout1, cout2 (weight 4).
module compressor_7to2 (
  input  logic [6:0] x,
  input  logic       cin1,
  input  logic       cin2,
  output logic       sum,
  output logic       carry,
  output logic       cout1,
  output logic       cout2
);
  logic s1, c1, c2;     // right 4:2 compressor
  logic s2, c21, c22;   // left 4:2 compressor
  logic s3;             // half-adder carry
  logic k, c3;          // first full adder

  compressor_4to2 u_c42_r (
    .x1(x[0]), .x2(x[1]), .x3(x[2]), .x4(x[3]), .cin(cin1),
    .sum(s1), .carry(c1), .cout(c2)
  );
  compressor_4to2 u_c42_l (
    .x1(x[4]), .x2(x[5]), .x3(x[6]), .x4(1'b0), .cin(cin2),
    .sum(s2), .carry(c21), .cout(c22)
  );

  half_adder u_ha  (.a(s1), .b(s2), .s(sum), .co(s3));
  full_adder u_fa1 (.a(s3), .b(c1), .c(c21), .s(k), .co(c3));
  full_adder u_fa2 (.a(k),  .b(c2), .c(c22), .s(carry), .co(cout2));

  assign cout1 = c3;
endmodule
