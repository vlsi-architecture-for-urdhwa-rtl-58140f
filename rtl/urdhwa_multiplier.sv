// urdhwa_multiplier: unsigned N x N multiplier in the Urdhwa Tiryagbhyam
// ("vertically and crosswise") style, with compressor-based column sums.
//
// Urdhwa multiplication forms, for every product column k, all crosswise
// bit products a[j] & b[i] with i + j = k at once, and sums each column
// together with the carries arriving from the lower columns. Here the
// column sums are done by compressors:
//   stage 1  one 7:2 compressor per column takes the products of rows
//            b[0]..b[6]; its sum stays in the column, its carry goes to
//            column k+1, and its two carry-outs go to the carry-ins of
//            column k+2.
//   stage 2  one XOR-XNOR 4:2 compressor per column takes the stage-1 sum
//            and carry bits of the column and the product of row b[7]
//            (for N = 8); its sum stays, its carry goes to column k+1 and
//            its carry-out to the carry-in of column k+1.
//   stage 3  a ripple-carry adder adds the two remaining rows.
// The compressor cells and the choice of XOR-XNOR 4:2 and 7:2 compressors
// come from the document. It does not describe how the multiplier wires
// them, nor the operand width: the two-stage arrangement, the final
// ripple adder and N = 8 are this design's own choices. Stage 1 accepts
// up to seven rows and stage 2 one more, so N may be 2 to 8. Bits of
// weight 2^(2N) or more are dropped; the product always fits in 2N bits.
//
// Purely combinational, no clock, no reset: p follows a and b after the
// propagation delay.
// Parameters: N operand width (default 8, range 2..8).
// Ports: a, b unsigned operands; p = a * b.
module urdhwa_multiplier #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  localparam int unsigned W = 2 * N;   // product width = number of columns

  if (N < 2 || N > 8) begin : g_bad_width
    $error("urdhwa_multiplier: N must be between 2 and 8");
  end

  // ---------------------------------------------------------------
  // Crosswise products: col[k][i] = a[k-i] & b[i], row i of column k.
  // ---------------------------------------------------------------
  logic [7:0] col [W];

  for (genvar k = 0; k < W; k++) begin : g_col
    for (genvar i = 0; i < 8; i++) begin : g_row
      if (i < N && k >= i && k - i < N) begin : g_pp
        assign col[k][i] = a[k-i] & b[i];
      end else begin : g_zero
        assign col[k][i] = 1'b0;
      end
    end
  end

  // ---------------------------------------------------------------
  // Stage 1: a row of 7:2 compressors over rows 0..6.
  // ---------------------------------------------------------------
  logic [W-1:0] s1_sum;      // weight 2^k
  logic [W:0]   s1_carry;    // s1_carry[k+1] has weight 2^(k+1)
  logic [W+1:0] s1_co1;      // s1_co1[k+2] has weight 2^(k+2)
  logic [W+1:0] s1_co2;

  assign s1_carry[0] = 1'b0;
  assign s1_co1[1:0] = 2'b00;
  assign s1_co2[1:0] = 2'b00;

  for (genvar k = 0; k < W; k++) begin : g_s1
    compressor_7to2 u_c72 (
      .x    (col[k][6:0]),
      .cin1 (s1_co1[k]),
      .cin2 (s1_co2[k]),
      .sum  (s1_sum[k]),
      .carry(s1_carry[k+1]),
      .cout1(s1_co1[k+2]),
      .cout2(s1_co2[k+2])
    );
  end

  // ---------------------------------------------------------------
  // Stage 2: a row of XOR-XNOR 4:2 compressors.
  // ---------------------------------------------------------------
  logic [W-1:0] s2_sum;
  logic [W:0]   s2_carry;
  logic [W:0]   s2_co;

  assign s2_carry[0] = 1'b0;
  assign s2_co[0]    = 1'b0;

  for (genvar k = 0; k < W; k++) begin : g_s2
    compressor_4to2 u_c42 (
      .x1   (s1_sum[k]),
      .x2   (s1_carry[k]),
      .x3   (col[k][7]),
      .x4   (1'b0),
      .cin  (s2_co[k]),
      .sum  (s2_sum[k]),
      .carry(s2_carry[k+1]),
      .cout (s2_co[k+1])
    );
  end

  // ---------------------------------------------------------------
  // Stage 3: carry-propagate addition of the last two rows.
  // ---------------------------------------------------------------
  cpa_ripple #(.W(W)) u_cpa (
    .a(s2_sum),
    .b(s2_carry[W-1:0]),
    .y(p)
  );

  // Bits pushed beyond the top column have weight 2^W or more.
  logic unused_overflow;
  assign unused_overflow = ^{s1_carry[W], s1_co1[W+1:W], s1_co2[W+1:W],
                             s2_carry[W], s2_co[W]};
endmodule
