// Type-1 multimode 2-D IIR symmetry filter (the fabricated design of this family).
//
// A separable-denominator 2-D IIR filter
//   H(z1,z2) = sum a_ij z1^-i z2^-j / ((1 - sum_k b_k z1^-k)(1 - sum_k b_k z2^-k))
// in the Type-1 arrangement: Block 1 (t1_block1) realises Y1 = X / (1 - sum b_k z1^-k)
// and owns the line shift-register column; Block 2 (t1_block2) adds the Y1
// samples that share a coefficient, multiplies each group once and closes the
// 1-D recursion in z2. The separable denominator keeps the filter BIBO-stable
// whenever the 1-D polynomial is stable, whatever the numerator, and the
// symmetry constraint b_k0 = b_0k lets one coefficient port b_coef serve both
// 1-D recursions (two multiplier sets, same values).
// Modes (input mode): DSM diagonal a_ij = a_ji, FRSM four-fold rotational
// a_ij = a_j(N-i), QSM quadrantal a_ij = a_(N-i)j, OSM octagonal (both).
// One set of multipliers, the union of the four modes' sets (11 numerator
// multipliers for N = 3, 17 with the six b multipliers), serves all four modes;
// interconnection boxes inside the Block-2 core connect or disconnect each
// signal path according to the mode. Change the mode between frames and
// pulse rst_n.
//
// Interface: one raster-scan pixel x per clock with en=1 (images M2 pixels
// wide, zero-padded); y is the matching output pixel, combinational in x.
// a_coef is the full (N+1) x (N+1) numerator array, of which only the orbit
// representatives are read. rst_n clears all history.
// Timing and structure follow the document; widths, rounding, saturation and
// the single-tree output adder are this design's choices (see t1_block2).
module t1_multimode_filter
  import sf_pkg::*;
#(
  parameter int N    = 3,
  parameter int M2   = 256,
  parameter int DW   = 16,
  parameter int CW   = 16,
  parameter int FRAC = 14,
  parameter int AW   = DW + CW + 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  sf_pkg::sym_mode_e   mode,
  input  logic signed [DW-1:0] x,
  input  logic signed [CW-1:0] a_coef [N+1][N+1],
  input  logic signed [CW-1:0] b_coef [1:N],
  output logic signed [DW-1:0] y
);
  logic signed [DW-1:0] y1_col [N+1];

  t1_block1 #(.N(N), .M2(M2), .DW(DW), .CW(CW), .FRAC(FRAC), .AW(AW)) u_block1 (
    .clk(clk), .rst_n(rst_n), .en(en), .x(x), .b_row(b_coef), .y1_col(y1_col)
  );

  t1_block2 #(.N(N), .M2(M2), .DW(DW), .CW(CW), .FRAC(FRAC), .AW(AW), .MODES(MODES_ALL)) u_block2 (
    .clk(clk), .rst_n(rst_n), .en(en), .mode(mode), .y1_col(y1_col),
    .a_coef(a_coef), .b_col(b_coef), .y(y)
  );
endmodule
