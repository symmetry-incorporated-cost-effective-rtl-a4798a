// Non-separable-denominator 2-D IIR filter with diagonal symmetry, order
// N x N (2 x 2 by default):
//   H(z1,z2) = sum a_ij z1^-i z2^-j / (1 - sum_{(i,j) != (0,0)} b_ij z1^-i z2^-j),
//   a_ij = a_ji,  b_ij = b_ji.
// Diagonal symmetry is the one symmetry that does not need a separable
// denominator for stability, so the full 2-D recursion is kept and both
// polynomials share multipliers between (i,j) and (j,i): N^2 + 3N + 1
// multipliers (11 for N = 2) instead of 2N^2 + 4N + 1.
//
// Structure: one multiplier per numerator orbit on the current X and one per
// denominator orbit on the current Y; each product is fanned out to the taps
// of its orbit, summed in transposed row chains and rows are joined through
// line shift registers (the Type-3 Block-2 core, t3_block2, with its
// non-separable feedback option).
//
// Interface: one raster-scan pixel x per clock with en=1; y is the matching
// output pixel, combinational in x. Only a_ij and b_ij with i <= j are read;
// b_00 is unused. Widths, rounding, saturation and the M2-stage row shift
// registers (row-input delays absorbed) are this design's choices.
module nonsep_diag_filter
  import sf_pkg::*;
#(
  parameter int N    = 2,
  parameter int M2   = 256,
  parameter int DW   = 16,
  parameter int CW   = 16,
  parameter int FRAC = 14,
  parameter int AW   = DW + CW + 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic signed [DW-1:0] x,
  input  logic signed [CW-1:0] a_coef [N+1][N+1],
  input  logic signed [CW-1:0] b_coef [N+1][N+1],
  output logic signed [DW-1:0] y
);
  t3_block2 #(.N(N), .M2(M2), .DW(DW), .CW(CW), .FRAC(FRAC), .AW(AW), .MODES(MODES_DSM),
              .FULL_DEN(1'b1)) u_core (
    .clk(clk), .rst_n(rst_n), .en(en), .mode(SYM_DSM), .x(x),
    .a_coef(a_coef), .b_coef(b_coef), .y3(y)
  );
endmodule
