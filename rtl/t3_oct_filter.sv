// Type-3 octagonal symmetry filter.
//
// A separable-denominator 2-D IIR filter
//   H(z1,z2) = sum a_ij z1^-i z2^-j / ((1 - sum_k b_k z1^-k)(1 - sum_k b_k z2^-k))
// in the Type-3 arrangement: Block 2 (t3_block2) multiplies the input X once
// per coefficient orbit, routes each product to all taps of its orbit, sums
// the taps in transposed row chains and closes the recursion in z1 with the
// b_k0 feedback of its output Y3; Block 1 (t3_block1) then closes the
// recursion in z2, Y = Y3 / (1 - sum b_0k z2^-k). Since every multiplier
// works on the current input or output, the longest path is one multiplier
// and two adders in the drawings (one fewer adder than Type-1). b_k0 = b_0k,
// so one port b_coef feeds both recursions.
// Symmetry: octagonal, a_ij = a_ji = a_(N-i)j; 3 numerator multipliers for N = 3.
//
// Interface: one raster-scan pixel x per clock with en=1 (images M2 pixels
// wide, zero-padded); y is the matching output pixel, combinational in x.
// a_coef is the full (N+1) x (N+1) numerator array, of which only the orbit
// representatives are read. rst_n clears all history.
// Widths, rounding, saturation and the M2-stage row shift registers are this
// design's choices (see t3_block2).
module t3_oct_filter
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
  input  logic signed [DW-1:0] x,
  input  logic signed [CW-1:0] a_coef [N+1][N+1],
  input  logic signed [CW-1:0] b_coef [1:N],
  output logic signed [DW-1:0] y
);
  logic signed [DW-1:0] y3;
  logic signed [CW-1:0] b_full [N+1][N+1];

  // Denominator column b_i0 for Block 2 (other entries unused).
  always_comb begin
    for (int i = 0; i <= N; i++)
      for (int j = 0; j <= N; j++)
        b_full[i][j] = (j == 0 && i != 0) ? b_coef[(i == 0) ? 1 : i] : '0;
  end

  t3_block2 #(.N(N), .M2(M2), .DW(DW), .CW(CW), .FRAC(FRAC), .AW(AW), .MODES(MODES_OSM),
              .FULL_DEN(1'b0)) u_block2 (
    .clk(clk), .rst_n(rst_n), .en(en), .mode(sf_pkg::SYM_DSM), .x(x),
    .a_coef(a_coef), .b_coef(b_full), .y3(y3)
  );

  t3_block1 #(.N(N), .DW(DW), .CW(CW), .FRAC(FRAC), .AW(AW)) u_block1 (
    .clk(clk), .rst_n(rst_n), .en(en), .y3(y3), .b_col(b_coef), .y(y)
  );
endmodule
