// Type-1 separable-denominator 2-D IIR filter (no symmetry):
//   H(z1,z2) = sum_{i,j=0..N} a_ij z1^-i z2^-j
//              / ((1 - sum_i b_i0 z1^-i)(1 - sum_j b_0j z2^-j)),
// realised as Y1 = X + sum_i b_i0 z1^-i Y1 (Block 1) followed by
// Y = sum a_ij z1^-i z2^-j Y1 + sum_j b_0j z2^-j Y (Block 2).
//
// Structure (as drawn for this filter): Block 1 (t1_block1) owns a column of
// (M2-1)-stage shift registers on Y1. Block 2 has one sub-block #1 per row i,
// fed by Y1 delayed i(M2-1); row outputs are joined from the top through one
// z^-1 per row, so row i is delayed i*M2 in total (z1^-i). Row 0's W input is
// Y itself, carrying b_01..b_0N (its b_00 tap is left out), which closes the
// recursion in z2; the other rows use only their X side.
//
// Interface: one raster-scan pixel x per clock with en=1; y is the matching
// output pixel, combinational in x. (N+1)^2 + 2N multipliers.
// Widths, rounding and saturation are this design's choices.
module type1_sepden #(
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
  input  logic signed [CW-1:0] b_row  [1:N],
  input  logic signed [CW-1:0] b_col  [1:N],
  output logic signed [DW-1:0] y
);
  `include "sf_arith.svh"

  logic signed [DW-1:0] y1_col [N+1];
  logic signed [AW-1:0] row_out [N+1];
  logic signed [AW-1:0] chain [1:N];    // z^-1 stages joining the rows
  logic signed [CW-1:0] b_w0 [N+1];     // row 0 W coefficients {-, b_01..b_0N}
  logic signed [CW-1:0] zero_c [N+1];
  logic signed [DW-1:0] zero_d;

  always_comb begin
    for (int j = 0; j <= N; j++) begin
      zero_c[j] = '0;
      b_w0[j]   = (j == 0) ? '0 : b_col[(j == 0) ? 1 : j];
    end
    zero_d = '0;
  end

  t1_block1 #(.N(N), .M2(M2), .DW(DW), .CW(CW), .FRAC(FRAC), .AW(AW)) u_block1 (
    .clk(clk), .rst_n(rst_n), .en(en), .x(x), .b_row(b_row), .y1_col(y1_col)
  );

  sub_block1 #(.N(N), .DW(DW), .CW(CW), .FRAC(FRAC), .AW(AW), .HAS_W0(1'b0)) u_row0 (
    .clk(clk), .rst_n(rst_n), .en(en), .xi(y1_col[0]), .wi(y),
    .a(a_coef[0]), .b(b_w0), .yi(row_out[0])
  );

  for (genvar i = 1; i <= N; i++) begin : g_row
    sub_block1 #(.N(N), .DW(DW), .CW(CW), .FRAC(FRAC), .AW(AW), .HAS_W0(1'b0)) u_row (
      .clk(clk), .rst_n(rst_n), .en(en), .xi(y1_col[i]), .wi(zero_d),
      .a(a_coef[i]), .b(zero_c), .yi(row_out[i])
    );
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)  chain[i] <= '0;
      else if (en) chain[i] <= row_out[i] + ((i < N) ? chain[(i < N) ? i + 1 : i] : '0);
    end
  end

  assign y = sat(row_out[0] + chain[1]);
endmodule
