// Separable filter framework A1: framework A rearranged so that the
// denominator is separable by structure, whatever the multiplier values:
//   H(z1,z2) = (E_0(z2) + sum_{i>=1} F_i(z2) z1^-i)
//              / ((1 - D_0(z2)) (1 - sum_{i>=1} b_i0 z1^-i)),
//   E_0 = sum_j a_0j z2^-j,  D_0 = sum_{j>=1} b_0j z2^-j,  F_i = sum_j a_ij z2^-j.
//
// Structure (as drawn for framework A1): the bottom row is a sub-block #2 whose
// D_0 output is added to X at the input node U = X + D_0 U (a loop in z2
// only); its E_0 output joins the output sum. U climbs a z^-1 line on the left
// and Y on the right. Rows i >= 1 are sub-blocks #1 with F_i on U and the
// constant G_i = b_i0 on Y; row outputs are joined through (M2-1)-stage shift
// registers (row i delayed i*M2 in total). The two loops do not touch, which
// is what makes the denominator a product of two 1-D polynomials.
//
// Interface: one raster-scan pixel x per clock with en=1; y is the matching
// output pixel, combinational in x. U and Y are saturated to DW bits; b_00 is
// left out. Widths, rounding and saturation are this design's choices.
module framework_a1 #(
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

  logic signed [DW-1:0] u;
  logic signed [AW-1:0] v0, e0;
  logic signed [DW-1:0] ul [1:N];
  logic signed [DW-1:0] yl [1:N];
  logic signed [AW-1:0] row_out [1:N];
  logic signed [AW-1:0] uin [1:N];
  logic signed [AW-1:0] srq [1:N];
  logic signed [CW-1:0] d0 [N+1];
  logic signed [CW-1:0] b_w [1:N][N+1];

  always_comb begin
    for (int j = 0; j <= N; j++) d0[j] = (j == 0) ? '0 : b_col[(j == 0) ? 1 : j];
    for (int i = 1; i <= N; i++)
      for (int j = 0; j <= N; j++) b_w[i][j] = (j == 0) ? b_row[i] : '0;
  end

  sub_block2 #(.N(N), .DW(DW), .CW(CW), .FRAC(FRAC), .AW(AW), .HAS_B0(1'b0)) u_row0 (
    .clk(clk), .rst_n(rst_n), .en(en), .xi(u), .a(a_coef[0]), .b(d0), .vi(v0), .yi(e0)
  );

  assign u = sat(AW'(x) + v0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 1; i <= N; i++) begin
        ul[i] <= '0;
        yl[i] <= '0;
      end
    end else if (en) begin
      for (int i = 1; i <= N; i++) begin
        ul[i] <= (i == 1) ? u : ul[(i == 1) ? 1 : i - 1];
        yl[i] <= (i == 1) ? y : yl[(i == 1) ? 1 : i - 1];
      end
    end
  end

  for (genvar i = 1; i <= N; i++) begin : g_row
    sub_block1 #(.N(N), .DW(DW), .CW(CW), .FRAC(FRAC), .AW(AW), .HAS_W0(1'b1)) u_row (
      .clk(clk), .rst_n(rst_n), .en(en), .xi(ul[i]), .wi(yl[i]),
      .a(a_coef[i]), .b(b_w[i]), .yi(row_out[i])
    );
    assign uin[i] = row_out[i] + ((i < N) ? srq[(i < N) ? i + 1 : i] : '0);
    sf_sr #(.LEN(M2 - 1), .W(AW)) u_sr (
      .clk(clk), .rst_n(rst_n), .en(en), .d(uin[i]), .q(srq[i])
    );
  end

  assign y = sat(e0 + srq[1]);
endmodule
