// Filter framework A: a general (non-separable) 2-D IIR filter
//   H(z1,z2) = sum_i F_i(z2) z1^-i / (1 - sum_i G_i(z2) z1^-i),
//   F_i = sum_j a_ij z2^-j,  G_i = sum_j b_ij z2^-j,  b_00 = 0,
// built from N+1 sub-blocks #1 without any signal broadcast to all rows.
//
// Structure (as drawn for framework A): X climbs a z^-1 line on the left and Y
// a z^-1 line on the right, one delay per row, so row i sees X and Y delayed i.
// Row i is a sub-block #1 realising F_i (X side) and G_i (W side). The row
// outputs are joined from the top through (M2-1)-stage shift registers, so
// row i's contribution is delayed i + i(M2-1) = i*M2 samples, i.e. z1^-i.
// Row 0 drops its b_00 tap so Y has no delay-free loop.
//
// Interface: one raster-scan pixel x per clock with en=1; y is the matching
// output pixel, combinational in x; b_coef[0][0] is unused.
// Widths, rounding and saturation of Y are this design's choices.
module framework_a #(
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
  input  logic signed [CW-1:0] b_coef [N+1][N+1],
  output logic signed [DW-1:0] y
);
  `include "sf_arith.svh"

  logic signed [DW-1:0] xl [1:N];
  logic signed [DW-1:0] yl [1:N];
  logic signed [AW-1:0] row_out [N+1];
  logic signed [AW-1:0] uin [1:N];
  logic signed [AW-1:0] srq [1:N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 1; i <= N; i++) begin
        xl[i] <= '0;
        yl[i] <= '0;
      end
    end else if (en) begin
      for (int i = 1; i <= N; i++) begin
        xl[i] <= (i == 1) ? x : xl[(i == 1) ? 1 : i - 1];
        yl[i] <= (i == 1) ? y : yl[(i == 1) ? 1 : i - 1];
      end
    end
  end

  sub_block1 #(.N(N), .DW(DW), .CW(CW), .FRAC(FRAC), .AW(AW), .HAS_W0(1'b0)) u_row0 (
    .clk(clk), .rst_n(rst_n), .en(en), .xi(x), .wi(y),
    .a(a_coef[0]), .b(b_coef[0]), .yi(row_out[0])
  );

  for (genvar i = 1; i <= N; i++) begin : g_row
    sub_block1 #(.N(N), .DW(DW), .CW(CW), .FRAC(FRAC), .AW(AW), .HAS_W0(1'b1)) u_row (
      .clk(clk), .rst_n(rst_n), .en(en), .xi(xl[i]), .wi(yl[i]),
      .a(a_coef[i]), .b(b_coef[i]), .yi(row_out[i])
    );
    assign uin[i] = row_out[i] + ((i < N) ? srq[(i < N) ? i + 1 : i] : '0);
    sf_sr #(.LEN(M2 - 1), .W(AW)) u_sr (
      .clk(clk), .rst_n(rst_n), .en(en), .d(uin[i]), .q(srq[i])
    );
  end

  assign y = sat(row_out[0] + srq[1]);
endmodule
