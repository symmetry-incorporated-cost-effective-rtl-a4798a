// Type-3 separable-denominator 2-D IIR filter (no symmetry):
//   H(z1,z2) = sum_{i,j=0..N} a_ij z1^-i z2^-j
//              / ((1 - sum_i b_i0 z1^-i)(1 - sum_j b_0j z2^-j)),
// realised as Y3 = sum a_ij z1^-i z2^-j X + sum_i b_i0 z1^-i Y3 (Block 2)
// followed by Y = Y3 + sum_j b_0j z2^-j Y (Block 1, t3_block1).
//
// Structure (as drawn for this filter): X climbs a z^-1 line on the left and
// Y3 a z^-1 line on the right, one delay per row. Row 0 is a sub-block #3
// (a_00..a_0N); row i >= 1 is a sub-block #1 whose X input is X delayed i and
// whose W input is Y3 delayed i carrying only b_i0. Row outputs are joined from
// the top through (M2-1)-stage shift registers, so row i is delayed
// i + i(M2-1) = i*M2 (z1^-i).
//
// Interface: one raster-scan pixel x per clock with en=1; y is the matching
// output pixel, combinational in x. Widths, rounding and saturation are this
// design's choices.
module type3_sepden #(
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

  logic signed [DW-1:0] xl [1:N];        // X delayed i
  logic signed [DW-1:0] yl [1:N];        // Y3 delayed i
  logic signed [DW-1:0] y3;
  logic signed [AW-1:0] row_out [N+1];
  logic signed [AW-1:0] uin [1:N];
  logic signed [AW-1:0] srq [1:N];
  logic signed [CW-1:0] b_w [1:N][N+1];  // row i W coefficients {b_i0, 0, ...}

  always_comb begin
    for (int i = 1; i <= N; i++)
      for (int j = 0; j <= N; j++) b_w[i][j] = (j == 0) ? b_row[i] : '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 1; i <= N; i++) begin
        xl[i] <= '0;
        yl[i] <= '0;
      end
    end else if (en) begin
      for (int i = 1; i <= N; i++) begin
        xl[i] <= (i == 1) ? x  : xl[(i == 1) ? 1 : i - 1];
        yl[i] <= (i == 1) ? y3 : yl[(i == 1) ? 1 : i - 1];
      end
    end
  end

  sub_block3 #(.N(N), .DW(DW), .CW(CW), .FRAC(FRAC), .AW(AW)) u_row0 (
    .clk(clk), .rst_n(rst_n), .en(en), .xi(x), .p(a_coef[0]), .yi(row_out[0])
  );

  for (genvar i = 1; i <= N; i++) begin : g_row
    sub_block1 #(.N(N), .DW(DW), .CW(CW), .FRAC(FRAC), .AW(AW), .HAS_W0(1'b1)) u_row (
      .clk(clk), .rst_n(rst_n), .en(en), .xi(xl[i]), .wi(yl[i]),
      .a(a_coef[i]), .b(b_w[i]), .yi(row_out[i])
    );
    assign uin[i] = row_out[i] + ((i < N) ? srq[(i < N) ? i + 1 : i] : '0);
    sf_sr #(.LEN(M2 - 1), .W(AW)) u_sr (
      .clk(clk), .rst_n(rst_n), .en(en), .d(uin[i]), .q(srq[i])
    );
  end

  assign y3 = sat(row_out[0] + srq[1]);

  t3_block1 #(.N(N), .DW(DW), .CW(CW), .FRAC(FRAC), .AW(AW)) u_block1 (
    .clk(clk), .rst_n(rst_n), .en(en), .y3(y3), .b_col(b_col), .y(y)
  );
endmodule
