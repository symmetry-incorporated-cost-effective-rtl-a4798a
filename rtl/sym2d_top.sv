// Top level: the family of 2-D IIR filter structures for raster-scanned
// images, side by side on one input pixel stream.
//
// Every structure filters the same stream x (one pixel per clock with en=1,
// images M2 pixels wide, rows zero-padded) with its own coefficients and
// drives its own output. The structures are:
//   t1_multimode  Type-1 multimode symmetry filter (diagonal, four-fold
//                 rotational, quadrantal or octagonal by mode_t1); the main
//                 design of the family
//   t3_multimode  Type-3 multimode symmetry filter (mode_t3)
//   t1_diag, t1_frsm, t1_quad, t1_oct   Type-1 single-symmetry filters
//   t3_diag, t3_frsm, t3_quad, t3_oct   Type-3 single-symmetry filters
//   type1_sepden, type3_sepden          separable-denominator filters without
//                                       symmetry (br = b_i0, bc = b_0j)
//   framework_a   general non-separable filter from sub-blocks #1
//   framework_a1  separable framework from sub-blocks #1 and #2
//   nonsep        order NNS x NNS non-separable filter with diagonal symmetry
// All outputs are combinational in x (the a_00 path has no delay); sample them
// on the clock edge that accepts x. rst_n clears every filter's history; a
// multimode filter's mode should change only between frames, with rst_n.
// Running the structures side by side on one stream is this design's choice;
// each one is defined in its own module.
module sym2d_top
  import sf_pkg::*;
#(
  parameter int N    = 3,
  parameter int NNS  = 2,
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
  input  sym_mode_e            mode_t1,
  input  sym_mode_e            mode_t3,
  input  logic signed [CW-1:0] a_t1_multimode [N+1][N+1],
  input  logic signed [CW-1:0] b_t1_multimode [1:N],
  output logic signed [DW-1:0] y_t1_multimode,
  input  logic signed [CW-1:0] a_t3_multimode [N+1][N+1],
  input  logic signed [CW-1:0] b_t3_multimode [1:N],
  output logic signed [DW-1:0] y_t3_multimode,
  input  logic signed [CW-1:0] a_t1_diag [N+1][N+1],
  input  logic signed [CW-1:0] b_t1_diag [1:N],
  output logic signed [DW-1:0] y_t1_diag,
  input  logic signed [CW-1:0] a_t1_frsm [N+1][N+1],
  input  logic signed [CW-1:0] b_t1_frsm [1:N],
  output logic signed [DW-1:0] y_t1_frsm,
  input  logic signed [CW-1:0] a_t1_quad [N+1][N+1],
  input  logic signed [CW-1:0] b_t1_quad [1:N],
  output logic signed [DW-1:0] y_t1_quad,
  input  logic signed [CW-1:0] a_t1_oct [N+1][N+1],
  input  logic signed [CW-1:0] b_t1_oct [1:N],
  output logic signed [DW-1:0] y_t1_oct,
  input  logic signed [CW-1:0] a_t3_diag [N+1][N+1],
  input  logic signed [CW-1:0] b_t3_diag [1:N],
  output logic signed [DW-1:0] y_t3_diag,
  input  logic signed [CW-1:0] a_t3_frsm [N+1][N+1],
  input  logic signed [CW-1:0] b_t3_frsm [1:N],
  output logic signed [DW-1:0] y_t3_frsm,
  input  logic signed [CW-1:0] a_t3_quad [N+1][N+1],
  input  logic signed [CW-1:0] b_t3_quad [1:N],
  output logic signed [DW-1:0] y_t3_quad,
  input  logic signed [CW-1:0] a_t3_oct [N+1][N+1],
  input  logic signed [CW-1:0] b_t3_oct [1:N],
  output logic signed [DW-1:0] y_t3_oct,
  input  logic signed [CW-1:0] a_type1_sepden [N+1][N+1],
  input  logic signed [CW-1:0] br_type1_sepden [1:N],
  input  logic signed [CW-1:0] bc_type1_sepden [1:N],
  output logic signed [DW-1:0] y_type1_sepden,
  input  logic signed [CW-1:0] a_type3_sepden [N+1][N+1],
  input  logic signed [CW-1:0] br_type3_sepden [1:N],
  input  logic signed [CW-1:0] bc_type3_sepden [1:N],
  output logic signed [DW-1:0] y_type3_sepden,
  input  logic signed [CW-1:0] a_framework_a1 [N+1][N+1],
  input  logic signed [CW-1:0] br_framework_a1 [1:N],
  input  logic signed [CW-1:0] bc_framework_a1 [1:N],
  output logic signed [DW-1:0] y_framework_a1,
  input  logic signed [CW-1:0] a_framework_a [N+1][N+1],
  input  logic signed [CW-1:0] b_framework_a [N+1][N+1],
  output logic signed [DW-1:0] y_framework_a,
  input  logic signed [CW-1:0] a_nonsep [NNS+1][NNS+1],
  input  logic signed [CW-1:0] b_nonsep [NNS+1][NNS+1],
  output logic signed [DW-1:0] y_nonsep
);
  t1_multimode_filter #(.N(N), .M2(M2), .DW(DW), .CW(CW), .FRAC(FRAC), .AW(AW)) u_t1_multimode (
    .clk(clk), .rst_n(rst_n), .en(en), .mode(mode_t1), .x(x), .a_coef(a_t1_multimode), .b_coef(b_t1_multimode), .y(y_t1_multimode)
  );

  t3_multimode_filter #(.N(N), .M2(M2), .DW(DW), .CW(CW), .FRAC(FRAC), .AW(AW)) u_t3_multimode (
    .clk(clk), .rst_n(rst_n), .en(en), .mode(mode_t3), .x(x), .a_coef(a_t3_multimode), .b_coef(b_t3_multimode), .y(y_t3_multimode)
  );

  t1_diag_filter #(.N(N), .M2(M2), .DW(DW), .CW(CW), .FRAC(FRAC), .AW(AW)) u_t1_diag (
    .clk(clk), .rst_n(rst_n), .en(en), .x(x), .a_coef(a_t1_diag), .b_coef(b_t1_diag), .y(y_t1_diag)
  );

  t1_frsm_filter #(.N(N), .M2(M2), .DW(DW), .CW(CW), .FRAC(FRAC), .AW(AW)) u_t1_frsm (
    .clk(clk), .rst_n(rst_n), .en(en), .x(x), .a_coef(a_t1_frsm), .b_coef(b_t1_frsm), .y(y_t1_frsm)
  );

  t1_quad_filter #(.N(N), .M2(M2), .DW(DW), .CW(CW), .FRAC(FRAC), .AW(AW)) u_t1_quad (
    .clk(clk), .rst_n(rst_n), .en(en), .x(x), .a_coef(a_t1_quad), .b_coef(b_t1_quad), .y(y_t1_quad)
  );

  t1_oct_filter #(.N(N), .M2(M2), .DW(DW), .CW(CW), .FRAC(FRAC), .AW(AW)) u_t1_oct (
    .clk(clk), .rst_n(rst_n), .en(en), .x(x), .a_coef(a_t1_oct), .b_coef(b_t1_oct), .y(y_t1_oct)
  );

  t3_diag_filter #(.N(N), .M2(M2), .DW(DW), .CW(CW), .FRAC(FRAC), .AW(AW)) u_t3_diag (
    .clk(clk), .rst_n(rst_n), .en(en), .x(x), .a_coef(a_t3_diag), .b_coef(b_t3_diag), .y(y_t3_diag)
  );

  t3_frsm_filter #(.N(N), .M2(M2), .DW(DW), .CW(CW), .FRAC(FRAC), .AW(AW)) u_t3_frsm (
    .clk(clk), .rst_n(rst_n), .en(en), .x(x), .a_coef(a_t3_frsm), .b_coef(b_t3_frsm), .y(y_t3_frsm)
  );

  t3_quad_filter #(.N(N), .M2(M2), .DW(DW), .CW(CW), .FRAC(FRAC), .AW(AW)) u_t3_quad (
    .clk(clk), .rst_n(rst_n), .en(en), .x(x), .a_coef(a_t3_quad), .b_coef(b_t3_quad), .y(y_t3_quad)
  );

  t3_oct_filter #(.N(N), .M2(M2), .DW(DW), .CW(CW), .FRAC(FRAC), .AW(AW)) u_t3_oct (
    .clk(clk), .rst_n(rst_n), .en(en), .x(x), .a_coef(a_t3_oct), .b_coef(b_t3_oct), .y(y_t3_oct)
  );

  type1_sepden #(.N(N), .M2(M2), .DW(DW), .CW(CW), .FRAC(FRAC), .AW(AW)) u_type1_sepden (
    .clk(clk), .rst_n(rst_n), .en(en), .x(x), .a_coef(a_type1_sepden), .b_row(br_type1_sepden), .b_col(bc_type1_sepden),
    .y(y_type1_sepden)
  );

  type3_sepden #(.N(N), .M2(M2), .DW(DW), .CW(CW), .FRAC(FRAC), .AW(AW)) u_type3_sepden (
    .clk(clk), .rst_n(rst_n), .en(en), .x(x), .a_coef(a_type3_sepden), .b_row(br_type3_sepden), .b_col(bc_type3_sepden),
    .y(y_type3_sepden)
  );

  framework_a1 #(.N(N), .M2(M2), .DW(DW), .CW(CW), .FRAC(FRAC), .AW(AW)) u_framework_a1 (
    .clk(clk), .rst_n(rst_n), .en(en), .x(x), .a_coef(a_framework_a1), .b_row(br_framework_a1), .b_col(bc_framework_a1),
    .y(y_framework_a1)
  );

  framework_a #(.N(N), .M2(M2), .DW(DW), .CW(CW), .FRAC(FRAC), .AW(AW)) u_framework_a (
    .clk(clk), .rst_n(rst_n), .en(en), .x(x), .a_coef(a_framework_a), .b_coef(b_framework_a),
    .y(y_framework_a)
  );

  nonsep_diag_filter #(.N(NNS), .M2(M2), .DW(DW), .CW(CW), .FRAC(FRAC), .AW(AW)) u_nonsep (
    .clk(clk), .rst_n(rst_n), .en(en), .x(x), .a_coef(a_nonsep), .b_coef(b_nonsep), .y(y_nonsep)
  );
endmodule
