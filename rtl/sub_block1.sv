// Sub-block #1: two-input, one-output direct-form FIR two-pair
//   Y = F(z)X + G(z)W,  F(z) = sum_j a_j z^-j,  G(z) = sum_j b_j z^-j,  j = 0..N,
// with z = z2 (one pixel of delay). This is the row building block of the
// filter frameworks and of the Type-1/Type-3 row structures.
//
// Structure (as drawn for sub-block #1): X and W each climb a z^-1 line with a
// delay after every second tap, so tap j reads its input delayed ceil(j/2);
// the products of taps 2g and 2g+1 are added into an output chain that has a
// z^-1 between each pair, so tap j reaches Y after floor(j/2) more delays.
// No input signal is broadcast to more than two multipliers.
//
// Timing: yi is combinational in xi and wi through tap 0 (Y = a_0 X + b_0 W
// plus stored terms). All registers advance on clk when en=1 and clear on
// rst_n. Each product is rounded once (qmul); yi is the unsaturated AW-bit sum.
// HAS_W0=0 leaves out the b_0 W tap, which a row closing a loop through W
// needs (b_00 = 0); that parameter, the rounding and the widths are this
// design's choices.
module sub_block1 #(
  parameter int N      = 3,
  parameter int DW     = 16,
  parameter int CW     = 16,
  parameter int FRAC   = 14,
  parameter int AW     = DW + CW + 4,
  parameter bit HAS_W0 = 1'b1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic signed [DW-1:0] xi,
  input  logic signed [DW-1:0] wi,
  input  logic signed [CW-1:0] a [N+1],
  input  logic signed [CW-1:0] b [N+1],
  output logic signed [AW-1:0] yi
);
  `include "sf_arith.svh"

  localparam int NIN  = (N + 1) / 2;  // input delays of the last tap
  localparam int NOUT = N / 2;        // output delays of the last tap

  // Registered input lines (index k = k delays) and output-chain registers;
  // index 0 of each is unused and kept at zero so that no array mixes
  // combinational and registered elements.
  logic signed [DW-1:0] xd   [NIN+1];
  logic signed [DW-1:0] wd   [NIN+1];
  logic signed [AW-1:0] oreg [NOUT+1];
  logic signed [AW-1:0] prod [N+1];
  logic signed [AW-1:0] acc  [NOUT+1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k <= NIN; k++) begin
        xd[k] <= '0;
        wd[k] <= '0;
      end
      for (int g = 0; g <= NOUT; g++) oreg[g] <= '0;
    end else if (en) begin
      for (int k = 1; k <= NIN; k++) begin
        xd[k] <= (k == 1) ? xi : xd[k-1];
        wd[k] <= (k == 1) ? wi : wd[k-1];
      end
      for (int g = 1; g <= NOUT; g++) oreg[g] <= acc[g];
    end
  end

  always_comb begin
    for (int j = 0; j <= N; j++) begin
      prod[j] = qmul(AW'((j == 0) ? xi : xd[(j + 1) / 2]), a[j]);
      if (j > 0 || HAS_W0) prod[j] = prod[j] + qmul(AW'((j == 0) ? wi : wd[(j + 1) / 2]), b[j]);
    end
    for (int g = 0; g <= NOUT; g++) begin
      acc[g] = prod[2*g];
      if (g < NOUT) acc[g] = acc[g] + oreg[(g < NOUT) ? g + 1 : g];
      if (2 * g + 1 <= N) acc[g] = acc[g] + prod[2*g+1];
    end
  end

  assign yi = acc[0];
endmodule
