// Type-3 Block 1: the 1-D recursion in z2 that follows Block 2 in every Type-3
// filter,
//   Y = Y3 + sum_{j=1..N} b_0j z2^-j Y.
//
// Structure: the W side of a sub-block #1 (Y climbs a z^-1 line with a delay
// after every second tap, products run down an adder chain with a delay
// between each pair), as drawn for Block 1 of the Type-3 filters; b_00 is
// left out so the loop has no delay-free path. The X side of that sub-block is
// tied to zero and falls away in synthesis. Y is saturated to DW bits (this
// design's choice).
//
// Timing: y is combinational in y3. Registers advance when en=1 and clear on
// rst_n.
module t3_block1 #(
  parameter int N    = 3,
  parameter int DW   = 16,
  parameter int CW   = 16,
  parameter int FRAC = 14,
  parameter int AW   = DW + CW + 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic signed [DW-1:0] y3,
  input  logic signed [CW-1:0] b_col [1:N],
  output logic signed [DW-1:0] y
);
  `include "sf_arith.svh"

  logic signed [CW-1:0] zero_c [N+1];
  logic signed [CW-1:0] bw     [N+1];
  logic signed [AW-1:0] fb;

  always_comb begin
    for (int j = 0; j <= N; j++) begin
      zero_c[j] = '0;
      bw[j]     = (j == 0) ? '0 : b_col[(j == 0) ? 1 : j];
    end
  end

  sub_block1 #(.N(N), .DW(DW), .CW(CW), .FRAC(FRAC), .AW(AW), .HAS_W0(1'b0)) u_loop (
    .clk(clk), .rst_n(rst_n), .en(en), .xi('0), .wi(y), .a(zero_c), .b(bw), .yi(fb)
  );

  assign y = sat(AW'(y3) + fb);
endmodule
