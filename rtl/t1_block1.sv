// Type-1 Block 1: the 1-D recursion in z1 shared by every Type-1 filter,
//   Y1 = X + sum_{i=1..N} b_i0 z1^-i Y1,
// together with the column of line shift registers that Block 2 also reads.
//
// Structure (as drawn): Y1 climbs a column of N shift registers of M2-1
// stages; y1_col[i] is Y1 delayed i(M2-1) samples. The products b_i0*y1_col[i]
// are summed in a transposed chain that has one z^-1 per row, so the b_i0
// term reaches the input adder after i(M2-1) + i = i*M2 samples, i.e. z1^-i.
// The input adder saturates Y1 to DW bits (this design's choice).
//
// Timing: y1_col[0] = Y1 = sat(x + stored terms) is combinational in x.
// Registers advance when en=1 and clear on rst_n.
module t1_block1 #(
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
  input  logic signed [CW-1:0] b_row [1:N],
  output logic signed [DW-1:0] y1_col [N+1]
);
  `include "sf_arith.svh"

  logic signed [AW-1:0] tchain [1:N];


  for (genvar i = 1; i <= N; i++) begin : g_col
    sf_sr #(.LEN(M2 - 1), .W(DW)) u_sr (
      .clk(clk), .rst_n(rst_n), .en(en), .d(y1_col[i-1]), .q(y1_col[i])
    );
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)  tchain[i] <= '0;
      else if (en) tchain[i] <= qmul(AW'(y1_col[i]), b_row[i]) + ((i < N) ? tchain[(i < N) ? i + 1 : i] : '0);
    end
  end

  assign y1_col[0] = sat(AW'(x) + tchain[1]);
endmodule
