// Sub-block #2: one-input, two-output direct-form FIR two-pair, the transpose
// of sub-block #1:
//   V = D(z)X,  D(z) = sum_j b_j z^-j;   Y = E(z)X,  E(z) = sum_j a_j z^-j.
// It is the bottom row of separable framework A1, where V closes the 1-D loop
// in z2 around the input adder.
//
// Structure (as drawn for sub-block #2): X climbs one z^-1 line with a delay
// between taps 1/2, 3/4, ... (tap j reads X delayed floor(j/2)); each output
// has its own adder chain with a z^-1 between taps 0/1, 2/3, ... (tap j
// reaches the output after ceil(j/2) delays).
//
// Timing: vi and yi are combinational in xi through tap 0 only. Registers
// advance when en=1, clear on rst_n. Products are rounded once; outputs are
// unsaturated AW-bit sums. HAS_B0=0 leaves out the b_0 tap so that V can be
// fed back to the input without a delay-free loop (this parameter, rounding
// and widths are this design's choices).
module sub_block2 #(
  parameter int N      = 3,
  parameter int DW     = 16,
  parameter int CW     = 16,
  parameter int FRAC   = 14,
  parameter int AW     = DW + CW + 4,
  parameter bit HAS_B0 = 1'b1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic signed [DW-1:0] xi,
  input  logic signed [CW-1:0] a [N+1],
  input  logic signed [CW-1:0] b [N+1],
  output logic signed [AW-1:0] vi,
  output logic signed [AW-1:0] yi
);
  `include "sf_arith.svh"

  localparam int NIN  = N / 2;        // input delays of the last tap
  localparam int NOUT = (N + 1) / 2;  // output delays of the last tap

  logic signed [DW-1:0] xd [NIN+1];
  logic signed [AW-1:0] pa [N+1];
  logic signed [AW-1:0] pb [N+1];
  logic signed [AW-1:0] acc_y [NOUT+1];
  logic signed [AW-1:0] acc_v [NOUT+1];
  logic signed [AW-1:0] reg_y [NOUT+1];
  logic signed [AW-1:0] reg_v [NOUT+1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k <= NIN; k++) xd[k] <= '0;
      for (int g = 0; g <= NOUT; g++) begin
        reg_y[g] <= '0;
        reg_v[g] <= '0;
      end
    end else if (en) begin
      for (int k = 1; k <= NIN; k++) xd[k] <= (k == 1) ? xi : xd[k-1];
      for (int g = 1; g <= NOUT; g++) begin
        reg_y[g] <= acc_y[g];
        reg_v[g] <= acc_v[g];
      end
    end
  end

  always_comb begin
    for (int j = 0; j <= N; j++) begin
      pa[j] = qmul(AW'((j < 2) ? xi : xd[j / 2]), a[j]);
      pb[j] = (j > 0 || HAS_B0) ? qmul(AW'((j < 2) ? xi : xd[j / 2]), b[j]) : '0;
    end
    acc_y[0] = '0;
    acc_v[0] = '0;
    for (int g = 1; g <= NOUT; g++) begin
      acc_y[g] = (g < NOUT) ? reg_y[(g < NOUT) ? g + 1 : g] : '0;
      acc_v[g] = (g < NOUT) ? reg_v[(g < NOUT) ? g + 1 : g] : '0;
      if (2 * g <= N) begin
        acc_y[g] = acc_y[g] + pa[2*g];
        acc_v[g] = acc_v[g] + pb[2*g];
      end
      acc_y[g] = acc_y[g] + pa[2*g-1];
      acc_v[g] = acc_v[g] + pb[2*g-1];
    end
  end

  // Tap 0 joins the outputs directly; kept out of the arrays above so that a
  // loop closed from vi back to xi (framework A1) has no apparent
  // combinational path through the registered taps.
  assign yi = qmul(AW'(xi), a[0]) + reg_y[1];
  assign vi = (HAS_B0 ? qmul(AW'(xi), b[0]) : '0) + reg_v[1];
endmodule
