// Sub-block #3: single-input single-output direct-form FIR
//   Y = C(z)X,  C(z) = sum_j rho_j z^-j,  j = 0..N,
// where rho may hold numerator or denominator coefficients. It is row 0 of the
// Type-3 separable-denominator filter.
//
// Structure (as drawn for sub-block #3): X runs along one z^-1 line with a
// delay between taps 1/2, 3/4, ... (tap j reads X delayed floor(j/2)); the
// products are summed along a chain that runs back towards the output with a
// z^-1 between taps 0/1, 2/3, ... (ceil(j/2) output delays).
//
// Timing: yi is combinational in xi through tap 0 only. Registers advance when
// en=1, clear on rst_n. Products are rounded once; yi is the unsaturated AW-bit
// sum (rounding and widths are this design's choices).
module sub_block3 #(
  parameter int N    = 3,
  parameter int DW   = 16,
  parameter int CW   = 16,
  parameter int FRAC = 14,
  parameter int AW   = DW + CW + 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic signed [DW-1:0] xi,
  input  logic signed [CW-1:0] p [N+1],
  output logic signed [AW-1:0] yi
);
  `include "sf_arith.svh"

  localparam int NIN  = N / 2;
  localparam int NOUT = (N + 1) / 2;

  logic signed [DW-1:0] xd [NIN+1];
  logic signed [AW-1:0] prod [N+1];
  logic signed [AW-1:0] acc  [NOUT+1];
  logic signed [AW-1:0] oreg [NOUT+1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k <= NIN; k++) xd[k] <= '0;
      for (int g = 0; g <= NOUT; g++) oreg[g] <= '0;
    end else if (en) begin
      for (int k = 1; k <= NIN; k++) xd[k] <= (k == 1) ? xi : xd[k-1];
      for (int g = 1; g <= NOUT; g++) oreg[g] <= acc[g];
    end
  end

  always_comb begin
    for (int j = 0; j <= N; j++) prod[j] = qmul(AW'((j < 2) ? xi : xd[j / 2]), p[j]);
    for (int g = 0; g <= NOUT; g++) begin
      acc[g] = (g < NOUT) ? oreg[(g < NOUT) ? g + 1 : g] : '0;
      if (2 * g <= N) acc[g] = acc[g] + prod[2*g];
      if (g >= 1)     acc[g] = acc[g] + prod[2*g-1];
    end
  end

  assign yi = acc[0];
endmodule
