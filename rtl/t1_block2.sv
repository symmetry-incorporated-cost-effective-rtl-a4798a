// Type-1 Block 2 with symmetry: the numerator and the z2 recursion
//   Y = sum_k a_k * ( sum_{(i,j) in orbit k} z1^-i z2^-j Y1 ) + sum_j b_0j z2^-j Y
// for the symmetry modes enabled in MODES (see sf_pkg). Samples of Y1 whose
// taps must carry equal coefficients are added first and share one
// multiplier, which is where the symmetric filters save their multipliers
// (N = 3: diagonal 10, four-fold rotational 4, quadrantal 8, octagonal 3
// numerator multipliers; all four modes together 11).
//
// How it works: row i reads y1_col[i] (Y1 delayed i(M2-1) by the Block-1
// shift-register column) and extends it with a short z^-1 line, so tap (i,j)
// is Y1 delayed i*M2 + j. For each multiplier k a pre-adder sums every tap
// that is routed to it. When more than one mode is enabled (the multimode
// filter), each (tap, multiplier) wire that only some modes use passes through
// an interconnection gate, an AND with the decoded mode, which is the
// connect/disconnect job of an interconnection box; wires no mode uses are not
// built. The rounded products and the b_0j feedback terms are added in one
// tree and saturated to give Y.
//
// Timing: y is combinational in y1_col[0] (tap (0,0)). Registers advance when
// en=1 and clear on rst_n. The mode input is read every cycle and should only
// change between frames, followed by rst_n. With one mode bit set in MODES the
// mode input is ignored.
// Follows the document: the orbit grouping, the multiplier sets, one rounding
// per multiplier. This design's choices: the gating form of the
// interconnection boxes, and collecting the products in a single adder tree
// instead of the retimed adder chains of the published drawings (same
// transfer function, longer combinational path).
module t1_block2
  import sf_pkg::*;
#(
  parameter int         N     = 3,
  parameter int         M2    = 256,
  parameter int         DW    = 16,
  parameter int         CW    = 16,
  parameter int         FRAC  = 14,
  parameter int         AW    = DW + CW + 4,
  parameter logic [3:0] MODES = MODES_ALL
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  sym_mode_e            mode,
  input  logic signed [DW-1:0] y1_col [N+1],
  input  logic signed [CW-1:0] a_coef [N+1][N+1],
  input  logic signed [CW-1:0] b_col  [1:N],
  output logic signed [DW-1:0] y
);
  `include "sf_arith.svh"

  localparam int NT       = (N + 1) * (N + 1);
  localparam int NUM_AMUL = num_mults(N, MODES);   // numerator multipliers
  localparam bit SINGLE   = ($countones(MODES) == 1);
  localparam int FIXED    = first_mode(MODES);
  localparam int LINE     = 2 * N;                 // longest row line

  // Elaboration-time tables. ROUTE[(r*NT + t)*4 + m]: tap t (= i*(N+1)+j)
  // belongs to the orbit of representative r in mode m (flat so it can be a
  // constant function result). MULT[r]: r needs a multiplier.
  function automatic logic [NT*NT*4-1:0] make_route();
    logic [NT*NT*4-1:0] rt;
    rt = '0;
    for (int t = 0; t < NT; t++)
      for (int m = 0; m < 4; m++)
        if (MODES[m]) rt[(rep_idx(N, m, t / (N + 1), t % (N + 1)) * NT + t) * 4 + m] = 1'b1;
    return rt;
  endfunction

  function automatic logic [NT-1:0] make_mult();
    logic [NT-1:0] mk;
    for (int r = 0; r < NT; r++) mk[r] = is_mult(N, MODES, r);
    return mk;
  endfunction

  localparam logic [NT*NT*4-1:0] ROUTE = make_route();
  localparam logic [NT-1:0]      MULT  = make_mult();

  // Row lines: rl[i][k] = y1_col[i] delayed k (k >= 1 registered).
  logic signed [DW-1:0] rl [N+1][LINE+1];
  // History of Y for the b_0j recursion: yh[j] = Y delayed j.
  logic signed [DW-1:0] yh [N+1];

  logic [3:0]           mode_on;   // decoded mode, one bit per symmetry
  logic signed [AW-1:0] presum [NT];
  logic signed [AW-1:0] total;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i <= N; i++)
        for (int k = 0; k <= LINE; k++) rl[i][k] <= '0;
      for (int j = 0; j <= N; j++) yh[j] <= '0;
    end else if (en) begin
      for (int i = 0; i <= N; i++)
        for (int k = 1; k <= LINE; k++) rl[i][k] <= (k == 1) ? y1_col[i] : rl[i][k-1];
      for (int j = 1; j <= N; j++) yh[j] <= (j == 1) ? y : yh[j-1];
    end
  end

  function automatic logic signed [DW-1:0] tap(input int i, input int j);
    return (i + j == 0) ? y1_col[0] : ((i + j <= LINE) ? rl[i][i + j] : '0);
  endfunction

  always_comb begin
    for (int m = 0; m < 4; m++)
      mode_on[m] = MODES[m] && (SINGLE ? (m == FIXED) : (mode == sym_mode_e'(m)));
  end

  // Pre-adders with interconnection gates: tap t joins pre-adder r in the
  // modes marked in its ROUTE entry. Entries that no enabled mode uses are
  // constant zero and build nothing; with a single mode the gates fold away.
  always_comb begin
    for (int r = 0; r < NT; r++) begin
      presum[r] = '0;
      for (int t = 0; t < NT; t++)
        if ((ROUTE[(r * NT + t) * 4 +: 4] & mode_on) != 4'b0000)
          presum[r] = presum[r] + AW'(tap(t / (N + 1), t % (N + 1)));
    end
  end

  // Multipliers, feedback and output adder tree.
  always_comb begin
    total = '0;
    for (int r = 0; r < NT; r++)
      if (MULT[r])
        total = total + qmul(presum[r], a_coef[r / (N + 1)][r % (N + 1)]);
    for (int j = 1; j <= N; j++)
      total = total + qmul(AW'(yh[j]), b_col[j]);
  end

  assign y = sat(total);

  initial begin
    assert (N >= 1 && M2 > N && valid_modes(MODES) && NUM_AMUL == $countones(MULT))
      else $error("t1_block2: need N >= 1, M2 > N and at least one mode");
  end
endmodule
