// Type-3 Block 2 with symmetry (transposed form):
//   Y3 = sum_{i,j} a_ij z1^-i z2^-j X + sum_{i=1..N} b_i0 z1^-i Y3
// with the a_ij tied by the symmetry modes enabled in MODES (see sf_pkg), or,
// with FULL_DEN=1, the non-separable diagonal-symmetric recursion
//   Y3 = sum a_ij z1^-i z2^-j X + sum_{(i,j) != (0,0)} b_ij z1^-i z2^-j Y3,
//   a_ij = a_ji, b_ij = b_ji.
//
// How it works: each coefficient orbit has one multiplier acting on the
// current X (or on the current output for the feedback coefficients), and its
// rounded product is routed to every tap of the orbit; in a multimode core the
// routing of a tap is a mode-selected choice among the products it may take,
// which is the job of the interconnection boxes. Row i is a transposed adder
// chain: the term of tap (i,N) enters a register, and the terms of taps
// N-1..1 are added on the way down, one z^-1 per tap; the term of tap (i,0)
// joins combinationally. Rows are joined from the top by shift registers of M2
// samples, so the term of tap (i,j) reaches the output after i*M2 + j samples.
// The output is saturated to DW bits. Because a product is rounded once and
// then fanned out, each tap carries its own rounding error, as the Type-3
// error analysis assumes.
//
// Timing: y3 is combinational in x (tap (0,0)). Registers advance when en=1
// and clear on rst_n. The mode input should only change between frames,
// followed by rst_n; with one mode bit set in MODES it is ignored.
// This design's choices: the products of the undelayed X are fanned out, so
// the one-sample delays the drawings place on row inputs are absorbed into
// row shift registers of M2 (not M2-1) stages; interconnection boxes are
// realised as gated selection.
module t3_block2
  import sf_pkg::*;
#(
  parameter int         N        = 3,
  parameter int         M2       = 256,
  parameter int         DW       = 16,
  parameter int         CW       = 16,
  parameter int         FRAC     = 14,
  parameter int         AW       = DW + CW + 4,
  parameter logic [3:0] MODES    = MODES_ALL,
  parameter bit         FULL_DEN = 1'b0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  sym_mode_e            mode,
  input  logic signed [DW-1:0] x,
  input  logic signed [CW-1:0] a_coef [N+1][N+1],
  input  logic signed [CW-1:0] b_coef [N+1][N+1],
  output logic signed [DW-1:0] y3
);
  `include "sf_arith.svh"

  localparam int NT       = (N + 1) * (N + 1);
  localparam int NUM_AMUL = num_mults(N, MODES);
  localparam bit SINGLE   = ($countones(MODES) == 1);
  localparam int FIXED    = first_mode(MODES);

  logic [3:0]           mode_on;
  logic signed [AW-1:0] pa   [NT];        // numerator products, by orbit representative
  logic signed [AW-1:0] pb   [NT];        // feedback products
  logic signed [AW-1:0] term [N+1][N+1];  // routed term of each tap
  logic signed [AW-1:0] sreg [N+1][N+1];  // row chains, index j = 1..N used
  logic signed [AW-1:0] rsum [N+1];       // row sums (term (i,0) + chain)
  logic signed [AW-1:0] uin  [N+1];       // input of the row-i shift register
  logic signed [AW-1:0] srq  [1:N];       // outputs of the row shift registers
  logic signed [AW-1:0] t00;              // term of tap (0,0), kept apart from
                                          // 'term' so the output has no path
                                          // through the feedback products

  // Elaboration-time tables. REP[(m*NT + t)*8 +: 8]: orbit representative
  // of tap t (= i*(N+1)+j) in mode m (flat so it can be a constant function
  // result). MULT[r]: r needs a numerator multiplier.
  // FBM[r]: r needs a feedback multiplier (b_i0 for i >= 1, or with FULL_DEN
  // the diagonal orbits other than (0,0)).
  function automatic logic [4*NT*8-1:0] make_rep();
    logic [4*NT*8-1:0] rt;
    for (int m = 0; m < 4; m++)
      for (int t = 0; t < NT; t++) rt[(m * NT + t) * 8 +: 8] = 8'(rep_idx(N, m, t / (N + 1), t % (N + 1)));
    return rt;
  endfunction

  function automatic logic [NT-1:0] make_mult();
    logic [NT-1:0] mk;
    for (int r = 0; r < NT; r++) mk[r] = is_mult(N, MODES, r);
    return mk;
  endfunction

  function automatic logic [NT-1:0] make_fbm();
    logic [NT-1:0] fk;
    for (int r = 0; r < NT; r++)
      if (FULL_DEN) fk[r] = (r != 0) && (rep_idx(N, 0, r / (N + 1), r % (N + 1)) == r);
      else fk[r] = (r % (N + 1) == 0) && (r != 0);
    return fk;
  endfunction

  localparam logic [4*NT*8-1:0] REP  = make_rep();
  localparam logic [NT-1:0]     MULT = make_mult();
  localparam logic [NT-1:0]     FBM  = make_fbm();

  always_comb begin
    for (int m = 0; m < 4; m++)
      mode_on[m] = MODES[m] && (SINGLE ? (m == FIXED) : (mode == sym_mode_e'(m)));
  end

  // One multiplier per orbit.
  always_comb begin
    for (int r = 0; r < NT; r++)
      pa[r] = MULT[r] ? qmul(AW'(x), a_coef[r / (N + 1)][r % (N + 1)]) : '0;
  end

  always_comb begin
    for (int r = 0; r < NT; r++)
      pb[r] = FBM[r] ? qmul(AW'(y3), b_coef[r / (N + 1)][r % (N + 1)]) : '0;
  end

  always_comb begin
    t00 = '0;
    for (int m = 0; m < 4; m++)
      if (MODES[m] && mode_on[m]) t00 = t00 | pa[0];
  end

  // Interconnection: route products to taps.
  always_comb begin
    for (int i = 0; i <= N; i++)
      for (int j = 0; j <= N; j++) begin
        term[i][j] = '0;
        for (int m = 0; m < 4; m++)
          if (MODES[m] && mode_on[m]) term[i][j] = term[i][j] | pa[int'(REP[(m * NT + tap_idx(N, i, j)) * 8 +: 8])];
        if (FULL_DEN) begin
          if (i + j != 0) term[i][j] = term[i][j] + pb[int'(REP[tap_idx(N, i, j) * 8 +: 8])];
        end else if (j == 0 && i != 0) begin
          term[i][j] = term[i][j] + pb[tap_idx(N, i, 0)];
        end
      end
  end

  // Transposed row chains.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i <= N; i++)
        for (int j = 0; j <= N; j++) sreg[i][j] <= '0;
    end else if (en) begin
      for (int i = 0; i <= N; i++)
        for (int j = 1; j <= N; j++)
          sreg[i][j] <= (j == N) ? term[i][j] : term[i][j] + sreg[i][(j < N) ? j + 1 : j];
    end
  end

  always_comb begin
    for (int i = 0; i <= N; i++) rsum[i] = term[i][0] + sreg[i][1];
    for (int i = 0; i <= N; i++) uin[i] = rsum[i] + ((i >= 1 && i < N) ? srq[(i < N) ? i + 1 : N] : '0);
  end

  for (genvar i = 1; i <= N; i++) begin : g_row_sr
    sf_sr #(.LEN(M2), .W(AW)) u_sr (
      .clk(clk), .rst_n(rst_n), .en(en), .d(uin[i]), .q(srq[i])
    );
  end

  assign y3 = sat(t00 + sreg[0][1] + srq[1]);

  initial begin
    assert (N >= 1 && M2 > N && valid_modes(MODES) && NUM_AMUL == $countones(MULT))
      else $error("t3_block2: need N >= 1, M2 > N and at least one mode");
  end
endmodule
