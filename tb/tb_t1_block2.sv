// Self-checking testbench for t1_block2, Block 2 of the Type-1 multimode
// structure: symmetry pre-adders with mode-controlled interconnection gates,
// one multiplier per orbit, and the row recursion in b_0j.
//
// What it does: stands in for Block 1 by driving y1_col[i] with a random
// stream s delayed i*(M2-1) (reduced line length M2 = 8, N = 3), and runs
// every mode (DSM, FRSM, QSM, OSM), each once with small samples and random
// en=0 stalls and once with full-scale samples and larger coefficients so the
// output saturates. Every entry of a_coef is random: the block must read only
// the orbit representatives, so entries outside them are don't-cares here.
// The reference groups the taps by orbit (orbits listed independently in
// sf_ref_pkg) and computes
//   y[n] = sat( sum_orbits round(a_rep * sum_{(i,j) in orbit} s[n - i*M2 - j])
//             + sum_j round(b_0j * y[n-j]) ).
// It also checks the multiplier count of the block, 11 for N = 3.
//
// Timing: inputs change at the falling edge; y is compared 1 time unit later
// in every cycle, stall cycles included. A reset separates the runs. A
// watchdog ends a hung run with a failure.
module tb_t1_block2;
  import sf_pkg::*;
  import sf_ref_pkg::*;

  localparam int N    = 3;
  localparam int M2   = 8;
  localparam int DW   = 16;
  localparam int CW   = 16;
  localparam int FRAC = 14;
  localparam longint YMAX = (64'sd1 <<< (DW - 1)) - 1;

  logic                 clk;
  logic                 rst_n = 1'b0;
  logic                 en    = 1'b0;
  sym_mode_e            mode  = SYM_DSM;
  logic signed [DW-1:0] y1_col [N+1];
  logic signed [CW-1:0] a_coef [N+1][N+1];
  logic signed [CW-1:0] b_col  [1:N];
  logic signed [DW-1:0] y;

  int     checks   = 0;
  int     failures = 0;
  int     stalls   = 0;
  int     sat_hits = 0;
  longint sh[$];   // accepted stream samples, oldest first
  longint yh[$];   // accepted outputs, oldest first

  t1_block2 #(.N(N), .M2(M2), .DW(DW), .CW(CW), .FRAC(FRAC)) dut (
    .clk(clk), .rst_n(rst_n), .en(en), .mode(mode), .y1_col(y1_col),
    .a_coef(a_coef), .b_col(b_col), .y(y)
  );

  initial begin : clock
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  initial begin : watchdog
    #500000;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  function automatic longint sget(input int idx);
    return (idx < 0) ? 0 : sh[idx];
  endfunction

  function automatic longint yget(input int idx);
    return (idx < 0) ? 0 : yh[idx];
  endfunction

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures <= 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic run(input int m, input bit big);
    rst_n = 1'b0;
    en    = 1'b0;
    mode  = sym_mode_e'(m);
    sh.delete();
    yh.delete();
    for (int i = 0; i <= N; i++) begin
      y1_col[i] = '0;
      for (int j = 0; j <= N; j++)
        a_coef[i][j] = big ? CW'($urandom_range(32767) - 16384) : CW'($urandom_range(16383) - 8192);
    end
    for (int j = 1; j <= N; j++)
      b_col[j] = CW'(longint'($urandom_range(32'(1 << (FRAC - 1)))) - (1 << (FRAC - 2)));
    @(negedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 250; cyc++) begin
      longint acc, snow, ynow;
      int     n;
      n  = sh.size();
      en = big || ($urandom_range(4) != 0);
      if (big) snow = ($urandom_range(1) != 0) ? YMAX : -YMAX - 1;
      else snow = longint'($urandom_range(16383)) - 8192;
      if (!en) stalls++;
      y1_col[0] = DW'(snow);
      for (int i = 1; i <= N; i++) y1_col[i] = DW'(sget(n - i * (M2 - 1)));
      acc = 0;
      for (int r = 0; r < (N + 1) * (N + 1); r++) begin
        longint s;
        bit     used;
        s    = 0;
        used = 0;
        for (int i = 0; i <= N; i++)
          for (int j = 0; j <= N; j++)
            if (orbit_rep(N, m, i, j) == r) begin
              s += (i + j == 0) ? snow : sget(n - i * M2 - j);
              used = 1;
            end
        if (used) acc += qm(s, longint'(a_coef[r / (N + 1)][r % (N + 1)]), FRAC);
      end
      for (int j = 1; j <= N; j++) acc += qm(yget(n - j), longint'(b_col[j]), FRAC);
      ynow = satv(acc, DW);
      #1;
      check($sformatf("mode %0d big %0d cycle %0d", m, big, cyc), longint'(y), ynow);
      if (en) begin
        sh.push_back(snow);
        yh.push_back(ynow);
        if (ynow == YMAX || ynow == -YMAX - 1) sat_hits++;
      end
      @(negedge clk);
    end
  endtask

  initial begin
    for (int i = 0; i <= N; i++) begin
      y1_col[i] = '0;
      for (int j = 0; j <= N; j++) a_coef[i][j] = '0;
    end
    for (int j = 1; j <= N; j++) b_col[j] = '0;
    for (int m = 0; m < 4; m++) begin
      run(m, 1'b0);
      run(m, 1'b1);
    end
    checks++;
    if (stalls == 0 || sat_hits == 0) begin
      failures++;
      $display("FAIL: stalls %0d, saturated samples %0d (both must be > 0)", stalls, sat_hits);
    end
    checks++;
    if (dut.NUM_AMUL != 11) begin
      failures++;
      $display("FAIL: %0d numerator multipliers, expected 11", dut.NUM_AMUL);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
