// Self-checking testbench for t3_block2, Block 2 of the Type-3 multimode
// structure: one multiplier per orbit on the present input, mode-controlled
// routing of the products to the taps, transposed row chains joined through
// line shift registers, and the column recursion in b_i0.
//
// What it does: runs an N = 3 instance with reduced line length M2 = 8 in
// every mode (DSM, FRSM, QSM, OSM), once with small inputs and random en=0
// stalls and once with full-scale inputs and larger coefficients so Y3
// saturates. Every entry of a_coef and b_coef is random: the block must read
// only the orbit representatives of a and only b_i0 (i >= 1) of b. The
// reference computes, tap by tap with the orbit's representative coefficient
// (orbits listed independently in sf_ref_pkg),
//   y3[n] = sat( sum_ij round(a_rep(ij) * x[n - i*M2 - j])
//              + sum_i round(b_i0 * y3[n - i*M2]) ).
// It also checks the multiplier count of the block, 11 for N = 3.
//
// Timing: inputs change at the falling edge; y3 is compared 1 time unit later
// in every cycle, stall cycles included. A reset separates the runs. A
// watchdog ends a hung run with a failure.
module tb_t3_block2;
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
  logic signed [DW-1:0] x     = '0;
  logic signed [CW-1:0] a_coef [N+1][N+1];
  logic signed [CW-1:0] b_coef [N+1][N+1];
  logic signed [DW-1:0] y3;

  int     checks   = 0;
  int     failures = 0;
  int     stalls   = 0;
  int     sat_hits = 0;
  longint xh[$];   // accepted inputs, oldest first
  longint yh[$];   // accepted outputs, oldest first

  t3_block2 #(.N(N), .M2(M2), .DW(DW), .CW(CW), .FRAC(FRAC)) dut (
    .clk(clk), .rst_n(rst_n), .en(en), .mode(mode), .x(x),
    .a_coef(a_coef), .b_coef(b_coef), .y3(y3)
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

  function automatic longint xget(input int idx);
    return (idx < 0) ? 0 : xh[idx];
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
    xh.delete();
    yh.delete();
    for (int i = 0; i <= N; i++)
      for (int j = 0; j <= N; j++) begin
        a_coef[i][j] = big ? CW'($urandom_range(32767) - 16384) : CW'($urandom_range(16383) - 8192);
        b_coef[i][j] = CW'($urandom);
      end
    for (int i = 1; i <= N; i++)
      b_coef[i][0] = CW'(longint'($urandom_range(32'(1 << (FRAC - 1)))) - (1 << (FRAC - 2)));
    @(negedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 250; cyc++) begin
      longint acc, xnow, ynow;
      int     n;
      n  = xh.size();
      en = big || ($urandom_range(4) != 0);
      if (big) xnow = ($urandom_range(1) != 0) ? YMAX : -YMAX - 1;
      else xnow = longint'($urandom_range(16383)) - 8192;
      if (!en) stalls++;
      x   = DW'(xnow);
      acc = 0;
      for (int i = 0; i <= N; i++)
        for (int j = 0; j <= N; j++) begin
          int r;
          r = orbit_rep(N, m, i, j);
          acc += qm((i + j == 0) ? xnow : xget(n - i * M2 - j),
                    longint'(a_coef[r / (N + 1)][r % (N + 1)]), FRAC);
        end
      for (int i = 1; i <= N; i++) acc += qm(yget(n - i * M2), longint'(b_coef[i][0]), FRAC);
      ynow = satv(acc, DW);
      #1;
      check($sformatf("mode %0d big %0d cycle %0d", m, big, cyc), longint'(y3), ynow);
      if (en) begin
        xh.push_back(xnow);
        yh.push_back(ynow);
        if (ynow == YMAX || ynow == -YMAX - 1) sat_hits++;
      end
      @(negedge clk);
    end
  endtask

  initial begin
    for (int i = 0; i <= N; i++)
      for (int j = 0; j <= N; j++) begin
        a_coef[i][j] = '0;
        b_coef[i][j] = '0;
      end
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
