// Self-checking testbench for nonsep_diag_filter: the non-separable diagonal-symmetry filter (numerator and denominator symmetric).
//
// What it does: for each mode it builds random zero-padded raster images
// (ROWS lines of M2 pixels), random coefficients that obey the symmetry
// constraint of the mode, and the expected output image from the reference
// model in sf_ref_pkg (the filter's difference equation evaluated directly,
// with the same rounding and saturation rules). It resets the filter,
// streams the image one pixel per clock and compares every output pixel.
// One frame per mode uses small pixels with random en=0 stall cycles (the
// history must hold still); a second uses frequent full-scale pixels so the
// saturating nodes clip. The line length is reduced to M2 = 12 to keep the
// run short; structure and arithmetic are the same as at the default size.
//
// Timing: inputs change at the falling edge, the output is compared 1 time
// unit later (it is combinational in x, so every sample is checked in the
// cycle it enters, which also checks the one-pixel-per-clock rate).
// Extra checks: saturation and stalls must have happened, and the core must hold 6 numerator multipliers.
// A watchdog ends a hung run with a failure.
module tb_nonsep_diag_filter;
  import sf_pkg::*;
  import sf_ref_pkg::*;

  localparam int N    = 2;
  localparam int M2   = 12;
  localparam int DW   = 16;
  localparam int CW   = 16;
  localparam int FRAC = 14;
  localparam int ROWS = 12;
  localparam longint YMAX = (64'sd1 <<< (DW - 1)) - 1;

  logic                 clk;
  logic                 rst_n = 1'b0;
  logic                 en    = 1'b0;
  logic signed [DW-1:0] x     = '0;
  logic signed [CW-1:0] a_coef [N+1][N+1];
  logic signed [CW-1:0] b_coef [N+1][N+1];
  logic signed [DW-1:0] y;

  int checks   = 0;
  int failures = 0;
  int stalls   = 0;
  int sat_hits = 0;

  nonsep_diag_filter #(.N(N), .M2(M2), .DW(DW), .CW(CW), .FRAC(FRAC)) dut (
    .clk(clk), .rst_n(rst_n), .en(en), .x(x),
    .a_coef(a_coef), .b_coef(b_coef), .y(y)
  );

  initial begin : clock
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  initial begin : watchdog
    #(18640);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures <= 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic run_frame(input int m, input bit big, input bit gaps);
    mat_t   a;
    mat_t   b;
    longint xs[];
    longint ys[];
    a = '{default: 0};
    b = '{default: 0};
    // Numerator with diagonal symmetry a_ij = a_ji.
    rand_sym(a, N, 0, big ? (64'sd1 <<< FRAC) : (64'sd1 <<< (FRAC - 1)));
    // Diagonal-symmetric denominator b_ij = b_ji, each within +-1/8.
    rand_sym(b, N, 0, 64'sd1 <<< (FRAC - 3));
    b[0][0] = 0;
    make_image(xs, ROWS, M2, N, DW, big);
    run(K_NONSEP, N, M2, m, DW, FRAC, a, b, xs, ys);

    @(negedge clk);
    rst_n = 1'b0;
    en    = 1'b0;
    x     = '0;
    for (int i = 0; i <= N; i++)
      for (int j = 0; j <= N; j++) a_coef[i][j] = CW'(a[i][j]);
    for (int i = 0; i <= N; i++)
      for (int j = 0; j <= N; j++) b_coef[i][j] = CW'(b[i][j]);
    @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < xs.size(); t++) begin
      while (gaps && $urandom_range(4) == 0) begin
        en = 1'b0;
        x  = DW'($urandom);
        stalls++;
        @(negedge clk);
      end
      en = 1'b1;
      x  = DW'(xs[t]);
      #1;
      check($sformatf("mode %0d big %0d pixel %0d", m, big, t), longint'(y), ys[t]);
      if (ys[t] == YMAX || ys[t] == -YMAX - 1) sat_hits++;
      @(negedge clk);
    end
    en = 1'b0;
  endtask

  initial begin
    for (int i = 0; i <= N; i++)
      for (int j = 0; j <= N; j++) a_coef[i][j] = '0;
    for (int i = 0; i <= N; i++)
      for (int j = 0; j <= N; j++) b_coef[i][j] = '0;
    foreach (MODE_LIST[k]) begin
      run_frame(MODE_LIST[k], 1'b0, 1'b1);
      run_frame(MODE_LIST[k], 1'b1, 1'b0);
    end
    checks++;
    if (sat_hits == 0) begin
      failures++;
      $display("FAIL: no output sample saturated");
    end
    checks++;
    if (stalls == 0) begin
      failures++;
      $display("FAIL: no stall cycle was applied");
    end
    // Numerator multiplier count of the core against the published count
    // and against an orbit count made by the reference package.
    checks++;
    if (dut.u_core.NUM_AMUL != 6 || count_mults(N, 4'd1) != 6) begin
      failures++;
      $display("FAIL: numerator multipliers %0d (reference %0d), expected 6",
               dut.u_core.NUM_AMUL, count_mults(N, 4'd1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int MODE_LIST [1] = '{-1};
endmodule
