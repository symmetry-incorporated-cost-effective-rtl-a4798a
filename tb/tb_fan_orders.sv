// Workload testbench: the diagonal-symmetric separable-denominator filter at
// the three orders of the Fan-filter design study (3 x 3, 4 x 4, 5 x 5),
// which need 16, 23 and 31 multipliers.
//
// What it does: instantiates t1_diag_filter with N = 3, 4 and 5 side by side
// on one pixel stream (line length reduced to M2 = 16), gives each random
// diagonal-symmetric numerators (a_ij = a_ji) and a stable symmetric
// separable denominator (b_k0 = b_0k, each within +-0.25 for N = 3 and
// scaled down with the order), and compares every output pixel with the
// reference model in sf_ref_pkg. The designed Fan-filter coefficients are
// not published, so random coefficients of the same form stand in for them.
// It also checks the multiplier counts: (N+1)(N+2)/2 numerator multipliers
// (10, 15, 21) plus 2N denominator multipliers give 16, 23 and 31.
//
// Timing: inputs change at the falling edge and the outputs are compared
// 1 time unit later in the cycle the pixel is accepted. Two frames are run,
// the second with full-scale pixels so the outputs saturate. A watchdog ends
// a hung run with a failure.
module tb_fan_orders;
  import sf_pkg::*;
  import sf_ref_pkg::*;

  localparam int M2   = 16;
  localparam int DW   = 16;
  localparam int CW   = 16;
  localparam int FRAC = 14;
  localparam int ROWS = 14;
  localparam longint YMAX = (64'sd1 <<< (DW - 1)) - 1;

  logic                 clk;
  logic                 rst_n = 1'b0;
  logic                 en    = 1'b0;
  logic signed [DW-1:0] x     = '0;
  logic signed [CW-1:0] a3 [4][4];
  logic signed [CW-1:0] a4 [5][5];
  logic signed [CW-1:0] a5 [6][6];
  logic signed [CW-1:0] b3 [1:3];
  logic signed [CW-1:0] b4 [1:4];
  logic signed [CW-1:0] b5 [1:5];
  logic signed [DW-1:0] y3, y4, y5;

  int checks   = 0;
  int failures = 0;
  int sat_hits = 0;

  t1_diag_filter #(.N(3), .M2(M2)) u_n3 (
    .clk(clk), .rst_n(rst_n), .en(en), .x(x), .a_coef(a3), .b_coef(b3), .y(y3));
  t1_diag_filter #(.N(4), .M2(M2)) u_n4 (
    .clk(clk), .rst_n(rst_n), .en(en), .x(x), .a_coef(a4), .b_coef(b4), .y(y4));
  t1_diag_filter #(.N(5), .M2(M2)) u_n5 (
    .clk(clk), .rst_n(rst_n), .en(en), .x(x), .a_coef(a5), .b_coef(b5), .y(y5));

  initial begin : clock
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  initial begin : watchdog
    #200000;
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

  // Diagonal-symmetric numerator and symmetric separable denominator of order n.
  function automatic void coefs(input int n, input bit big, output mat_t a, output mat_t b);
    a = '{default: 0};
    b = '{default: 0};
    rand_sym(a, n, 0, big ? (64'sd1 <<< (FRAC - 1)) : (64'sd1 <<< (FRAC - 2)));
    for (int k = 1; k <= n; k++) begin
      b[k][0] = (longint'($urandom_range(32'(1 << (FRAC - 1)))) - (1 << (FRAC - 2))) * 3 / longint'(n);
      b[0][k] = b[k][0];
    end
  endfunction

  task automatic frame(input bit big);
    mat_t   a [3:5];
    mat_t   b [3:5];
    longint xs[];
    longint e3[], e4[], e5[];
    make_image(xs, ROWS, M2, 5, DW, big);
    for (int n = 3; n <= 5; n++) coefs(n, big, a[n], b[n]);
    run(K_T1, 3, M2, 0, DW, FRAC, a[3], b[3], xs, e3);
    run(K_T1, 4, M2, 0, DW, FRAC, a[4], b[4], xs, e4);
    run(K_T1, 5, M2, 0, DW, FRAC, a[5], b[5], xs, e5);
    @(negedge clk);
    rst_n = 1'b0;
    en    = 1'b0;
    for (int i = 0; i <= 5; i++)
      for (int j = 0; j <= 5; j++) begin
        if (i <= 3 && j <= 3) a3[i][j] = CW'(a[3][i][j]);
        if (i <= 4 && j <= 4) a4[i][j] = CW'(a[4][i][j]);
        a5[i][j] = CW'(a[5][i][j]);
      end
    for (int k = 1; k <= 5; k++) begin
      if (k <= 3) b3[k] = CW'(b[3][k][0]);
      if (k <= 4) b4[k] = CW'(b[4][k][0]);
      b5[k] = CW'(b[5][k][0]);
    end
    @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < xs.size(); t++) begin
      en = 1'b1;
      x  = DW'(xs[t]);
      #1;
      check($sformatf("order 3 big %0d pixel %0d", big, t), longint'(y3), e3[t]);
      check($sformatf("order 4 big %0d pixel %0d", big, t), longint'(y4), e4[t]);
      check($sformatf("order 5 big %0d pixel %0d", big, t), longint'(y5), e5[t]);
      if (e5[t] == YMAX || e5[t] == -YMAX - 1) sat_hits++;
      @(negedge clk);
    end
    en = 1'b0;
  endtask

  initial begin
    frame(1'b0);
    frame(1'b1);
    checks++;
    if (sat_hits == 0) begin
      failures++;
      $display("FAIL: no output sample saturated");
    end
    checks++;
    if (u_n3.u_block2.NUM_AMUL + 6 != 16 || u_n4.u_block2.NUM_AMUL + 8 != 23 ||
        u_n5.u_block2.NUM_AMUL + 10 != 31) begin
      failures++;
      $display("FAIL: multipliers %0d/%0d/%0d, expected 16/23/31", u_n3.u_block2.NUM_AMUL + 6,
               u_n4.u_block2.NUM_AMUL + 8, u_n5.u_block2.NUM_AMUL + 10);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
