// Self-checking testbench for t1_block1, Block 1 of the Type-1 structure: the
// column recursion Y1 = X + sum_i b_i0 z1^-i Y1 and the line shift-register
// column whose taps y1_col[i] carry Y1 delayed i*(M2-1).
//
// What it does: runs an N = 3 instance with a reduced line length M2 = 8 (so
// many lines pass in a short run) on random pixels, with random en=0 stalls,
// random b_i0 within +-0.25 and, in alternate runs, frequent full-scale
// pixels so the Y1 adder saturates. The reference keeps the accepted Y1
// samples and computes
//   y1[n] = sat(x[n] + sum_i round(b_i * y1[n - i*M2])),
//   y1_col[i] = y1[n - i*(M2-1)] for i >= 1, y1_col[0] = y1[n].
//
// Timing: inputs change at the falling edge; all N+1 outputs are compared 1
// time unit later in every cycle, stall cycles included. A watchdog ends a
// hung run with a failure.
module tb_t1_block1;
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
  logic signed [DW-1:0] x     = '0;
  logic signed [CW-1:0] b_row  [1:N];
  logic signed [DW-1:0] y1_col [N+1];

  int     checks   = 0;
  int     failures = 0;
  int     stalls   = 0;
  int     sat_hits = 0;
  longint y1h[$];   // accepted Y1 samples, oldest first

  t1_block1 #(.N(N), .M2(M2), .DW(DW), .CW(CW), .FRAC(FRAC)) dut (
    .clk(clk), .rst_n(rst_n), .en(en), .x(x), .b_row(b_row), .y1_col(y1_col)
  );

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

  function automatic longint hist(input int idx);
    return (idx < 0) ? 0 : y1h[idx];
  endfunction

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures <= 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    for (int i = 1; i <= N; i++) b_row[i] = '0;
    for (int run_i = 0; run_i < 4; run_i++) begin
      bit big;
      big   = run_i[0];
      rst_n = 1'b0;
      en    = 1'b0;
      y1h.delete();
      for (int i = 1; i <= N; i++)
        b_row[i] = CW'(longint'($urandom_range(32'(1 << (FRAC - 1)))) - (1 << (FRAC - 2)));
      @(negedge clk);
      rst_n = 1'b1;
      for (int cyc = 0; cyc < 300; cyc++) begin
        longint acc, y1now;
        int     n;
        en = ($urandom_range(4) != 0);
        if (big && $urandom_range(2) == 0) x = ($urandom_range(1) != 0) ? DW'(YMAX) : DW'(-YMAX - 1);
        else x = DW'($urandom_range(16383)) - DW'(8192);
        if (!en) stalls++;
        n   = y1h.size();
        acc = longint'(x);
        for (int i = 1; i <= N; i++) acc += qm(hist(n - i * M2), longint'(b_row[i]), FRAC);
        y1now = satv(acc, DW);
        #1;
        check($sformatf("run %0d cycle %0d y1_col[0]", run_i, cyc), longint'(y1_col[0]), y1now);
        for (int i = 1; i <= N; i++)
          check($sformatf("run %0d cycle %0d y1_col[%0d]", run_i, cyc, i), longint'(y1_col[i]),
                hist(n - i * (M2 - 1)));
        if (en) begin
          y1h.push_back(y1now);
          if (y1now == YMAX || y1now == -YMAX - 1) sat_hits++;
        end
        @(negedge clk);
      end
    end
    checks++;
    if (stalls == 0 || sat_hits == 0) begin
      failures++;
      $display("FAIL: stalls %0d, saturated samples %0d (both must be > 0)", stalls, sat_hits);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
