// Self-checking testbench for t3_block1, Block 1 of the Type-3 structure: the
// row recursion Y = Y3 + sum_j b_0j z2^-j Y.
//
// What it does: runs an N = 3 instance on random Y3 samples with random
// b_0j within +-0.25, random en=0 stalls and, in alternate runs, frequent
// full-scale inputs so the output adder saturates. The reference keeps the
// accepted outputs and computes y[n] = sat(y3[n] + sum_j round(b_j * y[n-j])).
//
// Timing: inputs change at the falling edge; y is compared 1 time unit later
// in every cycle, stall cycles included (y then reflects the present y3 on
// the held history). A watchdog ends a hung run with a failure.
module tb_t3_block1;
  import sf_ref_pkg::*;

  localparam int N    = 3;
  localparam int DW   = 16;
  localparam int CW   = 16;
  localparam int FRAC = 14;
  localparam longint YMAX = (64'sd1 <<< (DW - 1)) - 1;

  logic                 clk;
  logic                 rst_n = 1'b0;
  logic                 en    = 1'b0;
  logic signed [DW-1:0] y3    = '0;
  logic signed [CW-1:0] b_col [1:N];
  logic signed [DW-1:0] y;

  int     checks   = 0;
  int     failures = 0;
  int     stalls   = 0;
  int     sat_hits = 0;
  longint yh[$];   // accepted outputs, oldest first

  t3_block1 #(.N(N), .DW(DW), .CW(CW), .FRAC(FRAC)) dut (
    .clk(clk), .rst_n(rst_n), .en(en), .y3(y3), .b_col(b_col), .y(y)
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
    return (idx < 0) ? 0 : yh[idx];
  endfunction

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures <= 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    for (int j = 1; j <= N; j++) b_col[j] = '0;
    for (int run_i = 0; run_i < 4; run_i++) begin
      bit big;
      big   = run_i[0];
      rst_n = 1'b0;
      en    = 1'b0;
      yh.delete();
      for (int j = 1; j <= N; j++)
        b_col[j] = CW'(longint'($urandom_range(32'(1 << (FRAC - 1)))) - (1 << (FRAC - 2)));
      @(negedge clk);
      rst_n = 1'b1;
      for (int cyc = 0; cyc < 300; cyc++) begin
        longint acc, ynow;
        int     n;
        en = ($urandom_range(4) != 0);
        if (big && $urandom_range(2) == 0) y3 = ($urandom_range(1) != 0) ? DW'(YMAX) : DW'(-YMAX - 1);
        else y3 = DW'($urandom_range(16383)) - DW'(8192);
        if (!en) stalls++;
        n   = yh.size();
        acc = longint'(y3);
        for (int j = 1; j <= N; j++) acc += qm(hist(n - j), longint'(b_col[j]), FRAC);
        ynow = satv(acc, DW);
        #1;
        check($sformatf("run %0d cycle %0d", run_i, cyc), longint'(y), ynow);
        if (en) begin
          yh.push_back(ynow);
          if (ynow == YMAX || ynow == -YMAX - 1) sat_hits++;
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
