// Self-checking testbench for sub_block3, the single-input single-output
// direct-form FIR P(z2) X used as row 0 of the Type-3 separable structure.
//
// What it does: drives an N = 3 and an N = 4 instance (odd and even tap
// counts place the last delay differently) with random inputs, coefficients
// and en=0 stalls, and compares against yi = sum_j round(p_j * x[n-j]) built
// from the history of accepted inputs (x[n] is the present input).
//
// Timing: inputs change at the falling edge; yi is compared 1 time unit later
// in every cycle, stall cycles included. A reset separates the runs. A
// watchdog ends a hung run with a failure.
module tb_sub_block3;
  import sf_ref_pkg::*;

  localparam int DW   = 16;
  localparam int CW   = 16;
  localparam int FRAC = 14;
  localparam int AW   = DW + CW + 4;

  logic                 clk;
  logic                 rst_n = 1'b0;
  logic                 en    = 1'b0;
  logic signed [DW-1:0] xi    = '0;
  logic signed [CW-1:0] p3 [4];
  logic signed [CW-1:0] p4 [5];
  logic signed [AW-1:0] y3;
  logic signed [AW-1:0] y4;

  int     checks   = 0;
  int     failures = 0;
  int     stalls   = 0;
  longint xh[$];

  sub_block3 #(.N(3), .DW(DW), .CW(CW), .FRAC(FRAC), .AW(AW)) u3 (
    .clk(clk), .rst_n(rst_n), .en(en), .xi(xi), .p(p3), .yi(y3)
  );
  sub_block3 #(.N(4), .DW(DW), .CW(CW), .FRAC(FRAC), .AW(AW)) u4 (
    .clk(clk), .rst_n(rst_n), .en(en), .xi(xi), .p(p4), .yi(y4)
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

  function automatic longint past(input int j, input longint now);
    if (j == 0) return now;
    return (j <= xh.size()) ? xh[j - 1] : 0;
  endfunction

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures <= 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    for (int run_i = 0; run_i < 4; run_i++) begin
      rst_n = 1'b0;
      en    = 1'b0;
      xh.delete();
      for (int j = 0; j < 5; j++) begin
        if (j < 4) p3[j] = CW'($urandom);
        p4[j] = CW'($urandom);
      end
      @(negedge clk);
      rst_n = 1'b1;
      for (int cyc = 0; cyc < 200; cyc++) begin
        longint e3, e4;
        en = ($urandom_range(4) != 0);
        xi = DW'($urandom);
        if (!en) stalls++;
        e3 = 0;
        e4 = 0;
        for (int j = 0; j <= 3; j++) e3 += qm(past(j, longint'(xi)), longint'(p3[j]), FRAC);
        for (int j = 0; j <= 4; j++) e4 += qm(past(j, longint'(xi)), longint'(p4[j]), FRAC);
        #1;
        check($sformatf("N=3 run %0d cycle %0d", run_i, cyc), longint'(y3), e3);
        check($sformatf("N=4 run %0d cycle %0d", run_i, cyc), longint'(y4), e4);
        if (en) xh.push_front(longint'(xi));
        @(negedge clk);
      end
    end
    checks++;
    if (stalls == 0) begin
      failures++;
      $display("FAIL: no stall cycle was applied");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
