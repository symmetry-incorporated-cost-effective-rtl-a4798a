// Self-checking testbench for sub_block2, the one-input two-output FIR
// two-pair Y = A(z2) X, V = B(z2) X (the transpose of sub-block #1).
//
// What it does: drives two instances, N = 3 with the b_0 tap present and
// N = 4 without it (HAS_B0 = 0, used where V is fed back to the input node),
// with random inputs and coefficients and random en=0 stalls. The reference
// keeps the history of accepted inputs and computes
//   yi = sum_j round(a_j * x[n-j]),  vi = sum_j round(b_j * x[n-j])
// (x[n] is the present input; rounding to nearest at FRAC bits).
//
// Timing: inputs change at the falling edge; both outputs are compared 1 time
// unit later in every cycle, stall cycles included. A reset separates the
// runs. A watchdog ends a hung run with a failure.
module tb_sub_block2;
  import sf_ref_pkg::*;

  localparam int DW   = 16;
  localparam int CW   = 16;
  localparam int FRAC = 14;
  localparam int AW   = DW + CW + 4;

  logic                 clk;
  logic                 rst_n = 1'b0;
  logic                 en    = 1'b0;
  logic signed [DW-1:0] xi    = '0;
  logic signed [CW-1:0] a3 [4];
  logic signed [CW-1:0] b3 [4];
  logic signed [CW-1:0] a4 [5];
  logic signed [CW-1:0] b4 [5];
  logic signed [AW-1:0] y3, v3;
  logic signed [AW-1:0] y4, v4;

  int     checks   = 0;
  int     failures = 0;
  int     stalls   = 0;
  longint xh[$];

  sub_block2 #(.N(3), .DW(DW), .CW(CW), .FRAC(FRAC), .AW(AW), .HAS_B0(1'b1)) u3 (
    .clk(clk), .rst_n(rst_n), .en(en), .xi(xi), .a(a3), .b(b3), .vi(v3), .yi(y3)
  );
  sub_block2 #(.N(4), .DW(DW), .CW(CW), .FRAC(FRAC), .AW(AW), .HAS_B0(1'b0)) u4 (
    .clk(clk), .rst_n(rst_n), .en(en), .xi(xi), .a(a4), .b(b4), .vi(v4), .yi(y4)
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
        if (j < 4) begin
          a3[j] = CW'($urandom);
          b3[j] = CW'($urandom);
        end
        a4[j] = CW'($urandom);
        b4[j] = CW'($urandom);
      end
      @(negedge clk);
      rst_n = 1'b1;
      for (int cyc = 0; cyc < 200; cyc++) begin
        longint ey3, ev3, ey4, ev4;
        en = ($urandom_range(4) != 0);
        xi = DW'($urandom);
        if (!en) stalls++;
        ey3 = 0;
        ev3 = 0;
        ey4 = 0;
        ev4 = 0;
        for (int j = 0; j <= 3; j++) begin
          ey3 += qm(past(j, longint'(xi)), longint'(a3[j]), FRAC);
          ev3 += qm(past(j, longint'(xi)), longint'(b3[j]), FRAC);
        end
        for (int j = 0; j <= 4; j++) begin
          ey4 += qm(past(j, longint'(xi)), longint'(a4[j]), FRAC);
          if (j > 0) ev4 += qm(past(j, longint'(xi)), longint'(b4[j]), FRAC);
        end
        #1;
        check($sformatf("N=3 yi run %0d cycle %0d", run_i, cyc), longint'(y3), ey3);
        check($sformatf("N=3 vi run %0d cycle %0d", run_i, cyc), longint'(v3), ev3);
        check($sformatf("N=4 yi run %0d cycle %0d", run_i, cyc), longint'(y4), ey4);
        check($sformatf("N=4 vi run %0d cycle %0d", run_i, cyc), longint'(v4), ev4);
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
