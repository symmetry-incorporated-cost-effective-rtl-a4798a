// Self-checking testbench for sf_sr, the enable-gated line shift register that
// builds the z1^-1 (one image line) delays.
//
// What it does: streams random words into a short instance (LEN = 6, W = 12,
// reduced from the 255-stage default so every case fits a short run) with
// random en=0 cycles and two asynchronous resets in the middle of the stream.
// A queue of accepted words is the reference: after k enabled edges, q must
// equal the word accepted LEN edges earlier, or zero if fewer than LEN words
// were accepted since the last reset.
//
// Timing: d and en change at the falling edge; q is compared 1 time unit
// later, every cycle, including stall cycles (q must not move with en=0) and
// the cycles right after reset. A watchdog ends a hung run with a failure.
module tb_sf_sr;
  localparam int LEN = 6;
  localparam int W   = 12;

  logic                clk;
  logic                rst_n = 1'b0;
  logic                en    = 1'b0;
  logic signed [W-1:0] d     = '0;
  logic signed [W-1:0] q;

  int     checks   = 0;
  int     failures = 0;
  int     stalls   = 0;
  longint hist[$];

  sf_sr #(.LEN(LEN), .W(W)) dut (.clk(clk), .rst_n(rst_n), .en(en), .d(d), .q(q));

  initial begin : clock
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  initial begin : watchdog
    #100000;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic check_q(input int cyc);
    longint exp;
    exp = (hist.size() >= LEN) ? hist[hist.size() - LEN] : 0;
    checks++;
    if (longint'(q) != exp) begin
      failures++;
      if (failures <= 10) $display("FAIL cycle %0d: q=%0d expected %0d", cyc, q, exp);
    end
  endtask

  initial begin
    @(negedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 600; cyc++) begin
      if (cyc == 200 || cyc == 403) begin
        rst_n = 1'b0;          // asynchronous: takes effect at once
        hist.delete();
        #1;
        check_q(cyc);
        @(negedge clk);
        rst_n = 1'b1;
      end
      #1;
      check_q(cyc);
      en = ($urandom_range(3) != 0);
      d  = W'($urandom);
      if (en) hist.push_back(longint'(d));
      else stalls++;
      @(negedge clk);
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
