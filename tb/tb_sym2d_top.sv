// End-to-end testbench for sym2d_top at its default size (N = 3, NNS = 2,
// M2 = 256, 16-bit data, Q2.14 coefficients); no parameter is overridden.
//
// What it does: filters full-width 256-pixel raster images through all
// fifteen structures of the top at once and compares every output pixel of
// every structure with the reference model in sf_ref_pkg (difference
// equations evaluated directly, same rounding and saturation rules). Four
// frames are run; frame f puts the Type-1 multimode filter in mode f and the
// Type-3 multimode filter in mode (f+1) mod 4, so each sees all four
// symmetries (DSM, FRSM, QSM, OSM). Each frame draws new coefficients obeying
// each filter's constraints, and each frame is preceded by a reset.
// Frames 0 and 2 have small pixels and random en=0 stalls; frames 1 and 3
// have frequent full-scale pixels and larger numerators so outputs clip.
// Frame 3 is a complete 256 x 256 image; the others are 256 x ROWS.
//
// Mechanisms counted (a failure is counted for each that never happened):
// every mode of each multimode filter run with all its pixels matching; a
// saturated output on each structure; stall cycles; an output pixel of each
// structure that depends on the line delays (nonzero after the first line)
// and matches; and, per multimode filter, numerator multiplier counts of 11.
//
// Timing: inputs change at the falling edge and all outputs are compared
// 1 time unit later, in the cycle the pixel is accepted (outputs are
// combinational in x), which also checks the one-pixel-per-clock rate.
// A watchdog ends a hung run with a failure.
module tb_sym2d_top;
  import sf_pkg::*;
  import sf_ref_pkg::*;

  localparam int N    = 3;
  localparam int NNS  = 2;
  localparam int M2   = 256;
  localparam int DW   = 16;
  localparam int CW   = 16;
  localparam int FRAC = 14;
  localparam int ROWS = 24;
  localparam int NF   = 15;  // structures in the top
  localparam longint YMAX = (64'sd1 <<< (DW - 1)) - 1;

  // Structure index, kind and fixed mode (-1: none or set per frame).
  localparam int F_T1MM = 0, F_T3MM = 1, F_T1SEP = 10, F_T3SEP = 11, F_FWA1 = 12, F_FWA = 13,
                 F_NONSEP = 14;

  logic                 clk;
  logic                 rst_n   = 1'b0;
  logic                 en      = 1'b0;
  logic signed [DW-1:0] x       = '0;
  sym_mode_e            mode_t1 = SYM_DSM;
  sym_mode_e            mode_t3 = SYM_DSM;

  logic signed [CW-1:0] a_t1_multimode [N+1][N+1], a_t3_multimode [N+1][N+1];
  logic signed [CW-1:0] a_t1_diag [N+1][N+1], a_t1_frsm [N+1][N+1];
  logic signed [CW-1:0] a_t1_quad [N+1][N+1], a_t1_oct [N+1][N+1];
  logic signed [CW-1:0] a_t3_diag [N+1][N+1], a_t3_frsm [N+1][N+1];
  logic signed [CW-1:0] a_t3_quad [N+1][N+1], a_t3_oct [N+1][N+1];
  logic signed [CW-1:0] a_type1_sepden [N+1][N+1], a_type3_sepden [N+1][N+1];
  logic signed [CW-1:0] a_framework_a1 [N+1][N+1], a_framework_a [N+1][N+1];
  logic signed [CW-1:0] a_nonsep [NNS+1][NNS+1];
  logic signed [CW-1:0] b_t1_multimode [1:N], b_t3_multimode [1:N];
  logic signed [CW-1:0] b_t1_diag [1:N], b_t1_frsm [1:N], b_t1_quad [1:N], b_t1_oct [1:N];
  logic signed [CW-1:0] b_t3_diag [1:N], b_t3_frsm [1:N], b_t3_quad [1:N], b_t3_oct [1:N];
  logic signed [CW-1:0] br_type1_sepden [1:N], bc_type1_sepden [1:N];
  logic signed [CW-1:0] br_type3_sepden [1:N], bc_type3_sepden [1:N];
  logic signed [CW-1:0] br_framework_a1 [1:N], bc_framework_a1 [1:N];
  logic signed [CW-1:0] b_framework_a [N+1][N+1];
  logic signed [CW-1:0] b_nonsep [NNS+1][NNS+1];

  logic signed [DW-1:0] y_t1_multimode, y_t3_multimode;
  logic signed [DW-1:0] y_t1_diag, y_t1_frsm, y_t1_quad, y_t1_oct;
  logic signed [DW-1:0] y_t3_diag, y_t3_frsm, y_t3_quad, y_t3_oct;
  logic signed [DW-1:0] y_type1_sepden, y_type3_sepden, y_framework_a1, y_framework_a, y_nonsep;

  int checks   = 0;
  int failures = 0;
  int stalls   = 0;
  int sat_hits  [NF];
  int line_hits [NF];
  int mode_ok   [2][4];

  sym2d_top dut (.*);

  initial begin : clock
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  initial begin : watchdog
    #20000000;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  function automatic string fname(input int f);
    case (f)
      0: return "t1_multimode";
      1: return "t3_multimode";
      2: return "t1_diag";
      3: return "t1_frsm";
      4: return "t1_quad";
      5: return "t1_oct";
      6: return "t3_diag";
      7: return "t3_frsm";
      8: return "t3_quad";
      9: return "t3_oct";
      10: return "type1_sepden";
      11: return "type3_sepden";
      12: return "framework_a1";
      13: return "framework_a";
      default: return "nonsep";
    endcase
  endfunction

  function automatic longint yout(input int f);
    case (f)
      0: return longint'(y_t1_multimode);
      1: return longint'(y_t3_multimode);
      2: return longint'(y_t1_diag);
      3: return longint'(y_t1_frsm);
      4: return longint'(y_t1_quad);
      5: return longint'(y_t1_oct);
      6: return longint'(y_t3_diag);
      7: return longint'(y_t3_frsm);
      8: return longint'(y_t3_quad);
      9: return longint'(y_t3_oct);
      10: return longint'(y_type1_sepden);
      11: return longint'(y_type3_sepden);
      12: return longint'(y_framework_a1);
      13: return longint'(y_framework_a);
      default: return longint'(y_nonsep);
    endcase
  endfunction

  // Reference kind and symmetry mode of structure f in a frame.
  function automatic kind_e fkind(input int f);
    if (f == F_T1MM || (f >= 2 && f <= 5) || f == F_T1SEP) return K_T1;
    if (f == F_T3MM || (f >= 6 && f <= 9) || f == F_T3SEP) return K_T3;
    if (f == F_FWA1) return K_FWA1;
    if (f == F_FWA) return K_FWA;
    return K_NONSEP;
  endfunction

  function automatic int fmode(input int f, input int frame);
    if (f == F_T1MM) return frame % 4;
    if (f == F_T3MM) return (frame + 1) % 4;
    if (f >= 2 && f <= 5) return f - 2;
    if (f >= 6 && f <= 9) return f - 6;
    return -1;
  endfunction

  function automatic longint rb(input int frac_shift);
    return longint'($urandom_range(32'(1 << (FRAC - frac_shift + 1)))) - (1 << (FRAC - frac_shift));
  endfunction

  // Random coefficients for structure f obeying its constraints:
  // symmetric numerator for the symmetry filters (diagonal for nonsep),
  // b_i0 = b_0j for the symmetric separable filters, independent row and
  // column factors for the general separable ones, a small full denominator
  // for framework A and a diagonal-symmetric one for nonsep.
  task automatic make_coefs(input int f, input int m, input bit big, output mat_t a, output mat_t b);
    int n;
    a = '{default: 0};
    b = '{default: 0};
    n = (f == F_NONSEP) ? NNS : N;
    rand_sym(a, n, (f == F_NONSEP) ? 0 : m, big ? (64'sd1 <<< FRAC) : (64'sd1 <<< (FRAC - 1)));
    case (f)
      F_FWA: begin
        rand_sym(b, n, -1, 64'sd1 <<< (FRAC - 4));
        b[0][0] = 0;
      end
      F_NONSEP: begin
        rand_sym(b, n, 0, 64'sd1 <<< (FRAC - 3));
        b[0][0] = 0;
      end
      F_T1SEP, F_T3SEP, F_FWA1: begin
        for (int k = 1; k <= n; k++) begin
          b[k][0] = rb(2);
          b[0][k] = rb(2);
        end
      end
      default: begin
        for (int k = 1; k <= n; k++) begin
          b[k][0] = rb(2);
          b[0][k] = b[k][0];
        end
      end
    endcase
  endtask

  task automatic apply_coefs(input int f, input mat_t a, input mat_t b);
    for (int i = 0; i <= N; i++)
      for (int j = 0; j <= N; j++) begin
        case (f)
          0: a_t1_multimode[i][j] = CW'(a[i][j]);
          1: a_t3_multimode[i][j] = CW'(a[i][j]);
          2: a_t1_diag[i][j] = CW'(a[i][j]);
          3: a_t1_frsm[i][j] = CW'(a[i][j]);
          4: a_t1_quad[i][j] = CW'(a[i][j]);
          5: a_t1_oct[i][j] = CW'(a[i][j]);
          6: a_t3_diag[i][j] = CW'(a[i][j]);
          7: a_t3_frsm[i][j] = CW'(a[i][j]);
          8: a_t3_quad[i][j] = CW'(a[i][j]);
          9: a_t3_oct[i][j] = CW'(a[i][j]);
          10: a_type1_sepden[i][j] = CW'(a[i][j]);
          11: a_type3_sepden[i][j] = CW'(a[i][j]);
          12: a_framework_a1[i][j] = CW'(a[i][j]);
          13: begin
            a_framework_a[i][j] = CW'(a[i][j]);
            b_framework_a[i][j] = CW'(b[i][j]);
          end
          default: if (i <= NNS && j <= NNS) begin
            a_nonsep[i][j] = CW'(a[i][j]);
            b_nonsep[i][j] = CW'(b[i][j]);
          end
        endcase
      end
    for (int k = 1; k <= N; k++) begin
      case (f)
        0: b_t1_multimode[k] = CW'(b[k][0]);
        1: b_t3_multimode[k] = CW'(b[k][0]);
        2: b_t1_diag[k] = CW'(b[k][0]);
        3: b_t1_frsm[k] = CW'(b[k][0]);
        4: b_t1_quad[k] = CW'(b[k][0]);
        5: b_t1_oct[k] = CW'(b[k][0]);
        6: b_t3_diag[k] = CW'(b[k][0]);
        7: b_t3_frsm[k] = CW'(b[k][0]);
        8: b_t3_quad[k] = CW'(b[k][0]);
        9: b_t3_oct[k] = CW'(b[k][0]);
        10: begin
          br_type1_sepden[k] = CW'(b[k][0]);
          bc_type1_sepden[k] = CW'(b[0][k]);
        end
        11: begin
          br_type3_sepden[k] = CW'(b[k][0]);
          bc_type3_sepden[k] = CW'(b[0][k]);
        end
        12: begin
          br_framework_a1[k] = CW'(b[k][0]);
          bc_framework_a1[k] = CW'(b[0][k]);
        end
        default: ;
      endcase
    end
  endtask

  task automatic run_frame(input int frame, input int rows, input bit big, input bit gaps);
    longint xs[];
    longint yt[];
    longint yexp[];
    int     len;
    int     bad [NF];
    make_image(xs, rows, M2, N, DW, big);
    len  = xs.size();
    yexp = new[NF * len];
    for (int f = 0; f < NF; f++) begin
      mat_t a, b;
      bad[f] = 0;
      make_coefs(f, fmode(f, frame), big, a, b);
      run(fkind(f), (f == F_NONSEP) ? NNS : N, M2, fmode(f, frame), DW, FRAC, a, b, xs, yt);
      for (int t = 0; t < len; t++) yexp[f * len + t] = yt[t];
      apply_coefs(f, a, b);
    end

    @(negedge clk);
    rst_n   = 1'b0;
    en      = 1'b0;
    x       = '0;
    mode_t1 = sym_mode_e'(fmode(F_T1MM, frame));
    mode_t3 = sym_mode_e'(fmode(F_T3MM, frame));
    @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < len; t++) begin
      while (gaps && $urandom_range(7) == 0) begin
        en = 1'b0;
        x  = DW'($urandom);
        stalls++;
        @(negedge clk);
      end
      en = 1'b1;
      x  = DW'(xs[t]);
      #1;
      for (int f = 0; f < NF; f++) begin
        longint e;
        e = yexp[f * len + t];
        checks++;
        if (yout(f) != e) begin
          failures++;
          bad[f]++;
          if (failures <= 10)
            $display("FAIL frame %0d %s pixel %0d (row %0d col %0d): got %0d expected %0d",
                     frame, fname(f), t, t / M2, t % M2, yout(f), e);
        end else begin
          if (e == YMAX || e == -YMAX - 1) sat_hits[f]++;
          if (t >= M2 && e != 0) line_hits[f]++;
        end
      end
      @(negedge clk);
    end
    en = 1'b0;
    if (bad[F_T1MM] == 0) mode_ok[0][fmode(F_T1MM, frame)]++;
    if (bad[F_T3MM] == 0) mode_ok[1][fmode(F_T3MM, frame)]++;
    $display("frame %0d: %0d pixels, modes t1=%0d t3=%0d, failures so far %0d",
             frame, len, fmode(F_T1MM, frame), fmode(F_T3MM, frame), failures);
  endtask

  task automatic mechanism(input string what, input bit happened);
    checks++;
    if (!happened) begin
      failures++;
      $display("FAIL: mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    for (int f = 0; f < NF; f++) begin
      mat_t z;
      z = '{default: 0};
      sat_hits[f]  = 0;
      line_hits[f] = 0;
      apply_coefs(f, z, z);
    end
    for (int k = 0; k < 2; k++)
      for (int m = 0; m < 4; m++) mode_ok[k][m] = 0;

    run_frame(0, ROWS, 1'b0, 1'b1);
    run_frame(1, ROWS, 1'b1, 1'b0);
    run_frame(2, ROWS, 1'b0, 1'b1);
    run_frame(3, M2, 1'b1, 1'b0);

    for (int m = 0; m < 4; m++) begin
      mechanism($sformatf("Type-1 multimode filter in mode %0d", m), mode_ok[0][m] > 0);
      mechanism($sformatf("Type-3 multimode filter in mode %0d", m), mode_ok[1][m] > 0);
    end
    for (int f = 0; f < NF; f++) begin
      mechanism($sformatf("%s output saturated", fname(f)), sat_hits[f] > 0);
      mechanism($sformatf("%s output through the line delays", fname(f)), line_hits[f] > 0);
    end
    mechanism("en=0 stall cycles", stalls > 0);
    mechanism("Type-1 multimode core has 11 numerator multipliers",
              dut.u_t1_multimode.u_block2.NUM_AMUL == 11);
    mechanism("Type-3 multimode core has 11 numerator multipliers",
              dut.u_t3_multimode.u_block2.NUM_AMUL == 11);
    $display("stalls %0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
