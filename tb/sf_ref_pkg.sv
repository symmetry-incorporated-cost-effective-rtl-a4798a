// Reference model for the testbenches: computes, sample by sample, what each
// filter structure must output for a raster-scanned image, straight from the
// difference equations of the structures (not from their register layout).
//
// Arithmetic mirrors the fixed-point rules of the RTL: every multiplier output
// is rounded to nearest at FRAC fractional bits, sums are exact, and the
// recursive nodes (Y1, U, Y3, Y) saturate to DW bits. Type-1 symmetric filters
// add the samples of an orbit before multiplying (one rounding per orbit);
// Type-3 filters multiply first and fan out (one rounding per tap).
// Orbits are found here by listing each symmetry's coordinate images
// explicitly, independently of the package the RTL uses.
package sf_ref_pkg;

  typedef enum int {
    K_FWA,     // framework A, general 2-D recursion
    K_FWA1,    // framework A1, separable
    K_T1,      // Type-1 separable (mode < 0: no symmetry)
    K_T3,      // Type-3 separable (mode < 0: no symmetry)
    K_T3B2,    // Type-3 Block 2 alone (Y3), separable feedback
    K_NONSEP   // non-separable diagonal-symmetric recursion
  } kind_e;

  localparam int MAXN = 5;
  typedef longint mat_t [MAXN+1][MAXN+1];

  function automatic longint qm(longint s, longint c, int frac);
    return (s * c + (64'sd1 <<< (frac - 1))) >>> frac;
  endfunction

  function automatic longint satv(longint v, int dw);
    longint hi, lo;
    hi = (64'sd1 <<< (dw - 1)) - 1;
    lo = -hi - 1;
    return (v > hi) ? hi : ((v < lo) ? lo : v);
  endfunction

  // Orbit representative (smallest i*(n+1)+j) of tap (i,j) under mode m.
  function automatic int orbit_rep(int n, int m, int i, int j);
    int ii[8], jj[8];
    int cnt, best;
    ii[0] = i; jj[0] = j; cnt = 1;
    case (m)
      0: begin ii[1] = j; jj[1] = i; cnt = 2; end
      1: begin
        ii[1] = j;     jj[1] = n - i;
        ii[2] = n - i; jj[2] = n - j;
        ii[3] = n - j; jj[3] = i;
        cnt = 4;
      end
      2: begin ii[1] = n - i; jj[1] = j; cnt = 2; end
      default: begin
        ii[1] = j;     jj[1] = i;
        ii[2] = n - i; jj[2] = j;
        ii[3] = j;     jj[3] = n - i;
        ii[4] = i;     jj[4] = n - j;
        ii[5] = n - j; jj[5] = i;
        ii[6] = n - i; jj[6] = n - j;
        ii[7] = n - j; jj[7] = n - i;
        cnt = 8;
      end
    endcase
    best = ii[0] * (n + 1) + jj[0];
    for (int k = 1; k < cnt; k++)
      if (ii[k] * (n + 1) + jj[k] < best) best = ii[k] * (n + 1) + jj[k];
    return best;
  endfunction

  // Number of distinct orbits (= numerator multipliers) of a mode set.
  function automatic int count_mults(int n, logic [3:0] modes);
    int c;
    c = 0;
    for (int r = 0; r < (n + 1) * (n + 1); r++) begin
      bit hit;
      hit = 0;
      for (int m = 0; m < 4; m++)
        if (modes[m] && orbit_rep(n, m, r / (n + 1), r % (n + 1)) == r) hit = 1;
      if (hit) c++;
    end
    return c;
  endfunction

  // Fill a with random values that satisfy the symmetry of mode m (m < 0: none).
  function automatic void rand_sym(ref mat_t a, input int n, input int m, input longint range);
    mat_t base;
    for (int i = 0; i <= n; i++)
      for (int j = 0; j <= n; j++)
        base[i][j] = longint'($urandom_range(32'(2 * range))) - range;
    for (int i = 0; i <= n; i++)
      for (int j = 0; j <= n; j++) begin
        int r;
        r = (m < 0) ? i * (n + 1) + j : orbit_rep(n, m, i, j);
        a[i][j] = base[r / (n + 1)][r % (n + 1)];
      end
  endfunction

  function automatic longint at(ref longint v[], input int idx);
    return (idx < 0) ? 0 : v[idx];
  endfunction

  // Run one frame. b[i][0] = b_i0, b[0][j] = b_0j, b[i][j] general.
  function automatic void run(input kind_e kind, input int n, input int m2, input int mode,
                              input int dw, input int frac, input mat_t a, input mat_t b,
                              ref longint x[], ref longint y[]);
    longint w[];
    int len;
    len = x.size();
    w = new[len];
    y = new[len];
    for (int t = 0; t < len; t++) begin
      longint acc;
      case (kind)
        K_T1: begin
          acc = x[t];
          for (int i = 1; i <= n; i++) acc += qm(at(w, t - i * m2), b[i][0], frac);
          w[t] = satv(acc, dw);
          acc = 0;
          for (int r = 0; r < (n + 1) * (n + 1); r++) begin
            longint s;
            bit used;
            s = 0;
            used = 0;
            for (int i = 0; i <= n; i++)
              for (int j = 0; j <= n; j++)
                if (((mode < 0) ? i * (n + 1) + j : orbit_rep(n, mode, i, j)) == r) begin
                  s += at(w, t - i * m2 - j);
                  used = 1;
                end
            if (used) acc += qm(s, a[r / (n + 1)][r % (n + 1)], frac);
          end
          for (int j = 1; j <= n; j++) acc += qm(at(y, t - j), b[0][j], frac);
          y[t] = satv(acc, dw);
        end
        K_T3, K_T3B2: begin
          acc = 0;
          for (int i = 0; i <= n; i++)
            for (int j = 0; j <= n; j++) acc += qm(at(x, t - i * m2 - j), a[i][j], frac);
          for (int i = 1; i <= n; i++) acc += qm(at(w, t - i * m2), b[i][0], frac);
          w[t] = satv(acc, dw);
          if (kind == K_T3B2) y[t] = w[t];
          else begin
            acc = w[t];
            for (int j = 1; j <= n; j++) acc += qm(at(y, t - j), b[0][j], frac);
            y[t] = satv(acc, dw);
          end
        end
        K_FWA, K_NONSEP: begin
          acc = 0;
          for (int i = 0; i <= n; i++)
            for (int j = 0; j <= n; j++) begin
              acc += qm(at(x, t - i * m2 - j), a[i][j], frac);
              if (i + j != 0) acc += qm(at(y, t - i * m2 - j), b[i][j], frac);
            end
          y[t] = satv(acc, dw);
        end
        default: begin // K_FWA1
          acc = x[t];
          for (int j = 1; j <= n; j++) acc += qm(at(w, t - j), b[0][j], frac);
          w[t] = satv(acc, dw);
          acc = 0;
          for (int i = 0; i <= n; i++)
            for (int j = 0; j <= n; j++) acc += qm(at(w, t - i * m2 - j), a[i][j], frac);
          for (int i = 1; i <= n; i++) acc += qm(at(y, t - i * m2), b[i][0], frac);
          y[t] = satv(acc, dw);
        end
      endcase
    end
  endfunction

  // Random zero-padded image: rows x m2 pixels, the last n pixels of each row
  // and the last n rows zero; 'big' mixes in full-scale pixels.
  function automatic void make_image(ref longint x[], input int rows, input int m2,
                                     input int n, input int dw, input bit big);
    x = new[rows * m2];
    for (int r = 0; r < rows; r++)
      for (int c = 0; c < m2; c++) begin
        longint v;
        if (r >= rows - n || c >= m2 - n) v = 0;
        else if (big && $urandom_range(3) == 0)
          v = ($urandom_range(1) != 0) ? (64'sd1 <<< (dw - 1)) - 1 : -(64'sd1 <<< (dw - 1));
        else v = longint'($urandom_range(1 << (dw - 2))) - (1 << (dw - 3));
        x[r * m2 + c] = v;
      end
  endfunction

endpackage
