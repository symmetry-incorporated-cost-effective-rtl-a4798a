// Shared types and elaboration-time helpers for the 2-D symmetry filters.
//
// The four magnitude symmetries relate the numerator coefficients a_ij of an
// order N x N filter:
//   DSM  (diagonal)              a_ij = a_ji
//   FRSM (four-fold rotational)  a_ij = a_j(N-i)
//   QSM  (quadrantal)            a_ij = a_(N-i)j
//   OSM  (octagonal)             a_ij = a_ji = a_(N-i)j
// Taps (i,j) that must carry equal coefficients form an orbit; a filter needs
// one multiplier per orbit, and the samples of all taps in an orbit are added
// before (Type-1) or after (Type-3) that multiplier. The representative of an
// orbit is its lexicographically smallest member (i first, then j), which
// gives exactly the multiplier sets of the published N = 3 structures
// (DSM 10, FRSM 4, QSM 8, OSM 3, all four modes together 11).
// The orbit functions are pure and only used at elaboration time or on
// constant-folded mode inputs. The mode encoding is this design's choice.
package sf_pkg;

  typedef enum logic [1:0] {
    SYM_DSM  = 2'd0,
    SYM_FRSM = 2'd1,
    SYM_QSM  = 2'd2,
    SYM_OSM  = 2'd3
  } sym_mode_e;

  // Bit masks for the MODES parameter of the symmetric cores.
  localparam logic [3:0] MODES_DSM  = 4'b0001;
  localparam logic [3:0] MODES_FRSM = 4'b0010;
  localparam logic [3:0] MODES_QSM  = 4'b0100;
  localparam logic [3:0] MODES_OSM  = 4'b1000;
  localparam logic [3:0] MODES_ALL  = MODES_DSM | MODES_FRSM | MODES_QSM | MODES_OSM;

  // Linear index of tap (i,j) in an (N+1) x (N+1) grid.
  function automatic int tap_idx(input int n, input int i, input int j);
    return i * (n + 1) + j;
  endfunction

  // Index of the orbit representative of tap (i,j) under symmetry mode m.
  // The orbit is generated by the mode's coordinate maps; the smallest linear
  // index wins.
  function automatic int rep_idx(input int n, input int m, input int i, input int j);
    int best;
    int ci, cj, t;
    best = tap_idx(n, i, j);
    case (m)
      0: begin // DSM: transpose
        best = (tap_idx(n, j, i) < best) ? tap_idx(n, j, i) : best;
      end
      1: begin // FRSM: rotation (i,j) -> (j, N-i), four times
        ci = i; cj = j;
        for (int k = 0; k < 4; k++) begin
          t  = ci;
          ci = cj;
          cj = n - t;
          if (tap_idx(n, ci, cj) < best) best = tap_idx(n, ci, cj);
        end
      end
      2: begin // QSM: row flip (i,j) -> (N-i, j)
        best = (tap_idx(n, n - i, j) < best) ? tap_idx(n, n - i, j) : best;
      end
      default: begin // OSM: transpose and both flips, eight images
        for (int k = 0; k < 8; k++) begin
          ci = ((k & 1) != 0) ? n - i : i;
          cj = ((k & 2) != 0) ? n - j : j;
          if ((k & 4) != 0) begin
            t  = ci;
            ci = cj;
            cj = t;
          end
          if (tap_idx(n, ci, cj) < best) best = tap_idx(n, ci, cj);
        end
      end
    endcase
    return best;
  endfunction

  // True when tap index r is the representative of its own orbit in some mode
  // enabled in the mask, i.e. when a multiplier must exist for it.
  function automatic bit is_mult(input int n, input logic [3:0] modes, input int r);
    for (int m = 0; m < 4; m++)
      if (modes[m])
        if (rep_idx(n, m, r / (n + 1), r % (n + 1)) == r) return 1'b1;
    return 1'b0;
  endfunction

  // True when tap (i,j) is routed to multiplier r in at least one enabled mode:
  // such a pair needs a wire (and, in a multimode filter, an interconnection gate).
  function automatic bit may_route(input int n, input logic [3:0] modes,
                                   input int r, input int i, input int j);
    for (int m = 0; m < 4; m++)
      if (modes[m] && rep_idx(n, m, i, j) == r) return 1'b1;
    return 1'b0;
  endfunction

  // Number of numerator multipliers a structure with these modes needs.
  function automatic int num_mults(input int n, input logic [3:0] modes);
    int c;
    c = 0;
    for (int r = 0; r < (n + 1) * (n + 1); r++)
      if (is_mult(n, modes, r)) c++;
    return c;
  endfunction

  // True for a MODES mask that names at least one mode and nothing else.
  function automatic bit valid_modes(input logic [3:0] modes);
    return (modes != 4'b0000) && ((modes & ~MODES_ALL) == 4'b0000);
  endfunction

  // Lowest enabled mode: the fixed mode of a single-mode filter.
  function automatic int first_mode(input logic [3:0] modes);
    for (int m = 0; m < 4; m++)
      if (modes[m]) return m;
    return 0;
  endfunction

endpackage
