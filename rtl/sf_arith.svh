// Fixed-point helpers shared by the filter modules. Included inside a module
// body; the including module must define DW (sample width), CW (coefficient
// width), AW (accumulator width) and FRAC (fractional bits of a coefficient).
//
// qmul: product of an accumulator-width sample and a coefficient, rounded to
//       nearest at FRAC fractional bits (add half an LSB, arithmetic shift).
//       Every multiplier output in the design is rounded this way once.
// sat:  clamps an accumulator-width value to a DW-bit sample.

function automatic logic signed [AW-1:0] qmul(input logic signed [AW-1:0] s,
                                              input logic signed [CW-1:0] c);
  logic signed [AW+CW-1:0] qm_full;
  qm_full = s * c;
  qm_full = qm_full + ((AW+CW)'(1) <<< (FRAC - 1));
  return AW'(qm_full >>> FRAC);
endfunction

function automatic logic signed [DW-1:0] sat(input logic signed [AW-1:0] v);
  logic signed [AW-1:0] hi, lo;
  hi = AW'((64'sd1 <<< (DW - 1)) - 64'sd1);
  lo = -hi - AW'(1);
  if (v > hi) return hi[DW-1:0];
  if (v < lo) return lo[DW-1:0];
  return v[DW-1:0];
endfunction
