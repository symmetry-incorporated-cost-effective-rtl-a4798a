# Symmetric 2-D IIR filters that share their multipliers

A two-dimensional recursive (IIR) filter of order N x N needs up to
2(N+1)^2 - 1 coefficient multipliers: 31 of them at N = 3. Many useful 2-D
filters, such as fan, cone and near-circular low-pass filters, have a
magnitude response with a symmetry. The symmetry can be diagonal, four-fold
rotational, quadrantal or octagonal. Each symmetry forces groups of numerator
coefficients to be equal. A structure that knows this adds the signals of a
group first and multiplies the sum once, so it needs far fewer multipliers.

This RTL builds those structures for images that arrive in raster-scan order,
one pixel per clock. The main design is a **multimode** filter that can run
as any of the four symmetry filters. It has one set of multipliers, the union
of the four sets. Mode-controlled gates decide which delayed samples reach
which multiplier. At order 3 the multimode filter has 17 multipliers. The
four single-symmetry filters would need 16 + 10 + 14 + 9 = 49, so the
multimode filter needs 65% fewer.

Every filter here has a **separable denominator**, Q(z1,z2) = Q1(z1) Q2(z2),
except the general framework and the order-2 non-separable diagonal filter.
Separability is built into the structure, not left to the coefficient
values. The filter is then BIBO-stable whenever the two 1-D polynomials are
stable, whatever the numerator. The rotational, quadrantal and octagonal
symmetries need this for stability.

## Raster scan and the two delays

Pixels of an image M2 pixels wide arrive row by row: x(0,0), x(0,1), ...,
x(0,M2-1), x(1,0), ... With this order:

* z2^-1 (one pixel back along the row) is a single register.
* z1^-1 (the same column one line back) is a delay of M2 samples.

The filters treat the image as zero-padded: the last N pixels of every row
and the last N rows should be zero. Rows then do not leak into each other
through the line delays, and the output is the true 2-D filter response.
Reset clears all history, which matches the zero initial conditions.

Every filter has the same stream interface:

| signal   | meaning |
|----------|---------|
| `clk`    | clock |
| `rst_n`  | asynchronous active-low reset; clears every delay |
| `en`     | with `en=1` the present pixel `x` is accepted at the rising edge; with `en=0` nothing moves |
| `x`      | input pixel, signed DW bits |
| `y`      | output pixel, signed DW bits, saturated |
| `a_coef` | numerator a_ij, (N+1) x (N+1) signed CW-bit array |
| `b_coef` / `b_row`, `b_col` | denominator coefficients (see each module) |
| `mode`   | multimode filters only: 0 diagonal, 1 four-fold rotational, 2 quadrantal, 3 octagonal |

Throughput is one pixel per clock. Latency is zero: `y` is a combinational
function of the `x` presented in the same cycle, because the a_00 path has no
delay. Sample `y` on the edge that accepts `x`. Coefficients are plain
inputs. Hold them steady while a frame runs.

To change the mode of a multimode filter, do it between frames and pulse
`rst_n`. Switching modes mid-frame is legal in hardware. The history then
mixes two filters, though, and the output has no clean meaning.

## The four symmetries and their multiplier groups

The filter is

    H(z1,z2) = sum_{i,j=0..N} a_ij z1^-i z2^-j / ((1 - sum_i b_i0 z1^-i)(1 - sum_j b_0j z2^-j))

For the symmetric filters, b_k0 = b_0k. One port `b_coef[1:N]` then feeds
both 1-D recursions, through two sets of N multipliers.

The symmetries tie the numerator coefficients as follows:

| mode | name | constraint | groups (= numerator multipliers) at N = 3 |
|------|------|-----------|------|
| 0 | diagonal (DSM) | a_ij = a_ji | 10 |
| 1 | four-fold rotational (FRSM) | a_ij = a_j,N-i | 4 |
| 2 | quadrantal (QSM) | a_ij = a_N-i,j | 8 |
| 3 | octagonal (OSM) | all of the above | 3 |
| all four | multimode | union of the four sets | 11 |

A group, or *orbit*, is the set of taps (i,j) that one symmetry maps onto
each other. Each orbit is identified by its smallest member, ordered by i
first and then by j. That representative is the coefficient the filter reads.
Other entries of `a_coef` are ignored. The filter behaves as though
`a_coef` obeyed the constraint.

All orbit arithmetic lives in `sf_pkg` (`rep_idx`, `is_mult`, `num_mults`).
It runs only at elaboration time. Any N and any subset of modes (the `MODES`
bit mask) give the right structure without hand-drawn wiring.

Multiplier totals at N = 3:

| structure | module | multipliers |
|-----------|--------|-------------|
| general 2-D IIR | `framework_a` | 31 |
| separable denominator, no symmetry | `type1_sepden`, `type3_sepden`, `framework_a1` | 22 |
| diagonal | `t1_diag_filter`, `t3_diag_filter` | 16 |
| four-fold rotational | `t1_frsm_filter`, `t3_frsm_filter` | 10 |
| quadrantal | `t1_quad_filter`, `t3_quad_filter` | 14 |
| octagonal | `t1_oct_filter`, `t3_oct_filter` | 9 |
| multimode | `t1_multimode_filter`, `t3_multimode_filter` | 17 |
| order-2 non-separable diagonal | `nonsep_diag_filter` | 11 |

## Type-1 and Type-3: where the denominator sits

Each separable filter is a chain of two blocks. The two types put the two
halves of the denominator in opposite places.

**Type-1** (`t1_block1` then `t1_block2`)

* Block 1 computes Y1 = X / Q1(z1). It owns the column of line shift
  registers.
* `y1_col[i]` is Y1 delayed i(M2-1).
* Block 2 extends each row with a short register line, so tap (i,j) sees
  Y1 delayed i*M2 + j.
* Block 2 adds all taps of an orbit in a pre-adder and multiplies the sum
  once. It then adds the b_0j feedback of its own output Y.
* Each orbit's sum is rounded once.

**Type-3** (`t3_block2` then `t3_block1`)

* Block 2 runs in transposed form. One multiplier per orbit acts on the
  *present* input X.
* The rounded product is fanned out to every tap of the orbit.
* Each row is a chain of registers that collects its taps.
* Rows are joined through line shift registers, so the term of tap (i,j)
  reaches the output i*M2 + j samples later.
* The b_i0 feedback of Block 2's output Y3 enters the same row chains.
* Block 1 is the 1-D recursion Y = Y3 + sum b_0j z2^-j Y.
* Each tap carries its own product rounding, so Type-1 and Type-3 give
  slightly different results for the same coefficients.

Type-3 needs no pre-adders. Its shortest possible critical path is one adder
shorter than Type-1's.

## The multimode cores

`t1_block2` and `t3_block2` take a `MODES` mask:

* With one bit set, the mode input is ignored. The core reduces to a
  single-symmetry filter with no gates.
* With several bits set, the core builds a multiplier for every orbit
  representative of any enabled mode.

How the taps reach the multipliers:

* **Type-1:** each (tap, multiplier) pair that some enabled mode uses gets a
  gate, an AND with the decoded mode. An elaboration-time table marks the
  modes in which a pair is used. The gates are the interconnection boxes:
  in each mode they connect exactly the taps of that mode's orbits to the
  pre-adders.
* **Type-3:** each tap takes the product of its orbit's representative
  through the same kind of gated selection.

Pairs that no mode uses get no wire. For N = 3 with all four modes, the
numerator multipliers are a00, a01, a02, a03, a10, a11, a12, a13, a22, a23
and a33.

## Building blocks and frameworks

* `sub_block1`: the two-input FIR two-pair Y = A(z2) X + B(z2) W.
  * The delays are spread so no input drives more than two multipliers.
  * The X and W lines have a register after every second tap.
  * The output chain also has a register after every second tap.
  * Tap j therefore sees ceil(j/2) input delays and floor(j/2) output
    delays.
* `sub_block2`: the transpose of `sub_block1`, with one input and two outputs.
* `sub_block3`: the single-input FIR.
* `framework_a`: the general filter, one `sub_block1` per row.
  * X and Y climb short register lines.
  * Row outputs are joined through (M2-1)-stage line shift registers.
* `framework_a1`: a separable form of `framework_a`.
  * The bottom row is a `sub_block2` whose second output closes the z2
    recursion around the input adder.
  * Rows 1..N carry only b_i0 on Y.
* `type1_sepden`, `type3_sepden`: the separable filters without symmetry,
  built from Block 1 and the sub-blocks.
* `nonsep_diag_filter`: order 2, with diagonal symmetry in both numerator and
  denominator (a_ij = a_ji, b_ij = b_ji).
  * It is the Type-3 core with its `FULL_DEN` option.
  * The feedback products of Y share multipliers by orbit, just as the
    numerator's do.
  * 6 + 5 = 11 multipliers.
* `sf_sr`: the line delay.
* `sym2d_top`: puts every structure side by side on one pixel stream. Each
  structure has its own coefficient ports and output.

## Arithmetic

| parameter | default | meaning |
|-----------|---------|---------|
| `N`    | 3   | filter order (2 for `nonsep_diag_filter`) |
| `M2`   | 256 | image width in pixels |
| `DW`   | 16  | pixel width |
| `CW`   | 16  | coefficient width |
| `FRAC` | 14  | fractional bits of the coefficients (Q2.14: range -2 .. +2) |
| `AW`   | DW+CW+4 | internal sum width |

* **Products:** every product is rounded to nearest. The rounding adds
  2^(FRAC-1) and then shifts right arithmetically by FRAC.
* **Sums:** sums are carried in AW bits, which is wide enough that no
  intermediate sum overflows.
* **Saturation:** the recursive nodes (Y1, the input node U of
  `framework_a1`, Y3 and Y) saturate to DW bits. Saturation keeps an
  overloaded recursion bounded instead of letting it wrap around.
* **Shared macros:** `sf_arith.svh` holds the rounding multiply and the
  saturation. Each module includes it inside its body.

## Where this RTL departs from the published structures

* **Output adders.**
  * The published drawings retime registers into the adder chains. That
    reaches a critical path of one multiply plus three adds (Type-1) or
    two adds (Type-3).
  * Here the Type-1 core taps its delayed samples directly and adds all
    products in one combinational tree. The transfer function and rounding
    points are the same, but the path is longer.
  * The Type-3 core adds its products through registered row chains, as in
    the drawings. The output node still sums three terms.
* **Type-3 row delays.** The drawings put a one-sample delay on each row
  input and use (M2-1)-stage line registers. Here products of the undelayed
  X are used, and those delays move into M2-stage line registers. The
  transfer function is the same.
* **Line shift registers.**
  * `sf_sr` behaves exactly like a chain of cleared flip-flops: a circular
    buffer in a memory of LEN-1 words plus an output register.
  * A fill counter outputs zero until the buffer has filled since reset, so
    the memory itself needs no reset.
  * A line of 255 samples then maps onto a RAM instead of 4,000 flip-flops.
* **Interconnection boxes.** These are AND gates (Type-1) or gated selection
  (Type-3). Their wiring comes from the orbits, not from a hand-drawn
  crossbar.
* **Coefficients.** These are input ports. There is no coefficient memory or
  load protocol.
* **Not built:**
  * the transposed form of framework A and the Type-2 symmetry structures,
    which are only named;
  * the chip layout, its area and its power.
* **Fan-filter coefficients.** The optimised coefficients of the Fan-filter
  example are not published. The order 3, 4 and 5 versions are therefore
  exercised with random diagonal-symmetric coefficients. Orders 4 and 5 need
  `N` overridden; the default N = 3 holds the 3 x 3 design.

## Verification

`tb/sf_ref_pkg.sv` is a bit-exact reference model. It evaluates each
structure's difference equation directly on an image, with the same
rounding and saturation rules. It lists the symmetry orbits on its own, by
spelling out each symmetry's coordinate maps, so it does not reuse the
RTL's orbit code.

Every module has a self-checking testbench `tb/tb_<module>.sv`:

* Each one compares every output sample with the model, including cycles
  with `en=0`.
* Each one forces saturation and stalls, and fails if either never
  happened.
* The symmetric cores also check their multiplier count.
* Each prints `TB_RESULT checks=<n> failures=<n>`.
* Most use a short line (M2 = 8 or 16) so that many lines fit in a short run.

Two testbenches run whole-design workloads:

* `tb_sym2d_top` runs the whole top at its default size, M2 = 256.
  * It filters three 256 x 24 frames and one full 256 x 256 frame through
    all fifteen structures.
  * Between them the frames take both multimode filters through all four
    modes.
  * It counts each mechanism: each mode, saturation on every output, data
    through the line delays, stalls, and the multiplier counts. It fails on
    any that never happened.
* `tb_fan_orders` runs the diagonal filter at orders 3, 4 and 5: 16, 23 and
  31 multipliers.

To run one testbench with Verilator (5.x), from the top folder:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        --top-module tb_t1_multimode_filter \
        rtl/sf_pkg.sv tb/sf_ref_pkg.sv tb/tb_t1_multimode_filter.sv
    ./obj_dir/Vtb_t1_multimode_filter

The simulator is two-state. Everything that is read is reset, or is gated
until written, as with the line-buffer memory. The testbenches use only
`$urandom`.

## File map

| file | contents |
|------|----------|
| `rtl/sf_pkg.sv` | mode enum, mode masks, orbit functions |
| `rtl/sf_arith.svh` | rounding multiply and saturation |
| `rtl/sf_sr.sv` | line delay |
| `rtl/sub_block1.sv`, `sub_block2.sv`, `sub_block3.sv` | FIR row building blocks |
| `rtl/framework_a.sv`, `framework_a1.sv` | general and separable frameworks |
| `rtl/type1_sepden.sv`, `type3_sepden.sv` | separable filters without symmetry |
| `rtl/t1_block1.sv`, `t1_block2.sv` | Type-1 blocks (column recursion; symmetric core) |
| `rtl/t3_block2.sv`, `t3_block1.sv` | Type-3 blocks (symmetric transposed core; row recursion) |
| `rtl/t1_*_filter.sv`, `t3_*_filter.sv` | the four single-symmetry filters and the multimode filter of each type |
| `rtl/nonsep_diag_filter.sv` | order-2 non-separable diagonal filter |
| `rtl/sym2d_top.sv` | all structures side by side |
| `tb/sf_ref_pkg.sv` | reference model |
| `tb/tb_*.sv` | testbenches |
