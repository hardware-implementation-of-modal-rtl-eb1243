# Modal interval adder/subtractor and multiplier for IEEE-754 doubles

Interval arithmetic replaces a floating-point number by a pair of numbers
that is guaranteed to enclose the true value. *Modal* intervals generalise
this: an interval `[a1, a2]` may have `a1 <= a2` (a *proper* or existential
interval, the classical case) or `a1 >= a2` (an *improper* or universal
interval). Keeping both orderings makes the algebra richer (every interval
has an additive inverse under the "dual" operator, for example), and the
price in hardware is small: the operations are defined on the two bounds
separately, whatever their order.

This repository holds synthesizable SystemVerilog for four hardware units
that operate on modal intervals whose bounds are IEEE-754 binary64 numbers:

| unit | floating-point cores | throughput | latency (cycles) |
|---|---|---|---|
| serial adder/subtractor | 1 adder | 1 op / 2 cycles | 10 |
| parallel adder/subtractor | 2 adders | 1 op / cycle | 8 |
| parallel multiplier | 2 multipliers | 1 op / cycle (1 / 2 for cases 6 and 11) | 9 (10) |
| serial multiplier | 1 multiplier | 1 op / 2 cycles (1 / 3 for cases 6 and 11) | 10 (11) |

The serial forms reuse one floating-point core for both bounds and cost
little more area than a plain double-precision unit; the parallel forms
duplicate the core and run at the core's own rate. A system would normally
pick one form of each; the top module `modal_interval_units` instantiates all
four side by side so that each can be used and tested.

The design follows a thesis on hardware modal interval units in its
arithmetic definitions, its case analysis of multiplication, the split of
each unit into pre-processing, floating-point core and post-processing, and
its cycle counts. The handshake, the reset, the encodings and the inside of
the floating-point cores are this design's own; the sections below say where.

## Outward rounding

Every bound is computed by one floating-point operation with a directed
rounding mode so the result encloses the exact one: the first bound is
rounded towards −∞, the second towards +∞.

- add: `[a1, a2] + [b1, b2] = [a1 + b1 (down), a2 + b2 (up)]`
- subtract: `[a1, a2] − [b1, b2] = [a1 − b2 (down), a2 − b1 (up)]`

The modal definitions are the same formulas as the classical ones, applied
without checking the order of the bounds. Infinite bounds follow the IEEE
rules of the floating-point core, so for example `+∞ + (−∞)` gives NaN for
that bound.

## Floating-point cores (`fp_addsub`, `fp_mul`)

Both are complete IEEE-754 binary64 units: subnormal inputs and outputs,
signed zeros, infinities, NaN, and four rounding modes chosen per operation
(`rmode_e`: nearest-even, towards zero, up, down). Any NaN result is the
canonical quiet NaN `0x7FF8_0000_0000_0000`.

The multiplier has one extra input, `ieee_flag`. With `ieee_flag = 1` the
product `0 × ∞` is NaN as IEEE-754 demands. With `ieee_flag = 0` it is zero
(sign = XOR of the operand signs), which is the value interval
multiplication needs: a bound that is exactly zero multiplied by an infinite
bound contributes zero to the enclosure. The interval multipliers use
`ieee_flag = 0` except in one situation described below.

Inside, each core is one combinational datapath (align/add/normalise, or
53×53-bit product and normalise, then a shared `round_pack` function from
`mi_pkg`) followed by `LATENCY` register stages, default 7. Only the depth
of 7 comes from the original design, which used an existing core; a faster
implementation would spread the datapath over the stages by retiming or by
hand. Everything above the cores depends only on the depth, not on how the
stages are filled.

## Adder/subtractor units

**Serial (`ia_addsub_serial`).** The pre-processing stage (`ia_addsub_serial_pre`)
accepts an operation, sends the first-bound operation (rounded down) to the
single adder in the same cycle it registers the operands, and the
second-bound operation (rounded up) in the next cycle; `in_ready` is low
during that second cycle. A one-bit tag travels beside the adder pipeline
(`mi_delay`) to say which bound each sum is. The post-processing stage
(`ia_addsub_serial_post`) stores the first bound and, when the second
arrives, presents the whole interval with a one-cycle `result_ready`.
Latency: 1 (pre) + 7 (adder) + 2 (post) = 10 cycles.

**Parallel (`ia_addsub_parallel`).** The pre-processing stage
(`ia_addsub_parallel_pre`) registers both operations in one cycle; two
adders work in lockstep, one rounding down, one up, and their output
registers are the result register. Latency 1 + 7 = 8, one operation per cycle,
`in_ready` always 1.

## Multiplication: the sign cases

Multiplication is where modal intervals differ from classical ones and where
most of the logic of this design lies. The result bounds are each one
product of one bound of `A` and one of `B`, and which products are used
depends only on the signs of the four bounds. `im_case_decode` forms the
4-bit case number

    x = {x3, x2, x1, x0} = {a1 < 0, a2 < 0, b1 < 0, b2 < 0}

where −0 counts as non-negative. Of the 16 cases:

- **12 ordinary cases** need exactly two products, one per bound. For
  example `x = 0000` (all bounds non-negative) gives `[a1·b1, a2·b2]`, and
  `x = 0011` (`A` non-negative, `B` negative) gives `[a2·b1, a1·b2]`. The full
  table is in the opening comment of `rtl/im_parallel_pre.sv`.
- **Cases 7 and 10** (`x = 0110`, `1001`: one interval improper across zero,
  the other proper across zero) have the zero interval `[0, 0]` as result.
  If any of the four bounds is infinite the result is `[NaN, NaN]`.
- **Case 11** (`x = 1010`: both proper, both straddling zero) is the classical
  special case: `r1 = min(a1·b2, a2·b1)` rounded down and
  `r2 = max(a1·b1, a2·b2)` rounded up.
- **Case 6** (`x = 0101`: both improper, both straddling zero) is its modal
  mirror: `r1 = max(a1·b1, a2·b2)` rounded down and
  `r2 = min(a1·b2, a2·b1)` rounded up.

Cases 6 and 11 are the "special cases": they need four products, or three
with the trick used by the serial unit, and so take an extra cycle in both
multipliers. `im_case_decode` also outputs the flags the rest of the design
uses: `inf_flag` (a bound is infinite), `zero_case`, `nan_result` (zero case
with an infinite bound), `sc_classical`, `sc_modal`, `sc_enable` (either
special case), and the magnitude comparisons `cmp_a = |a1| <= |a2|`,
`cmp_b = |b1| <= |b2|`, taken on bits 62..0 of the bounds.

The zero cases need no special result path: the pre-processing units feed
`0 × 0` to the multipliers, which gives `[+0, +0]` at the normal latency; for
`[NaN, NaN]` they feed `∞ × 0` with `ieee_flag = 1`.

### Parallel multiplier (`im_parallel`)

Two multipliers, multiplier 1 rounding down and multiplier 2 rounding up.
For the 12 ordinary cases `im_parallel_pre` simply steers the right bounds to
each multiplier and the results go straight to `r1` and `r2`.

For cases 6 and 11 the unit issues two pairs in two consecutive cycles, each
pair belonging to one result bound, so that the post-processing unit
(`im_parallel_post`) needs only one comparator:

| case | cycle 1 (both rounded down) | cycle 2 (both rounded up) |
|---|---|---|
| 6 | a1·b1, a2·b2 → r1 = max | a1·b2, a2·b1 → r2 = min |
| 11 | a1·b2, a2·b1 → r1 = min | a1·b1, a2·b2 → r2 = max |

`in_ready` is low for the second cycle. A 3-bit tag (multiplication type
and "last pair") travels beside the multipliers. Latency 9 (1 + 7 + 1),
10 for the special cases.

### Serial multiplier (`im_serial`)

One multiplier, normally fed the first-bound product (rounded down) and then
the second-bound product (rounded up). For cases 6 and 11 the magnitude
comparisons remove one of the four products. In case 6, for instance,
`a1·b1` and `a2·b2` are both non-negative, and if `|a1| <= |a2|` and
`|b1| <= |b2|` (`c1c0 = 11`) then `a2·b2` is certainly the larger, so
`r1 = a2·b2` without a comparison; only `r2 = min(a1·b2, a2·b1)` needs two
products. When `c1c0` is `01` or `10` it is the other way round: the larger
of the positive products is unknown, but the smaller (most negative) of the
negative products is the one with both larger magnitudes.

The schedule (v = rounded down, ^ = rounded up; the first product of a
comparison goes into a temporary register `T`):

| case | c1c0 | product 1 | product 2 | product 3 |
|---|---|---|---|---|
| 6 | 00 | ^ a1·b2 → T | ^ a2·b1 → r2 = min(T, ·) | v a1·b1 → r1 |
| 6 | 11 | ^ a1·b2 → T | ^ a2·b1 → r2 = min(T, ·) | v a2·b2 → r1 |
| 6 | 01 | v a1·b1 → T | v a2·b2 → r1 = max(T, ·) | ^ a2·b1 → r2 |
| 6 | 10 | v a1·b1 → T | v a2·b2 → r1 = max(T, ·) | ^ a1·b2 → r2 |
| 11 | 00 | v a1·b2 → T | v a2·b1 → r1 = min(T, ·) | ^ a1·b1 → r2 |
| 11 | 11 | v a1·b2 → T | v a2·b1 → r1 = min(T, ·) | ^ a2·b2 → r2 |
| 11 | 01 | ^ a1·b1 → T | ^ a2·b2 → r2 = max(T, ·) | v a2·b1 → r1 |
| 11 | 10 | ^ a1·b1 → T | ^ a2·b2 → r2 = max(T, ·) | v a1·b2 → r1 |

`im_serial_pre` generates this sequence from a small `plan()` function of
(step, case, c1c0); each product carries a destination code (`mul_dest_e`:
store r1, store r2, store T, r1 = max/min with T, r2 = min/max with T) and a
"last" bit down the tag pipeline to `im_serial_post`. `in_ready` is low while
products of the accepted operation remain. Latency 10 (1 + 7 + 2), 11 for
the special cases; one operation per 2 cycles, per 3 for the special cases.

### Comparisons and signed zero

The comparator in the post-processing units compares numerically and treats
+0 and −0 as equal (on a tie the first product is kept). A special-case
result bound that is zero may therefore come out as either sign of zero.
The sign decoding treats −0 as non-negative, which is what keeps the case
table correct for zero bounds.

## Interfaces and timing

All units use the package types of `mi_pkg`: `fp64_t` (64-bit raw binary64)
and `interval_t` (packed struct `{fb, sb}`: first bound in bits 127..64,
second bound in bits 63..0).

Each unit has `in_valid`, `in_ready`, `a`, `b` (and `sub` for the
adder/subtractors) on the input side, and `result_ready` (one-cycle pulse)
with `r` on the output side. An operation is accepted on a rising edge where
`in_valid && in_ready`; results appear in order, exactly the latency in the
table above after acceptance. There is no output back-pressure: the units
are fixed-latency pipelines. Reset is synchronous and active low (`rst_n`);
it clears valid bits and control state only.

`modal_interval_units` brings out the four groups with prefixes `sas_`
(serial add/sub), `pas_` (parallel add/sub), `pm_` (parallel multiplier) and
`sm_` (serial multiplier). Its only parameter, `LATENCY` (default 7), sets
the depth of every floating-point core; the unit latencies above move with
it.

## Files

| file | contents |
|---|---|
| `rtl/mi_pkg.sv` | types, rounding-mode and destination enums, `round_pack`, `fp_lt` |
| `rtl/fp_addsub.sv`, `rtl/fp_mul.sv` | binary64 cores |
| `rtl/mi_delay.sv` | tag shift register beside a core |
| `rtl/ia_addsub_serial*.sv` | serial adder/subtractor and its pre/post stages |
| `rtl/ia_addsub_parallel*.sv` | parallel adder/subtractor and its pre stage |
| `rtl/im_case_decode.sv` | sign cases and flags of a multiplication |
| `rtl/im_parallel*.sv` | parallel multiplier and its pre/post stages |
| `rtl/im_serial*.sv` | serial multiplier and its pre/post stages |
| `rtl/modal_interval_units.sv` | top |
| `tb/tb_fp_ref_pkg.sv` | reference model: exact arithmetic on wide integers with directed rounding, interval add/sub/mul, operand generators |
| `tb/tb_*.sv` | one self-checking testbench per unit, plus the top |

## Verification

Every testbench compares against `tb_fp_ref_pkg`, which computes each
floating-point result exactly (as a wide integer) and rounds it itself, so it
does not rely on the simulator's floating-point arithmetic; the interval
multiplication reference implements the 16-case table directly (four
products where needed, min/max). Operands are drawn from a weighted mix of
ordinary normals, values near overflow, subnormals, the smallest normals,
signed zeros and infinities, so improper intervals, infinite bounds, NaN
results, the zero cases and `0 × ∞` all occur. Each testbench checks every
result bound and the latency of every operation, and the unit testbenches
also check the issue rate (2 or 3 cycles for the serial units and the
special cases).

- `tb_fp_addsub`, `tb_fp_mul`: the cores in all four rounding modes and both
  `ieee_flag` values.
- `tb_im_case_decode`: the decoder against the sign rules, including ±0.
- `tb_ia_addsub_serial`, `tb_ia_addsub_parallel`, `tb_im_parallel`,
  `tb_im_serial`: each unit with back-to-back random operations; the
  multiplier testbenches also run four published sample vectors, whose
  expected results the reference model reproduces.
- `tb_modal_interval_units`: all four units at once through the top at
  default parameters; it counts add and subtract, improper operands,
  infinite bounds, NaN results, input stalls, cases 6 and 11, the zero cases
  and `0 × ∞`, and fails if any of them never occurred.
- `tb_range_coverage`: the top at default parameters with 13 fixed
  combinations of number classes for the four bounds (normal, near overflow,
  subnormal, zero, infinity, and second operand equal to the additive or
  multiplicative inverse of the first), every combination on every unit.

### Simulating

With Verilator 5 (two-state simulation; every register that is read is
reset), from the repository root:

    verilator --binary -j 8 --top-module tb_modal_interval_units \
        rtl/mi_pkg.sv tb/tb_fp_ref_pkg.sv tb/tb_modal_interval_units.sv \
        -y rtl -y tb -Wno-fatal
    ./obj_dir/Vtb_modal_interval_units

Replace the testbench name to run another one. Each prints
`TB_RESULT checks=<n> failures=<m>` and finishes; a watchdog ends a hung run
with a failure. Lint the RTL with `verilator --lint-only -Wall -y rtl
rtl/mi_pkg.sv rtl/modal_interval_units.sv`. The remaining lint warnings are
unused signals: decoder outputs that one of the multipliers does not need,
and the sign bit in the IEEE class tests.

## Relation to the original design

Taken from the original design: the modal interval definitions and the
outward rounding of each bound; the serial and parallel structure of both
units, with pre-processing, floating-point cores and post-processing; the
16-case sign table of multiplication, the zero cases, the NaN result for
zero cases with infinite bounds, `ieee_flag` and `0 × ∞ = 0`; the
three-product scheme of the serial multiplier with the `|a1| <= |a2|` and
`|b1| <= |b2|` comparisons and the temporary register; the single comparator
of the parallel multiplier's post-processing; the 7-cycle cores and all the
latencies and issue rates in the table at the top.

This design's own choices:

- the `in_valid`/`in_ready` handshake (the original units expected their
  driver to space operations by the right number of cycles), the one-cycle
  `result_ready` pulse, and synchronous active-low reset;
- the rounding-mode encoding, the canonical NaN, and the sign of `0 × ∞ = 0`;
- the inside of the floating-point cores (one combinational step plus
  pipeline registers);
- the tag pipelines that tell the post-processing stages what each result is,
  and the destination codes of the serial multiplier.

Places where the original description was inconsistent and one reading was
chosen:

- For the parallel multiplier's case 6 the original operand table issues the
  second-bound pair first, while its text and case 11 issue the first-bound
  pair first; here both cases issue the first-bound pair first. Results are
  the same either way.
- For the serial multiplier's case 6 with `c1c0 = 01` and `10`, the original
  table takes the direct second bound as `a1·b2` and `a2·b1` respectively.
  With `c1c0 = 01` (`|b1| > |b2|`, `|a1| <= |a2|`) the more negative product
  is `a2·b1`, not `a1·b2`, so the table's choice would give a wrong (too
  narrow) bound; this design uses the mathematically correct products
  shown above.
- The logic equations as printed combine some flags with the wrong operator
  (an infinity test that ORs the exponent bits; a NaN-result flag that ORs
  the infinity flag with the zero cases; a special-case enable that ANDs the
  two special cases). The design uses the readings their descriptions
  state: exponent all ones and fraction zero; zero case *and* an infinite
  bound; case 6 *or* case 11.

Not built: classical-interval variants with an "improper operand" exception
flag, a modal/classical mode switch, floating-point exception flags
(overflow, underflow, inexact), interval division and other functions, and
multiple-precision units. The original work describes these only as
comparisons or future work.
