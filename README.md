# DPdSP: a dual-mode double / dual-single precision floating-point divider

A floating-point divider that handles either **one IEEE 754 double-precision
(DP) division** or **two independent single-precision (SP) divisions** in the
same hardware. The choice is made per operation by the `dp_sp` input. The idea
is to build vector units from one kind of configurable divider instead of
separate DP and SP arrays.

The expensive part of a divider is the multiplier array inside the mantissa
division. This design therefore:

- computes the mantissa quotient with a **series expansion** of the divisor's
  reciprocal,
- runs that expansion **iteratively on a single multiplier**, one
  multiplication per clock, and
- makes the multiplier **dual-mode**: one 54×54 product, or two 24×24 products
  side by side, with only three input multiplexers added.

The design supports sub-normal operands and results, rounds to nearest with
ties to even, and handles zero, infinity and NaN per lane. In every
simulation run, each result was within one unit in the last place (ulp) of
the exact quotient.

## Interface and operand layout

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `in_valid` / `in_ready` | in / out | 1 | handshake. An operation is accepted on a clock edge where both are high |
| `dp_sp` | in | 1 | 1 = one DP division, 0 = two SP divisions |
| `in1`, `in2` | in | 64 | dividend, divisor |
| `out_valid` | out | 1 | high for one cycle per result |
| `out_dp_sp` | out | 1 | mode of the result |
| `out_result` | out | 64 | quotient(s) |
| `out_dbz` | out | 3 | division by zero, per lane |
| `out_invalid` | out | 3 | invalid operation (0/0, ∞/∞, signalling or quiet NaN operand), per lane |

Layout of the operands and of the result:

- **DP mode:** all 64 bits are one binary64 value.
- **Dual-SP mode:** bits `[63:32]` hold lane **SP-2** and bits `[31:0]` hold
  lane **SP-1**, each a binary32 value.

The two layouts overlap on purpose. The 8 most significant DP exponent bits are
the SP-2 exponent bits. The first stage exploits this by sharing its field
tests between DP and SP-2.

Flag vectors use bit 2 for DP, bit 1 for SP-2 and bit 0 for SP-1. Only the bits
of the active mode are ever set.

## Pipeline and timing

The divider has three stages:

| Stage | Work | Cycles |
|---|---|---|
| 1 | Unpack and classify, normalize sub-normals, fetch the reciprocal seed | combinational, registered when the operation is accepted |
| 2 | Iterative mantissa division (`mant_div`) in parallel with sign, exponent and shift-amount logic (`exp_unit`) | 9 (DP) / 7 (dual-SP) |
| 3 | Right shift for underflow, rounding, normalization and exceptions, output multiplexer | 1, ends in the output register |

- **Latency:** 11 cycles for DP and 9 for dual-SP. The count includes the
  accepting edge as cycle 1 and the edge that raises `out_valid` as the last.
- **Acceptance interval:** one operation every 10 cycles (DP) or 8 cycles
  (dual-SP). `in_ready` falls when an operation is accepted and rises again
  on the clock edge that ends the mantissa divider's last state.

These latency and throughput numbers are the figures reported for the original
architecture. The handshake itself is this design's own.

The mode may change from one operation to the next. An assertion in `mant_div`
checks that the mode does not change while an operation is in the divider.

## Stage 1: unpacking, sub-normals and the reciprocal seed

`data_extract` classifies each operand of each lane as zero, sub-normal,
infinity or NaN. It also builds two **unified mantissas** `M1` (dividend) and
`M2` (divisor) with one 2:1 multiplexer each:

```
DP      : M = {hidden, frac[51:0], 11'b0}
dual-SP : M = {hidden2, frac2[22:0], 8'b0,  hidden1, frac1[22:0], 8'b0}
```

After this point the datapath sees one 64-bit word in either mode. DP occupies
`[63:11]`, SP-2 `[63:40]` and SP-1 `[31:8]`.

Sub-normal operands have a hidden bit of 0. Two blocks bring them to `1.xxx`
form:

- **`lod_dual`** counts leading zeros with two 32-bit counters. In SP mode each
  counter serves its own half. In DP mode the two counts combine.
- **`lshift_dual`** is a logarithmic shifter built from two 32-bit halves. Bits
  cross from the lower half into the upper half only in DP mode.

The shift amounts go on to the exponent logic.

**`a1inv_lookup`** then reads the seed reciprocal from two 256-entry tables:

- **DP_SP2 (256×53):** indexed by the 8 fraction bits after the leading one of
  the DP divisor or of the SP-2 divisor.
- **SP1 (256×24):** serves lane SP-1 only.

In dual-SP mode the SP-2 seed is the top 24 bits of the DP_SP2 entry.

## Stage 2: the iterative mantissa divider

This is the heart of the design (`mant_div.sv`). The rest of this section
explains how it works.

### The series

Let the normalized divisor mantissa be `m2 = 1.xxxxxxxx xxxx…`. Call its first
8 fraction bits `a1` (a value `1.xxxxxxxx`) and the rest `a2`, so
`m2 = a1 + a2` with `0 ≤ a2 < 2^-8`. With `r ≈ 1/a1` from the table:

```
q = m1/m2 = m1·r · 1/(1 + B) = A · (1 - B + B² - B³ + B⁴ - B⁵ + B⁶ - …)
```

Here `A = m1·r` is a first quotient estimate. `B` is the relative error of the
seed, about `a2/a1 < 2^-8`. Each further term adds about 8 bits of accuracy:

- **DP** needs terms up to `B⁶`.
- **SP** needs terms up to `B²`.

The polynomial factors so that the SP computation is a prefix of the DP
computation:

```
1 - B + B² - B³ + B⁴ - B⁵ + B⁶  =  1 - (B - B²)·(1 + B² + B⁴)
```

The named terms are:

```
A = m1·r         B = m2·r - 1      C = B²          D = C² = B⁴
E = B - C        F = 1 + C + D     G = E·F
H = A·G (DP)     H = A·E (SP)      q = I = A - H
```

Dual-SP mode skips D, F and G. Its series is `A·(1 - B + B²)`.

### Schedule

There is one multiplier, and each state of a nine-state FSM issues at most one
multiplication. In dual-SP mode the same multiplication carries both lanes at
once, one in each half of the multiplier.

| State | Multiplier | Registered when leaving the state |
|---|---|---|
| S0 (idle) | m1 × r | A (only when `start` is high) |
| S1 | m2 × r | B = product − 1 |
| S2 | B × B | C |
| S3 | C × C (DP only) | D; E = B − C (subtractor) |
| S4 | idle | F = 1 + C + D (DP only) |
| S5 | E × F (DP only) | G |
| S6 | G × A (DP) or E × A (SP lanes) | AG or AE |
| S7 | idle | H, aligned to A's format |
| S8 | idle | `done`. The quotient I = A − H is combinational from A and H |

- **DP** visits S0 through S8. That is 9 cycles.
- **Dual-SP** jumps from S3 to S6. That is 7 cycles.
- `E = B − C` and `I = A − H` use `dual_sub`. It is one 64-bit subtractor in
  DP mode and two 32-bit subtractors in dual-SP mode.

### Fixed-point formats

Each term is kept in a 64-bit register, or in two 32-bit lanes in dual-SP mode.
The binary point is placed to keep the bits that matter. "F = n" means that bit
`i` has weight `2^(i-n)`.

| Term | DP | each SP lane | Notes |
|---|---|---|---|
| A, q | 2.62 | 2.30 | The quotient lies in (0.5, 2) |
| B | F = 71 | F = 39 | B < 2^-7, so the leading zeros are not stored. Taking the product's bits from 2^-7 down drops the integer 1, which makes the "− 1" free |
| C | F = 78 | F = 39 | |
| D | F = 53, 25 bits | – | Only its top bits are significant at DP precision |
| E | F = 71 | F = 39 | |
| F | 1.53 | – | |
| G | F = 62 | – | |
| H | F = 62 | F = 30 | Same format as A, so that I = A − H needs no alignment |

The multiplier takes 54-bit (DP) or 24-bit (SP) operands. Before each
multiplication the top 54 or 24 bits of a register are selected. Where a term
has leading zeros, as B, C and E do, the selection starts below them, so that
no multiplier bits are wasted.

### Seed table and why B is `m2·r − 1`

The tables hold `ceil(2^31 / (256 + i))`: 1/a1 rounded up to 24 significant
bits. The 53-bit table stores these 24 bits at the top, followed by zeros.
Rounding up makes `m2·r ≥ 1`, so B is never negative and needs no sign
handling. The contents are computed during elaboration by a constant function
(`recip_lut.sv`). There is no data file.

The multiplier output in S1 is `m2·r`, and `B = m2·r − 1` is exactly the error
that the series corrects. As a result, the seed's own rounding error is
corrected as well, and the table needs no more than 24 significant bits.

The original formulation defines the second term as `a1^-1·a2`. That equals
`m2·r − 1` only if the table entry is exactly 1/a1. This design chooses
`m2·r − 1`.

### Accuracy of the mantissa quotient

Observed errors from the `mant_div` testbench, 3000 random divisions:

| Mode | Truncation bound | Largest error (units of the quotient's LSB) | Largest error (fraction of the result ulp) |
|---|---|---|---|
| DP | omitted terms below `B⁷ < 2^-56` | 80 units of 2^-62 | about 0.08 of the DP ulp |
| SP | omitted term `B³·A`, close to `2^-24` | 107 units of 2^-30 | about 0.8 of the SP ulp |

The SP truncation comes from the short three-term series itself. The quotient
is not correctly rounded in every case, but it always stays within 1 ulp (see
*Verification*).

## The dual-mode Booth multiplier

`booth_mult_dual` is a radix-4 modified-Booth multiplier with three operands:
two multiplicands and one multiplier. Three 2:1 multiplexers form them:

```
in1_t1 = dp ? x_dp : {30'b0, x_sp1}        // multiplicand for the low Booth digits
in1_t2 = dp ? x_dp : {x_sp2, 30'b0}        // multiplicand for the high Booth digits
in2    = dp ? y_dp : {y_sp2, 6'b0, y_sp1}  // multiplier, 6-bit zero gap
```

- `in2` is recoded into 28 radix-4 digits.
- Digits 0–13 select multiples of `in1_t1` (partial products PP1).
- Digits 14–27 select multiples of `in1_t2` (PP2).

**DP mode.** Both multiplicands are the same, so the rows add up to the full
54×54 product.

**Dual-SP mode.** The 6-bit zero gap makes the low digits recode exactly
`y_sp1` and the high digits exactly `y_sp2·2^30`.

- PP1 adds up to `x_sp1·y_sp1` in bits `[47:0]`.
- PP2 adds up to `x_sp2·y_sp2` in bits `[107:60]`.
- The two SP products never overlap, and no carry crosses between them.

The multiplier adds no other mode logic.

The 28 partial products use the usual sign-extension elimination. Each row
is 56 bits wide, `{~sign, 55 magnitude bits}`. One correction row carries the
+1 of every negated row and the constant that the inverted sign bits require.

That makes 29 rows. They are reduced column by column by a **Dadda tree** of
full and half adders, with target heights 28, 19, 13, 9, 6, 4, 3 and 2. That
is eight levels, as in the original architecture. At each level a column is
reduced only as far as that level's target requires.

Constant functions work out the whole plan at elaboration: the height of
every column at every level and the number of adders in each column. The
generate loops then place the adders from that plan, so the tree has no
hand-written wiring. A Kogge-Stone adder (`ks_adder`) adds the final two
rows.

## Sign, exponent and shift amounts

`exp_unit` runs in stage 2, in parallel with the divider. For each lane it
computes:

- the result sign;
- a base biased exponent, `(e1 − ls1) − (e2 − ls2) + bias`. A sub-normal's
  exponent field counts as 1, and `ls` is the stage-1 normalization shift;
- two right-shift amounts for an underflowing result:
  `rs0 = max(0, 1 − ebase)` for a quotient ≥ 1 and
  `rs1 = max(0, 2 − ebase)` for a quotient < 1. They saturate at 63 (DP) or
  31 (SP).

Both shift amounts are prepared because it is not known which one applies
until the quotient exists.

## Stage 3: right shift, rounding, finishing

**`rshift_dual`** aligns the quotient to `1.63` (or `1.31` per lane): it
shifts by one if q ≥ 1 and by two otherwise. It records which case occurred
(`lt1`). It then shifts right by `rs0` or `rs1` to form a sub-normal result,
and collects the dropped bits into a sticky bit per lane.

**`round_dual`** rounds to nearest, ties to even. It uses two 32-bit
incrementers:

- Each incrementer rounds one SP lane on its own.
- In DP mode the lower incrementer's carry feeds the upper one, so that
  together they round the 53-bit mantissa.

A lane whose mantissa rounds up to 2.0 raises `cout`.

**`norm_exc`** holds one `lane_finish` per lane (DP, SP-2, SP-1). Each
`lane_finish` does the following:

- applies the 1-bit renormalization after a carry and the exponent increment;
- turns exponent overflow into infinity;
- sets the exponent field to 0 for a sub-normal result, or to 1 if rounding
  brought it back to normal;
- applies the IEEE special cases:
  - NaN in → quiet NaN and `invalid`
  - 0/0 and ∞/∞ → quiet NaN and `invalid`
  - x/0 → ∞ and `dbz`
  - ∞/x → ∞
  - 0/x and x/∞ → 0

A 64-bit 2:1 multiplexer then selects either the DP result or the pair
`{SP-2, SP-1}`.

Two choices here are this design's own:

- A NaN result is the canonical quiet NaN, with only the top fraction bit set.
  Input NaN payloads are not propagated.
- Any NaN operand, quiet or signalling, raises `invalid`.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends with a
`TB_RESULT checks=… failures=…` line and has a cycle watchdog.

**End-to-end tests.** `tb_dpdsp_divider` runs the full design at its only
configuration:

- It streams several thousand operations with mixed modes and operand classes.
- It compares every result with a reference, `fp_ref_pkg`: real arithmetic for
  DP, exact conversion plus binary32 rounding for SP.
- It checks the 11/9-cycle latency and the 10/8-cycle interval.
- It counts each mechanism of the design and fails if one never occurred. The
  mechanisms are: the DP-only FSM states, the SP skip, sub-normal
  normalization and denormalization, the DP carry between the rounding
  incrementers, a sub-normal rounding up to normal, a quotient below one,
  overflow, each special case and mode switches.

**Unreachable carry.** No end-to-end operation makes a mantissa round up to
2.0. The quotient estimate never falls within the last half ulp below 2.0 or
1.0. That path is tested directly in `tb_round_dual` and `tb_norm_exc`.

**Workload test.** `tb_div_workloads` covers all four operand-class
combinations (normal/normal, normal/sub-normal, sub-normal/normal,
sub-normal/sub-normal) in each mode, 40,000 operations per combination, plus
directed special cases. The original evaluation used 5 million per
combination; the count is set by `NPER`. Results at the default size:

| Mode / classes | n/n | n/s | s/n | s/s |
|---|---|---|---|---|
| DP, correctly rounded | 99.7 % | 99.8 % | 99.8 % | 99.6 % |
| dual-SP (both lanes), correctly rounded | 86 % | 98 % | 51 % | 96 % |
| largest error | 1 ulp | 1 ulp | 1 ulp | 1 ulp |

Every other result is off by exactly one ulp, which matches the stated accuracy
of the original architecture ("at most 1 ulp"). The weaker SP figures come
from the three-term SP series. They are worst when the quotient is below one,
which is most often the case in the sub-normal/normal combination.

## Departures and filled-in details

**Taken from the original architecture:**

- the three-stage structure;
- the dual-mode operand layout;
- the shared exponent tests;
- the unified mantissas;
- the 8-bit seed with 256×53 and 256×24 tables, SP-2 sharing the DP table;
- the factored series and its term names A to I;
- the nine FSM states, including the SP skip of S4/S5 and the idle multiplier
  in S4, S7 and S8;
- the dual-mode Booth multiplier with three input multiplexers and a 6-bit gap;
- the 8-level Dadda reduction tree and the Kogge-Stone final adder;
- the 64-bit DP / 32-bit SP subtractions;
- rounding with two chained 32-bit incrementers;
- per-lane normalization and exception units and the 64-bit output
  multiplexer;
- latency 11/9 and throughput 10/8.

**This design's own choices:**

- `B = m2·r − 1` instead of `a1^-1·a2`, and a seed table rounded up to
  24 significant bits;
- the fixed-point formats and bit selections of the divider terms, except
  A. A's selection (`dp_mult[105:42]`, and `sp_mult[47:16]` per SP lane) is
  the original's. The others follow from the redefined B;
- the partial-product row encoding (sign-extension elimination) and the bit
  order inside each Dadda column;
- the internals of the leading-one detector and both shifters, which the
  original defers to earlier work;
- the exponent and shift-amount formulation;
- the two-shift-amount scheme;
- the handshake (`in_valid`/`in_ready`/`out_valid`), the asynchronous reset
  and the flag outputs;
- NaN encoding and `invalid` on any NaN operand.

**Not modelled:**

- other rounding modes (only round-to-nearest-even is described);
- a correctly rounded result: as in the original, the result may be 1 ulp off.

## Files

| File | Contents |
|---|---|
| `rtl/dpdsp_pkg.sv` | Lane indices, format constants, operand class record, FSM state type, per-lane exponent record |
| `rtl/dpdsp_divider.sv` | Top level: the three stages, pipeline registers and handshake |
| `rtl/data_extract.sv` | Unpacking, classification, unified mantissas |
| `rtl/lod_dual.sv`, `rtl/lshift_dual.sv` | Dual-mode leading-one detector and left shifter |
| `rtl/a1inv_lookup.sv`, `rtl/recip_lut.sv` | Seed tables and their packing |
| `rtl/mant_div.sv` | Iterative mantissa divider (FSM and term registers) |
| `rtl/booth_mult_dual.sv`, `rtl/ks_adder.sv` | Dual-mode Booth multiplier and its final adder |
| `rtl/dual_sub.sv` | 64-bit / 2×32-bit subtractor |
| `rtl/exp_unit.sv` | Sign, exponent and right-shift amounts |
| `rtl/rshift_dual.sv`, `rtl/round_dual.sv` | Alignment and right shift, rounding |
| `rtl/norm_exc.sv`, `rtl/lane_finish.sv` | Normalization, exceptions, output multiplexer |
| `tb/tb_<module>.sv` | Unit testbench of each module |
| `tb/tb_dpdsp_divider.sv` | End-to-end test (see above) |
| `tb/tb_div_workloads.sv` | Operand-class workload test |
| `tb/fp_ref_pkg.sv` | Reference helpers for the testbenches (binary32 conversion, ulp distance) |

A generic yosys synthesis of the whole divider gives about 12,700 cells (most
of them the single-bit full and half adders of the Dadda tree), 1,082
flip-flop bits, and the two lookup tables (19,712 ROM bits).

## Simulating

Every testbench runs with Verilator 5 and needs only the sources. Packages are
listed first, and the remaining RTL modules are found by `-y`. From the
repository root:

```sh
verilator --binary --timing --assert -Irtl -Itb -y rtl \
    rtl/dpdsp_pkg.sv tb/fp_ref_pkg.sv tb/tb_dpdsp_divider.sv \
    --top-module tb_dpdsp_divider -o sim
./obj_dir/sim
```

To run another test, substitute another testbench: `tb_div_workloads`,
`tb_mant_div`, `tb_booth_mult_dual` and so on. Each prints a summary and
`TB_RESULT checks=N failures=0` on success. The end-to-end and workload tests
each finish in well under a minute of simulation.

To change the workload size, edit `NPER` in `tb/tb_div_workloads.sv`. The
design itself has no size parameters beyond the table width: the formats are
fixed by IEEE 754.
