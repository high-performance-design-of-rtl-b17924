# Radix-4 SRT floating-point division, reciprocal and inverse square root

Three floating-point operators, `a / b`, `1 / a` and `1 / sqrt(a)`, built around one
idea. The significand is computed by a **radix-4 SRT digit recurrence**, not by a multiplier
or a lookup table. Each step picks one quotient digit from {-2, -1, 0, +1, +2} by looking at
a few top bits of a redundant (carry-save) residual, subtracts the digit's multiple, and
shifts. No step ever needs a full-width carry-propagate addition. Each step gives two result
bits. The digits are turned into ordinary binary on the fly. A single addition at the end
settles the last bit and the sticky bit.

All three operators are parameterized in:

- the fraction width (`sig_width`) and exponent width (`exp_width`);
- the rounding mode (`round`, six modes);
- the number of pipeline register ranks (`pipe_stages`, 0 to 3).

Half precision (10/5), single precision (23/8) and bfloat16 (7/8) are the intended formats.
Other widths work too. The defaults are single precision, round to nearest even, and no
pipeline registers.

## Interface

| module | ports |
|---|---|
| `srt_div` | `clk`, `rst_n`, `a`, `b`, `z`, `status[7:0]` |
| `srt_recip` | `clk`, `rst_n`, `a`, `z`, `status[7:0]` |
| `srt_invsqrt` | `clk`, `rst_n`, `a`, `z`, `status[7:0]` |
| `srt_ip_top` | all three side by side: `div_a/div_b/div_z/div_status`, `recip_*`, `isqrt_*` |

Operands and results are `{sign, biased exponent, fraction}`, `sig_width+exp_width+1` bits
wide, with a hidden leading one. Parameters:

| parameter | default | meaning |
|---|---|---|
| `sig_width` | 23 | fraction bits |
| `exp_width` | 8 | exponent bits |
| `round` | `IEEE_NEAR` | `srt_pkg::round_mode_e`: `IEEE_NEAR` (ties to even), `IEEE_ZERO`, `IEEE_PINF`, `IEEE_NINF`, `NEAR_UP` (nearest, ties toward +inf), `AWAY_ZERO` |
| `pipe_stages` | 0 | 0..3 register ranks; latency = `pipe_stages` cycles; a new operation every cycle |

With `pipe_stages = 0` an operator is purely combinational and `clk`/`rst_n` are unused.
There is no valid/ready handshake. The pipeline advances on every rising clock edge, and
the result for a set of operands appears `pipe_stages` edges after they were applied. That
gives one result per clock. The reset is asynchronous and active
low, and clears the pipeline registers.

`status` bits: `[0]` zero, `[1]` infinity, `[2]` invalid, `[3]` tiny (result flushed),
`[4]` huge (overflow), `[5]` inexact, `[6]` always 0, `[7]` divide by zero.

## The recurrence

### Division and reciprocal

With the divisor `d` in [1/2, 1) and the residual bounded by |w| ≤ 2/3·d, the step is

    w[j+1] = 4·w[j] − q[j+1]·d

The selection rule only has to keep the new residual inside the same bound. Thanks to the
redundancy of the digit set it can be decided from estimates. The residual estimate `y` is
7 bits of `4w` (3 integer bits, 4 fraction bits), the sum of the top bits of the two
carry-save words. It is never too large, and too small by less than 2/16. The divisor
estimate is its first few bits after the leading one. For each divisor interval, four
thresholds `m_-1 < m_0 < m_1 < m_2` (in sixteenths) split the range of `y`:

    q = −2 if y < m_-1,   q = k if m_k ≤ y < m_(k+1),   q = +2 if y ≥ m_2

Two threshold tables are used:

- **Table 1** (`srt_sel_t1`) has 16 rows, indexed by 4 bits of the divisor after the leading
  one (32·D = 16..31):

      m_2 : 12 13 14 14 15 15 16 17 17 18 19 19 20 21 21 22
      m_1 :  3  4  4  4  4  4  4  5  5  7  7  6  5  6  8  8
      m_0 : −5 −5 −5 −6 −6 −6 −7 −7 −7 −8 −8 −8 −9 −9 −9 −10
      m_-1: −13 −14 −14 −15 −16 −17 −18 −18 −19 −19 −20 −21 −23 −23 −24 −25

- **Table 2** (`srt_sel_t2`) has 8 rows, indexed by 3 bits (16·d = 8..15):

      m_2 : 12 14 15 16 18 20 20 24
      m_1 :  4  4  4  4  6  6  8  8
      m_0 : −4 −6 −6 −6 −8 −8 −8 −8
      m_-1: −13 −15 −16 −18 −20 −20 −22 −24

The `m_1` row of Table 1 is not monotonic. It is still correct, and both tables keep the
residual bounded for every divisor interval and every estimate.
`tb_srt_sel_t1`/`tb_srt_sel_t2` check this exhaustively against the bound conditions
themselves, not against a copy of the table.

Digits are one-hot: −2 = `1000`, −1 = `0100`, 0 = `0000`, +1 = `0001`, +2 = `0010`. The
multiple `q·d` is therefore a multiplexer choosing `d`, `2d` or their complement. One row of
3:2 counters adds it to the carry-save residual. The +1 of the complement goes into the free
LSB of the carry word (`srt_div_step`).

How each operator places its operands:

| operator | placement | start | result | steps N |
|---|---|---|---|---|
| division (Table 1) | `x = 1.f_a / 8` ∈ [1/8, 1/4), `d = 1.f_b / 2` ∈ [1/2, 1) | `w[0] = x` | Q ≈ x/d ∈ (1/8, 1/2); shifted left 2 or 3 bits, the exponent drops by one in the 3-bit case | ⌈(sig_width+5)/2⌉ |
| reciprocal (Table 2) | `d = 1.f_a / 2` | `w[0] = 1/4` | Q ≈ 1/(4d); 4Q = 2/1.f_a ∈ (1, 2], so no normalization shift | ⌈(sig_width+4)/2⌉ |

For single precision both take 14 steps. The division's starting point `x/8` and the
reciprocal's 1/4 are what keep `w[0]` within 2/3·d.

### Inverse square root

The operand is written as `a = d · 4^k` with `d` in [1/4, 1). For an even unbiased exponent,
`d = 1.f/4`. For an odd one, the significand goes one bit further left (`d = 1.f/2`), so
halving the exponent is exact. Then `1/sqrt(a) = 2^-k / sqrt(d)`, and `1/sqrt(d)` lies in
(1, 2].

The residual is `w[j] = 4^j (1 − d·Q[j]²) / 2`. Writing the digit's effect out gives

    w[j+1] = 4·w[j] − q·D[j] − q²·C[j]
    D[j+1] = D[j] + 2q·C[j]          (D = d·Q, tends to sqrt(d) ∈ [1/2, 1))
    C[j+1] = C[j] / 4                 (C[j] = d·4^-(j+1)/2)

so every product by a digit is again a multiplexer (`srt_isqrt_step`). Two rows of 3:2
counters absorb the two subtrahends. `D` is a plain binary word updated by an adder. Digits
are selected with Table 1, indexed by `D`.

The recurrence cannot start from Q = 0 (D would be 0) or from Q = 1, because the digits
could then not reach 2. A six-entry table on the top three bits of `d` supplies the first
approximation `Q[0]`, in eighths:

| d | [2/8,3/8) | [3/8,4/8) | [4/8,5/8) | [5/8,6/8) | [6/8,7/8) | [7/8,1) |
|---|---|---|---|---|---|---|
| Q[0] | 14/8 | 12/8 | 11/8 | 10/8 | 9/8 | 8/8 |

This keeps `w[0]` inside the bound and `D` close to [1/2, 1). While `D` is still outside that
range, the nearest table row is used. The digits are converted on the fly from 0 and then
added to `Q[0]`. N = ⌈(sig_width+3)/2⌉ steps, 13 for single precision. The words are
`sig_width + 3 + 2N` fraction bits wide, so that `C` never loses a bit.

### On-the-fly conversion and the last bit

`srt_otf` keeps Q and QM = Q − 4^-j. Each digit appends two bits to one of them:

| q | Q[j+1] | QM[j+1] |
|---|---|---|
| +2 | {Q, 10} | {Q, 01} |
| +1 | {Q, 01} | {Q, 00} |
| 0 | {Q, 00} | {QM, 11} |
| −1 | {QM, 11} | {QM, 10} |
| −2 | {QM, 10} | {QM, 01} |

After the last step one carry-propagate addition gives the residual's true value:

- a negative residual means Q is one unit too large, and QM is taken;
- a non-zero residual sets the sticky bit.

The truncated result plus sticky is therefore exact, which is all rounding needs.

## Rounding, post-normalization, exceptions

- `srt_round` takes `{1, fraction, guard, round, sticky}` (`sig_width+4` bits) and returns
  `sig_width+2` bits including a carry.
- `srt_postnorm` shifts back when rounding carried (1.11…1 → 10.0). It packs the result and
  handles the range:
  - **Overflow** gives infinity, or the largest finite number when the mode rounds toward
    zero for that sign.
  - **Tiny results are never produced as denormals.** They are flushed, keeping their sign,
    to zero or to the smallest normal number (MinNorm). A denormal counts as nearer to zero,
    so the nearest modes and `IEEE_ZERO` give zero. `AWAY_ZERO` gives MinNorm, and so do
    `IEEE_PINF` for positive and `IEEE_NINF` for negative results.
  - Tininess is judged after rounding.
- `srt_except` treats operands by exponent field:
  - exponent 0 counts as **zero**, denormals included;
  - an all-ones exponent counts as **infinity**, NaN included.

  It then overrides the datapath result:

  | operator | cases |
  |---|---|
  | division | x/0 = ±inf (divide-by-zero), inf/x = ±inf, 0/x = ±0, x/inf = ±0; 0/0 and inf/inf are invalid |
  | reciprocal | 1/±0 = ±inf (divide-by-zero), 1/±inf = ±0 |
  | inverse square root | 1/sqrt(±0) = ±inf (divide-by-zero), 1/sqrt(+inf) = +0; negative operands are invalid |

  Invalid operations return the +infinity pattern with the invalid and infinity flags.
  Outputs are never NaN or denormal.

## Pipelining

Each operator has three possible register ranks. They are present as follows:

| rank | present for `pipe_stages` |
|---|---|
| early | 2, 3 |
| middle | 1, 3 |
| late | 2, 3 |

So exactly `pipe_stages` ranks exist. They sit between recurrence steps and split the chain
into `pipe_stages + 1` runs of about equal length. For single-precision division with
`pipe_stages = 3`, they come after steps 4, 7 and 11. The exponent, the operands (needed by
the exception logic) and `Q[0]` travel with the residual. `srt_pipe_reg` is a register when
present and a wire otherwise.

## Where this departs from, or adds to, the original description

These are choices made where the description was silent or inconsistent:

- **Threshold tables.** Their rows were printed with the labels `m_-1 … m_2` against the values
  of `m_2 … m_-1`. They are used in the only order that satisfies the selection rule.
- **Table for division.** One passage suggests the divider shares the reciprocal's selection
  function. The divider uses Table 1, as that table's own caption says.
- **Reciprocal residual.** Computed as `4^j (1/4 − d·Q)` instead of `4^j (1 − d·Q)`, so that
  it starts inside the convergence bound. The result is the same 1/d in (1, 2].
- **Step counts.** The stated count ⌈(sig_width+3)/2⌉ is kept for the inverse square root. It
  is raised by one bit for the reciprocal and by two for division, whose quotients carry
  leading zeros. Otherwise guard and round bits would be missing.
- **Inverse square root.** The starting table, the final addition of `Q[0]`, and the clamping
  of the table row for out-of-range `D` are this design's own. The description does not give
  how the recurrence starts. It defines `C` without the factor `d`, which its own update rule
  for `D` needs; this design includes `d`.
- **Exceptions and flags.** The status bit layout, NaN handled as infinity, the invalid-result
  pattern, and tininess after rounding are this design's own.
- **Reset.** The asynchronous reset of the pipeline registers is this design's own.
- **Top level.** `srt_ip_top` simply places the three operators side by side with one shared
  parameter set.

The selection thresholds, the digit set and its one-hot codes, the on-the-fly conversion
rule, the D/C formulation, the six rounding modes, the flush-to-Zero/MinNorm rule and the
register-rank pattern follow the description.

## Verification

Every testbench prints `TB_RESULT checks=N failures=M`. Reference results come from
`tb/srt_ref_pkg.sv`, which computes each correctly rounded result with wide integer
arithmetic:

- division: long division with remainder;
- inverse square root: integer square root and an exactness test.

It shares nothing with the digit-recurrence hardware.

| testbench | what it does |
|---|---|
| `tb_srt_div`, `tb_srt_recip`, `tb_srt_invsqrt` | 6000 cycles of operands: random, near the exponent limits, and special classes. Runs single precision in all six modes (combinational), half precision with 2 ranks and bfloat16 with 3 and 1 ranks. Checks the latency and one-per-cycle throughput. |
| `tb_srt_sel_t1`, `tb_srt_sel_t2` | exhaustive check of the bound conditions |
| `tb_srt_otf`, `tb_srt_div_step`, `tb_srt_isqrt_step`, `tb_srt_round`, `tb_srt_postnorm`, `tb_srt_except`, `tb_srt_pipe_reg` | unit checks of each building block |
| `tb_srt_ip_top` | end to end: default top plus a half-precision, `AWAY_ZERO`, 3-rank copy. Counts 16 mechanisms and fails if any never occurred: both division normalizations, negative digits, QM correction, results equal to 2, odd and even exponents, rounding increment and carry, overflow, flush to zero and to MinNorm, divide-by-zero, invalid, pipelined results. |
| `tb_srt_ip_top_full` | the default top on the full verification workload: the twelve corner-case operands (±signalling NaN, ±quiet NaN, ±normal, ±denormal, ±inf, ±0), crossed for division, plus 10 million random divisions and 5 million random reciprocals and inverse square roots (under a minute). It also counts coverage bins and fails on any that stay empty: 64 bins on the top fraction bits of the operands and of the results of each component, the 32 × 32 cross of normal divisor and dividend bins, and the 9 × 9 cross of operand classes for division. It also fails on any denormal or NaN result and on status bit 6. |
| `tb_srt_sweep` | every parameter combination: 3 operators × 3 formats (half, single, bfloat16) × 6 rounding modes × 4 values of `pipe_stages`, 216 instances, 4000 random operands each. Slow to build (about 3 minutes with Verilator), fast to run. |

A rounding carry after rounding cannot occur in these three operations under
round-to-nearest. It only appears with a directed mode, for example `1/sqrt` of a value just
above a power of four, rounded away from zero. The end-to-end test drives that case.

To simulate, for example the divider's testbench with Verilator 5:

    verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/srt_pkg.sv tb/srt_ref_pkg.sv tb/tb_srt_div.sv --top-module tb_srt_div
    ./obj_dir/Vtb_srt_div

Replace `tb_srt_div` with any testbench name. `--timescale` gives the RTL files, which
declare none, the testbenches' time unit. `-Wno-fatal` keeps width warnings in the
reference model from stopping the build. Every file in `rtl/` passes
`verilator --lint-only -Wall` without errors (add `rtl/srt_pkg.sv` first). The remaining
warnings are unused bits, such as the top two bits of a residual that a left shift discards.

Not verified here: timing and area. The operators are written to be synthesizable, and the
combinational single-precision versions are 13 to 14 recurrence steps deep. Whether they meet
a given clock period depends on the library.

## Files

`rtl/`:

- `srt_pkg.sv`: rounding-mode enum, digit codes, status bit positions
- `srt_sel_t1.sv`, `srt_sel_t2.sv`: digit selection
- `srt_otf.sv`: on-the-fly conversion
- `srt_div_step.sv`, `srt_isqrt_step.sv`: one recurrence step each
- `srt_round.sv`, `srt_postnorm.sv`, `srt_except.sv`: result path
- `srt_pipe_reg.sv`: optional register rank
- `srt_div.sv`, `srt_recip.sv`, `srt_invsqrt.sv`: the operators
- `srt_ip_top.sv`: the three side by side

`tb/`:

- `srt_ref_pkg.sv`: reference model and operand generator
- one `tb_<module>.sv` per module
- `tb_srt_ip_top_full.sv`
- `tb_srt_sweep.sv`: all parameter combinations
