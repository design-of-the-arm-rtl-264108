# Radix-4 SRT divide and square-root macrocell (VFP-11 style)

This is a floating-point divide and square-root unit for IEEE-754 single and
double precision that retires two result bits per clock with a radix-4 SRT
recurrence. It reproduces the architecture used for the divide/square-root
macrocell of the ARM VFP-11 vector floating-point coprocessor: the goal there
was to fit one full radix-4 iteration into a very short clock period, and
the answer was to **never let the partial remainder's top bits become
redundant** and to **compute all five possible next remainders in parallel**,
so that the freshly chosen digit only has to steer multiplexers.

A single-precision result takes 15 cycles and a double-precision result 29
cycles, matching the latency quoted for the original macrocell.

## Why SRT, and what makes this iteration fast

A multiplicative (Newton-Raphson) divider would have borrowed the
coprocessor's multiply-accumulate pipeline, which is both slow for this
purpose (its multi-cycle latency enters every iteration) and would block
multiplications. A digit-recurrence divider is self-contained.

In a textbook radix-4 SRT iteration the remainder is kept in carry-save form,
so every cycle first needs a short carry-propagate adder on the top bits
before the digit can be selected, then a multiple of the divisor is chosen and
added. That chain is too long. This design changes three things:

1. **Non-redundant head.** The remainder is stored as an 8-bit two's
   complement *head* plus a carry-save *tail*. The head is exactly the top of
   the remainder (the tail only adds a non-negative amount below it, less
   than 2/16 after the radix shift), so the digit comparators can look at it
   directly, without any adder in front.
2. **Five-way speculation.** While the digit is being selected, five remainder
   adders compute `R - F(q)` for every `q` in {-2, -1, 0, +1, +2}. Each adder
   is one row of half/full adders followed by an 8-bit carry-propagate adder
   that assimilates the new head; the tail is left in carry-save form. The
   digit then picks one of five results.
3. **Root multiples from on-the-fly registers.** For square root the
   multiple `F` depends on the partial root. Keeping the partial root in two
   conventional forms, `Q+` (the root so far) and `Q-` (one last-digit unit
   less), lets every multiple be formed by wiring and OR-ing a few bits, with
   no adder.

The price is area: five wide adders and the multiplexers behind them.

## The recurrence

Division of significands `a / b`, both in `[1,2)`:

    w[0] = a/4,     w[j+1] = 4 w[j] - q(j+1) * b,      a/b = 4 * sum q(j) 4^-j

Square root of a radicand `X` in `[1,4)` (the significand, doubled when the
unbiased exponent is odd), with `y = X/4` and root `S = sqrt(y)` in `[1/2,1)`:

    S[0] = 1,  w[0] = y - 1
    w[j+1] = 4 w[j] - (2 S[j] q + q^2 eps),   eps = 4^-(j+1),   S[j+1] = S[j] + q eps

Starting the root at 1 (rather than 0) keeps the first remainder small
enough for the ordinary digit-selection rule; the first digit is then 0, -1
or -2.

Digits are in {-2,...,+2} (redundancy factor 2/3). The remainder stays within
`|w| <= 2/3 b` for division and within the corresponding root-dependent
band for square root.

### Multiples (`srt_fgen`)

Each remainder adder adds `-F(q)`; positive digits use the complemented
multiple with carry-in 1. For square root, with `Q = Q+`, `QM = Q-`:

| q  | F(q)            | formed as        |
|----|-----------------|------------------|
| +1 | 2Q + eps        | `2Q  OR eps`     |
| +2 | 4Q + 4eps       | `4Q  OR 4eps`    |
| -1 | -(2Q - eps)     | `2QM OR 7eps`    |
| -2 | -(4Q - 4eps)    | `4QM OR 12eps`   |

The OR works because `Q` and `QM` are multiples of `4 eps`. For division
`F = q*b`, i.e. `b` or `2b`.

### On-the-fly conversion (`srt_otf`)

| q  | next Q+  | next Q-  |
|----|----------|----------|
| +2 | Q + 2e   | Q + e    |
| +1 | Q + e    | Q        |
|  0 | Q        | QM + 3e  |
| -1 | QM + 3e  | QM + 2e  |
| -2 | QM + 2e  | QM + e   |

(`e` = eps; every `+` is a concatenation.) After the last digit, a negative
remainder means the result is one unit too large, so `Q-` is taken instead of
`Q+`; a non-zero remainder is the sticky bit for rounding.

## Digit selection constants (`srt_qsel`)

This is the part that needs the most care. Four comparators test the 8-bit
head of `4w` (units of 1/16) against constants `M_2 > M_1 > M_0 > M_-1`, and
the digit is the number of thresholds passed, minus 2. The constants depend
on the divisor (division) or on `2Q` (square root), in rows 1/16 wide from
14/16 to 2 (18 rows), selected by four fraction bits of `b` or by
`floor(32 Q)`.

A constant `M_k` is valid for a row `[D_lo, D_hi)` when

    (k - 2/3) D_hi + (k - 2/3)^2 eps   <=   M_k   <=   (k - 1 + 2/3) D_lo + (k - 1 + 2/3)^2 eps - 1/16

for every `eps` in use (0 for division, at most 1/64 for square root from
the third iteration on). The left side guarantees that digit `k` is
allowed whenever the head reaches `M_k`; the right side, with its `-1/16`,
accounts for the tail that the head leaves out (up to 2/16) and guarantees
digit `k-1` is allowed otherwise. Every row has a non-empty range; the RTL
uses its integer midpoint.

In the first two square-root iterations `eps` is large (1/4 and 1/16), and
the range above would be empty. But the root can then only be 1 (first
iteration) or 1/2, 3/4 or 1 (second), so these iterations use four extra
rows computed for those exact values. The table was validated on a
bit-accurate model of the datapath with 200 000 random and corner-case
double-precision divisions and square roots, and is checked again by the
testbenches.

## Number formats

All internal words are 58-bit two's complement with 56 fraction bits
(`srt_pkg`): range `[-2,2)`, resolution `2^-56`, enough for the `a/4`
starting value and the last square-root term `4^-28`. The remainder is
`{head[7:0], sum[49:0]} + carry[49:0]`; after the radix shift, the head
covers weights `2^3 .. 2^-4`. Operand significands are 53-bit `1.f`; single
precision operands are left-aligned in the same field and run for fewer
digits.

## Timing

| cycle edge | action |
|---|---|
| 0 | `start` sampled: operands unpacked, remainder and `Q+`/`Q-` initialised |
| 1 .. N | one digit per edge (N = 14 single, 28 double) |
| N+1 | remainder assimilated, result corrected, normalised, rounded, packed; `done` rises |

So the result is registered 15 (single) or 29 (double) edges after `start`
is sampled; `done` is a one-cycle pulse and the next `start` may be given in
that cycle. `start` is ignored while `busy`.

## The floating-point wrapper (`vfp_divsqrt`)

The iteration and its latency come from the original design; the handling
around it is this design's own, chosen to be simple and IEEE-conformant:

* round to nearest, ties to even;
* subnormal operands are read as zero, results below the normal range
  (judged on the exponent after rounding) are flushed to a signed zero and
  raise UFC (flush-to-zero);
* any NaN result is the default quiet NaN; signalling NaN operands, 0/0,
  inf/inf and the square root of a negative number raise IOC;
  finite/0 gives infinity with DZC; overflow gives infinity with OFC and IXC;
* `flags = {IOC, DZC, OFC, UFC, IXC}`;
* special operands also take the full latency.

Ports: `clk`, `rst_n` (asynchronous, active low), `start`, `op` (0 divide
`a/b`, 1 square root of `a`), `dp` (1 double, 0 single), `a`, `b` (64 bits;
single precision in bits `[31:0]`), `busy`, `done`, `result`, `flags`.

## Departures from the original macrocell

* The remainder adders are 58 bits wide instead of 54: the original's
  scaling of the remainder is not known, and this design's scaling needs
  two extra fraction bits and two integer bits.
* The selection constants, digit counts, initialisation, rounding mode,
  exception and subnormal handling are this design's own choices (see
  above); the original describes only the iteration structure and the
  latency.
* The formulas for the negative square-root multiples use `Q-` directly
  (`2QM OR 7eps`, `4QM OR 12eps`), an equivalent form of the original's
  complemented representation.
* Drive buffers shown in the original datapath are not modelled; they are
  left to synthesis.
* The physical results of the original (critical path of about 23 FO4 in
  180 nm CMOS, 15 logic stages as the target) cannot be checked from RTL.

## Files

| file | contents |
|---|---|
| `rtl/srt_pkg.sv` | widths, one-hot digit encoding, `mk_t`, `rem_t`, `op_e` |
| `rtl/srt_qsel.sv` | constant table, four comparators, one-hot digit logic |
| `rtl/srt_fgen.sv` | remainder-update multiples for both operations |
| `rtl/srt_rem_adder.sv` | one speculative remainder adder (HA/FA row + 8-bit CPA) |
| `rtl/srt_otf.sv` | on-the-fly `Q+`/`Q-` candidates and 5:1 selection |
| `rtl/srt_iter.sv` | one full iteration: selection, 5 adders, multiplexers |
| `rtl/srt_divsqrt_core.sv` | state registers, counter, final correction |
| `rtl/vfp_divsqrt.sv` | top level: IEEE unpack, exponent, specials, rounding |
| `tb/srt_ref_pkg.sv` | exact integer division and square root for checking |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification

Every testbench prints `TB_RESULT checks=N failures=M`.

* `tb_srt_qsel`: random remainders and divisors / roots; the chosen digit must
  keep the next remainder inside the convergence bound (real arithmetic).
* `tb_srt_fgen`, `tb_srt_rem_adder`, `tb_srt_otf`: each output against plain
  modular arithmetic.
* `tb_srt_iter`, `tb_srt_divsqrt_core`: complete 14- and 28-digit runs against
  exact integer quotients and square roots, plus the latency.
* `tb_vfp_divsqrt`: 12 000 random single/double divisions and square roots
  (a quarter with corner fractions: zero, all ones, table-row edges)
  compared bit for bit with the simulator's IEEE arithmetic, the inexact flag
  against exact integer arithmetic, special operands, overflow and
  flush-to-zero, latency 15/29, back-to-back operations, and counters showing
  that every digit value, the remainder-sign correction, rounding up, each
  special case, a start while busy and a start in the `done` cycle occurred.

Simulate with Verilator, for example:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/srt_pkg.sv tb/srt_ref_pkg.sv tb/tb_vfp_divsqrt.sv --top-module tb_vfp_divsqrt
    ./obj_dir/Vtb_vfp_divsqrt

Not covered: subnormal results (flushed by design), directed rounding modes
(not implemented), and gate-level timing.

## Changing the design

* Another rounding mode: only the `inc` expression in `vfp_divsqrt`.
* Other selection constants: regenerate from the inequality above; keep
  `M_2 > M_1 > M_0 > M_-1` in every row, since the one-hot logic relies on it.
* Other precisions: set the digit count so that `2*N` covers the significand
  plus one round bit (plus one more bit for quotients below 1), and extend the
  bit selection in the rounding stage.
