# Radix-4 combined reciprocal / square-root reciprocal unit

This unit computes 1/d or 1/sqrt(d) for the 53-bit significand of a
double-precision number and rounds the result to nearest. It finishes in 15
clock cycles, about half the 28 cycles a radix-4 digit-by-digit unit would
need alone.

The trick is to run two recurrences side by side on one shared stream of digits:

* **Digit-by-digit part.** A radix-4 recurrence produces two result bits per cycle.
* **Approximation part.** A second recurrence uses the same digits to carry out one
  Newton-Raphson step on the partial result built so far. The step is written as a
  digit recurrence, so it needs no multiplier.

Newton-Raphson roughly doubles the number of correct bits. After 14 digits
(28 bits) the approximation already holds about 56 correct bits, and that is
enough for a 53-bit result.

The same sources also hold the simpler unit that the combined one grew from. It
computes the reciprocal only, has its own start values and selection table, and
also returns a result in 15 cycles (30 when it falls back). `rr_top` places the two units side by side.
They share only the clock and reset.

An `exact` input selects a second mode. In this mode the unit runs the
digit-by-digit part alone for 28 iterations and rounds from the sign of its
final residual. Without it, the unit checks whether the approximation can be
rounded safely. When the approximation lies too close to a rounding boundary,
the unit falls back: it keeps running the digit-by-digit part and returns that
result instead (see "Correct-rounding fallback").

## Interface

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | Clock, asynchronous active-low reset |
| `start` | in | 1 | Start an operation. Accepted when not busy. |
| `op` | in | `op_e` | `OP_RECIP` (0) gives 1/d. `OP_RSQRT` (1) gives 1/sqrt(d). |
| `ed` | in | 1 | rsqrt only: 1 gives d = sig/2, in [1/2, 1). 0 gives d = sig/4, in [1/4, 1/2). |
| `exact` | in | 1 | 0: approximation result (15 cycles, 30 on a fallback). 1: digit-by-digit result (29 cycles). |
| `sig` | in | 53 | Significand `1.F` |
| `busy` | out | 1 | Iterating |
| `done` | out | 1 | Result valid. Held until the next start. |
| `result` | out | 54 | 2 integer bits and 52 fraction bits, value in (1, 2] |

The reciprocal always uses d = sig/2. The exponent is handled outside the unit:

* **Reciprocal:** 1/x = 2^-e-1 · 1/d.
* **Square-root reciprocal:** for an odd unbiased exponent, use `ed=1`. For an
  even one, use `ed=0`, so that d·2^k has an even k.

The result is 2.0 only when d = 1/2 (reciprocal) or d = 1/4 (rsqrt). The
caller then renormalises.

### Timing

`start` is sampled at a clock edge. At that edge the unit loads:

* the initial values,
* the first digit p1,
* the operation and the mode.

`done` rises 15 edges later. It rises 30 edges later after a fallback, and 29
edges later in exact mode. `result` is combinational on
the registers and stays stable while `done` is high.

The reciprocal unit (`rr_recip_unit`, ports `ru_*` on `rr_top`) has the same
handshake and result format, with `start`, `exact`, `sig`, `busy`, `done` and
`result`. It uses d = sig/2. The combined unit's ports appear on `rr_top` with
the prefix `cu_`.

## Algorithm

### Digit-by-digit recurrence

The recurrence keeps four values:

* a residual w, in carry-save form;
* D = d·P[j], where P[j] is the partial result;
* C = d·4^-(j+1)/2;
* the next digit p, from {-2,…,2}.

Each cycle computes:

```
w[j+1] = 4 w[j] - p D[j] - p² C[j]
D[j+1] = D[j] + 2 p C[j]
C[j+1] = C[j] / 4
```

For the square-root reciprocal P[j] converges to 1/sqrt(d).

For the reciprocal, C = 0 and D = d. The same hardware then evaluates
w[j+1] = 4w − q·d, the usual reciprocal recurrence.

The digit multiples need no multiplier:

* p·D is a choice of 0, D or 2D, inverted when the digit is negative.
* p²·C is a choice of 0, C or 4C.

The +1 that completes each two's-complement negation goes into a free carry
position of the 4-2 carry-save adder.

Only D is updated with a carry-propagate adder. It is off the critical loop of
the residual, and it also supplies the exact D estimate that digit selection
needs.

### Initial values

Two cases of each function are handled. Starting values:

| | Reciprocal | Square-root reciprocal |
|---|---|---|
| integer part | Q0 = 1 if d ≥ 3/4, else 2 | P0 = 1 if d ≥ 1/2, else 2 |
| w[0] | 1 − Q0·d | (1 − d·P0²)/2 |
| D[0] | d | P0·d |
| C[0] | 0 | d/8 |
| H[0] | Q0·(2 − Q0·d) | P0·(3 − d·P0²)/2 |

Each starting value keeps |w| bounded, so the first selected digit is already
valid.

### Digit selection

One table serves both operations. It is indexed by D^, the value of D truncated
to 5 fraction bits and clamped to 16/32..31/32. For each index it holds four
constants m−1, m0, m1, m2, in sixteenths (`rr_pkg`). The estimate y of 4w is
compared against them:

* y < m−1 gives digit −2.
* mk ≤ y < mk+1 gives digit k.
* y ≥ m2 gives digit 2.

Two details matter.

1. **The estimate of 4w.** A short adder combines the top 8 bits of the
   two carry-save words: 3 integer bits and 5 fraction bits. The last bit of
   the sum is then dropped. This keeps the estimate within 1/16 of 4w.
   Truncating each word to 4 fraction bits before adding can put the estimate
   2/16 low, which is more than the table tolerates.
2. **One constant.** m−1 at D^ = 26/32 is −20. This is one sixteenth above the
   value −21 that the table's neighbours suggest. With −21, an rsqrt operand just
   below 1/2 selects a first digit that leaves the residual out of bounds. A
   numeric model, run on random operands of both functions with random
   carry-save estimate errors, found no other violation.

The testbench `tb_rr_qdsel` checks this table exhaustively.

### The Newton-Raphson step as a recurrence

Let P be the partial result after j digits. One Newton-Raphson step from P
gives:

* for the square-root reciprocal, P(3 − d·P²)/2;
* for the reciprocal, P(2 − d·P).

The approximation part keeps H[j], this value scaled by 16^j. It updates H with
the digits of the digit-by-digit part:

```
H[j+1] = 16 H[j] + p·(2·4w[j] − p·D'[j] + op·w[j+1])
```

* D' is D/2 for the square-root reciprocal and D for the reciprocal.
* For the reciprocal, the w[j+1] term is forced to zero (`op` = 0).

Every term on the right is already present in the digit-by-digit datapath.
The adder chain is:

1. a 4-2 adder for 16H and p·(2·4w), both in carry-save form;
2. a 3-2 adder for −p²·D';
3. a 4-2 adder for p·w[j+1].

### Converting H: the hardest part

H grows by a factor of 16 each cycle, so it cannot be kept whole. Only a window
of 66 bits is kept, and each cycle a radix-16 digit is taken off its top.

**Taking a digit off the top.**

1. A 7-bit short adder adds bits 2^8..2^2 of the two words. This gives S, with
   4S ≤ Y < 4S + 8.
2. The digit is t = floor((S+3)/4), a value in −13..13.
3. The window fed back keeps S − 4t in its top bits. That value lies in −3..0.
4. As a result the remainder X satisfies |X| < 12 at all times, and no
   carry-propagate adder is needed in the loop.

**Building the result.** The digits go into on-the-fly conversion registers Q
and QM = Q − 1 (`rr_otf_conv`). These absorb negative digits without any borrow
propagating.

**Rounding.** After 14 iterations the result, in units of 2^-52, is
Q + X/16, with X/16 in [−0.75, 0.5). Rounding to nearest therefore chooses QM
when X < −8 and Q otherwise. Ties cannot occur for these functions.

### Exact mode

The 28 radix-4 digits give 56 fraction bits, converted on the fly.

1. A full-width adder forms the sign of the final residual.
2. If the residual is negative, the truncated result is QM; otherwise it is Q.
3. That value is rounded to nearest at 52 fraction bits by adding its bit 2^-53.

For the reciprocal the residual is exact and the result is always correctly
rounded. For the square-root reciprocal, C loses bits when it is shifted
right. This makes the residual very slightly inexact. The testbench therefore
accepts the correctly rounded value or its neighbour. So far it has seen
only correctly rounded values.

### Correct-rounding fallback

The Newton-Raphson result is only an approximation, so the converted window
can sit so close to a rounding boundary that its error may push it to the
wrong side. The approximation converter flags this case with its `hard`
output. X is the final window in units of 2^-56, and the boundary is at X = −8.

* The error of the approximation, measured on the final window, is known to
  stay below about 2/3 of a unit for rsqrt and below 0.45 for the reciprocal.
* The check uses a wider, rounder window: the result is flagged when
  −9 ≤ X < −7.75 or X ≥ 7. The second range is the boundary one place up.

The controller samples `hard` in the first cycle after the 14th iteration.
If it is set, the controller switches the operation to exact mode and resumes
the iterations, which costs one cycle more than exact mode from the start. The
result then comes from the digit-by-digit converter, so `done` rises after 30
edges. About 7% of random operands take this path. The published design
describes the same idea but gives no check rule, and expects the slow case to
be rarer. The window here is wide because the approximation carries only four
bits beyond the result.

## The reciprocal-only unit

This unit works the textbook way. It starts from w[0] = 1/4 and Q[0] = 0 and
runs the radix-4 recurrence w[j+1] = 4w − q·d. The digits then spell out
1/(4d), and the first digit (1 or 2) plays the role of the integer part.

**Digit selection.** The divisor is fixed, so selection needs only 3 bits of it
(d in [1/2, 1) truncated to 4 fraction bits). It uses an 8-row table
(`R_*` in `rr_pkg`). The residual estimate comes from truncating each
carry-save word to 4 fraction bits and adding the two in a 7-bit short adder.
The table leaves enough margin for that 2/16 error.

**Approximation.** The approximation register starts at E[0] = 0 and is
updated as

```
E[j+1] = 16 E[j] + q·(2·4w[j] − q·d)
```

The multiple −q·d is shared with the digit-by-digit side. The sum 2rw − q·d is
formed by a 3-2 adder. Both of its words are multiplied by q, and a 4-2 adder
adds the products to 16E.

**Converting E.** Because Q[0] = 0, E[14] is 16^13 times the Newton-Raphson
result, one radix-16 place less than in the combined unit. The window is
therefore converted exactly as in the combined unit, and the remaining window,
rounded to an integer, is appended as one more signed digit by the same Q/QM
rule (`TAIL` parameter of `rr_approx_convert`). The exact-mode result is the
converted 1/(4d) scaled by 4 (`PRE` = 2 in `rr_convert`).

**Accuracy.** Starting from Q[0] = 0 costs about two bits. After 14 digits the
Newton-Raphson error can reach about 0.45 units in the last place, so about 6%
of directly rounded results would be wrong. The unit therefore uses the same
fallback as the combined unit. The error is one-sided, so the flagged window
is a fraction of the appended digit in [1/32, 1/2). About half of the operands
fall back (30 cycles), and every result is correctly rounded. Exact mode
(29 cycles) is always correctly rounded as well.

## Number format

Every datapath word is a 66-bit two's-complement fixed-point number: 9
integer bits (sign included) and 57 fraction bits. This applies to w, D, C and
the H window (parameters `INTB`, `FRAC`).

* **Why one format.** Carry-save pairs move between the two recurrences with
  plain shifts and need no sign extension.
* **Why 57 fraction bits.** They hold d and C[0] = d/8 exactly.
* **Why 9 integer bits.** They cover the H window, which stays inside
  (−256, 256).

A tighter datapath would use separately scaled widths of about 56 to 58 bits.
The uniform format costs a few flip-flops but removes every alignment
question.

## Module map

| Module | Role |
|---|---|
| `rr_pkg` | Types (`digit_t`, `op_e`), default sizes, selection constants |
| `rr_top` | Both units side by side |
| `rr_combined_unit` | Combined unit |
| `rr_control` | Load / iterate / done sequencing, handshake |
| `rr_init` | Initial values and integer part |
| `rr_digit_recurrence` | REG W, D, C, P; residual, D and C updates, digit selection |
| `rr_qdsel` | Short adder and selection table |
| `rr_approx_recurrence` | REG H and the Newton-Raphson recurrence |
| `rr_approx_convert` | Radix-16 digit extraction, conversion and rounding of H |
| `rr_convert` | Conversion and rounding for exact mode |
| `rr_recip_unit` | Reciprocal-only unit |
| `rr_recip_digit_recurrence`, `rr_recip_approx_recurrence`, `rr_recip_qdsel` | Its digit-by-digit part, approximation part and selection |
| `rr_otf_conv` | On-the-fly conversion registers (radix 4 and 16) |
| `rr_digit_mux`, `rr_sq_mux` | Digit and digit-squared multiples |
| `rr_csa32`, `rr_csa42` | Carry-save adders |

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and includes a watchdog.

`tb_rr_combined_unit` runs the top level at its default parameters, through
420 operations across all four modes (reciprocal and rsqrt, approximation and
exact). The operands include:

* the boundary values d = 1/2, 3/4 and 1 − ulp;
* both values of `ed`;
* random significands.

It computes the correctly rounded reference with wide integer arithmetic: an
integer square root for rsqrt. Reciprocals in both modes must match it bit for
bit. Square-root reciprocals must be within one unit in the last place, and the
testbench reports how many were correctly rounded. With the seeds used so far
every result was correctly rounded. The testbench also checks:

* the latency (15, 29, and 30 after a fallback);
* that every mechanism occurs: both integer-part branches of each function,
  negative digits, rounding up and down in the approximation converter, and
  the fallback.

`tb_rr_recip_unit` does the same for the reciprocal unit. It checks that:

* both modes are bit-exact;
* the latency is 15, 29 or 30 cycles, and fallbacks occur;
* both first digits occur;
* negative digits occur;
* final digits of both signs occur.

`tb_rr_top` drives both units at the same time through `rr_top`, with every
parameter at its default.

To simulate one testbench with Verilator:

```
verilator --binary --timing -Wno-fatal rtl/rr_pkg.sv \
    $(ls rtl/rr_*.sv | grep -v rr_pkg) tb/tb_rr_top.sv \
    --top-module tb_rr_top -o sim
./obj_dir/sim
```

## Differences from the published design and limits

* **Restart.** The published unit starts a new operation from reset. This one
  has a start/busy/done handshake.
* **Selection.** Two changes keep the residual bounded in every case tested:
  * the 4w estimate uses an 8-bit short adder, one bit more than the usual
    7-bit estimate;
  * the D estimate is taken from the carry-propagate adder's output and not
    from a separate short adder.

  The one changed table constant is described above.
* **Approximation converter.** The published converter propagates a "+1 or +2"
  increment into a pair of shift registers. This one uses signed radix-16
  digits with Q/QM registers, because the H window can also decrease.
* **Rounding cases.** Both rounding paths use a single rounding step. The
  published design uses a table of Q/QM/QP cases. QP is never needed here.
* **Hard-to-round cases.** The fallback window is derived from error bounds
  worked out for this design. The published design gives no rule. The fallback
  is taken more often than the "very low probability" it expects.
* **Scope.** Subnormals, exponents and special values (zero, infinity, NaN,
  negative operands) are left to the surrounding floating-point unit.
