# Redundant binary Euclidean gcd unit

This design computes the greatest common divisor of two N-bit unsigned
integers (N = 32 by default) with a shift-and-subtract form of Euclid's
algorithm. Every subtraction is done in **redundant binary**: each digit is
-1, 0 or +1. That makes an addition of any width a constant-time operation
with no carry chain, so a gcd takes O(N) clock cycles, and the logic per
cycle does not grow with N.

The difficulty is that a redundant number does not show its size in its
leading digit. `0.1 -1 -1 ...` is smaller than `0.0 1 1 ...`. A binary gcd
has to know when an operand is "as large as it can be" before it decides to
subtract or to swap. Most of this design is about answering that question
from a few leading digits.

## Number format

A register holds N+1 signed digits `b0.b1 b2 ... bN`, read as a fraction:
digit `bi` has weight 2^-i. Each digit is stored as a `{pos, neg}` bit pair
(`rbea_pkg::sdig_t`), whose value is pos - neg. Index 0 of every digit array
is the most significant digit.

* **Complement bit.** `b0` starts at 0. It can become nonzero only with the
  opposite sign to the rest of the number, e.g. `1.0 -1 0 1 ...`. Such a
  number is in *complement form*. Its magnitude is 1 minus the magnitude of
  the tail.
* **Normalized.** A fraction is normalized when exactly one of `b0`, `b1` is
  nonzero and, if `b0 = 0`, also `b2 != -b1`. A normalized fraction has a
  magnitude between 1/4 and 1. An unnormalized one with `b0 = 0` has a
  magnitude below 1/2. Only three digits are needed for this test
  (`sd_norm_detect`). The sign of a normalized fraction is the sign of `b0`
  if that digit is nonzero, else the sign of `b1`.
* **decomp.** An unnormalized complement-form number has `b0 = -b1 != 0`.
  decomp rewrites it as `0.b0 b2 b3 ...`, which has the same value.
* **simshift** (`sd_simshift`) doubles a fraction whose `b0` is 0:
  * `b1 != 0, b2 = -b1`: the result is `0.b1 b3 b4 ...`. The pair b1, b2 is
    worth b1/4, so it is "absorbed" into a single digit.
  * otherwise: a plain left shift.

  Applied to an unnormalized number, simshift never produces a nonzero `b0`.
  Applied to a diff result below 1/2 of the form `0.1 0 ...`, the plain shift
  moves the 1 into `b0`. That gives a normalized complement-form number.

### Unit registers

An integer x is loaded as the fraction x / 2^N. Each left shift of P or Q
doubles the fraction, so the design tracks where the unit position went. UP
and UQ are one-hot (N+1)-bit registers. They start at 1 and shift with their
number, so the integer in P is always `P * 2^N / UP`. A subtraction of Q from
P is a valid gcd step (`p - 2^k q`) only when Q has been shifted at least as
far as P (UP <= UQ). Comparing UP with UQ therefore tells the controller when
P may no longer shift and the roles of P and Q must swap.

## Term selection

The operation "a diff b" is a - b when a and b have the same sign, and a + b
otherwise. Its magnitude is ||a| - |b||. With P and Q normalized, the next P
is one of three terms:

| P diff Q, after decomp | meaning        | next P                            |
|------------------------|----------------|-----------------------------------|
| not normalized         | it is below 1/2 | P diff Q                         |
| normalized, sign = sign(P)  | \|P\| > \|Q\| | P diff 2Q                   |
| normalized, sign != sign(P) | \|P\| < \|Q\| | 2P diff Q (needs UP < UQ)   |

Each choice has a magnitude below 1/2. Take P and Q positive with
1 > p > q > 1/4 and p - q > 1/4. If p >= 2q, p is within 1/2 of 2q. If
2q > p, 2q - p < 1/2 as well. A result below 1/2 can always be shifted left
once, so every subtraction makes at least one digit of progress. That is
where the bound "diff steps <= sum of the operand lengths" comes from.

Only the leading three digits of P diff Q decide the choice. A transfer in
the redundant adder moves at most one position, so those digits depend only on
positions 0..4 of P and Q. `digit_select` adds just those five digits, with
two spare integer positions, in a 7-digit copy of the adder. It applies
decomp to the leading result digits and tests them for normalization.
Without the decomp, an unnormalized complement result such as `1.-1 ...`
(about 0.6) would be taken as "small" and overflow the following shift.

`rbea_diff` then forms the chosen term with one full-width addition:

1. 2P or 2Q is a one-position wiring shift.
2. Q is negated (pos and neg swapped) when the signs are equal.
3. The sum is taken in `sd_adder` with two extra integer positions.
4. The weighted value of the integer positions (-1, 0 or +1, because the term
   is below 1/2) is folded into `b0`.
5. decomp and the mandatory simshift are applied.

The register therefore receives twice the term, in the same clock as the
addition.

## The adder

`sd_adder` is a row of identical 4-2 cells: two signed digits in, one signed
digit out, plus one transfer to the left.

1. Each cell forms z = x + y, a value from -2 to 2.
2. It writes z = 2t + w, where t is the transfer sent left and w is the
   interim sum that stays in place.
3. For z = +-1 the cell looks one position down. If both digits there are
   non-negative, that position can send only 0 or +1, so this cell picks
   w = -1. Otherwise it picks w = +1.
4. The result digit is w plus the transfer arriving from the right, and it
   always stays in {-1, 0, 1}.

A result digit therefore depends on at most three operand positions, whatever
the width.

## Controller (`rbea_gcd`)

One register transfer happens per clock:

| state  | action |
|--------|--------|
| INIT   | While neither P nor Q is normalized: simshift both, shift UP and UQ. |
| LOOPA  | While Q is unnormalized: simshift Q, shift UQ. If UQ overflows (Q = 0), go to RSHIFT. |
| LOOPB  | If P is unnormalized: swap when UP = UQ, otherwise simshift P and shift UP. If P is normalized: if the choice is 2P diff Q with UP = UQ, swap; otherwise load the rbea_diff result, advance UP by 1 position (2 for 2P), and swap if P had reached Q's unit. |
| RSHIFT | Shift P right and UP down until UP = 1. Then convert P to binary. |
| DONE   | `gcd` holds the result. |

A swap exchanges P with Q and UP with UQ, and returns to LOOPA. It happens in
the same clock as the step that ends LOOPB.

When Q becomes zero, P holds ± the gcd with its unit at UP. The digits below
the unit are all zero, so shifting right loses nothing. `rb_to_bin` subtracts
the negative digits from the positive digits with an ordinary subtractor and
returns the magnitude.

## Interface and timing

| port | dir | width | |
|------|-----|-------|-|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `start` | in | 1 | one-cycle pulse while not busy: loads `p`, `q` |
| `p`, `q` | in | N | unsigned operands |
| `busy` | out | 1 | high while computing |
| `done` | out | 1 | high from the end of a run until the next `start` |
| `gcd` | out | N | gcd(p, q), valid while `done` |
| `n_diff` | out | 16 | number of diff (add/subtract) steps in the last run |
| `n_cycles` | out | 16 | clock cycles of the last run |

gcd(0, 0) is undefined for the algorithm. The unit returns 0 for it at once.
gcd(x, 0) = x.

Latency depends on the data. At N = 32, random full-length operands take
about 119 cycles. Shorter operands take fewer, but each run still pays up to
N cycles of shifting: the common initial shift, the Q zero detection by UQ
overflow, and the final right shift. 8-bit operands, for example, take about
77 cycles. The worst case seen is under 6N + 8 cycles. In simulation about
0.39 add/subtract steps are needed per input bit (counting both operands),
while the hard bound is 1.

## Files

| file | contents |
|------|----------|
| `rtl/rbea_pkg.sv` | digit type `sdig_t`, term enum `sel_t`, digit helpers |
| `rtl/sd_adder.sv` | carry-free signed-digit adder, parameter `W` |
| `rtl/sd_norm_detect.sv` | normalization and sign from three digits |
| `rtl/sd_simshift.sv` | absorbing left shift |
| `rtl/digit_select.sv` | five-digit look-ahead term selection |
| `rtl/rbea_diff.sv` | term formation, addition, fold, decomp, shift |
| `rtl/rb_to_bin.sv` | redundant to binary magnitude |
| `rtl/rbea_gcd.sv` | top: registers and controller, parameter `N` |
| `tb/tb_*.sv` | one self-checking testbench per module (`rb_to_bin` is covered by the top's tests) |
| `tb/tb_rbea_progress.sv` | add/subtract steps per input bit for 8-, 16-, 24- and 32-bit operands |

`rbea_gcd` contains assertions for its invariants:

* a shift is only applied when `b0` is 0;
* the folded integer part of a diff result is in range;
* UP never passes UQ.

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<n>`. For example, the
end-to-end test (about 20,000 operand pairs at N = 32):

```
verilator --binary --timing --assert --top-module tb_rbea_gcd \
  rtl/rbea_pkg.sv rtl/sd_adder.sv rtl/sd_norm_detect.sv rtl/sd_simshift.sv \
  rtl/digit_select.sv rtl/rbea_diff.sv rtl/rb_to_bin.sv rtl/rbea_gcd.sv \
  tb/tb_rbea_gcd.sv
./obj_dir/Vtb_rbea_gcd
```

The top test compares every result with a plain Euclid gcd. It checks the
step bound and counts each mechanism, failing if one never occurs:

* initial common shift;
* Q shift and UQ overflow;
* P shift;
* each of the three terms;
* each of the three swap causes;
* absorbing shift;
* right shift.

Two paths never occur in the whole-unit runs: a diff result that needs decomp,
and a diff result in complement form. With this adder's transfer rule, they
did not arise in any simulated run. Their logic is kept and is tested in
`tb_rbea_diff` with general redundant operands.

## What is fixed by the method and what is chosen here

The following come from the published method:

* the signed-bit fraction format and the normalization rule;
* decomp and simshift;
* the three-term selection from five leading positions;
* the unit registers and the loop structure;
* the step bound.

The following are choices made in this design:

* N = 32;
* the `{pos, neg}` digit code;
* the adder's transfer rule;
* one loop step per clock, with the swap done in the same clock;
* the start/busy/done handshake and the reset;
* the statistics outputs;
* decomp applied before the normalization test in the term selection;
* the binary output converter.

The swap could be avoided with two symmetric registers and a role bit; this
design exchanges the registers instead. A systolic version and the extended
gcd (coefficients α, β with αp - βq = gcd) are not implemented.

To change the width, set `N` on `rbea_gcd`. All internal widths follow from
it, and the 16-bit statistics counters are enough for N up to several
thousand.
