# Decimal64 BID floating-point adder

A hardware adder/subtractor for IEEE 754 decimal64 numbers stored in the
binary integer decimal (BID) encoding. A decimal64 value is
`(-1)^s * C * 10^(E-398)`, where the coefficient `C` is a plain binary integer
of at most 16 decimal digits (54 bits) and `E` a 10-bit biased exponent.
Because `C` is binary, the adder can be built from ordinary binary parts: a
64-bit adder, a leading-one detector, small tables and a 64x64 multiplier.
The hard parts are the two decimal operations on a binary number: aligning a
coefficient by a power of ten (a multiplication) and rounding off `d` decimal
digits (a division by `10^d`). This design does both on a single shared
multiplier and splits the work into three cases so that a 64-bit (20-digit)
rounder is always enough, whatever the exponent difference (up to 767).

The adder returns correctly rounded results in all five decimal rounding
directions (ties-to-even, ties-away, toward zero, toward -inf, toward +inf),
with the standard's preferred exponent: the smaller input exponent when the
result is exact, otherwise the exponent that keeps 16 significant digits.

## The three cases

After decoding, the operands are swapped so that `A` has the larger (or equal)
exponent, `K = A.exp - B.exp`, and the effective operation `EOP` says whether
the magnitudes add or subtract (`op ^ A.sign ^ B.sign`). The sign of `B` enters
with the subtraction folded in, so after a swap the sign of the first operand
is still the sign with which its magnitude enters the sum. The number of
decimal digits `Qa` of `A`'s coefficient is counted and `r = Qa + K` bounds the
digits of `10^K * A.c`.

**Case 2, `K = 0`.** No alignment. `Z = |A.c +/- B.c|` has at most 17 digits.
Below `10^16` it is the result and bypasses the rounder; otherwise one digit
is rounded off and the exponent goes up by one. Equal exponents are the common
case in decimal workloads, which is why this path is the shortest.

**Case 1, `K != 0` and `r <= 19`.** `10^K * A.c` fits in 64 bits, so the
straightforward method works: multiply `A.c` by `10^K` from a table, form
`Z = |10^K A.c +/- B.c|`, count its digits `Q` and round off
`d1 = max(0, Q - 16)` digits. The exponent is `B.exp + d1`. Case 1 always goes
through the rounder, even when `d1 = 0`.

**Case 3, `r > 19`.** `10^K * A.c` would not fit. Instead `A.c` is pushed up to
exactly 16 digits, `A' = 10^g * A.c` with `g = 16 - Qa`, and `B.c` is rounded
off by `d3 = K - g` digits to `B'` before the addition:
`Z = A' +/- B'` at exponent `A.exp - g`. The sign is always `A`'s, because
`A'` has 16 digits and `B'` at most 12. Rounding `B` before the sum is only
correct if the direction is chosen with the sum in mind, so the rounder uses a
separate rule table in this case (below). Two outcomes still need repair:

* *Addition reaching 17 digits* (`Z >= 10^16`, e.g. `A' = 9999999999995555`):
  the sum goes through the rounder a second time and loses one more digit.
  To avoid rounding a rounded value, the second pass is given the *truncated*
  sum `A' + q` (with `q = floor(B.c / 10^d3)`) and, as a sticky bit, whether
  the first pass discarded anything.
* *Subtraction falling to 15 digits*: the whole of Case 3 is repeated with
  `g + 1` and `d3 - 1`, which keeps one more digit of `B`.

The recalculation test is made on the floor of the exact difference,
`A' - q - (fraction of B != 0)`, compared with `10^15`. Testing the rounded
difference `A' - B'` instead misses differences such as
`10^15 - 0.6`: rounding `B` up to 1 gives exactly `10^15`, which looks like 16
digits, yet the correctly rounded answer is `9999999999999994` one exponent
lower. When the exact difference is only a hair below `10^15`, the
recalculated difference can round up to `10^16`; it is then returned as
`10^15` at the original exponent. A zero `A` coefficient is sent to Case 1
with an alignment factor of 1 whatever `K` is; the result is `B` exactly.

A recalculation or second pass is rare: it needs the leading digits of `A'`
to be `9999...` (addition) or `1000...` (subtraction).

## The rounder

`bid_rounder` rounds an unsigned 64-bit `x` by `d` digits (`0..19`) without a
divider. For each `d` the package `bid_pkg` holds the constant

    S_d = 64 + ceil(log2(10^d))      (S_0 = 64)
    K_d = ceil(2^S_d / 10^d)         (always in [2^64, 2^65))

Then `x * K_d / 2^S_d = x / 10^d + e` with `0 <= e < 10^-d` for every
`x < 2^64`, which gives two exact results from one multiplication:

* the quotient `q = floor(x * K_d / 2^S_d)` equals `floor(x / 10^d)`;
* the low `S_d` bits `F` of the product classify the discarded fraction
  `f`: `f = 0` iff `F < K_d`; `f = 1/2` iff `2^(S_d-1) <= F < 2^(S_d-1) + K_d`;
  `f > 1/2` iff `F >= 2^(S_d-1) + K_d`.

Only the low 64 bits of `K_d` are stored; the product `x * K_d` is formed as
`x * (K_d - 2^64) + (x << 64)` so the shared 64x64 multiplier suffices. The
increment is then chosen from `f`, the mode and the sign. In Case 3
(`override_active_in`) it follows this table, where an "increment" adds one to
`q`; for a subtraction that lowers the final result, which is why the columns
differ:

| mode | addition            | subtraction          |
|------|---------------------|----------------------|
| RTZ  | never               | f != 0               |
| RTA  | f >= 1/2            | f > 1/2              |
| RTE  | f > 1/2, or f = 1/2 and odd | same          |
| RTP  | sign = + and f != 0 | sign = - and f != 0  |
| RTN  | sign = - and f != 0 | sign = + and f != 0  |

"odd" is the parity of `A' +/- q`, i.e. the parity of `A'` (input
`a_odd_even`) xor that of `q`. Outside Case 3 the usual rules for a magnitude
apply. On a second pass (`rnd2_active`) a set sticky bit
(`rnd2_active_prev_dir`) turns an exact half into "above half" and a zero
fraction into a nonzero one. If the increment produces `10^16` the rounder
returns `10^15` and raises `carry`, and the exponent goes up by one.

The rounder has four register stages: (1) constant lookup and partial
products, (2) product, (3) shift and fraction compares, (4) decision,
increment and carry. It also accepts plain multiplies (`is_mul`), whose low 64
bits come out after stage 2; this is how the alignment products `10^K * A.c`
and `10^g * A.c` use the same multiplier.

## Digit counter

`digit_counter` counts the decimal digits of a binary integer. A leading-one
detector finds the top bit position `m`, so `2^m <= x < 2^(m+1)`. A table gives
`n(m)`, the digit count of `2^m`, which is the count of `x` or one less; a
second table gives `10^n(m)`, and `digits = x < 10^n(m) ? n(m) : n(m) + 1`.
Both tables are computed at elaboration from powers of ten. One counter serves
both `Qa` (when an operation is accepted) and `digits(Z)` in Case 1.

## Datapath and schedule

`bid_adder` instantiates one each of: two decoders, the swap unit, the digit
counter, the case selector, the power-of-ten table, the add/subtract and
absolute-value unit, the range detector (`>= 10^16`, `< 10^15`), the rounder
(holding the multiplier) and the encoder. A controller runs one operation at
a time on a fixed schedule; the next request can be accepted in the cycle the
previous result leaves, so back-to-back Case 2 additions complete one every 3
cycles and Case 1/3 operations one every 7. Cycle 1 is the cycle in which `in_valid` and
`in_ready` are both high; the swap, digit count and case choice are done on
the input ports in that cycle.

| cycle | Case 2                      | Case 1                         | Case 3                                   |
|-------|-----------------------------|--------------------------------|------------------------------------------|
| 1     | decode, swap, Qa, case      | same                           | same                                     |
| 2     | add; rounder starts (d = 1) | multiply 10^K * A.c starts     | rounder starts on B.c (d3)               |
| 3     | range flag decides          | multiply                       | multiply 10^g * A.c starts               |
| 4     | **out_valid** (bypass)      | add, digits(Z), rounder starts | wait                                     |
| 5     |                             | rounder                        | A' captured                              |
| 6     |                             | rounder                        | add A' +/- B'; rounder starts (d = 1)    |
| 7     |                             | rounder                        | range flags decide                       |
| 8     |                             | **out_valid**                  | **out_valid** (bypass)                   |

So the latency, from the accepting cycle to the `out_valid` cycle, is 3 cycles
for Case 2, 7 for Case 1 and 7 for Case 3. The one-digit rounding of a Case 2
or Case 3 sum is started speculatively in the cycle the sum is formed; when
the range flag asks for it the result comes 2 cycles later (Case 2 with
rounding: 5 cycles; Case 3 second pass: 9 cycles). A Case 3 recalculation
restarts at cycle 2 of the Case 3 column (13 cycles).

## Interface

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `in_valid` / `in_ready` | in / out | 1 | request handshake; `in_ready` is high when idle and in the cycle a result leaves |
| `a`, `b` | in | 64 | BID decimal64 operands |
| `op` | in | 1 | 0: `a + b`, 1: `a - b` |
| `mode` | in | 3 | 0 RTE, 1 RTA, 2 RTZ, 3 RTN, 4 RTP (`bid_pkg::rnd_mode_e`) |
| `out_valid` | out | 1 | result valid for one cycle |
| `z` | out | 64 | BID decimal64 result |
| `special` | out | 1 | an operand was infinity or NaN (not handled) |
| `out_case`, `out_rounded`, `out_round2`, `out_recalc` | out | 2,1,1,1 | which case, whether the rounder produced the result, whether a second pass or a recalculation happened |

Non-canonical coefficients (above `10^16 - 1`) read as zero. An exact zero
from operands of opposite sign is `+0`, or `-0` when rounding toward -inf.

## Limits and departures

* Infinities, NaNs, exponent overflow and underflow, and the status flags of
  the standard are not handled. Results whose exponent would leave 0..767
  wrap.
* One operation is in flight at a time. The multiplier is busy in at most
  two cycles of an operation, so a scheduler that overlaps operations (with
  buffering around the shared multiplier) could raise throughput; it is not
  built.
* The Case 3 recalculation test uses the floor of the exact difference, and
  a recalculated difference of `10^16` is folded back (see above). The
  second pass takes the truncated sum plus a sticky bit.
* Not built: skipping the multiplier when `g = 0` (a multiply by 1 is done;
  the skip would not shorten Case 3, whose time is set by rounding `B`), and
  bypassing the rounder in Case 1 when `Z < 10^16`, which the source design
  also leaves out.
* The reciprocal constants, the stage split of the rounder, the partial-
  product split of the multiplier, the zero handling and the controller are
  this design's own.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. The end-to-end test `tb_bid_adder` compares
each result with `tb/bid_ref_pkg.sv`, an independent model that forms the
exact sum in 256-bit arithmetic and rounds it by division. It runs the worked
examples of the algorithm, a rounding carry, exact cancellation in two modes,
a zero operand, and ten million random operations whose exponent differences
are spread over all three cases; it checks the latency of each operation against
the table above and fails if any case, the bypass, the Case 2 rounding, the
second pass, the recalculation, the carry or any rounding mode never
occurred. `tb_bid_rounder` checks the rounder against division for every `d`,
every mode and all control bits, including its 2- and 4-cycle timing.

To run a testbench with Verilator:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/bid_pkg.sv tb/bid_ref_pkg.sv tb/tb_bid_adder.sv \
        --top-module tb_bid_adder -o sim
    ./obj_dir/sim

Replace `tb_bid_adder` with any other `tb_*` name. The full end-to-end run
(ten million operations) takes about three minutes; lower `NRAND` in
`tb_bid_adder` for a quicker run.

## Files

* `rtl/bid_pkg.sv` types, rounding-mode and case encodings, `pow10`,
  rounder constants
* `rtl/bid_adder.sv` top: datapath and controller
* `rtl/bid_unpack.sv`, `rtl/bid_pack.sv` BID decimal64 decode/encode
* `rtl/bid_swap.sv` exponent compare, swap, effective operation
* `rtl/digit_counter.sv`, `rtl/lod64.sv` decimal digit counter, leading-one
  detector
* `rtl/bid_case_sel.sv` case choice, `g`, `d3`
* `rtl/pow10_lut.sv` power-of-ten table
* `rtl/addsub_abs.sv` add/subtract and absolute value
* `rtl/range_check.sv` `>= 10^16` / `< 10^15` detector
* `rtl/bid_rounder.sv` four-stage rounder with the shared multiplier
* `rtl/mult64_2stage.sv` two-stage 64x64 multiplier
* `tb/bid_ref_pkg.sv` reference model; `tb/tb_*.sv` testbenches
