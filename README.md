# Radix-64 floating-point divider

A digit-recurrence divider for IEEE 754 half, single and double precision
that produces six quotient bits per clock. A single radix-64 iteration would
need a very large digit-selection function, so each clock instead performs
three radix-4 iterations (digits in {-2, -1, 0, +1, +2}) and uses
speculation to keep the three iterations from being three full iterations
in series. With normal operands and a normal result a division takes

| format | quotient bits (incl. guard) | radix-4 digits after the integer digit | digit cycles | total cycles |
|--------|-----------------------------|----------------------------------------|--------------|--------------|
| half   | 11                          | 6                                      | 2            | 4            |
| single | 24                          | 12                                     | 4            | 6            |
| double | 53                          | 27                                     | 9            | 11           |

The two extra cycles are the first cycle (unpack and prescale, where the
integer quotient digit is also found) and the rounding cycle. A subnormal
operand adds two cycles (one subnormal) or three (two), a subnormal
("tiny") result adds one. Special operands and power-of-two divisors finish
in one cycle.

The design is one division at a time, not pipelined. Everything is
synthesizable SystemVerilog in `rtl/`. The self-checking testbenches are in `tb/`.

## Cycle by cycle

```
normal operands      E1/PS  DGT ... DGT  RND1
one subnormal        E1  NM1  PS  DGT ... DGT  RND1
two subnormals       E1  NM1  NM2  PS  DGT ... DGT  RND1
tiny result          ...  RND1  RND2
special / x / 2^k    E1
```

* **E1/PS** (`fpdiv_unpack`, `fpdiv_special`, `fpdiv_prescale`): this happens in the
  cycle where `start` is high. The operands are unpacked straight from the input
  ports and special cases are detected. For normal operands the same cycle
  prescales both significands, compares them and selects the integer digit.
* **NM** (`fpdiv_normalize`): one shared leading-zero counter and shifter.
  It normalizes one subnormal operand per cycle, the dividend first. A separate
  **PS** cycle then prescales the registered operands.
* **DGT** (`fpdiv_digit_cycle`): three radix-4 iterations. The new remainder
  and the three digits are registered (`fpdiv_quot_acc`).
* **RND1** (`fpdiv_round1`): forms the quotient from its two digit words,
  corrects it by the sign of the final remainder, and rounds. **RND2**
  (`fpdiv_round2`) re-rounds a tiny result at the subnormal position.

`fpdiv_ctrl` is the state machine that sequences these cycles.

## Prescaling: making digit selection independent of the divisor

The significands `mx` and `md` (both in [1,2)) are treated as `md/2`, `mx/2`
in [0.5,1). Both are multiplied by the same factor `M = 1 + A + B`. The factor
depends only on the three divisor bits after the leading one:

| divisor bits | M           | divisor bits | M           |
|--------------|-------------|--------------|-------------|
| 000          | 1 + 1/2 + 1/2 | 100        | 1 + 1/4 + 1/8 |
| 001          | 1 + 1/4 + 1/2 | 101        | 1 + 1/4       |
| 010          | 1 + 1/2 + 1/8 | 110        | 1 + 1/8       |
| 011          | 1 + 1/2       | 111        | 1 + 1/8       |

Every row puts the scaled divisor `z` in [1 - 1/64, 1 + 1/8). In that range a
single radix-4 selection table works for every divisor. The product is the
operand plus two shifted copies. A 3:2 carry-save adder reduces the three
terms, and a carry-propagate adder makes the result non-redundant.

In parallel, a subtractor compares `mx < md`. If so, the scaled dividend `w`
is doubled and the exponent lowered by one. This keeps the quotient `w/z` in
[1,2) and the rounding position fixed.

The integer digit can only be +1 or +2. It is selected from the carry-save
form of the scaled dividend: +2 when the sum of the two words, truncated to
five fraction bits, is at least 1.5. This is done for both the plain and the
doubled dividend, and the comparison picks one. The first remainder is then
`rem[1] = w - q1*z`. Its positive word is `w` and its negative word is `z` or `2z`.

## Remainder representation

The remainder is kept as two 59-bit words, P and N, with `rem = P - N` modulo
2^59. Each word has 3 integer bits (two's complement) and 56 fraction bits.
Three integer bits are enough for 4*rem, which lies in (-3, 3). The
fraction bits hold `md/2 * M` exactly.

One radix-4 step, `rem' = 4*rem - q*z`, is one 3:2 CSA per digit value
(`fpdiv_rem_cands`). It adds `4P`, `~(4N)` and a divisor multiple T:

* `~z` or `~2z` for q > 0, with the free carry LSB set to complete the negation
* `z` or `2z` for q < 0
* 0 for q = 0

The CSA sum becomes the new P and the inverted CSA carry the new N.
Any window of the top bits can then be assimilated as `P + ~N + 1`.
Each adder in the selection path has this form: one input inverted and a
carry-in of 1.

## The digit cycle: three iterations with speculation

This is the core of the design and its critical path. The remainder side is
simple: three rows of five CSAs, each row followed by a 5:1 mux driven by that
iteration's digit. The digit side avoids waiting for a full row:

1. **q[i+1]** – a 6-bit adder assimilates the top 6 bits (3 integer, 3
   fraction) of 4*rem[i]. The standard selection `fpdiv_qsel` then picks the digit:

   | estimate of 4*rem (eighths) | digit |
   |-----------------------------|-------|
   | 13 … 31                     | +2    |
   | 4 … 12                      | +1    |
   | -3 … 3                      | 0     |
   | -12 … -4                    | -1    |
   | -32 … -13                   | -2    |

2. **q[i+2]** – while q[i+1] is being selected, five 9-bit adders assimilate
   the top 9 bits of 4*rem[i+1] for all five candidate remainders. q[i+1]
   then only drives a mux. Each 9-bit adder is split into a 3-bit low part and
   a 6-bit high part. The reason: the `+1` of `P + ~N + 1` now enters three
   bits lower than in the 6-bit adder. When no carry leaves the low part, the
   6-bit result is one unit below the estimate the table expects. The
   carry-aware table `fpdiv_qsel_carry` therefore moves each interval
   end-point by one unit when that carry is 0. For example, an estimate of 12
   selects +2 with carry 0 and +1 with carry 1.
3. **q[i+3]** – five 7-bit adders add the low 7 bits of the selected 9-bit
   value to the top 7 bits of `-4*q*z`, one adder for each value of q[i+2].
   In units, those 7 bits are 16*rem[i+1] with four fraction bits.
   q[i+2] picks one of the five sums, and its top 6 bits go through the
   standard table.

Why the estimates are good enough: with `z` in [63/64, 9/8) the table above
tolerates an estimate error strictly inside ±1/8. Each estimate stays inside it:

* The 6-bit estimate of two truncated words is off by less than ±1/8.
* The 9-bit estimate is off by less than ±1/64, which is ±1/16 at the scale of 16*rem.
* The 7-bit term `floor(-4qz) + 1/16` is off by (-1/16, 0].
* The last truncation to 6 bits moves the estimate by 0 or 1/16.

Together the error stays within ±1/8. `tb_fpdiv_digit_cycle` checks this
directly: for 200,000 remainders, half of them within 1/16 of a selection
boundary, every step must keep |rem| ≤ 2/3·z.

Critical path, as the structure implies: 6-bit adder → SELECT → 5:1 mux →
SELECT → 5:1 mux → SELECT → 5:1 mux.

## Quotient and rounding

The digits are stored in two words, `quot_pos` for positive digits and
`quot_neg` for the magnitudes of negative digits, two bits per digit. The
words are subtracted only once, in RND1. This is cheaper in the cycle than
on-the-fly conversion.

After k digits (k = 27, 12 or 6) the quotient `Q` has 2k fraction bits.
If the final remainder is negative, `Q` is one unit too large and is
decremented. A nonzero remainder sets the sticky bit. For double precision
the 54 fraction bits give one more bit than the 52 + guard needed, and that
bit joins the sticky.

Rounding adds the biased exponent and the fraction as one integer, so a
rounding carry moves into the exponent and an all-ones exponent means
overflow. It supports the four IEEE modes: nearest-even, toward zero, toward
+inf and toward -inf.

A result whose exponent is below the normal range is tiny. Tininess is
detected before rounding. A tiny result is not rounded in RND1. RND2 shifts
the unrounded significand right to the subnormal position, keeping a sticky
bit, and rounds once. A rounding carry there gives the smallest normal number.

Early termination (`fpdiv_special`):

* NaN operand: the dividend's NaN, or else the divisor's, made quiet. Invalid is raised for a signalling NaN.
* inf/inf and 0/0: default NaN, invalid.
* inf/x and x/0: infinity. x/0 also raises divide-by-zero.
* 0/x and x/inf: zero.
* Normal dividend and a power-of-two divisor: the dividend with its exponent
  lowered, but only when the new exponent is still normal. Otherwise the
  division takes the normal path.

Exception flags `{nv, dz, of, uf, nx}` are produced for every division.

## Interface (`fpdiv`)

| port     | dir | width | meaning |
|----------|-----|-------|---------|
| clk      | in  | 1  | clock, rising edge |
| rst_n    | in  | 1  | asynchronous reset, active low |
| start    | in  | 1  | start a division; only while `ready` (asserted) |
| fmt      | in  | 2  | 0 half, 1 single, 2 double |
| rm       | in  | 2  | 0 nearest-even, 1 toward zero, 2 toward +inf, 3 toward -inf |
| a, b     | in  | 64 | dividend, divisor, in the low 16/32/64 bits |
| ready    | out | 1  | idle |
| done     | out | 1  | one-cycle pulse: `result`, `flags` valid (held until the next result) |
| result   | out | 64 | quotient in the low 16/32/64 bits, upper bits zero |
| flags    | out | 5  | {invalid, divide-by-zero, overflow, underflow, inexact} |

Count the start cycle as cycle 1. The result is written at the end of cycle
L, and `done` is high in cycle L+1. L is 4/6/11 for half, single and double
precision, with +2 for one subnormal operand, +3 for two, +1 for a tiny
result, and L = 1 for early termination.

## Where this RTL makes its own choices

* **Remainder width.** The remainder is 59 bits (3 integer + 56 fraction
  bits). The architecture's area figures speak of 58-bit CSAs. The bit-level
  format was not specified, and this one is exact for double precision.
* **Remainder muxes.** Each of the three remainder selections is written as a
  one-hot 5:1 mux over the five candidates, one per digit value. The area
  breakdown of the architecture counts 4:1 muxes for the wide remainder words
  and 5:1 muxes only for the narrow ones; how the fifth case is folded in is
  not described, so the plain 5:1 form is used here. Function is the same.
* **Bit slices.** The bit slices feeding the 6/9/7-bit adders are derived
  for this format (bits 56:51, 56:48, 56:50 of the 59-bit words).
* **Subnormal operands.** E1 and PS are separate cycles, with one NM cycle
  per subnormal operand, dividend first. Two subnormal operands therefore
  cost three extra cycles.
* **Integer digit.** The integer-digit rule (carry-save dividend ≥ 1.5 at five
  fraction bits) is this design's own. It is proven safe by the bound check in
  `tb_fpdiv_prescale`.
* **Rounding, flags, NaNs.** The rounding modes, exception flags, NaN
  propagation, tininess-before-rounding and the packing of half and single
  precision in 64-bit words are all this design's own.
* **Interface.** The reset, the start/ready/done handshake and the
  one-cycle early-termination latency are also this design's own.

## Verification

Each block has a self-checking testbench that prints
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|-----------|----------------|
| `tb_fpdiv` | 200,000 random divisions over all formats and rounding modes: normal, subnormal, tiny, overflow, power-of-two, exact-quotient and special operands. It compares result, flags and latency with an integer reference model (`tb/fpdiv_ref_pkg.sv`), and it fails if any mechanism (early termination, power-of-two, NM1/NM2, RND2, an exact quotient, doubling of the dividend, integer digit +2, overflow, carry-0 selection, each digit value) never occurred |
| `tb_fpdiv_latency` | the specified cycle counts: 4/6/11, single precision with a subnormal operand and tiny result (9), two subnormals, early termination |
| `tb_fpdiv_digit_cycle` | exact remainder update and the convergence bound |
| `tb_fpdiv_prescale` | scaled divisor range, quotient preserved by scaling (`w·md = x'·z`), bound on rem[1] |
| `tb_fpdiv_qsel`, `tb_fpdiv_qsel_carry` | exhaustive selection tables |
| `tb_fpdiv_rem_cands`, `tb_fpdiv_quot_acc` | arithmetic identities of the remainder step and the quotient words |
| `tb_fpdiv_round1`, `tb_fpdiv_round2` | rounding against the reference rounding function |
| `tb_fpdiv_unpack`, `tb_fpdiv_normalize`, `tb_fpdiv_special`, `tb_fpdiv_ctrl` | unpacking, normalization, early termination, cycle sequences |

The reference model is independent of the RTL. It finds the quotient with a
128-bit integer division and its remainder, then rounds at the bit position
the exponent calls for.

Run a testbench with Verilator 5 (packages first, modules found by `-y`):

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/fpdiv_pkg.sv tb/fpdiv_ref_pkg.sv tb/tb_fpdiv.sv --top-module tb_fpdiv -o sim
./obj_dir/sim
```

Replace `tb_fpdiv` by any other testbench name. The full `tb_fpdiv` run
(200,000 divisions) takes about two seconds; `NTESTS` in it sets the count.
A run with `NTESTS` raised to 2,000,000 also passes (about 17 seconds).

What is not verified: timing and area. The gate-delay estimate of the
architecture (about 300 ps per digit cycle) concerns a custom
implementation, and nothing here measures it.
