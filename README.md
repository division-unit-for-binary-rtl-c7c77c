# Radix-10 divider for Binary Integer Decimal significands

IEEE 754-2008 decimal floating point allows the significand to be stored as a
plain binary integer (Binary Integer Decimal, BID). Dividing two such numbers
must still yield a correctly rounded *decimal* quotient of 16 digits
(decimal64). This RTL does that with a radix-10 digit recurrence that runs
entirely on binary integers. Each clock cycle it produces one signed decimal
quotient digit from a binary carry-save residual. It folds the digit into a
binary quotient as `Q = 10·Q + q`, so the BID result needs no conversion from
BCD at the end.

The design follows the architecture published as *"Division Unit for Binary
Integer Decimals"*: shared operand normalization with a rectangular
multiplier, a retimed carry-save recurrence with split digits `q = 5·qH + qL`,
table-driven digit selection, and on-the-fly conversion with round-half-even.
The section "Where this RTL departs from the published design" lists where it
differs.

```
 mx, md ──► norm_unit ──x,d──► recurrence ──q──► conv_round ──► mq
             (LOD, 10^e table,   (carry-save w,     (Q = 10Q + q,
              57x32 multiplier)   sel_func, szd)     rounding)
 ex, ed, sx, sd ───────────────────────────────────► exp_sign ──► eq, sq
                     div_ctrl sequences all of it
```

## Interface and timing (`bid_divider`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `start` | in | 1 | one-cycle pulse; the operands are captured in this cycle. It is ignored while `busy` is high |
| `sx`, `ex`, `mx` | in | 1, 10, 54 | dividend sign, biased exponent (bias 398), BID significand |
| `sd`, `ed`, `md` | in | 1, 10, 54 | divisor sign, exponent, significand |
| `busy` | out | 1 | a division is running |
| `done` | out | 1 | one-cycle pulse; the results below are valid from then until the next `start` |
| `sq` | out | 1 | `sx ^ sd` |
| `eq` | out | 12, signed | biased exponent of the quotient, not range-checked |
| `mq` | out | 54 | quotient significand, not normalized |

The result is `(-1)^sq · mq · 10^(eq-398)`. If the quotient is exact, `mq`
holds only the digits it needs (1/8 gives `mq = 125`, `eq = 398-3`).
Otherwise it is rounded to 16 digit positions after the leading position of
the normalized ratio, ties to even.

Cycle by cycle, with cycle 1 the one after `start` is sampled:

| cycle | state | work |
|---|---|---|
| 1 | N1 | divisor: leading-one detection, table lookup, operand swap → RMX/RMY |
| 2 | N2 | dividend: same; divisor: Booth partial products and 4:2 tree → pipeline register |
| 3 | N3 | dividend: tree; divisor: final adder → `d`, `db2` |
| 4 | N4 | dividend: final adder → `x` (uses `db2`) |
| 5 | INIT | `w[0] = x`, `5d` |
| 6–22 | ITER j = 1..17 | digit `q_j` is selected and `w[j]` computed; `q_(j-1)` is assimilated |
| 23 | ROUND | `q17` is the rounding digit; `q16 + {-1,0,+1}` is assimilated |
| 24 | FIN | `done` |

So a quotient that is not exact takes 24 cycles: 4 to normalize and 20 for
recurrence and rounding. An exact quotient with C digits finishes in cycle
C + 7. A zero dividend finishes in cycle 7.

## Normalization (`norm_unit`, `lod`, `pow10_table`, `rect_mult`)

BID operands are not normalized: 1 and 1000000000000000 are both valid
significands. The recurrence needs a divisor in a known range, so that a
7-bit prefix of the divisor can select the digit. It also needs
`x < (7/9)·d`, so that the recurrence can start at `w[0] = x`. Both operands
are multiplied by a power of ten:

* dividend: `x = mx·10^ex_n` with `0.1·2^54 <= x < 2·2^54`
* divisor: `d = md·10^ed_n` with `0.1·2^59 <= d < 2·2^59`

The divisor is placed 5 bits higher than the dividend, so
`x/d < 2/(0.1·32) = 0.625 < 7/9` for any pair.

The power comes from the leading-zero count `lz` of the 54-bit significand,
plus 5 for the divisor. Every significand with `lz` leading zeros lies in
`[2^(53-lz), 2^(54-lz))`. The range `[0.2·2^lz, 2·2^lz)` spans a factor of
10, so exactly one power of ten falls in it. The table stores the smallest
`e` with `5·10^e >= 2^lz`. Both tables (`lz → e` and `e → 10^e`, up to
10^17) are computed at elaboration in `bid_div_pkg`.

The product can exceed the range by one bit. A divisor product with bit 59
set is halved (`db2 = 1`), and the dividend is halved with it.

One multiplier serves both operands. Whenever `10^e` needs more than 30 bits,
the significand fits in 30 bits, and the other way round. The leading-one
detector's flag `th = (m >= 2^30)` therefore sends the wider factor to the
57-bit input and the narrower one to the 32-bit input. `rect_mult` uses
radix-4 Booth recoding (16 partial products), reduces them with three levels
of 4:2 compressors, and has a pipeline register before the final adder. That
register is why normalization takes 4 cycles rather than 2. The divisor goes
first, because the dividend needs its `db2`.

## The recurrence (`recurrence`, `sel_func`, `szd`)

With digits `q ∈ {-7..7}` split as `q = 5·qH + qL`, where `qH ∈ {-1,0,1}`
and `qL ∈ {-2..2}`:

```
v[j] = 10·w[j-1] - qH_j·5d
w[j] = v[j]      - qL_j·d          |w| <= (7/9)·d   (redundancy rho = 7/9)
```

The residual is kept as two 64-bit words (sum and carry). `10w` is built as
`8w + 2w` with two rows of full adders. One more row adds `-qH·5d` and a last
row adds `-qL·d`. A negative multiple enters as its bitwise inverse, and the
missing +1 goes into the free least significant bit of the carry word. `5d`
is computed once, in the INIT cycle. Arithmetic wraps modulo 2^64, which is
exact because `|10w| < 7.8·2^60`.

**Digit selection** is the subtle part. Both digits are chosen in the same
cycle from the previous residual:

* The estimate `est` adds bits 62..47 of the two residual words. It is in
  units of 2^47, never above `w`, and less than 2^48 below it.
* To keep the ×10 off the critical path, `qH` is selected by comparing `w`
  itself with constants for `10w/10`:
  `qH = +1` if `est >= mH1`, `-1` if `est + mH1 < 0`, else 0.
* `qL` depends on `v/10 ≈ w - qH·d/2`. It is computed for all three values
  of `qH` in parallel, using `d/2` truncated to the same 2^47 unit, and `qH`
  then picks one. `qL = ±2` or `±1` comes from comparing with `mL2` and `mL1`
  in the same way.
* A negative threshold is the one's complement of the positive one
  (`m0 = -m1 - 1`), so only `mH1`, `mL2` and `mL1` are stored for each
  divisor interval.

The constants depend on the 7 leading bits of `d` (`dhat`, `d` normalized
to 59 bits):

| dhat | 13–14 | 14–16 | 16–18 | 18–19 | 19–22 | 22–26 | 26–30 | 30–33 | 33–39 | 39–46 | 46–54 | 54–64 | 64–77 | 77–90 | 90–108 | 108–128 |
|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|
| mH1 | 28 | 30 | 34 | 36 | 42 | 48 | 56 | 64 | 72 | 84 | 100 | 115 | 139 | 166 | 195 | 230 |
| mL2 | 18 | 18 | 22 | 22 | 24 | 27 | 32 | 40 | 40 | 48 | 56 | 68 | 84 | 105 | 113 | 128 |
| mL1 | 4 | 4 | 8 | 8 | 8 | 8 | 8 | 8 | 8 | 16 | 16 | 16 | 16 | 32 | 32 | 32 |

The constants are in units of `dhat/8`. They are compared with `est` shifted
by 3 bits. Write `D` for the divisor in those units (`8·dhat <= D < 8·(dhat+1)`)
and `r = 1/8`. A constant is correct if, over the whole interval:

* `(2/9)·Dmax + r <= mH1 <= (5/18)·Dmin - r`
* `(11/90)·Dmax + 2r <= mL2 <= (16/90)·Dmin - 2r`
* `(2/90)·Dmax + 2r <= mL1 <= (7/90)·Dmin - 2r`

The bounds come from the selection intervals for ρ = 7/9 and the estimate
errors above. Every entry in the table meets them.

The leading-zero normalization never produces `dhat < 14`: the power of ten
it picks is always at least 1.11 times the lower end of the range. Values
below 14 use the first row.

`szd` adds the two residual words and reports sign and zero. A zero residual
stops the division early, with an exact quotient. At the end, sign and zero
of the final remainder feed the rounding.

## Quotient assembly and rounding (`conv_round`)

Each digit is converted to two's complement and registered together with
`q+1` and `q-1`. One cycle later it is assimilated with a row of full adders
and an adder: `Q = (Q<<3) + (Q<<1) + q`. The one-cycle delay means the zero
test of the matching residual is known when the digit is added. An exact
quotient therefore stops with the right number of digits, and nothing ever
has to be divided by 10.

For the same reason, `q16` is not assimilated in iteration 17. It is moved
to a second register `q_R` while `q17`, the rounding digit, is produced. In
the ROUND cycle, let `B = q17`, let `s` and `z` be the sign and zero of the
final remainder, and let `L` be the LSB of `q_R`:

| condition | assimilated |
|---|---|
| `B + 5 - s - (z & ~L) >= 10` | `q_R + 1` |
| `B + 5 - s - (z & L) < 0` | `q_R - 1` |
| otherwise | `q_R` |

This is round-half-even of `q_R + (B + remainder)/10`.

## Sign and exponent (`exp_sign`)

`sq = sx ^ sd`. Since `mx/md = (x/d)·10^(ed_n - ex_n)` and
`x/d = Q·10^(-C)`, where C is the number of digits assimilated (16 when
rounded):

```
eq = ex - ed + 398 - ex_n + ed_n - C
```

Overflow, underflow, `md = 0`, infinities and NaNs are not handled: they
belong to the surrounding floating-point unit. With `md = 0` the unit still
finishes, with a meaningless result.

## Where this RTL departs from the published design

* **Halving when the divisor overflows.** The published unit shifts both `x`
  and `d` right by one. `d` is always even then, but an odd `x` (for
  example an already normalized odd dividend) would lose its last bit and
  change the quotient. Here the registers hold `2x` and `2d` instead: `P`
  when halving, `P<<1` otherwise. The ratio is exact, and the top 7 bits of
  the divisor register are still `dhat`.
* **Exponent formula.** The published formula carries an extra `+16`. The
  formula above is the one that gives the correct value, for example for
  1/8 = 125·10^-3.
* **Negative ties.** Applied literally, the published rounding amount
  `R = 5 - s - (z & ~L)` also in the decrement test rounds a tie of
  `B = -5` away from even. The decrement test here uses `L` in place of `~L`.
* **Selection details chosen here:** the estimate precision (2^47, i.e. 1/64
  of a `dhat` unit), the comparison forms, and the reading of the multi-row
  cells of the constant table for `mL2` and `mL1`. With these choices the
  published constants meet the bounds above.
* **Own choices where the description is silent:** the 64-bit residual
  width, the order of the carry-save rows, computing `5d` in the INIT cycle,
  the controller's states and the start/busy/done handshake, the input
  registers, and how the 4:2 compressors are built (two 3:2 rows each).
* The Booth multiplier drops the +1 of its last partial product. Its 32-bit
  operand must stay below 2^31, which always holds here (it is below 2^30).

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|---|---|
| `tb_bid_divider` | about 20,600 divisions: fixed cases (1/8 must assimilate the digits 1, 3, −5, giving Q = 1, 13, 125), forced ties, random operands of 1–16 digits, divisors near powers of two. The reference uses 256-bit integers: exact quotients by divisibility, otherwise `x·10^16/d` rounded half-even. Also checks sign, exponent, the latency (24 or C+7), and that each mechanism occurs: exact stop, zero dividend, divisor halving, both operand routings, round up/down/none, positive and negative ties, all digit components. Runs at the default sizes |
| `tb_norm_unit` | ranges, values and `db2` of the normalized operands, against wide integers |
| `tb_rect_mult` | products and the one-cycle pipeline latency |
| `tb_lod`, `tb_pow10_table` | counts and the range condition for every `lz` |
| `tb_sel_func` | for 200,000 random divisors and residuals split into random carry-save pairs, the selected digit keeps the next residual within (7/9)·d |
| `tb_recurrence` | `|x·10^j - Q_j·d| <= (7/9)·d` after every iteration, plus sign/zero |
| `tb_conv_round` | digit strings with forced ties against round-half-even |
| `tb_div_ctrl` | the control word in every cycle, early stop after each C, latency |
| `tb_szd`, `tb_exp_sign` | against direct arithmetic |

To run one with Verilator (the package must come first):

```
verilator --binary --timing --assert -Irtl -Itb rtl/bid_div_pkg.sv tb/tb_bid_divider.sv \
          --top-module tb_bid_divider
./obj_dir/Vtb_bid_divider
```

The full-size divider test runs in well under a second.

## Files

`rtl/bid_div_pkg.sv` holds the widths, the digit and control types, and the
two tables. `rtl/csa32.sv` and `rtl/csa42.sv` are the carry-save rows used
by the multiplier, the recurrence and the quotient adder. Each of the other
files holds the module of the same name described above. The top level is
`rtl/bid_divider.sv`.
