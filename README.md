# Hybrid restoring / non-restoring decimal divider

Decimal (BCD) division is usually done digit by digit with repeated
subtraction. Restoring division subtracts the divisor until the partial
remainder goes negative, then adds it back: a quotient digit of 9 costs 11
additions/subtractions. Non-restoring division skips the add-back and
continues the next digit with the negative remainder, adding instead of
subtracting: then a digit of 0 costs 10. Each method is cheap for some digits
and expensive for others.

This divider picks per digit. When the remainder changes sign, the value
before the last step (`Pre_R`) and after it (`Cur_R`) lie on either side of
zero, one divisor apart. The divider keeps whichever has the **smaller
magnitude**:

* `|Pre_R| >= |Cur_R|`: keep `Cur_R` (non-restoring; the kept value may be
  negative, and the next digit then counts down by adding);
* `|Pre_R| <  |Cur_R|`: undo the last step and keep `Pre_R` (restoring).

After the shift, a small remainder needs few subtractions and a remainder
close to minus one divisor needs few additions. So every digit after the
first costs at most 6 operations and 3.5 on average, against 11 and 6 for
restoring division. The first digit can cost up to 11.

The arithmetic is done in excess-3 code, using one-digit add/subtract cells
that have carry lookahead inside each digit.

## What it computes

```
quotient  = floor(X * 10^(n-1) / D)        (n quotient digits)
remainder = X * 10^(n-1) - quotient * D     (0 <= remainder < D)
```

The dividend `X` is the first partial remainder, and zeros are shifted in
behind it. `X` must be less than `10*D`, so that the first quotient digit is
between 0 and 9. Two common uses:

* **Fraction** (`X < D`): the result is the first `n` decimal digits of
  `X/D` (digits 0.d1 d2 ...).
* **Integer division** of a k-digit `X` by `D`: pass `D * 10^(k-1)` as the
  divisor and use `n = k`.

If `X >= 10*D`, or if `D = 0`, the divider stops early and raises `overflow`.

## Worst-case cost

Each cost below counts every divisor addition or subtraction: plain steps,
undo steps and the final sign correction. The worst case is a quotient of
the form 9444…4. The testbench at full size checks that the RTL uses exactly
these counts:

| quotient digits n | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 | 10 | 16 | 32 | 64 |
|---|---|---|---|---|---|---|---|---|---|---|---|---|---|
| operations | 11 | 17 | 23 | 29 | 35 | 41 | 47 | 53 | 59 | 65 | 101 | 197 | 389 |

That is `6n + 5`. Restoring division needs `11n` in its worst case (704 for
64 digits). The numbers match the published figures for this algorithm.
On random 64-digit operands the divider averages about 3.5 operations per
quotient digit (3.46 in the full-size testbench).

## The algorithm, step by step

For each digit `i = 0 .. n-1`:

1. While the sign has not changed since the previous step: if
   `Cur_R >= 0`, then `Cur_R -= D` and `Q += 1`; otherwise `Cur_R += D` and
   `Q -= 1`. `Pre_R` keeps the value from before the step. The first step of
   a digit never counts as a sign change.
2. When the sign has changed, compare `|Pre_R|` with `|Cur_R|`. If
   `|Pre_R| < |Cur_R|`, do one more step in the opposite direction. This
   brings `Cur_R` back to `Pre_R`.
3. If more digits remain, shift `Cur_R` and `Q` one decimal digit left.

After the last digit, a negative `Cur_R` gets one last `+D` and `Q` gets
`-1`. At the end of every digit, `Q` is the true quotient so far, or one
more than it. This is why the quotient can be a plain up/down counter: it
needs no digit-set conversion at the end.

Example: 2/3 with n = 3.

* Digit 0: one subtraction gives `2 → -1`, Q = 1. `|2| >= |-1|`, so the
  divider keeps -1.
* Shift: -10, Q = 10.
* Digit 1: four additions give `-7, -4, -1, 2`, Q = 6. The sign has
  changed and `|-1| < |2|`, so the divider undoes the last addition:
  -1, Q = 7.
* Shift: -10, Q = 70.
* Digit 2: the same as digit 1. It ends at -1, Q = 67.
* Final correction: `-1 + 3 = 2`, Q = 66. Check: 200 = 66·3 + 2.

Total: 1 + 5 + 5 + 1 = 12 operations.

## Number format

* Every internal digit is **excess-3** (digit + 3). In this code, the
  9's complement of a digit is its bitwise inverse.
* Negative partial remainders are stored in **ten's complement** over
  N+2 digits. A value is negative exactly when its top digit is 5–9, which
  in excess-3 is **bit 3 of the top digit**. Reading the sign therefore
  needs no logic.
* Two extra remainder digits are needed: `|Cur_R|` can reach almost `10*D`,
  and one more digit holds the sign.
* The quotient counter has N+1 digits. When the last digit overshoots, the
  count can briefly reach `10^n`.
* The ports are plain BCD. Converters (`bcd_to_ex3`, `ex3_to_bcd`) sit at
  the register inputs and outputs.

## The excess-3 add/subtract cell (`ex3_addsub_digit`)

The cell works on one digit, as follows:

* `sel = 1` (subtract) inverts the addend's excess-3 code, which gives the
  excess-3 code of its 9's complement. The incoming carry is XORed with
  `sel`.
* A 4-bit carry lookahead adder (`cla4`) forms `X = a + b' + cin`.
* Both operands carry a bias of 3, so `X` carries a bias of 6. Without a
  carry out, the result is `X - 3`. With a carry out, the 4-bit wrap has
  already removed 16 = 10 + 6, so the result is `X + 3`.
* Four correction units (Add C=0, Add C=1, Sub C=0, Sub C=1) feed a
  selector that is driven by `{sel, carry_out}`.

**Where this departs from the original scheme.** The original
subtraction-correction rule also adds 1 when the lower digit produced a
carry. The four cases are −3, −2, +3, +4. Here that carry already enters
the lookahead adder through `carry_in`, as in the original block diagram.
So the subtraction units apply the same −3/+3 as the addition units. The
result is the same.

`ex3_addsub_n` chains the cells. Cell `i` gets
`carry_in = carry_out(i-1) ^ sel`, so after its own XOR the adder sees the
true decimal carry. Cell 0 gets 0, which becomes the +1 of the ten's
complement when subtracting. Between digits the carry ripples. This is the
longest path in the design: 66 cells at N = 64.

## Structure

```
hybrid_divider                 top: start/busy/done, BCD ports
├─ hybrid_div_ctrl             FSM: IDLE -> RUN -> (FIX) -> IDLE, op counter
└─ hybrid_div_datapath         Cur_R, Pre_R, D (N+2 digits), Q (N+1 digits)
   ├─ ex3_addsub_n  (N+2)      Cur_R -/+ D
   ├─ ex3_addsub_n  (N+1)      Q +/- 1
   ├─ rem_compare              |Pre_R| >= |Cur_R| via Pre_R + Cur_R
   │   └─ ex3_addsub_n (N+2)
   ├─ bcd_to_ex3 x 2N          operand load
   └─ ex3_to_bcd x 2N          result outputs
ex3_addsub_n -> ex3_addsub_digit -> cla4
hdiv_pkg                       digit types, command/status structs, FSM states
```

The controller sends the datapath one command word per cycle
(`dp_ctrl_t`: `load`, `arith`, `sub`, `save_pre`, `shift`). It gets back
four status flags (`dp_status_t`), all taken from registers: the signs of
`Cur_R` and `Pre_R`, `|Pre_R| >= |Cur_R|`, and `Q >= 10`.

`rem_compare` compares magnitudes without computing them. The two
remainders have opposite signs, so `|Pre_R| >= |Cur_R|` holds exactly when
`Pre_R + Cur_R` is zero or has the sign of `Pre_R`.

## Interface and timing (`hybrid_divider`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `start` | in | 1 | sampled while `busy` is low; operands are taken in that cycle |
| `num_digits` | in | `$clog2(N+1)` | n, 1..N (0 or > N is read as N) |
| `dividend`, `divisor` | in | 4N | BCD, digit 0 in bits [3:0] |
| `busy` | out | 1 | high from the cycle after start until the end |
| `done` | out | 1 | one-cycle pulse; results valid from then until the next start |
| `overflow` | out | 1 | `X >= 10*D` or `D = 0`; quotient/remainder then meaningless |
| `quotient`, `remainder` | out | 4N | BCD |
| `op_count` | out | 16 | additions/subtractions used by the last division |

Each cycle does one addition or subtraction. Each digit ends with one
decision cycle. That cycle also performs the undo step of a restoring digit
and the digit shift. The latency from the start edge to the edge where
`done` rises is:

```
1 (load) + plain operations + n (decision cycles) + 1 if a final correction is needed
```

For the 64-digit worst case this is 391 cycles. The parameter `N`
(default 64) sets the register size. `n` can be anything up to `N` at run
time.

## Choices made here (not fixed by the algorithm)

* The rule that picks a restoring or a non-restoring digit is read as a
  comparison of *magnitudes*. A signed comparison would end every digit
  negative and cost up to 11 operations per digit. The magnitude reading
  gives exactly the 6-per-digit worst case and the table above.
* The original flow shifts the quotient before testing for the last digit.
  Here the quotient shifts together with the remainder before each new
  digit, so the last digit lands in position 0.
* The following are all this design's own choices:
  * operand widths (N digits each);
  * the run-time `n`;
  * the `overflow` detection;
  * the start/busy/done handshake;
  * asynchronous reset;
  * one operation per cycle;
  * ripple carry between digits.
* The `cla4` lookahead is a textbook generate/propagate form.

## Simulating

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=… failures=…`. Example with plain Verilator (put the
package first and let `-y` find the other modules):

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/hdiv_pkg.sv tb/tb_hybrid_divider_full.sv --top-module tb_hybrid_divider_full
./obj_dir/Vtb_hybrid_divider_full
```

| testbench | what it checks |
|---|---|
| `tb_cla4`, `tb_bcd_to_ex3`, `tb_ex3_to_bcd`, `tb_ex3_addsub_digit` | exhaustive |
| `tb_ex3_addsub_n`, `tb_rem_compare` | 6 digits, random and corner values against integer arithmetic |
| `tb_hybrid_div_datapath` | N = 4, random command sequences against an integer register model |
| `tb_hybrid_div_ctrl` | N = 8, controller driving an integer stand-in datapath |
| `tb_hybrid_divider` | N = 8; 400+ random and directed divisions: results, overflow, exact op count and latency from an integer model, the `6n+5` bound; checks that every mechanism (subtract runs, add runs, restoring and non-restoring digit ends, negative remainder carried over a shift, final correction, overflow) occurs |
| `tb_hybrid_divider_full` | default size N = 64: worst-case table for n = 1..64; 20 random 64-digit divisions, mean cost between 3 and 4 operations per digit |
| `tb_integer7` | N = 16: 7-digit integer division (dividends up to 9,999,999, divisor ≤ dividend) |

## Limits

* Only the hybrid divider is built. Restoring and non-restoring dividers
  exist here only as a description, for comparison.
* The carry ripples across all N+2 digits within one cycle. For N = 64 this
  limits the clock rate. A lookahead across digits would shorten this path,
  but it is not part of the design.
* The operation counts are exact and tested. The cycle count adds one
  decision cycle per digit. No gate-level timing has been done.
