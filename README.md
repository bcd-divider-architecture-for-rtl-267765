# Nikhilam BCD divider: two decimal digits by one, without a subtractor

This is a combinational divider for binary-coded decimal (BCD) numbers. It
divides a two-digit BCD dividend `b` (8 bits) by a one-digit BCD divisor `a`
(4 bits). It returns a one-digit quotient `q` and a one-digit remainder `r`.
The arithmetic uses only a 10's complement, a small multiplier and adders. It
follows the *Nikhilam* rule of Vedic arithmetic: "all from 9 and the last
from 10".

## The idea

To divide by a digit `d`, work with its distance from the base 10 instead:
`c = 10 - d`. A dividend with tens digit `h` and units digit `l` can then be
written as

    10*h + l  =  h*d + (l + h*c)

So `h` is a first guess of the quotient, and `l + h*c` is what is left over.
Finding the leftover takes one multiplication and one addition. No
subtraction is needed.

Example, 20 / 9: `c = 1`, `h = 2`, `l = 0`. The quotient is 2 and the
leftover is 0 + 2*1 = 2.

The leftover is not always smaller than `d`, so the step repeats:

* **Nikhilam round.** The leftover still has a tens digit `h'`. The step is
  applied again to the leftover, and `h'` is added to the quotient.
  Example, 29 / 9: 2 rem 11, then 11 becomes 1 + 1*1 = 2, giving 3 rem 2.
* **Correction round.** The leftover is a single digit `l`, but `l >= d`.
  This shows up as `l + c` reaching 10 (a decimal carry). The units digit of
  `l + c` is `l - d`, and 1 is added to the quotient.
  Example, 72 / 9: 7 rem 9, then 9 + 1 = 10 carries, giving 8 rem 0.
* **Done.** The tens digit is zero and `l + c` does not carry. Then `l` is
  the remainder.

Each round leaves `value - quotient*d` unchanged, and each round that is
taken adds at least 1 to the quotient. So with a one-digit quotient the
division ends after at most 9 rounds taken. The worst case is 9 / 1, which
needs nine correction rounds.

## Architecture

In the reference architecture, one round is a loop through six blocks:

| block | module | job |
|---|---|---|
| 10's complement | `bcd_tens_complement` | `c = (9 - a) + 1` |
| 2:1 multiplexer | `mux2` | dividend at the start, fed-back adder result afterwards |
| 4x4 multiplier | `mult4x4` | `c` times the operand's tens digit (binary, at most 81) |
| adder | `nikhilam_adder` | product + units digit, returned as two BCD digits and a carry |
| decision box | `decision_box` | is another round needed? |
| incremental block | `incrementer` | adds the round's quotient digit |

Here the loop is **unrolled**. `nikhilam_round` is one pass through
multiplier, adder, decision box, multiplexer and incrementer.
`bcd_vedic_divider` computes the complement once and chains `ROUNDS`
copies of `nikhilam_round`:

    a --> bcd_tens_complement --c--+---------+---------+-- ...
                                   v         v         v
    b --> v[0] --> [round 0] --> v[1] --> [round 1] --> ... --> v[ROUNDS].lo --> r
    0 --> q[0] -->           --> q[1] -->           --> ... --> q[ROUNDS]    --> q

Inside a round, with operand `v = {hi, lo}`:

* `corr = (hi == 0)`. The multiplier input is `hi`, or 1 when `corr` is set.
  This way one multiplier and one adder serve both kinds of round.
* `sum = lo + c*m`, converted to two BCD digits. `carry` means the tens
  digit of `sum` is not zero.
* `taken = !corr || carry`.
* When `taken` is set, the next operand is `sum`. In a correction round its
  tens digit is cleared, because that digit is the quotient increment and not
  part of the new operand. The quotient grows by `m`.
* When `taken` is clear, the operand and the quotient pass through unchanged.

Once the answer is found, the remaining rounds are not taken. So the result
simply appears at the end of the chain. Each round's `taken` and `corr` are
kept as named signals (`taken[k]`, `corr[k]`) so that a simulation can see
how a division went.

### Interface and timing

| port | dir | width | meaning |
|---|---|---|---|
| `a` | in | 4 | divisor, BCD 1..9 |
| `b` | in | 8 (`bcd2_t`) | dividend, `b[7:4]` tens, `b[3:0]` units |
| `q` | out | 4 | quotient, BCD |
| `r` | out | 4 | remainder, BCD |
| `err` | out | 1 | the input has no one-digit answer or is not legal |

The divider has no clock and no reset. Outputs follow inputs after the
combinational delay of the chain.

`err` is set for any of these inputs:

* `a = 0`;
* any digit above 9;
* `b[7:4] >= a`, which would need a quotient above 9.

When `err` is set, `q` and `r` are forced to 0.

Shared types are in `bcd_div_pkg`. `bcd_digit_t` is a 4-bit digit.
`bcd2_t` is `{hi, lo}`, with the same bit layout as an 8-bit BCD word.
`MAX_ROUNDS = 9` is also defined there.

## Where this design departs from the reference description

* **Unrolled loop.** The reference draws a feedback loop, but reports a
  purely combinational delay and has no clock. Unrolling the loop into nine
  rounds is this design's reading of that. The round count is derived from
  the algorithm; no number is given for it.
* **Quotient increment.** The reference adds 1 to the quotient per extra
  round, with the condition "remainder equals divisor". That is correct for
  divisor 9. It is wrong when a leftover of 20 or more is fed back: 79 / 8
  gives 7 rem 23, so the next round must add 2. Here a round adds the
  operand's tens digit, or 1 in a correction round. The condition
  "remainder equals divisor" becomes "remainder >= divisor", found through
  the complement carry.
* **Adder width.** The adder returns the whole sum as two BCD digits, not
  one digit plus a carry, so that larger leftovers can be fed back.
* **Multiplexer select.** The select is the decision box's output rather
  than the bare adder carry. The first Nikhilam round must feed back even
  when nothing carries.
* **`err` output.** The reference does not define what happens for divisor 0,
  non-BCD codes or quotients above 9. The `err` output is this design's own
  addition.
* **Widths.** The reference is inconsistent about which operand is 8 bits
  wide. This design follows the reading in which the dividend is 8 bits and
  the divisor 4 bits, which matches its block diagram and its results.
* **Reported results.** The reference reports a delay of 1.15 ns and 524
  gates in its own cell library. Neither number is reproduced here.

## Verification

Every module has a self-checking testbench in `tb/`, named `tb_<module>`.
Each one prints `TB_RESULT checks=N failures=M`.

| testbench | what it covers |
|---|---|
| `tb_bcd_tens_complement` | all 16 codes |
| `tb_mult4x4` | all 256 operand pairs |
| `tb_nikhilam_adder` | every product 0..81 with every units digit |
| `tb_decision_box` | all cases |
| `tb_incrementer` | all cases |
| `tb_mux2` | 500 random pairs |

`tb_bcd_vedic_divider` tests the divider at its default size:

* It applies the seven demonstration divisions 20/9, 29/9, 22/8, 40/9, 52/9,
  72/9 and 19/9, whose expected results are 2 r2, 3 r2, 2 r6, 4 r4, 5 r7,
  8 r0 and 2 r1.
* It then applies all 4096 input codes and compares each result with
  integer division.
* It counts Nikhilam rounds, correction rounds, multi-round divisions,
  divisions that use all nine rounds, and `err` cases. It fails if any of
  these never occurs.

To run one testbench with Verilator:

    verilator --binary --timing --assert -Irtl rtl/bcd_div_pkg.sv \
        tb/tb_bcd_vedic_divider.sv --top-module tb_bcd_vedic_divider
    ./obj_dir/Vtb_bcd_vedic_divider

Each testbench finishes in well under a second.

## Changing it

* `ROUNDS` on `bcd_vedic_divider` can be lowered to trade depth for
  correctness. Some legal inputs then come out wrong; the exhaustive
  testbench shows which.
* Supporting two-digit quotients would take three changes: replacing
  `incrementer` with a two-digit BCD accumulator (with decimal carry),
  dropping the `b[7:4] >= a` check from `err`, and raising `ROUNDS`. The rounds themselves need no change, because each
  round already handles leftovers up to 90. The worst case, 99 / 1, needs
  far more than nine rounds.
