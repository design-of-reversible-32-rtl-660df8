# Reversible-gate BCD adders and subtractors, 32-bit and 64-bit

Binary fractions cannot represent most decimal fractions exactly. Work that has
to match hand calculation, such as money, tax or billing, is therefore done in
decimal, with each digit held as a 4-bit BCD (binary-coded decimal) code. This
RTL implements BCD addition and subtraction on 8-digit (32-bit) and 16-digit
(64-bit) words. Every unit is built from *reversible* logic gates: the 3x3
Peres gate, the 3x3 TR gate and the 4x4 DKG gate. A reversible gate maps its
inputs one-to-one onto its outputs, so in principle it does not lose
information. That is why such gates are studied for low-power and quantum
circuits. Here they are written as ordinary combinational logic, which any
synthesis tool maps to normal cells. The gate structure is kept so that it
can be seen and counted in the netlist.

There are three kinds of unit, each at both word sizes:

| unit | module | gate family | operation |
|---|---|---|---|
| BCD adder | `bcd_adder_peres` | Peres | a + b, digit by digit |
| BCD subtractor | `bcd_subtractor_tr` | TR (complement) + Peres (adders) | a - b, nine's-complement method |
| BCD adder/subtractor | `bcd_addsub_dkg` | DKG | either, selected by `sub` |

`bcd_reversible_top` places all six units (3 kinds x 2 sizes) side by side,
each with its own ports. Nothing is clocked. Every output is a combinational
function of the operands.

## The result format: one 5-bit value per digit

No unit returns a single BCD word. Each returns one 5-bit value for every
decimal digit: `res[i] = {carry_i, digit_i}`, where `res[0]` belongs to the
least significant digit (bits `[3:0]` of the operands). An 8-digit unit
therefore has 8 x 5 = 40 result bits, and a 16-digit unit has 80.

Bit 4 means different things in the two operations. This is the key to reading
the outputs.

* **Addition.** The digits are independent. Digit *i* of the result is the
  BCD sum of `a_i` and `b_i` alone. Its bit 4 is that digit's decimal carry,
  and that carry is **not** passed to digit *i+1*. For example, 7 + 8 gives
  `1_0101` (carry 1, digit 5). A full-width decimal sum is formed outside the
  unit, by adding each carry into the next digit. This is how the units
  behave in the published examples, and the RTL keeps it.
* **Subtraction.** The digits form one carry chain. Bit 4 of digit *i* is the
  carry into digit *i+1*, and the carry out of the top digit wraps round to
  digit 0. The digits `[3:0]` then make up a complete decimal word (see below).

In both operations, the digit codes `1010`..`1111` (10..15) are not valid BCD.
They are still processed with fixed 5-bit arithmetic rather than rejected. For
example, `D + D` gives `00000`, because (26 + 6) mod 32 = 0. These cases exist
only to match the published behaviour bit for bit. Valid BCD operands never
produce them.

## The BCD digit adder

`bcd_digit_adder_peres` is the building block of the Peres and TR units:

1. Four full adders form the 5-bit binary sum `s = a + b + cin`. Each full
   adder is two Peres gates: the first gives `a^b` and `a&b`, the second adds
   the carry.
2. If `s > 9`, that is if `s[4] | s[3]&(s[2]|s[1])`, a second row of full
   adders adds 6 to all five bits. The result wraps modulo 32.

For valid digits with `cin = 0`, the sum `s` lies in 0..18. The output is then
exactly `{s >= 10, s mod 10}`. The adder unit ties `cin` to 0.

## Subtraction by nine's complement, and the end-around carry

This is the least obvious part of the design.

The nine's complement of an n-digit number B is `10^n - 1 - B`: each digit is
replaced by `9 - b_i`. `nines_comp_tr` forms `9 - b_i` for one digit with
four TR-gate full subtractors, as a 4-bit difference modulo 16. The
subtractor then adds A and the complement of B with BCD digit adders that
pass carries from digit to digit:

    A + (10^n - 1 - B) = (A - B) + (10^n - 1)

* If **A > B**, the sum is at least 10^n, so a carry leaves the top digit.
  The low n digits hold `A - B - 1`. Adding the carry back into digit 0 (the
  *end-around carry*) gives exactly `A - B`.
* If **A < B**, no carry leaves the top digit. The digits hold
  `10^n - 1 - (B - A)`, the nine's complement of the magnitude. The top
  digit's bit 4 is 0 and marks the result as negative. The magnitude is
  recovered by taking the nine's complement of the digits again.
* If **A = B**, the digits are all nines (`01001` everywhere), the
  nine's-complement "negative zero". An all-zero input reads the same way.

Worked example, 8 digits, `00000523 - 00000187`. The nine's complement of
00000187 is 99999812, and 523 + 99999812 = 1_00000335. The carry wraps round
and gives 00000336. Per digit, the unit outputs digit 0 = `0_0110`,
digit 1 = `0_0011`, digit 2 = `1_0011`, and digits 3..7 = `1_0000`.
`00000187 - 00000523` gives the digits `99999663`, which is the nine's
complement of 336. The top digit's bit 4 is 0, so the result is negative.
Low digits can still carry internally: here digits 0 and 1 read `1_0011` and
`1_0110`.

**Resolving the loop.** The end-around carry feeds the top carry back into the
bottom digit, which is a combinational loop. The RTL breaks it with two rows
of digit adders. The first row runs the chain from a carry-in of 0; its top
carry is the end-around carry, and it is 1 exactly when A > B. The second row
runs the chain again from that carry and drives the outputs. This costs a
second row of digit adders (`bcd_subtractor_tr` is about twice the size of
`bcd_adder_peres`). It is the value the closed loop settles to from an
all-zero start, and the netlist has no loop.

### `LATE_CARRY`: where the carry enters a digit

`bcd_subtractor_tr` and `bcd_addsub_dkg` have a parameter `LATE_CARRY`.

* `LATE_CARRY = 0` (default): the carry from the digit below enters the digit
  adder's binary sum, before the +6 correction. This gives correct decimal
  subtraction for all valid operands. It is what the nine's-complement method
  calls for.
* `LATE_CARRY = 1`: each digit adds only `a_i + (9 - b_i)`. Once that value
  has been corrected, the incoming carry is added to the 5-bit result by a
  separate incrementer (`bcd_inc5_peres` or `dkg_inc5`). This reproduces the
  published waveforms of the subtractor exactly. It has a flaw, though. A
  digit whose corrected sum is 9 and that receives a carry becomes `0_1010`
  (ten, not a BCD digit) and does not carry onward. One example is 8 - 8
  with a carry coming in. Use this setting only to compare against those
  waveforms.

## The DKG adder/subtractor

The DKG gate has a control input `a`. With `a = 0` its outputs `r, s` are the
carry and sum of `b + c + d`. With `a = 1` they are the borrow and difference
of `b - c - d`. `dkg_digit_addsub` uses that control directly:

1. **Operand row.** Each bit uses `DKG(a=sub, b=sub & 9[i], c=b[i], d=borrow)`.
   With `sub = 0` this adds `0 + b[i] + 0` and passes B through. With
   `sub = 1` it subtracts, and the row forms `9 - b` (mod 16).
2. **Adder row.** Four DKG gates with `a = 0` work as full adders and form
   `a + operand + cin`.
3. **Correction row.** DKG full adders add 6 when the sum exceeds 9, as in the
   Peres digit adder.

`bcd_addsub_dkg` arranges these slices like the subtractor: two rows and an
end-around carry. In add mode it forces every carry-in to 0. The result is
that `sub = 0` gives bit-for-bit the output of `bcd_adder_peres`, and
`sub = 1` gives the output of `bcd_subtractor_tr` with the same `LATE_CARRY`.
The select pin is the one input the combined unit has beyond the adder.
`sub = 1` means subtract; this polarity is this design's choice.

## Gate equations

| gate | inputs | outputs |
|---|---|---|
| Peres | a, b, c | p = a, q = a^b, r = ab ^ c |
| TR | a, b, c | p = a, q = a^b, r = a&~b ^ c |
| DKG | a, b, c, d | p = b, q = ~a&c \| a&~d, r = (a^b)(c^d) ^ cd, s = b^c^d |

The pass-through outputs that a circuit does not need are the garbage outputs
of reversible design. They are left unconnected, and the linter reports them
as unused signals.

## Files

All in `rtl/`, one module or package per file:

| file | contents |
|---|---|
| `bcd_pkg.sv` | `bcd_digit_t` (4 bits), `digit_res_t` (5 bits), `DIGITS_32 = 8`, `DIGITS_64 = 16`, constants 9 and 6 |
| `peres_gate.sv`, `tr_gate.sv`, `dkg_gate.sv` | the three reversible gates |
| `peres_full_adder.sv`, `tr_full_subtractor.sv` | two-gate full adder and full subtractor |
| `bcd_digit_adder_peres.sv` | BCD digit adder with carry-in |
| `nines_comp_tr.sv` | 9 - b for one digit |
| `bcd_inc5_peres.sv`, `dkg_inc5.sv` | 5-bit +carry incrementers (`LATE_CARRY = 1` only) |
| `bcd_adder_peres.sv` | N-digit adder, `DIGITS` (default 8) |
| `bcd_subtractor_tr.sv` | N-digit subtractor, `DIGITS`, `LATE_CARRY` |
| `dkg_digit_addsub.sv` | DKG digit slice |
| `bcd_addsub_dkg.sv` | N-digit adder/subtractor, `DIGITS`, `LATE_CARRY` |
| `bcd_reversible_top.sv` | the six units at 8 and 16 digits |

Operands are plain packed vectors `logic [4*DIGITS-1:0]`. Results are packed
arrays `digit_res_t [DIGITS-1:0]`. To change the word size, set `DIGITS`.
The RTL accepts any value; the testbench models assume at most 16 digits.

After coarse synthesis, the top comes to about 4,000 single-bit gates (AND,
OR, XOR and NOT), with no flip-flops.

## Simulation

Each testbench in `tb/` checks its outputs itself and ends by printing
`TB_RESULT checks=N failures=M`. They share `tb/bcd_ref_pkg.sv`, which holds
two kinds of reference model. The first works on the decimal values of the
operands. The second is a per-digit integer model that also covers the codes
10..15 and the `LATE_CARRY = 1` behaviour. With plain Verilator, for example:

    verilator --binary --timing -Irtl -Itb rtl/bcd_pkg.sv tb/bcd_ref_pkg.sv \
        tb/tb_bcd_reversible_top.sv --top-module tb_bcd_reversible_top
    obj_dir/Vtb_bcd_reversible_top

Swap in any other `tb/tb_<module>.sv` and `--top-module tb_<module>`. Each run
takes well under a second.

What is checked:

* The gates and the digit-level blocks against every input pattern, including
  the reversibility of each gate (all output patterns differ).
* The word-level units at 8 and 16 digits, and at both `LATE_CARRY` settings.
  They are checked against the published example operands and results, and
  against thousands of random operands: valid BCD words against decimal
  arithmetic, and arbitrary codes against the per-digit model.
* The top with all parameters at their defaults. This is an end-to-end run of
  all six units. It also counts the behaviours the design depends on, and
  fails if any of them never occurs: the +6 correction, a carry rippling
  through a subtract digit, the end-around carry at 1 and at 0, equal
  operands, and the DKG select switching in both directions.

## Where this RTL departs from, or goes beyond, the published design

* **The gates' equations** are the standard definitions of the Peres, TR and
  DKG gates. How the gates are wired inside each digit is this design's own;
  it was chosen to be the simplest structure with the published behaviour.
* **The adder** does not chain carries between digits. This follows the
  published examples exactly, and it is deliberate: a carry chain would
  change the printed results.
* **The subtractor.** The published examples show a digit carry chain with
  an end-around carry. The RTL resolves the end-around carry with two rows
  instead of a loop. By default the carry enters before the correction, which
  gives correct decimal results; `LATE_CARRY = 1` gives the published
  behaviour, flaw included.
* **Subtract mode of the DKG unit.** No example was published for it. Here it
  is defined to match the TR subtractor, and the `sub` pin and its polarity
  are this design's choice.
* **No timing model.** The published designs were also purely combinational.
  Their delays (about 7.7 to 10.9 ns on a small FPGA) are properties of that
  implementation and are not modelled.
