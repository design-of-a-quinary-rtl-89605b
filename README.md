# Quinary to RNS {23, 24, 25} converter

This is a combinational converter from a six-digit quinary (radix-5) number to
its residue number system (RNS) form over the moduli set {5²−2, 5²−1, 5²} =
{23, 24, 25}. RNS arithmetic splits one wide addition or multiplication into
independent narrow ones, one per modulus, with no carries between them. Before
any of that can happen, each operand has to be brought into residue form.
That step is what this design does.

The moduli are chosen to sit next to a power of the radix. This makes the
forward conversion cheap in quinary:

| modulus | 25 mod m | 125 mod m | 625 mod m | 3125 mod m |
|--------:|---------:|----------:|----------:|-----------:|
| 25      | 0        | 0         | 0         | 0          |
| 24      | 1        | 5         | 1         | 5          |
| 23      | 2        | 10        | 4         | 20         |

As a result:

* The residue modulo 25 is just the two lowest input digits.
* Above those two digits, each input digit adds only a small constant multiple
  to the residues modulo 24 and 23.

Every residue is below 25, so it is written as two quinary digits. The six
output digits are:

| outputs | residue | meaning |
|---------|---------|---------|
| `x2 x1` | N mod 25 | `x2` high digit, `x1` low digit |
| `x4 x3` | N mod 24 | `x4` high digit, `x3` low digit |
| `x6 x5` | N mod 23 | `x6` high digit, `x5` low digit |

The three residues together represent 0..13799 uniquely (23·24·25 = 13800),
which is quinary 000000..420144. So the input has six quinary digits `n6..n1`.
Inputs up to 444444 (15624) are also accepted, and their residues are correct,
but they repeat those of N − 13800.

## Digit encoding

The published converter is written in terms of multiple-valued (five-level)
logic elements. This RTL is ordinary two-valued logic. Each quinary digit
travels on a 3-bit bus (`quin_pkg::qdig_t`) holding its value 0..4 in binary.
Codes 5..7 are not valid inputs, and the outputs for them are undefined.
Each quinary element (half adder, full adder, comparator) is written as a
small binary circuit with the same digit-level behaviour.

## Building blocks

| module | role |
|--------|------|
| `qha` | quinary half adder: digit + digit → sum digit, carry |
| `qfa` | quinary full adder: digit + digit + carry-in → sum digit, carry |
| `qcmp` | pattern comparator. With the default pattern 4-4, it maps the digit pair 44 (= 24) to 00 and raises a carry. |
| `qmod_fix` | modular correction of a two-digit sum S ≤ 2(M−1) (see below) |
| `qmod_add` | residue adder modulo M: `qha` on the low digits, `qfa` on the high digits, then `qmod_fix` |
| `q3_rns` | three-digit converter (0..124) |
| `qdigit4_rns` | residues of n4·125 |
| `qdigit_rns` | residues of n·5^POS for POS ≥ 2. It is used for the 5th digit (625) and the 6th digit (3125). |
| `q4_rns` | four-digit converter (0..624) |
| `q6_rns` | six-digit converter, the top level |

### Modular correction without a subtractor

`qmod_fix` is the one idea that recurs at every level. Suppose two residues
modulo M (M = 23 or 24) have been added digit by digit in quinary. The result
is at most 2(M−1). It needs fixing exactly when it reaches M. That is the
case in two situations:

* the high digit produced a carry (S ≥ 25); or
* the digits read 4-4 (M = 24), or 4-3 or 4-4 (M = 23).

In that case the constant K = 25 − M is added: 1 for modulus 24, 2 for
modulus 23. The carry out of the high digit is then dropped. Dropping that
carry removes 25, so the net change is +K − 25 = −M. No subtractor or
magnitude comparator is needed, only a pattern test and a one-digit add.
With M = 25 the block only drops the carry (K = 0).

### Three-digit converter (`q3_rns`)

For N = 25·n3 + 5·n2 + n1, write V = 5·n2 + n1. Then:

* N mod 25 = V, so `x2 x1 = n2 n1`.
* N mod 24 = (V + n3) mod 24.
* N mod 23 = (V + 2·n3) mod 23. This equals ((N mod 24) + n3 + k) mod 23,
  where k = 1 when the mod-24 channel removed a 24 (24 ≡ 1 mod 23).

The circuit works as follows:

1. Comparator 1 (`qcmp`) folds V = 24 to 0 and raises `c1`.
2. Two half adders add n3 to the folded pair.
3. `qmod_fix` (M = 24) handles sums of 24..27 and raises `k24`. `c1` and
   `k24` never fire together.
4. A full adder adds n3 and `c1 | k24` to the low mod-24 digit. A half adder
   ripples the carry into the high digit.
5. `qmod_fix` (M = 23) handles sums of 23..28.

Worked example: 86 = quinary 321.

* Residues: mod 25 = 21, mod 24 = 24, mod 23 = 32 (all in quinary).
* So `x6..x1` = 3 2 2 4 2 1.

### 4th-digit converter (`qdigit4_rns`)

125 ≡ 5 (mod 24), so n4·125 mod 24 is just `n4 0` in quinary.
125 ≡ 10 (mod 23), so the mod-23 residue is 10·n4 mod 23, built from two
half adders:

* the first forms n4 + n4 as the high digit, with carry c;
* c stands for 25 ≡ 2 (mod 23), so the second forms c + c as the low digit.

For n4 = 0..4 the mod-23 digits are 00, 20, 40, 12 and 32.

### Multi-level assembly (`q4_rns`, `q6_rns`)

The input is split into parts whose residues are computed independently:

    n6 00000 + n5 0000 + n4 000 + n3 n2 n1

The parts are then summed channel by channel with `qmod_add`:

* level 1 (`q4_rns`): `q3_rns` plus `qdigit4_rns`, with one mod-24 adder and
  one mod-23 adder;
* level 2: adds the 5th digit's residues (`qdigit_rns`, POS = 4);
* level 3: adds the 6th digit's residues (`qdigit_rns`, POS = 5).

The mod-25 channel needs no adder at any level, because every higher weight
is a multiple of 25.

Example: 586 = quinary 4321 = 4000 + 0321.

* Mod 23: 32 + 32 = 114 in quinary, which has a carry, so add 2 and drop 25 → 21.
* Mod 24: 24 + 40 = 114, which has a carry, so add 1 and drop 25 → 20.
* Mod 25: 21 + 00 → 21.
* Result: 21 20 21.

## Timing

Every block is purely combinational. There is no clock, no reset, no state and
no handshake. The outputs are valid one combinational delay after the inputs
settle. The longest path runs through the comparator and adders of `q3_rns`,
then three `qmod_add` stages in the mod-23 channel. Register the inputs or
outputs outside this design if it is to sit in a pipeline.

## Where this RTL departs from the published design

* **3-digit converter corrections.** The published three-digit schematic, read
  literally, gives wrong residues for 25 of the 125 inputs. Examples:
  * 117 (quinary 432) comes out as 00 modulo 23 instead of 02;
  * 120 (quinary 440) comes out as 44 modulo 24 instead of 00.

  The published conversion tables are arithmetically correct for all the
  rows they print, and this RTL follows them. It keeps the element chain
  (comparator 1, two half adders, the X5 full adder) and adds a modulo-24
  correction after the half adders. The modulo-23 output comparator (which
  tested only for 4-3) is replaced by a `qmod_fix` correction.
* **4th-digit converter.** The low mod-23 digit is formed as carry + carry,
  with the carry of n4 + n4 on both inputs of the second half adder. The
  published schematic does not show where that adder's second input comes
  from. This choice reproduces the published table of n4·125 for every n4.
* **5th and 6th digits.** These are only described as "generalising" the
  four-digit scheme. `qdigit_rns` is this design's own: a five-entry constant
  table per modulus, computed at elaboration time from 5^POS mod m. The
  chain order of the level-2 and level-3 adders is also this design's choice.
* **General mod-24 adder in `q4_rns`.** `q4_rns` uses the general `qmod_add`
  for the mod-24 channel, including a low-digit half adder that the published
  diagram leaves out because its second input is always 0.
* **Element count.** The published design counts 27 quinary elements for six
  digits. This RTL has more: two extra corrections in `q3_rns`, three
  elements per modular adder, and table-based digit converters. It does not
  try to reproduce that count.

## Verification

Each module has a self-checking testbench in `tb/`. Each compares against
residues computed with integer `%` in the testbench and prints
`TB_RESULT checks=N failures=M`:

* `tb_qha`, `tb_qfa`, `tb_qcmp`, `tb_qmod_fix`, `tb_qmod_add`: exhaustive over
  all legal inputs, for moduli 23, 24 and 25 where the module takes M.
* `tb_qdigit4_rns`, `tb_qdigit_rns`: all five digit values, plus the published
  table of n4·125.
* `tb_q3_rns`, `tb_q4_rns`: all 125 and all 625 inputs, plus every row of the
  published 3- and 4-digit conversion tables.
* `tb_q6_rns` (end to end, default configuration): covers the following.
  * All 15625 inputs.
  * A check that the 13800 in-range inputs give 13800 distinct residue
    triples.
  * The worked examples and the range limits.
  * Counts of every mechanism. Each must occur at least once:
    * the 4-4 fold;
    * both corrections in `q3_rns`;
    * the 4th-digit carry;
    * the mod-24 and mod-23 wrap at each level.

To run one with Verilator:

    verilator --binary --timing --assert -Irtl -Itb rtl/quin_pkg.sv tb/tb_q6_rns.sv --top-module tb_q6_rns
    ./obj_dir/Vtb_q6_rns

Every run takes well under a second.

## Changing it

* The moduli and radix are constants in `quin_pkg`.
* The digit converters and `qmod_fix` are parameterised by position and
  modulus.
* `qmod_fix` accepts any M from 21 to 25. Its pattern test assumes
  M − 20 ≤ 4, that is, a modulus in the top row of two-digit quinary values.
* Another digit count is built by adding or removing a `qdigit_rns` level and
  its two `qmod_add` instances in `q6_rns`.
