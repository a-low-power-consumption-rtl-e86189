# clacsma16: a 16-bit carry look-ahead adder with run-time carry masking

Many workloads (image processing, DSP, wearable sensing) can tolerate small
errors in their additions. This adder uses that tolerance: it is an
ordinary two-level carry look-ahead adder (CLA), but each of its lower 4-bit
groups can be switched at run time into an approximate mode. In that mode the
group generates no carries. The switch sits in the half adders that prepare
the propagate and generate bits, so it adds no gate to the carry path and
one gate input per bit.

With every mask set, the result is the exact `a + b + cin`. Clearing a
group's mask makes the result smaller than the exact sum by exactly the
value of `a AND b` over that group's bits (see *What an approximate result
means* below).

## The carry-maskable half adder (`cmha`)

A CLA first forms, for every bit position, a propagate `P = A XOR B` and a
generate `G = A AND B`. The XOR is reused for the sum (`S_i = P_i XOR
C_(i-1)`), so P is the XOR form rather than the OR form.

The CMHA builds that XOR as `(A OR B) AND NAND(A, B)` and reuses the NAND,
through an inverter, to produce G. It then widens the NAND to three inputs
and uses the third input as a mask `m_x`:

| m_x | P         | G        | meaning                              |
|-----|-----------|----------|--------------------------------------|
| 1   | A XOR B   | A AND B  | ordinary half adder (accurate)       |
| 0   | A OR B    | 0        | no carry generated here (approximate)|

Why OR and not plain XOR in masked mode: when `A = B = 1`, the exact
`{carry, sum}` is `10` (value 2). Forcing `G = 0` with `P = XOR = 0` would
give `00`, an error of 2. Using `P = OR = 1` gives `01`, an error of 1.

Internally `u = ~(m_x & a & b)`, `w = a | b`, `p = w & u`, `g = ~u`. That
is four gates. An ordinary half adder built the same way differs only in
the NAND's third input.

## Structure of the 16-bit adder

```
        m_x[0]     m_x[1]     m_x[2]     (1)
          |          |          |         |
 Part 1  [CMHA 3-0] [CMHA 7-4] [CMHA11-8] [CMHA15-12]   cmha_group x4
          | P,G      | P,G      | P,G      | P,G
 Part 2  [unit 0]<- [unit 1]<- [unit 2]<- [unit 3]      cla4_unit x4
     cin->  | PG0,GG0 | PG1,GG1 | PG2,GG2 | PG3,GG3      (C2-0, C6-4, C10-8, C14-12)
            +---------+---------+---------+
                     [unit 4]  cin->                    cla4_unit
                   C3, C7, C11, C15  (C3->unit 1, C7->unit 2, C11->unit 3)
 Part 3           [XOR row]  S_i = P_i ^ C_(i-1), S16 = C15   sum_xor
```

* **Part 1, P/G preparation (`cmha_group`).** There are four groups of four
  CMHAs. Groups 0, 1 and 2 (bits 3-0, 7-4 and 11-8) take `m_x[0]`, `m_x[1]`
  and `m_x[2]`. Group 3 (bits 15-12) has its mask tied to 1, so the most
  significant bits are always added exactly.
* **Part 2, carries (`carry_lookahead`).** This is a two-level look-ahead.
  Units 0 to 3 are first-level 4-bit CLA units, one per group. Each one
  produces its group's propagate `PG = P3 P2 P1 P0`, its group's generate
  `GG = G3 + P3 G2 + P3 P2 G1 + P3 P2 P1 G0`, and the three carries inside the
  group. Unit 4 is the same 4-bit unit, fed with the four PG/GG pairs. It
  produces the group carries C3, C7, C11 and C15. C3, C7 and C11 are the
  carry-ins of units 1, 2 and 3. Every carry is a two-level sum of products
  of its unit's inputs (`cla4_unit`). The path from an operand to C15 is
  therefore CMHA, then unit k, then unit 4.
* **Part 3, sum (`sum_xor`).** This is a row of XOR gates,
  `S_i = P_i XOR C_(i-1)`. The carry-in plays `C_(-1)`, and `S16 = C15`.

The whole adder is combinational. It has no clock or reset, and the outputs
are valid one adder delay after the inputs settle.

## What an approximate result means

In masked mode, the CMHA turns the bit pair `(a_i, b_i)` into `(a_i OR b_i,
0)`: P and G are exactly those of a half adder adding `a_i | b_i` to zero.
Since `a + b = (a | b) + (a & b)` bit by bit, the whole adder returns

```
sum = a + b + cin - (a & b & MASKED)
```

where `MASKED` has ones on the bits of every group whose mask is 0. This
holds for any mix of masks and for either value of `cin`. As a result:

* The approximate sum is never larger than the exact one.
* The error is at most `2^(4k+4) - 1` when groups 0 to k are masked, so at
  most 4095 with all three masked. It is zero whenever the operands share
  no set bit in the masked groups.
* With `cin = 0` and the masks cleared from group 0 upwards, no carry
  leaves the masked bits. Those sum bits are simply `a | b`, and the upper
  groups add exactly. Accuracy is then chosen in steps of 4 bits, from exact
  (`m_x = 3'b111`) through 4, 8 and 12 approximate low bits
  (`3'b110`, `3'b100`, `3'b000`).
* A mask pattern that is not a prefix, such as `3'b101`, is allowed and still
  follows the formula. The carry out of an exact group then ripples through
  the masked group's OR-valued P bits. `cin` likewise enters group 0 even
  when it is masked.

Masking is meant to save power as well as settle sooner. In a masked group,
G is held at 0, so the generate inputs of its look-ahead unit stop toggling
and no carry chain starts there. How much power and delay this saves
depends on the gate library and is not modelled here.

## Interface of `clacsma16`

| port    | dir | width | meaning                                                      |
|---------|-----|-------|--------------------------------------------------------------|
| `a`     | in  | 16    | addend                                                       |
| `b`     | in  | 16    | addend                                                       |
| `cin`   | in  | 1     | carry-in, into look-ahead units 0 and 4                      |
| `m_x`   | in  | 3     | `m_x[k] = 1`: group k (bits 4k+3..4k) exact; 0: approximate  |
| `sum`   | out | 17    | `sum[16]` is the carry out                                   |
| `carry` | out | 1     | carry out (C15), equal to `sum[16]`                          |

To get a single accuracy switch `m` (1 = exact, 0 = low 12 bits
approximate), drive all three bits from it: `.m_x({3{m}})`.

Sizes are in the package `clacsma_pkg`: `GROUP_W = 4`, `NUM_GROUPS = 4`,
`WIDTH = 16` and `NUM_MASKS = 3`. They are fixed by the structure, because
the second-level unit is a 4-bit unit. `cmha_group` has a `GROUP_W`
parameter. The other modules are written for 4-bit groups.

## Where this RTL goes beyond the original description, or fills it in

* **Carry-in.** The reference structure ties the carry-in of the first
  look-ahead unit to 0. Its implemented version has a `cin` input. Here
  `cin` is a port that feeds unit 0 and unit 4. With `cin = 0` the circuit is
  the reference structure. Bit 0 of the sum then needs one more XOR
  (sixteen in Part 3 instead of fifteen).
* **Three masks, not one.** The structure has one mask per low group. The
  implemented version exposes a single `m`. The three separate masks are
  kept here, and tying them together gives the single-switch version.
* **PG and GG** are named but not defined in the source. The standard
  definitions above are used, which lets the second-level unit be the same
  4-bit unit as the first-level ones.
* **Unused outputs.** Unit 4's PG/GG are left open, as is the top carry
  `c[3]` of units 0 to 3. That carry duplicates what unit 4 computes, and the
  structure takes the group carries from unit 4. Verilator reports these as
  unused or empty pins. `sum[16]` is a plain copy of C15.
* **Not modelled.** The evaluation in the source covers power, delay and
  area on a 45-nm library and on a Spartan-3E FPGA, an image-processing
  application, and conventional CLA/RCA baselines. It is not part of this
  RTL. Nor are those baselines.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. Each also has a watchdog.

| testbench            | what it checks                                                                  |
|----------------------|---------------------------------------------------------------------------------|
| `tb_cmha`            | all 8 input combinations against the table above                                |
| `tb_cmha_group`      | all 512 combinations of mask and 4-bit operands                                 |
| `tb_cla4_unit`       | all 512 combinations of p, g, ci; carries against a bit ripple, PG/GG            |
| `tb_carry_lookahead` | full-length propagate chains, and 200k random P/G words against a ripple         |
| `tb_sum_xor`         | 20k random P/C words                                                             |
| `tb_clacsma16`       | the whole adder (see below)                                                      |

`tb_clacsma16` runs the adder as built, with no parameter overrides, and
checks the following:

* Three worked additions in exact mode: 2223 + 15699 = 17922,
  2223 + 15696 = 17919 and 14511 + 15696 = 30207. For the last one it also
  checks the internal words `G = 0011100000000000`,
  `P = 0000010111111111` and `C[14:0] = 011100000000000`.
* Exact mode against `a + b + cin`.
* Every mask setting against both a bit-serial model and the closed form
  above.
* Prefix masking with `cin = 0` against `{upper exact sum, (a|b) low bits}`.

It counts how often each mechanism occurred and fails if any never did. The
mechanisms are exact mode, carry-in, carry out, a carry passed from group 0
across groups 1 and 2 by unit 4, and each mask changing a result.

To simulate with Verilator 5:

```
verilator --binary --timing -Irtl -y rtl rtl/clacsma_pkg.sv tb/tb_clacsma16.sv \
          --top-module tb_clacsma16 -o sim
./obj_dir/sim
```

Replace `tb_clacsma16` with any other testbench name to run that one. Each
one finishes in well under a second.
