# 8x8 Vedic multiplier with Brent-Kung partial-product adders

An unsigned 8-bit by 8-bit combinational multiplier built by recursive splitting.
Each operand is cut into halves, the four half-by-half products are formed in
parallel (the "vertical and crosswise" rule, Urdhva Tiryagbhyam, of Vedic
arithmetic), and the overlapping partial products are merged by Brent-Kung
parallel-prefix adders instead of ripple-carry adders. The recursion goes
8x8 → 4x4 → 2x2, and the 2x2 multiplier is four AND gates and two half adders.

There is no clock, register or handshake: `p` is `a * b` one propagation delay
after `a` and `b` settle.

## Hierarchy

```
vedic_8x8_m                    a[7:0], b[7:0] -> p[15:0]
├── a41..a44 : vedic_4x4_m     four nibble products
│   ├── u_m0..u_m3 : vedic_2x2_m
│   └── u_bk1..u_bk3 : brent_kung_adder #(.WIDTH(4))
└── fa4, fa5, fa6 : brent_kung_adder #(.WIDTH(8))
```

| Module | File | What it is |
|---|---|---|
| `vedic_8x8_m` | `rtl/vedic_8x8_m.sv` | top: four 4x4 multipliers, three 8-bit adders |
| `vedic_4x4_m` | `rtl/vedic_4x4_m.sv` | four 2x2 multipliers, three 4-bit adders |
| `vedic_2x2_m` | `rtl/vedic_2x2_m.sv` | 2x2 multiplier, gate level |
| `brent_kung_adder` | `rtl/brent_kung_adder.sv` | parameterised prefix adder, `WIDTH` = 8 by default |

All operands are unsigned.

## How the partial products are merged

This is the part that needs care. For the 8x8 level, with `al = a[3:0]`,
`ah = a[7:4]` and likewise for `b`:

| Product | Operands | Weight | Covers product bits |
|---|---|---|---|
| `m0` | `al * bl` | 2^0 | 7..0 |
| `m1` | `al * bh` | 2^4 | 11..4 |
| `m2` | `ah * bl` | 2^4 | 11..4 |
| `m3` | `ah * bh` | 2^8 | 15..8 |

The three adders work as follows:

1. `P[3:0] = m0[3:0]`. Nothing else has weight below 2^4.
2. **Adder 1** (`fa4`) adds the two middle products: `{c1, s1} = m1 + m2`.
3. **Adder 2** (`fa5`) adds the upper nibble of `m0` to that sum:
   `{c2, s2} = s1 + m0[7:4]`. Its low nibble is final: `P[7:4] = s2[3:0]`.
4. **Adder 3** (`fa6`) adds the high product to what is left of the middle
   region: `P[15:8] = m3 + {3'b000, c1 | c2, s2[7:4]}`. The upper nibble of `s2`
   is the low nibble of the addend, and the carry enters at the addend's fifth bit.
   That is weight 2^12, because adder 1's bit 8 sits at product bit 12.

**Both middle carries go to adder 3.** The usual description of this scheme sends
only adder 1's carry on. Adder 2 can carry out while adder 1 does not. Take
`a = 8'h8F`, `b = 8'h9F`: then `m1 + m2 = 135 + 120 = 255`, and adding
`m0[7:4] = 14` carries out. If that carry is dropped, the product comes out as
`0x48D1` when it should be `0x58D1`. Of the 65536 operand pairs, 524 products
depend on adder 2's carry. The two carries have the same weight. They can never
both be 1, because `{c1, s1} + m0[7:4] <= 450 + 15 < 512`. An OR therefore
merges them, and an immediate assertion in the RTL checks that they are never
both set. Adder 3's own carry-out is always 0, since the product fits in 16
bits. A second assertion checks this.

`vedic_4x4_m` uses the same scheme one level down: 2-bit halves, 4-bit products
and three 4-bit adders. The same second-carry case arises there too, for example
`11 * 15`.

## The Brent-Kung adder

`brent_kung_adder` computes `{cout, sum} = a + b + cin` in three stages:

- **Pre-processing:** `P_i = a_i ^ b_i`, `G_i = a_i & b_i`. The carry-in is
  folded into bit 0: `G_0 |= P_0 & cin`.
- **Carry tree:** pairs are merged with the prefix operator
  `(G, P) o (G', P') = (G | P & G', P & P')`.
  - The up-sweep has `log2(WIDTH)` levels. Level `l` merges bit `i` with bit
    `i - 2^l` wherever `i + 1` is a multiple of `2^(l+1)`. This makes the carries
    of bits 1, 3, 7, … complete.
  - The down-sweep has `log2(WIDTH) - 1` levels, run from the widest span to the
    narrowest. It fills in the carries of the other bits.
  - After the tree, `G` at bit `i` is the carry out of bit `i`.
- **Post-processing:** `sum_i = P_i ^ C_(i-1)`, with `C_(-1) = cin`.

At `WIDTH = 8` the tree has 11 merge nodes in 5 levels. A Kogge-Stone tree has
17 nodes in 3 levels. The Brent-Kung form trades depth for fewer nodes and less
wiring. The tree is generated from `WIDTH`, which must be a power of two and at
least 2. Any other value stops elaboration with an error. In the multiplier,
every `cin` is tied to 0.

## The 2x2 multiplier

The columns of a 2x2 product are formed directly:

- Column 0 is `a0 & b0`.
- Column 1 is the half-adder sum of the two cross terms `a1 & b0` and `a0 & b1`.
- Column 2 and column 3 are the half-adder sum and carry of `a1 & b1` and
  column 1's carry.

## What follows the source description and what is chosen here

These follow the description:

- The 8x8 → 4x4 → 2x2 split.
- The four nibble multipliers and the operand pairs they take.
- Three 8-bit Brent-Kung adders, and what each one adds.
- The adder's three-stage equations.
- The module names `vedic_8x8_m` and `vedic_4x4_m`, and the instance names
  `a41`–`a44` and `fa4`–`fa6`.

These are choices made here:

- **Adder 2's carry.** It is routed into adder 3, as explained above. This is a
  deliberate correction.
- **Inside the 4x4 multiplier.** Only its parts are given: 2x2 multipliers and
  Brent-Kung addition. It is wired like the 8x8 level.
- **Inside the 2x2 multiplier.** It uses the standard gate form of the rule.
- **The Brent-Kung tree.** It uses the textbook up-sweep/down-sweep form, with
  a carry-in port.
- **One adder module.** A single parameterised `brent_kung_adder` is used, not a
  fixed 8-bit one.
- **Instance roles.** Which named instance does which job (`a41` = low × low,
  `a44` = high × high; `fa4`/`fa5`/`fa6` = adders 1/2/3) is assigned here.
- **Signedness.** All operands are unsigned.

The source also mentions adding the sub-products "by modifying the logic levels of
the Brent-Kung adder". It gives no detail, so the adders here are unmodified
Brent-Kung adders.

The reported FPGA results for this multiplier are 6.12 ns delay, 34.12 µW and
158 LUTs. They come from one vendor flow and are not reproduced or checked here.

## Verification

Each module has a self-checking testbench in `tb/` that compares against integer
arithmetic:

| Testbench | Coverage |
|---|---|
| `tb_brent_kung_adder` | exhaustive at `WIDTH` 8 and 4 (every `a`, `b`, `cin`); 5000 random vectors at `WIDTH` 16 |
| `tb_vedic_2x2_m` | all 16 operand pairs |
| `tb_vedic_4x4_m` | all 256 operand pairs; counts both middle-carry cases and requires each to occur |
| `tb_vedic_8x8_m` | all 65536 operand pairs plus named corner cases. It counts adder-1 carries (2994 of the 65536 pairs), adder-2 carries (524) and full-width products, and requires each to occur |

Each testbench ends with a line `TB_RESULT checks=N failures=M` and has a watchdog.
The 8x8 testbench runs the top at its only configuration in a few seconds.

To simulate with Verilator, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl tb/tb_vedic_8x8_m.sv \
          --top-module tb_vedic_8x8_m -Mdir obj && ./obj/Vtb_vedic_8x8_m
```

Replace `tb_vedic_8x8_m` with any other testbench name to run it. Lint with
`verilator --lint-only -Wall -y rtl rtl/vedic_8x8_m.sv`.

## Changing it

- **Wider adders.** Use `brent_kung_adder #(.WIDTH(16))` and so on; any power of
  two works.
- **A 16x16 multiplier.** Instantiate four `vedic_8x8_m` and three 16-bit adders,
  wired as in `vedic_8x8_m` with every width doubled. Keep adder 2's carry.
- **Pipelining.** Put registers on the partial products, between the 4x4 stage
  and the adders. The design has no clock of its own.
