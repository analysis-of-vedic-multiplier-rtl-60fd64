# Vedic multiplier with interchangeable adder topologies

An unsigned N x N-bit multiplier built by the *vertical and crosswise*
(Urdhva Tiryagbhyam) method of Vedic arithmetic, with the adders that sum its
partial products made in one of five topologies: ripple carry (RCA), linear
carry select (RCA-CSA), square-root carry select (SQRT-CSA), square-root carry
select with Binary to Excess-1 Converters (BEC), and common Boolean logic (CBL).

The multiplier is a fixed tree of small multipliers and adders, so almost all
of its delay, area and power lies in the adders. Swapping the adder topology
while keeping the tree is how the five variants trade speed against area and
power. The top module, `vedic_top`, holds all five variants side by side on the
same operands, at 64 x 64 bits by default.

Everything is combinational. There is no clock, no reset and no handshake: a
product is valid one propagation delay after the operands change.

## The vertical and crosswise recursion

Split each N-bit operand into a high half M and a low half L of H = N/2 bits:

```
a = aM·2^H + aL        b = bM·2^H + bL

a·b = aM·bM·2^N  +  (aM·bL + aL·bM)·2^H  +  aL·bL
      "vertical"      "crosswise"            "vertical"
```

The four half-size products are made the same way, down to 2 x 2-bit
multipliers (`vedic_2x2`: four AND gates and two half adders). A 16 x 16
multiplier is four 8 x 8 multipliers and one combining stage. Each 8 x 8 is
four 4 x 4 multipliers and a stage, and so on. A 64 x 64 multiplier therefore
holds 1024 `vedic_2x2` cells and 341 combining stages.

`vedic_mult` unrolls this recursion level by level instead of writing a module
that instantiates itself. Level 1 multiplies every 2-bit slice of `a` with
every 2-bit slice of `b`. Level l (slice width S = 2^l, C = N/S slices per
operand) holds the C·C products

```
g_lvl[l].pr[i*C + j] = a[S*i +: S] * b[S*j +: S]      (2S bits each)
```

Each of them comes from a `vedic_combine` fed with four products of level l-1:
slices 2i+1 and 2i of `a` are the high and low halves of slice i. The last
level has a single product, which is `p`. The gates are exactly those of the
recursive description. Only the names of the instances differ.

## The combining stage

`vedic_combine` is the part that the adder topology changes, so it repays a
careful look. For N = 16 (H = 8) it is:

```
            mm = aM·bM           ml = aM·bL      lm = aL·bM      ll = aL·bL
          [15:8]   [7:0]            [15:0]          [15:0]        [15:8]  [7:0]
             |       |                 \               /             |      |
             |       |              adder 1: 16 bit, cin = 0         |      |
             |       |               r1 = ml + lm, carry c1          |      |
             |       |                        |                      |      |
             |    {mm[7:0], ll[15:8]} --- adder 2: 16 bit, cin = 0 --+      |
             |                             r2 = {..} + r1, carry c2         |
             |                                    |                         |
             |        half adder (c1, c2) -> {hc, hs}                       |
             |                   |                |                         |
   adder 3: 8 bit, mm[15:8] + {000000, hc, hs}    |                         |
             |                                    |                         |
          p[31:24]                             p[23:8]                   p[7:0]
```

The bits line up as follows. `ll` is the only term below bit H, so its low half
is the product's low half. Between bits H and N+H-1 three terms overlap: the
crosswise sum, the high half of `ll` and the low half of `mm`. Adders 1 and 2
add them in two steps. Each of those steps can carry out of bit N+H-1, so up
to two carries, a value of 0, 1 or 2, must enter the top half. The half adder
turns the two carries into that two-bit number. Adder 3 adds it to the high
half of `mm`, with N/2-2 zeros above it (six zeros at N = 16). Adder 3 never
carries out, because the product fits in 2N bits, so its carry out is left
open.

Both carries really do occur together. For a random 64-bit operand pair, the
top stage sets c1 and c2 together in about 1% of cases, for example
`0xd9ed17e3cc0e95ee * 0xee52bdb6d1020a15`. The testbenches count each case.

Adders 1 and 2 are N bits wide, and adder 3 is N/2 bits. At 64 bits the top
stage holds two 64-bit adders and a 32-bit adder, and the stages below hold
ever more, ever narrower adders. Which topology wins therefore depends on N.
The fast carry select variants gain most at 32 and 64 bits, where the widest
adders are long enough for their carry path to dominate.

## The five adders

All five have the same interface: `a`, `b` (W bits), `cin` → `sum` (W bits),
`cout`. The multiplier ties `cin` to 0. `vedic_adder` picks the topology with
its `KIND` parameter (`vedic_pkg::adder_e`). `vedic_mult` uses the same
topology for every adder at every level.

| `adder_e` | module | structure |
|---|---|---|
| `ADD_RCA` | `rca_adder` | W `full_adder` cells, carry rippling bit by bit |
| `ADD_RCA_CSA` | `csa_adder` | equal blocks of 4 bits; the lowest is an RCA, every other block (`csel_block`) has two RCAs (carry in 0 and 1) and a multiplexer driven by the carry from below |
| `ADD_SQRT_CSA` | `sqrt_csa_adder` | as RCA-CSA, but block widths grow from the bottom: 2, 2, 3, 4, 5, ... so a block's RCAs finish about when its select carry arrives |
| `ADD_BEC` | `bec_csa_adder` | square-root blocks in which the carry-in-1 RCA is replaced by a Binary to Excess-1 Converter (`bec`) that adds one to the carry-in-0 result (`bec_csel_block`) |
| `ADD_CBL` | `cbl_adder` | per bit, the carry-in-0 and carry-in-1 results share logic: sum is `a^b` or its complement, carry is `a&b` or `a\|b`; the real carry selects through a multiplexer and ripples bit by bit |

The block partitions come from constant functions in `vedic_pkg`. These are
`sqrt_blk_lo`, `sqrt_num_blk`, `lin_blk_lo`, `lin_num_blk` and the constant
`CSA_BLOCK = 4`. The last block of an adder is cut short at the adder's width.
A 16-bit square-root adder has blocks 2+2+3+4+5, and a 64-bit one has
2+2+3+4+5+6+7+8+9+10+8.

The BEC is one bit wider than its block, so it also gives the carry out for a
carry in of 1: `x0 = ~b0`, `xi = bi ^ (b0 & … & b(i-1))`.

## Modules

| module | role |
|---|---|
| `vedic_top` | five `vedic_mult` instances, one per topology; ports `a`, `b` (N), `p_rca`, `p_bec`, `p_csa`, `p_sqrt`, `p_cbl` (2N) |
| `vedic_mult` | N x N multiplier, parameters `N` (power of two, ≥ 2, default 64) and `ADDER` (default `ADD_SQRT_CSA`) |
| `vedic_combine` | combining stage of one level, parameters `N` (even, ≥ 4) and `ADDER` |
| `vedic_2x2` | 2 x 2 leaf multiplier |
| `vedic_adder` | selects one of the five adders |
| `rca_adder`, `csa_adder`, `sqrt_csa_adder`, `bec_csa_adder`, `cbl_adder` | the adders, parameter `W` |
| `csel_block`, `bec_csel_block`, `bec`, `full_adder`, `half_adder` | their building blocks |
| `vedic_pkg` | `adder_e` and the block-partition functions |

The operands are unsigned. To use a single variant, instantiate `vedic_mult`
with `ADDER` set. Sizes smaller than 64 are reached by setting `N` on either
`vedic_top` or `vedic_mult`.

## Origin of the design and choices made here

These parts follow the method as published:

- the split into halves and the four half-size products;
- the recursion down to a 2 x 2 multiplier;
- the combining stage: two N-bit adders with carry in 0, a half adder on their
  carry outs, and an N/2-bit adder whose second operand is zero-padded;
- the five topologies by name and principle, including equal blocks for the
  linear carry select adder, growing blocks for the square-root one, and a BEC
  in place of the carry-in-1 adder;
- the sizes 8, 16, 32 and 64 bits.

These are choices of this implementation:

- The 2 x 2 cell is built from AND gates and half adders.
- The linear carry select adder uses 4-bit blocks.
- The square-root block sequence is 2, 2, 3, 4, ….
- The lowest block of each carry select adder is a plain RCA.
- One topology is used for every adder of every level.
- The CBL adder is built bit by bit as described above. This reading agrees
  with published delay figures in which CBL and RCA multipliers are equally
  slow at 32 and 64 bits.
- The recursion is unrolled by level.
- All five variants are placed in one top module.
- The operands are unsigned.

The published comparison reports area, power and delay after synthesis to a
32/28 nm standard-cell library. The RTL here is technology independent and
does not reproduce those numbers. A synthesis of `vedic_top` at N = 64 to
generic gates gives roughly 90,000 word-level cells for the five variants
together.

## Simulation

Every testbench in `tb/` checks itself against `*` or `+` computed with wide
integer arithmetic. It ends by printing
`TB_RESULT checks=<n> failures=<m>`, and a watchdog stops it if it hangs.

| testbench | what it covers |
|---|---|
| `tb_vedic_top` | all five variants at the default 64 x 64 bits; corner cases and 3000 random pairs; counts the top stage's carry cases (c1 alone, c2 alone, both, neither) and fails if one never occurs |
| `tb_vedic_sizes` | `vedic_top` at N = 8 (exhaustive), 16 and 32 |
| `tb_vedic_mult` | `vedic_mult` for all topologies at N = 2 and 8 (exhaustive) and 32 |
| `tb_vedic_combine` | the combining stage at N = 16 and 4, all topologies, with carry-case counts |
| `tb_rca_adder` … `tb_cbl_adder` | each adder at W = 2 (exhaustive), 13 (partial last block) and 64 |
| `tb_bec`, `tb_vedic_2x2`, `tb_half_adder` | exhaustive |

To run one of them with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/vedic_pkg.sv tb/tb_vedic_top.sv \
          --top-module tb_vedic_top -y rtl -y tb +libext+.sv -Mdir obj_tb_vedic_top -j 8
obj_tb_vedic_top/Vtb_vedic_top
```

The 64-bit top takes a minute or two to build because the five 64-bit
multipliers are flattened into C++. The simulation itself runs in well under a
second. Lint with
`verilator --lint-only -Wall -Irtl -y rtl +libext+.sv rtl/vedic_pkg.sv rtl/vedic_top.sv`.
