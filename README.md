# 16×16 Vedic multiplier with BEC carry-select adders

A combinational 16×16-bit unsigned multiplier built on the *Urdhva-Tiryagbhyam*
("vertically and crosswise") rule of Vedic arithmetic. The operands are split
in half again and again. A 2×2 multiplier is the leaf. Every level forms the
four half-by-half products in parallel and adds them with a small adder
network. At the top level the adders are carry-select adders. Each of their
groups uses one ripple-carry adder plus a **binary to excess-1 converter
(BEC)** in place of the usual second ripple-carry adder. That saves gates at
a small cost in delay.

There is no clock, no reset and no handshake: `c = a * b` settles through
gates.

```
a[15:0], b[15:0] ──► vm16x16_beca ──► c[31:0]
```

## The vertical-and-crosswise split

Write each operand as a high and a low half, `a = aH·2^h + aL` and likewise
for `b`. Then

```
a·b = aH·bH · 2^2h  +  (aH·bL + aL·bH) · 2^h  +  aL·bL
        vertical          crosswise               vertical
```

The four products do not depend on each other, so they are computed at the
same time. Only the final additions are sequential. The design applies this
split at every level:

| level | module         | sub-multipliers  | adders                                |
|-------|----------------|------------------|---------------------------------------|
| 2×2   | `vedic_2x2`    | 4 AND gates      | 2 half adders                         |
| 4×4   | `vedic_4x4`    | 4 × `vedic_2x2`  | 3 × 4-bit ripple-carry (`rca`)        |
| 8×8   | `vedic_8x8`    | 4 × `vedic_4x4`  | 3 × 8-bit ripple-carry (`rca`)        |
| 16×16 | `vm16x16_beca` | 4 × `vedic_8x8`  | 2 × 16-bit + 1 × 24-bit `bec_adder`   |

### 2×2 leaf

```
s0    = a0·b0
c1 s1 = a1·b0 + a0·b1        half adder 1 (crosswise)
c2 s2 = a1·b1 + c1           half adder 2 (vertical)
p     = {c2, s2, s1, s0}
```

### 4×4 and 8×8: the three-adder network

This is the least obvious part of the design. Here it is for the 4×4 block.
The 8×8 block is the same with every width doubled. The products are
`q0 = aL·bL`, `q1 = aL·bH`, `q2 = aH·bL` and `q3 = aH·bH`, each 4 bits wide.

```
RCA1  {ca1, t} = q1 + q2                        the crosswise sum
RCA2  {ca2, u} = t  + {00, q0[3:2]}             aligns q0's upper half
RCA3  {ca3, v} = q3 + {0, ca1|ca2, u[3:2]}
p = { v , u[1:0] , q0[1:0] }
      S7..S4  S3 S2    S1 S0
```

Both intermediate carries have weight 2^(h+2), which is bit 2 of RCA3's second
operand. They are joined with an OR gate and not with another adder. That is
exact because the two carries are never 1 together. If `ca1 = 1`, then `t`
is at most 2 (the largest crosswise sum is 2·9 = 18 = 16 + 2). Adding
`q0[3:2]`, which is at most 2, cannot overflow. Both carries do occur:
11·14 sets `ca2`, for example, so neither can be dropped. `ca3` is always 0,
because 15·15 < 256. Assertions in the RTL check both facts.

The 4×4 arrangement (three 4-bit adders, two zero inputs on the second one)
follows the original design. Routing `ca2` through the OR gate is this
implementation's choice, because the original leaves that wire unspecified.
The 8×8 block was specified only as "built from 4×4 blocks", so reusing the
4×4 network with 8-bit adders is also this implementation's choice.

### 16×16: the adder tree

```
q3 = aH·bH   q1 = aH·bL   q2 = aL·bH   q0 = aL·bL        (four vedic_8x8)

left   (16 b)  l = q3 + q1[15:8]           L = {l, q1[7:0]}    24 bits
right  (16 b)  r = q2 + q0[15:8]           R = r               16 bits
final  (24 b)  c[31:8] = L + R
               c[7:0]  = q0[7:0]
```

The pairing follows the original block diagram: one adder for the two
products with `aH`, one for the two with `aL`, and a final adder producing
`c[31:8]`, with `c[7:0]` taken straight from `aL·bL`. The adder widths were
not given. They are chosen as the narrowest that hold their sums, and none of
the three adders can carry out (255² + 255 < 2^16, and a·b < 2^32). The
longest path runs through one 8×8 block and two BEC adders.

## The BEC carry-select adder (`bec_adder`)

A carry-select adder cuts the word into groups. A regular one computes each
group twice, once assuming carry-in 0 and once assuming carry-in 1. When the
real carry arrives from below, a mux picks one result. The carry then crosses
one mux per group instead of rippling through every bit.

The second computation is just the first one plus one. So `bec_adder` keeps a
single n-bit ripple-carry adder per group, with carry-in 0. An
**(n+1)-bit binary to excess-1 converter** turns its result `{carry, sum}`
into `{carry, sum} + 1`. Then a 2(n+1):(n+1) mux (`bec_mux`) picks one, using
the previous group's carry:

```
        x[grp] y[grp]
            │   │
        ┌───▼───▼───┐ cin=0
        │  n-bit RCA │
        └─────┬─────┘ {c0, sum0}  (n+1 bits)
              ├──────────────┐
        ┌─────▼─────┐        │
        │ (n+1) BEC │  +1    │
        └─────┬─────┘        │
             1│              │0
           ┌──▼──────────────▼──┐
 carry[g] ─►        mux         │
           └─────────┬──────────┘
             {carry[g+1], s[grp]}
```

The converter is a chain of ANDs and XORs:

```
X0 = ~B0
Xi = Bi ^ (B0 & B1 & ... & B(i-1))
```

For 4 bits this maps 0000→0001, 0001→0010, …, 1110→1111 and 1111→0000. It
needs far fewer gates than a second n-bit adder. The bottom group is a plain
ripple-carry adder fed by the adder's carry-in.

**Group sizes** grow by one bit per group, as in a square-root carry-select
adder. At 16 bits the groups are `[1:0] [3:2] [6:4] [10:7] [15:11]`, with
sizes 2, 2, 3, 4, 5 and muxes of 6:3, 8:4, 10:5 and 12:6. That matches the
reference square-root layout. For other widths the sequence continues 6, 7,
… and the last group is cut to fit. The 24-bit adder is therefore 2, 2, 3, 4,
5, 6, 2. The constant functions in `bec_adder_pkg` compute the partition at
elaboration.

All XORs in the design (half adders, full adders, converters) are built by
`xor_aoi` from AND, OR and NOT, as `A·~B + ~A·B`. This is the gate model in
which the design's area and delay are usually counted: every AND, OR or NOT
gate costs one unit of area and one unit of delay.

## Modules

| file                   | what it is                                          | parameter (default) |
|------------------------|-----------------------------------------------------|---------------------|
| `vm16x16_beca.sv`      | top: 16×16 multiplier                                | —                   |
| `vedic_8x8.sv`         | 8×8 multiplier, 4 × 4×4 + 3 × 8-bit RCA              | —                   |
| `vedic_4x4.sv`         | 4×4 multiplier, 4 × 2×2 + 3 × 4-bit RCA              | —                   |
| `vedic_2x2.sv`         | 2×2 multiplier, 4 AND + 2 half adders                | —                   |
| `bec_adder.sv`         | carry-select adder with BEC groups                   | `W` (16)            |
| `bec_adder_pkg.sv`     | group-partition functions for `bec_adder`            | —                   |
| `bec_mux.sv`           | BEC plus 2:1 word mux, one carry-select stage        | `W` (4)             |
| `bec.sv`               | binary to excess-1 converter                         | `W` (4, ≥ 2)        |
| `rca.sv`               | ripple-carry adder                                   | `W` (4)             |
| `full_adder.sv`        | two half adders and an OR                            | —                   |
| `half_adder.sv`        | AOI XOR and an AND                                   | —                   |
| `xor_aoi.sv`           | XOR from AND/OR/NOT                                  | —                   |

All modules are synthesizable and purely combinational. Generic synthesis of
the top gives about 4450 single-bit gates (AND, OR, NOT and a few muxes) and
no flip-flops.

## Where this departs from, or fills in, the original design

- **Second carry in the 4×4/8×8 network.** It is OR-ed with the first carry
  into the third adder (see above). The original does not show where it goes.
- **8×8 internals.** The 4×4 network is reused with 8-bit ripple-carry
  adders. Only "built from 4×4 blocks" was specified.
- **Adder widths at the top:** 16, 16 and 24 bits. The original says only
  "BEC adders of different sizes".
- **BEC adder internals.** The adder is a square-root carry-select adder with
  one ripple-carry adder and one BEC per group. Widths other than 16 use the
  extended group sequence described above. The original gives the principle,
  the 4-bit BEC with its mux, and the 16-bit group boundaries.
- **Cell internals.** The full adder is built from two half adders and an OR
  gate. The half adder is an AOI XOR and an AND.
- **Unsigned operands only.** Signed multiplication is not part of the design.
- **Not included.** The regular (two-RCA) square-root carry-select adder and
  the array multiplier served only as comparison points. They are not part of
  this RTL.

## Verification

Every module has a self-checking testbench in `tb/tb_<module>.sv`. Each one
compares against integer arithmetic computed in the testbench and ends with a
line `TB_RESULT checks=N failures=M`. Each also has a watchdog.

- `xor_aoi`, `half_adder`, `full_adder`, `vedic_2x2`, `vedic_4x4`, `bec`,
  `bec_mux`: exhaustive.
- `rca`: exhaustive at 4 and 8 bits.
- `vedic_8x8`: exhaustive (all 65536 operand pairs).
- `bec_adder`: exhaustive at 5 bits. At 16 and 24 bits it runs corner cases
  and 100 000 random vectors each.
- `vedic_4x4` and `vedic_8x8` also count how often each intermediate carry is
  set. They fail if a carry never occurs.
- `bec_adder` counts, per group, how often the converter path and how often
  the direct path were selected. It fails if either is never taken.
- `tb_vm16x16_beca` is the end-to-end test, run at the default size. It
  covers 45·61 = 2745 and 9587·6954 = 66 667 998 (the operands of the
  original design's simulation), zero, one, all-ones and every single-bit
  pair, and 200 000 random pairs. It also checks that every group of all
  three BEC adders selects both the converter and the direct result, and that
  both intermediate carries fire in all four 8×8 blocks and in a 4×4 block. It
  runs in about a second.

The immediate assertions in `vedic_4x4`, `vedic_8x8` and `vm16x16_beca`
check that carries that should be impossible never occur (run with
`--assert`).

## Simulating

With Verilator 5 (the package must be read first):

```sh
verilator --binary --timing --assert -Irtl -y rtl \
    rtl/bec_adder_pkg.sv tb/tb_vm16x16_beca.sv --top-module tb_vm16x16_beca
./obj_dir/Vtb_vm16x16_beca
```

Replace the testbench name to run any other block's test. To lint a single
module: `verilator --lint-only -Wall -Irtl -y rtl rtl/bec_adder_pkg.sv
rtl/<module>.sv --top-module <module>`.

To try another carry-select partition, change `grp_nominal` in
`bec_adder_pkg.sv`. `tb_bec_adder` and the top testbench derive their group
counts from the same package.
