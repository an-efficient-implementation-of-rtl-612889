# Reversible-gate Urdhva Tiryagbhyam multiplier, 16 x 16 bits

This is a combinational unsigned multiplier, 16 x 16 -> 32 bits. It is built from reversible
logic gates: Peres, Feynman (CNOT) and HNG. It follows the Vedic *Urdhva Tiryagbhyam*
("vertically and crosswise") scheme applied recursively:

- An N x N product is split into four N/2 x N/2 products of the operand halves.
- Two of them are "vertical" (low x low, high x high) and two are "crosswise" (low x high,
  high x low).
- Ripple-carry adders sum the four products, offset by 0, N/2 and N bits.
- The recursion goes 16 -> 8 -> 4 -> 2. At the bottom sits a 2 x 2 multiplier made of six
  reversible gates.
- Every adder is a chain of HNG gates, each one working as a full adder.

The RTL describes the gate network and is written for simulation and synthesis. It does not
model reversibility at the physical level. Each gate's unused outputs (its "garbage") are
present as signals but left unconnected. There is no clock: the multiplier is one
combinational path from `a`, `b` to `y`.

## Gate library

| module         | function                                              | used as                                   |
|----------------|-------------------------------------------------------|-------------------------------------------|
| `peres_gate`   | p = a, q = a^b, r = ab ^ c                            | AND (c = 0), AND-XOR, half adder          |
| `feynman_gate` | p = a, q = a^b                                        | fan-out, XOR                              |
| `hng_gate`     | p = a, q = b, r = a^b^c, s = (a^b)c ^ ab ^ d          | full adder with d = 0 (r sum, s carry)    |
| `rev_half_adder` | one Peres gate, c = 0                               | sum = q, carry = r                        |
| `rev_or_gate`  | Peres (c = 0) then Feynman on its q, r outputs        | a \| b = (a^b) ^ ab                       |

The usual quantum costs are Peres 4, Feynman 1 and HNG 6.

A signal that feeds several gates, such as an operand bit used by more than one partial
product, is a plain wire. No Feynman fan-out gates are inserted. The gate counts and quantum
costs below therefore leave fan-out out.

## The 2 x 2 cell (`ut_mult_2x2`)

This cell uses five Peres gates and one Feynman gate:

- Peres(a0, b0, 0) gives a0b0 = q0.
- Peres(a1, b1, 0) gives a1b1.
- Peres(a1, b0, 0) gives a1b0. This feeds the `c` input of Peres(a0, b1, ·), whose `r` output is
  a0b1 ^ a1b0 = q1. The AND and the XOR of the crosswise column thus come from one chained pair.
- Peres(a0b0, a1b1, 0) gives the column carry a0a1b0b1 on `r`. Note that a0b1 & a1b0 equals
  a0b0 & a1b1.
- Feynman(carry, a1b1) gives q3 = carry and q2 = a1b1 ^ carry.

## Ripple-carry adders (`hng_rca`)

`hng_rca #(WIDTH)` chains WIDTH HNG gates, so its quantum cost is 6·WIDTH. It also leaves
2·WIDTH garbage bits, the pass-through copies of the two operands. The carry enters at bit 0
(`cin`) and leaves as `cout`. The multipliers use widths 4, 5, 8, 9 and 16 and always tie
`cin` to 0. With `cin` fixed at 0, bit 0 could be a Peres half adder. Here it is an HNG gate
like the other bits, so every adder has the same shape.

## Composition

Notation: `q0 = lo(a)·lo(b)`, `q1`/`q2` the crosswise products, `q3 = hi(a)·hi(b)`.

**4 x 4 (`ut_mult_4x4`)**. This level uses four 2 x 2 cells and three adders:

```
x[4:0] = q1 + {00, q0[3:2]}          4-bit adder
t[5:0] = {0, q2} + x                 5-bit adder
m = { q3 + t[5:2] , t[1:0], q0[1:0] }   last term: 4-bit adder
```

**8 x 8 (`ut_mult_8x8`)**. This level uses four 4 x 4 multipliers and three adders:

```
r[8:0] = q1 + q2                     8-bit adder
p[8:0] = r + {00000, q0[7:4]}        9-bit adder
m = { q3 + {000, p[8:4]} , p[3:0], q0[3:0] }   last term: 8-bit adder
```

Some adder carry outputs can never be 1 because the product fits its width. For example, the
top adder's `cout` is always 0. These carries are left unconnected.

**16 x 16 (`ut_mult_16x16`, the top)**. This level uses four 8 x 8 multipliers and two 16-bit
adders, followed by a separate chain for the top byte:

```
y[7:0]            = q0[7:0]
{C1, qa}          = q1 + q2                          upper 16-bit adder
{C2, y[23:8]}     = qa + {q3[7:0], q0[15:8]}         lower 16-bit adder
y[31:24]          = q3[15:8] + C1 + C2               carry merge + half-adder chain
```

Unlike the smaller levels, the 16-bit level does not use a third wide adder. The two middle
carries are merged and rippled through q3[15:8] with half adders.

## The carry merge and `PAPER_OR_MERGE`

The original form of this structure combines C1 and C2 with a single reversible OR gate. That
one bit is then rippled through eight half adders. This is only correct if C1 and C2 are never
both 1, and they can be. An exhaustive sweep of all 2^32 operand pairs finds both carries set
for 49,604,974 pairs, about 1.15 %. The first is a = 0x14FC, b = 0xF3FE, whose product is
0x14000608. In those cases the OR form returns y 2^24 too small.

The top therefore has one parameter:

| `PAPER_OR_MERGE` | top byte                                                         | result                          |
|------------------|------------------------------------------------------------------|---------------------------------|
| `0` (default)    | HNG full adder on q3[8], C1, C2, then 7 Peres half adders        | exact product for all inputs    |
| `1`              | reversible OR of C1, C2, then 8 Peres half adders (original form) | a·b − 2^24 when C1 = C2 = 1     |

The default costs the same as the OR form, give or take one gate. Use `1` only to compare with
the original structure.

Gate totals for the top:

| `PAPER_OR_MERGE` | Peres | Feynman | HNG | quantum cost |
|------------------|-------|---------|-----|--------------|
| 0 (default)      | 327   | 64      | 341 | 3418         |
| 1                | 329   | 65      | 340 | 3421         |

## Timing

Everything is combinational. The critical path runs through the following, each adder being a
full ripple:

1. The 2 x 2 cell.
2. Three adders at the 4 x 4 level.
3. Three adders at the 8 x 8 level.
4. The two 16-bit adders.
5. The top-byte chain.

To use the multiplier in a clocked design, register `a`, `b` and `y` outside it. Choose the
clock period to cover this path, or cut the path with pipeline registers between levels, which
this RTL does not include.

## Ports

| module          | inputs                | output      |
|-----------------|-----------------------|-------------|
| `ut_mult_2x2`   | `a[1:0]`, `b[1:0]`    | `q[3:0]`    |
| `ut_mult_4x4`   | `a[3:0]`, `b[3:0]`    | `m[7:0]`    |
| `ut_mult_8x8`   | `a[7:0]`, `b[7:0]`    | `m[15:0]`   |
| `ut_mult_16x16` | `a[15:0]`, `b[15:0]`  | `y[31:0]`   |
| `hng_rca`       | `a`, `b` [WIDTH-1:0], `cin` | `sum[WIDTH-1:0]`, `cout` |

All operands are unsigned.

## Verification

Each module has a self-checking testbench in `tb/`, named `tb_<module>.sv`. Each one prints
`TB_RESULT checks=<n> failures=<n>`.

- **Gates, half adder, OR:** every input combination is checked against the gate equations.
- **`hng_rca`:** checked at widths 4, 5, 8, 9 and 16, against integer addition.
  - The 4- and 5-bit widths are checked exhaustively with both carry-in values.
  - All widths get corner cases and 5,000 random operands.
  - The test counts full-length carry ripples.
- **`ut_mult_2x2`, `ut_mult_4x4`, `ut_mult_8x8`:** every operand pair is checked. The 8 x 8 test
  covers 65,536 pairs.
- **Published example values:** 1111 × 1110 = 11010010, 10100110 × 00011110 = 0001001101110100
  and 0x1000 × 0x1000 = 0x01000000.
- **Published internal values:** the multiplier testbenches also check the partial products and
  first adder sums printed alongside those examples. This confirms the operand pairing of the
  crosswise products, `q1 = hi(a)·lo(b)`.
- **`tb_ut_mult_16x16`:** runs the top at its default parameters, about 4.2 million checks.
  - It checks corner cases and the two operand pairs that set both carries.
  - It sweeps every multiplicand against 0xFFFF and 0xA5C3, and 0xFFFF against every
    multiplier.
  - It checks 4,000,000 random pairs.
  - An independent model predicts C1 and C2. The test fails if any of the four carry cases
    (none, C1 only, C2 only, both) never occurs.
- **`tb_ut_mult_16x16_or`:** builds the top with `PAPER_OR_MERGE = 1`. It checks that the
  output is exact except when both carries are 1, where it must be 2^24 short.

To run a testbench with Verilator 5 from the project root:

```
verilator --binary --timing -Wno-fatal -y rtl +libext+.sv \
    --top-module tb_ut_mult_16x16 tb/tb_ut_mult_16x16.sv
./obj_dir/Vtb_ut_mult_16x16
```

Replace the testbench name to run another one. The full 16 x 16 test takes about 7 seconds.

## Changing the design

- **Adder width:** the only numeric parameter is `hng_rca`'s `WIDTH`.
- **Multiplier levels:** each level is written out explicitly, following the published block
  diagrams, rather than generated recursively.
- **Wider multiplier (32 x 32):** add a level shaped like `ut_mult_16x16`. Four 16 x 16
  instances and two 32-bit adders handle the middle. The two middle carries must be added into
  the top half with a full adder, as in the default merge here, not ORed.
- **Garbage outputs:** these are the unused outputs of each reversible gate, held in local
  signals (`g`, `g_a`, `g_b`, `hg` and similar). Lint tools flag them as unused. That is
  expected: they exist so the gate count matches a reversible implementation.
