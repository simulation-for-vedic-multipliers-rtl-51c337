# 8x8 Vedic multiplier from reversible gates

This is an unsigned 8-bit by 8-bit combinational multiplier. It is organised after the
*Urdhva Tiryagbhyam* ("vertically and crosswise") rule of Vedic arithmetic. Every
gate in it is a reversible logic gate: Peres, Feynman (CNOT) or HNG.

Vertically-and-crosswise multiplication works digit by digit. Each product digit is a
sum of cross products, plus the carry from the digit below:

```
r0      = a0 b0
c1 r1   = a1 b0 + a0 b1
c2 r2   = c1 + a2 b0 + a1 b1 + a0 b2
...
c6 r6   = c5 + a3 b3
```

In hardware the rule is applied to digits that are half the operand width:

```
a = aH * 2^k + aL,   b = bH * 2^k + bL
a*b = aL*bL  +  (aH*bL + aL*bH) * 2^k  +  aH*bH * 2^(2k)
       vertical        crosswise              vertical
```

The design does this twice. The 8x8 multiplier is built from four 4x4 multipliers, and
each 4x4 multiplier from four 2x2 multipliers. All partial results are added by
ripple-carry adders made of HNG gates. The design has no clock and no registers: the
product settles after the ripple delay of the adder chain.

## Hierarchy

```
vedic_8x8                      top: m[15:0] = a[7:0] * b[7:0]
├── vedic_4x4  x4              m[7:0] = a[3:0] * b[3:0]
│   ├── vedic_2x2  x4          q[3:0] = a[1:0] * b[1:0]
│   │   ├── peres_gate  x5
│   │   └── feynman_gate x1
│   └── ripple_carry_adder x3  (4, 5, 4 bits, all HNG)
└── ripple_carry_adder x3      (8 bits with a Peres LSB, 9 bits all HNG,
                                8 bits with a Peres LSB)
    ├── hng_gate
    └── peres_gate
```

Synthesized with generic tools, the top is 382 two-input cells (191 AND, 191 XOR).

## The reversible gates

All three gates are bijections on their inputs. Each gate is a module of its own.

| gate | inputs | outputs | used as |
|---|---|---|---|
| `peres_gate` | a, b, c | p = a, q = a^b, r = (a&b)^c | with c=0: r is the AND of a and b (a partial product); {r,q} is a half adder |
| `feynman_gate` | a, b | p = a, q = a^b | controlled inversion |
| `hng_gate` | a, b, c, d | p = a, q = b, r = a^b^c, s = ((a^b)&c)^(a&b)^d | with d=0: r is the sum and s the carry of a full adder |

These are the standard definitions of the three gates. The architecture names the gates
but relies on those definitions, and the testbenches check them.

Outputs that carry no result are *garbage outputs*. They exist only because each gate must
be reversible. They are brought out on a `g` port by `vedic_2x2` and by
`ripple_carry_adder`. One level up they are left unconnected, so synthesis removes them.
Signals fan out as plain wires; no fan-out (copy) gates are inserted. The whole netlist
is therefore made of reversible gates, but it is not itself a reversible circuit.

## 2x2 multiplier (`vedic_2x2`)

This is the least obvious block. It uses five Peres gates and one Feynman gate:

| gate | inputs (a, b, c) | used output |
|---|---|---|
| Peres 1 | a0, b0, 0 | r = a0b0 |
| Peres 2 | a1, b1, 0 | r = a1b1 |
| Peres 3 | a1, b0, 0 | r = a1b0 |
| Peres 4 | a0, b1, a1b0 | r = a0b1 ^ a1b0 = **q1** |
| Peres 5 | a0b0, a1b1, 0 | p = a0b0 = **q0**, r = a0b0·a1b1 |
| Feynman | a0b0·a1b1, a1b1 | p = **q3**, q = a1b1 & ~a0b0 = **q2** |

The crosswise step a1b0 + a0b1 carries out only when all four input bits are 1. That is
exactly when a0b0 and a1b1 are both 1. So the carry is formed from the two vertical
products instead of the crosswise ones. The Feynman gate then splits the result: it
clears q2 and sets q3 in that case (3·3 = 9 = 1001b).

The nine garbage bits come out on `g[8:0]`:

- `g[1:0]`, `g[3:2]`, `g[5:4]` and `g[7:6]` are `{q, p}` of Peres gates 1 to 4.
- `g[8]` is `q` of Peres gate 5.

With this order, a = 11b and b = 01b give `g = 111011101b`. That is the value the
reference simulation of this multiplier shows for those inputs.

## 4x4 multiplier (`vedic_4x4`)

```
q0 = a[1:0]*b[1:0]   q1 = a[3:2]*b[1:0]   q2 = a[1:0]*b[3:2]   q3 = a[3:2]*b[3:2]

m[1:0] = q0[1:0]
t[4:0] = q1 + {00, q0[3:2]}         4-bit adder
x[5:0] = {0, q2} + t                5-bit adder
m[3:2] = x[1:0]
y[4:0] = q3 + x[5:2]                4-bit adder
m[7:4] = y[3:0]
```

Some carries can never occur:

- The first adder never carries out (9 + 3 < 16).
- `x[5]` and `y[4]` are always 0.

They are kept because the stated adder widths produce them. Example (15·15): q0..q3 =
1001, t = 01011, x = 010100, y = 01110, m = 225.

## 8x8 multiplier (`vedic_8x8`, top)

```
q0 = a[3:0]*b[3:0]   q1 = a[7:4]*b[3:0]   q2 = a[3:0]*b[7:4]   q3 = a[7:4]*b[7:4]

m[3:0]  = q0[3:0]
t[8:0]  = q2 + q1                        8-bit adder (Peres half adder in bit 0)
p[9:0]  = t + {00000, q0[7:4]}           9-bit adder (all HNG)
m[7:4]  = p[3:0]
y[8:0]  = q3 + {00, p[9:4]}              8-bit adder (Peres half adder in bit 0)
m[15:8] = y[7:0]
```

The 4x4 level groups its adders differently: there, the two cross terms are not added
to each other first. Here `t` is the whole crosswise sum, and the low vertical term's
upper nibble is added next. `p[9]` and `y[8]` are always 0.

Example (255·255): q0..q3 = 11100001, t = 111000010, p = 0111010000, y = 011111110,
m = 65025.

## Ripple carry adder (`ripple_carry_adder`)

Parameters:

- `WIDTH` (default 8) sets the operand width. The output `sum[WIDTH:0]` is
  `{carry out, sum}`.
- `PERES_LSB` (default 0) picks the gate in bit 0. With 0, every bit is an HNG gate and
  bit 0 takes `cin`. With 1, bit 0 is a Peres half adder and `cin` is ignored.

Bits 1 and up are always HNG gates, each with its fourth input tied to 0.

The 4-, 5- and 9-bit adders use the all-HNG form. The two 8-bit adders of the top use the
Peres LSB. Inside the multipliers every `cin` is 0.

## Where this implementation makes its own choices

- **Gate equations.** The standard Peres, Feynman and HNG definitions above are used.
  The architecture names the gates but does not restate them.
- **Operands are unsigned.** Nothing in the structure handles a sign.
- **Operand of the last 4x4 adder.** The source gives no label for the second input of
  the last 4x4 adder. `x[5:2]` is used, which matches the reference internal values.
- **Adder bit 0.** The source is inconsistent about the gate in bit 0 of the 8-bit
  adders: a Peres half adder in one place, "all HNG" in another. The Peres version is
  built; it is the same function, since the carry in is 0. The 9-bit adder is all HNG.
- **The `g` port.** The order of the 2x2 garbage bits is this design's own; it reproduces
  the one reference value. The `g` port of `ripple_carry_adder` is also this design's
  own.
- **Not modelled.** The FPGA implementation reports 3 flip-flops and a global clock. What
  they did is not described, so no registered wrapper is modelled. To register the
  product for a timing test, put flip-flops around `vedic_8x8` yourself.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_peres_gate`, `tb_feynman_gate`, `tb_hng_gate` | full truth tables against the arithmetic use of each gate (half adder, full adder, inverter), and that the output words are all distinct (reversibility) |
| `tb_ripple_carry_adder` | 4- and 5-bit all-HNG adders exhaustively with both carry-in values; the 8-bit Peres-LSB adder exhaustively; the 9-bit adder over a third of all pairs plus 20 000 random pairs with cin = 1; counts full-width carry ripples |
| `tb_vedic_2x2` | all 16 products, and the reference garbage value |
| `tb_vedic_4x4` | all 256 products; internal nets for 15·15; counts carries into bit 4 of the 5-bit adder and transfers into the high adder |
| `tb_vedic_8x8` | the four reference products 213·253 = 53889, 255·255 = 65025, 253·255 = 64515, 252·124 = 31248; all internal nets for 255·255; all 65 536 products; counts, each required to be non-zero, of t[8], p[8], a non-zero p[9:4], carries inside a 4x4 multiplier, and carries across bit 3 of the high adder |

`tb_vedic_8x8` is the end-to-end test of the design as built; the top has no parameters.
Every test completes in well under a second.

Run one with plain Verilator from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --top-module tb_vedic_8x8 -y rtl -y tb tb/tb_vedic_8x8.sv
./obj_dir/Vtb_vedic_8x8
```

## Changing the design

- **A wider multiplier** (16x16) follows the same pattern as `vedic_8x8`. Instantiate four
  `vedic_8x8`, then add two 16-bit adders and one 17-bit adder, shifting by 8 instead
  of 4. The adder is already parameterized.
- **Lint warnings.** Verilator reports the unconnected `g` pins (`PINCONNECTEMPTY`) and
  the unused top bits `y[8]` and `y[4]` (`UNUSEDSIGNAL`). Both are intended. The top
  bits are the carry outputs of adders whose sum cannot overflow.
