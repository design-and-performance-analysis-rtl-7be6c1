# Reversible-logic 4x4 multipliers, with Booth companions

A reversible gate maps its inputs to its outputs one to one: it has as many
outputs as inputs, and no output may fan out. The hope behind circuits made
only of such gates is lower power. A reversible gate need not destroy
information, so in principle it need not dissipate the energy that erasing a
bit costs. This RTL builds a 4x4 unsigned multiplier in that style, gate by
gate, in the two variants of the source paper ("Design and Performance
Analysis of low Power Reversible Multipliers", N. Kaur and A. Singh). It also
builds a 4x4 Urdhva Tiryagbhyam (Vedic) multiplier from the same gates, and
the radix-2 and radix-4 Booth multipliers and the Fredkin-gate multiplexer
that the paper also describes.

The SystemVerilog is ordinary synthesizable logic. Each reversible gate is a
small combinational module whose outputs follow the gate's equations. The
reversible structure lives in how the gates are wired. Constant inputs are tied
to 0, and every output that carries no result is brought out on a `garbage`
port rather than left open. Nothing here models energy or quantum cost. Those
are the paper's evaluation, not a function of the logic.

## The gates

| module         | gate               | outputs (inputs A, B, C, D)                  | role here                            |
|----------------|--------------------|----------------------------------------------|--------------------------------------|
| `feynman_gate` | Feynman (FG), 2x2  | P=A, Q=A^B                                   | copy a bit (B=0)                     |
| `bvf_gate`     | BVF, 4x4           | P=A, Q=A^B, R=C, S=C^D                       | double two copies into four          |
| `peres_gate`   | Peres (PG), 3x3    | P=A, Q=A^B, R=AB^C                           | AND (C=0); half adder                |
| `toffoli_gate` | Toffoli (TG), 3x3  | P=A, Q=B, R=AB^C                             | AND that passes both operands on     |
| `mhng_gate`    | MHNG, 4x4          | P=A, Q=D, R=A^B^C, S=(A^B)C ^ AB ^ D         | full adder (D=0)                     |
| `fredkin_mux2` | Fredkin, 3x3       | P=S, Q=S'A+SB, R=S'B+SA                      | 2:1 multiplexer on Q                 |

`ha_pg` is a half adder made of one Peres gate (sum on Q, carry on R, one
garbage output). `fa_mhng` is a full adder made of one MHNG gate (sum on R,
carry on S, two garbage outputs).

**The MHNG carry term.** In the paper, the S output of the MHNG gate ends
in "xor C". With that term S is not a carry, and the gate could not serve as
the full adder the paper builds from it. This design takes the term to be D,
as in the HNG gate that MHNG modifies. With D tied to 0, S is then the
majority of A, B and C. The gate's remaining outputs are as the paper gives
them. Note that the MHNG as given (Q = D rather than Q = B) is not itself a
one-to-one map. This RTL reproduces the logic function and does not check
reversibility.

## Partial products: fan-out is the hard part

A 4x4 multiplier needs the sixteen AND terms `pp[j][i] = x[i] & y[j]`. A
Peres or Toffoli gate with C = 0 gives one such term on R. The difficulty is
that each operand bit feeds four of them, and a reversible circuit cannot
simply fan a wire out.

**Peres-gate generator (`ppgc_pg`, Method I).** A Peres gate passes input A
unchanged to output P but not input B (Q becomes A^B). So `y[j]` can run along
row j from one gate's P to the next gate's A, and needs no copies. `x[i]` has
to be copied instead. A Feynman gate with a 0 input makes two copies, and a BVF
gate with two 0 inputs turns those into four. The circuit has 4 FG, 4 BVF and
16 PG: 24 gates, 28 constant inputs and 20 garbage outputs (16 Q outputs and
the `y[j]` leaving each row). These are the counts the paper gives.

**Toffoli-gate generator (`ppgc_tg`, Method II).** A Toffoli gate passes both
A and B through. So in a 4x4 grid `y[j]` runs along the rows and `x[i]` down
the columns, and no fan-out circuit is needed. A Toffoli gate costs more than
a Peres gate, and the paper suggests using Peres gates where the data path
ends. Here the four gates of the last row are Peres gates, since `x[i]` is
not needed below them. The paper does not say which gates it means. 8 garbage
outputs remain.

## The addition array (`addition_array`)

The array is three carry-save rows and a ripple row, with 4 half adders and 8
full adders (12 gates, 12 constant inputs, 20 garbage outputs):

```
 row 1   HA col1 -> p[1]   HA col2          HA col3
 row 2   FA col2 -> p[2]   FA col3          FA col4 (x3y1 + x2y2 + c)
 row 3   FA col3 -> p[3]   FA col4          FA col5 (x2y3 + x3y2 + c)
 row 4   HA col4 -> p[4]   FA col5 -> p[5]  FA col6 (x3y3 + ...) -> p[6], carry -> p[7]
```

`p[0] = x0y0` needs no adder. Half adders are Peres gates and full adders
are MHNG gates; this MHNG version is the improved ("modified") array of the
paper. The paper's version with two-Peres-gate full adders is the baseline it
compares against, and is not built. The paper gives the row shape (HA HA HA /
FA FA FA / FA FA FA / FA FA HA) and where the product bits leave. This
design places each cell's summands by column weight. The testbench checks the array on all
65536 patterns of its sixteen inputs.

`rev_mult4_m1` is `ppgc_pg` followed by the array (40 garbage outputs), and
`rev_mult4_m2` is `ppgc_tg` followed by the same array (28 garbage outputs).
The paper's cost table names "Method I" and "Method II" but does not define
them. This design reads Method I as the Peres-gate generator with the MHNG
array, because those gate counts match its quantum-cost total of 132. It
reads Method II as the Toffoli-gate variant.

## Urdhva Tiryagbhyam multiplier (`vedic4x4`, `vedic2x2`, `rca_mhng`)

The paper evaluates a 4x4 Urdhva Tiryagbhyam ("vertically and crosswise")
unit and a ripple carry adder built from MHNG gates, but does not show how
either is built. Here `vedic2x2` forms a 2x2 product from four Peres AND terms
and two Peres half adders. `vedic4x4` multiplies the operand halves with four
such cells and combines the four partial products with three 4-bit `rca_mhng`
adders:

```
q0 = xl*yl  q1 = xh*yl  q2 = xl*yh  q3 = xh*yh
adder 1: q1 + q2               -> s1, c1
adder 2: s1 + q0[3:2]          -> s2, c2          p[3:2] = s2[1:0], p[1:0] = q0[1:0]
adder 3: q3 + {0, c1^c2, s2[3:2]}   -> p[7:4]
```

c1 and c2 are never both 1, so a Feynman gate's XOR merges them. The adder
width of 4 is this design's choice.

## Booth multipliers

**`booth_r2_seq`: radix 2, sequential, signed, N = 4.** On `start` the
operand with fewer changes between neighbouring bits becomes the multiplier X,
and the other becomes the multiplicand Y. On a tie `b` is the multiplier, and
`swapped` reports the choice. Registers U and V start at 0, and the bit
below X (X-1) starts at 0. Each clock then does one step:

| X0 X-1 | action            |
|--------|-------------------|
| 0 0    | shift only        |
| 1 1    | shift only        |
| 0 1    | U = U + Y, shift  |
| 1 0    | U = U - Y, shift  |

"Shift" moves U:V one place right arithmetically, copies X0 to X-1 and
rotates X right. Rotating X means it needs only one register. After N steps,
U:V is the product. `done` pulses N + 1 clocks after the start cycle, and `p`
holds until the next start. U carries one guard bit above N, so adding or
subtracting Y cannot overflow (-8 x -8 needs it). The paper's hand table uses
N-bit U. Assertions check that `done` lasts one cycle and only ends a run.

**`booth_r4`: radix 4 (modified Booth), combinational, signed.** The
multiplier gets a 0 below its LSB, and is sign-extended by one bit if N is
odd. It is then read in overlapping triplets, each selecting 0, +Y, +2Y, -Y
or -2Y. So there are only N/2 partial products. 2Y is Y shifted left. A
negative product is the bit inverse of the positive one, and the +1 that
completes the two's complement enters as the carry in of the adder that
accumulates it. All additions are `cla_adder` carry-lookahead adders, as the
paper asks. Every carry of `cla_adder` is formed directly from the generates
and propagates. The recoding rules are in `mult_pkg`, shared with the radix-2
design.

## Top level

`rev_mult_top` puts everything side by side. The paper uses each circuit on
its own, so it gives no larger system to follow. The three unsigned
multipliers share `x`/`y` and give `p_m1`, `p_m2` and `p_ut`. The Booth
multipliers have their own `b2_*` and `b4_*` ports, and the multiplexer has
its own `mx_*` ports. `BOOTH_N` (default 4) sets both Booth widths. Only the
radix-2 Booth multiplier is clocked (`clk`, synchronous active-low `rst_n`).

Many garbage outputs are copies of inputs or constants, for example `y[j]`
leaving a row, or the 0 passed through an MHNG gate. Synthesis therefore
reports them as idle. That is expected.

## Not built

- The sign rule of a generic binary multiplier (equal signs give a positive
  product). The reversible multipliers are unsigned and the paper gives no
  circuit for it. The Booth multipliers handle signs in two's complement.
- The baseline circuits the paper compares against: the two-Peres-gate full
  adder and the unmodified addition array, multiplier and ripple carry adder.
- Power, supply-voltage and temperature behaviour, and quantum cost. These
  are analysis results, not logic.

## Simulating

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each one ends
by printing `TB_RESULT checks=N failures=M`. The combinational blocks are
checked exhaustively. `cla_adder` and the 8-bit `booth_r4` instance are
checked on random vectors. The Booth testbenches also check latency and count
every step kind and recoding. `tb_rev_mult_top` runs the whole top at its
default parameters, including the worked example 2 x (-4) = -8. With
Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/mult_pkg.sv tb/tb_rev_mult_top.sv \
          --top-module tb_rev_mult_top -Mdir obj && obj/Vtb_rev_mult_top
```

Replace the testbench name to run another block. `mult_pkg.sv` must come
first, because most modules import it. Each testbench runs in well under a
second.
