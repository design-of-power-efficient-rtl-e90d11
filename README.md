# Reversible 8x8 Vedic multiplier

An unsigned 8x8 → 16-bit multiplier. It uses the Urdhva Tiryagbhyam
("vertically and crosswise") method of Vedic arithmetic and is built only
from reversible logic gates. Reversible gates have as many outputs as
inputs and map each input pattern to a different output pattern, so no
information is erased. Every gate here is one of four standard reversible
gates:

| gate    | inputs → outputs                                        | quantum cost | role here |
|---------|---------------------------------------------------------|--------------|-----------|
| Feynman | P=A, Q=A⊕B                                              | 1 | copies a bit (B=0), so no wire fans out |
| Toffoli | P=A, Q=B, R=AB⊕C                                        | 5 | AND of two bits (C=0) |
| Peres   | P=A, Q=A⊕B, R=AB⊕C                                      | 4 | half adder (C=0): Q is the sum, R the carry |
| HNG     | P=A, Q=B, R=A⊕B⊕C, S=(A⊕B)C⊕AB⊕D                         | 6 | full adder (D=0): R is the sum, S the carry |

Outputs that the computation does not need (for example P and Q of every
HNG gate) are *garbage outputs*. They exist only to keep each gate
reversible, and the RTL leaves them unconnected. Verilator's
`UNUSEDSIGNAL` lint warnings for them are expected.

The whole design is combinational. It has no clock, no registers and no
handshake. The product is valid one propagation delay after the operands
change.

## How the product is assembled

The same split-and-recombine step is used at two levels. Split each
operand into halves, `a = {aH, aL}` and `b = {bH, bL}`, with h bits per
half:

```
a*b = (aH*bH) << 2h  +  (aH*bL + aL*bH) << h  +  aL*bL
```

The four half-size products are independent, so they are formed in
parallel. This is the "vertical and crosswise" step. Three adders of
width 2h then combine them:

```
adder 1:  sum1, ca1 = aL*bH + aH*bL
adder 2:  sum2, ca2 = sum1 + (aL*bL >> h)            (upper half of aL*bL)
          product[h-1:0]   = (aL*bL)[h-1:0]
          product[2h-1:h]  = sum2[h-1:0]
adder 3:  product[4h-1:2h] = aH*bH + {ca1+ca2, sum2[2h-1:h]}
```

`ca1` and `ca2` have the same weight, `2^(3h)`. They are added by one
Peres gate. Its XOR output goes to bit h of adder 3's second operand and
its AND output to bit h+1. For unsigned operands the two carries are never
1 together, so the AND output is always 0. It is still wired in so that
the tree is exact by construction. The testbenches check that the carries
never coincide. The carry out of adder 3 is always 0 and is not used.

- `vedic4x4` applies this step with h = 2. It uses four `vedic2x2` blocks
  and three 4-bit HNG ripple-carry adders.
- `vedic8x8` (the top) applies it with h = 4. It uses four `vedic4x4`
  blocks and three 8-bit HNG ripple-carry adders.

### The 2x2 base case (`vedic2x2`)

```
q0 = a0 b0
q1 = a1 b0 ⊕ a0 b1                 carry c = a1 b0 · a0 b1
q2 = a1 b1 ⊕ c                     q3 = a1 b1 · c
```

Four Feynman gates copy `a0, a1, b0, b1`. Four Toffoli gates form the bit
products. Two Peres gates serve as the half adders for `q1` and `q2/q3`.

### Ripple-carry adder (`hng_rca`)

`WIDTH` HNG gates are chained: gate i takes `A=a[i]`, `B=b[i]`, `C=` the
previous carry (`cin` for gate 0) and `D=0`. Its R output is `sum[i]` and
its S output is the next carry. The default `WIDTH = 8` has 16 garbage
outputs and a quantum cost of 48.

## Files

| file | module | what it is |
|------|--------|-----------|
| `rtl/feynman_gate.sv` | `feynman_gate` | 2x2 Feynman gate |
| `rtl/toffoli_gate.sv` | `toffoli_gate` | 3x3 Toffoli gate |
| `rtl/peres_gate.sv`   | `peres_gate`   | 3x3 Peres gate |
| `rtl/hng_gate.sv`     | `hng_gate`     | 4x4 HNG gate |
| `rtl/hng_rca.sv`      | `hng_rca #(WIDTH=8)` | HNG ripple-carry adder |
| `rtl/vedic2x2.sv`     | `vedic2x2`     | 2x2 multiplier |
| `rtl/vedic4x4.sv`     | `vedic4x4`     | 4x4 multiplier |
| `rtl/vedic8x8.sv`     | `vedic8x8`     | 8x8 multiplier, top: `a[7:0]`, `b[7:0]` → `p[15:0]` |

Each `tb/tb_<module>.sv` is a self-checking testbench. It ends by printing
`TB_RESULT checks=N failures=M`.

- The gate testbenches apply every input pattern. They compare the outputs
  with the truth table and also check that the gate is reversible: no two
  inputs may give the same output.
- `tb_hng_rca` adds every pair of 8-bit operands with both carry-in values,
  and every 4-bit case.
- `tb_vedic2x2`, `tb_vedic4x4` and `tb_vedic8x8` multiply every operand pair
  (65,536 pairs for the top) and compare against integer multiplication.
- `tb_vedic4x4` and `tb_vedic8x8` also count the internal carries `ca1`,
  `ca2` and the merged carry. They fail if any of these never occurs, or
  if `ca1` and `ca2` are ever 1 together.
- The first vectors are the worked examples 16 + 65 = 81 for the adder and
  16 × 3 = 48 for the multiplier.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl --top-module tb_vedic8x8 tb/tb_vedic8x8.sv
./obj_dir/Vtb_vedic8x8
```

The top's exhaustive test finishes in well under a second.

## Size and cost

After generic synthesis the top is 398 single-bit AND/XOR cells.

The quantum cost of this netlist is:

- 2x2 multiplier: 4 FG + 4 TG + 2 PG = 32
- 4x4 multiplier: 4×32 + 3×24 + 4 = 204
- 8x8 multiplier: 4×204 + 3×48 + 4 = **964**

The reference design this RTL follows quotes 720 for the whole 8x8
multiplier. That figure implies a cheaper 2x2 netlist than the one used
here, but the gate-level insides of that 2x2 block were never published.

## Where this RTL departs from, or fills in, the reference design

- **Adder type in the 4x4 level.** The reference block diagram labels the
  three 4-bit adders "carry look-ahead". Its text builds every adder as an
  HNG ripple-carry adder, including a 4-bit one. This RTL uses HNG
  ripple-carry adders throughout.
- **Carry merge.** The reference 8x8 schematic shows an XOR element and a
  2-input AND next to its adders, but does not say how they connect. Here
  that XOR/AND pair is one Peres gate that adds `ca1` and `ca2`, at both
  multiplier levels.
- **2x2 multiplier insides** are this design's own choice. The reference
  says only that the multipliers use Peres, Toffoli and Feynman gates.
- **No clock.** The reference schematics route a `clk` pin (and the
  waveforms a `ce` enable) into every adder, but no register or enable
  behaviour is described. All modules here are combinational.
- **Fan-out above the 2x2 level.** Inside `vedic2x2`, Feynman gates copy
  every operand bit. In `vedic4x4` and `vedic8x8`, operand halves go to two
  sub-multipliers by plain wires, as the reference block diagram draws
  them. A strictly reversible netlist would need Feynman copiers there too.
- **Not included:** the reference waveforms show a wrapper with `select1`,
  `select2[2:0]`, `s1` and `s2` that switches between sum and product. Its
  behaviour is not described, so it is not built.
- **Operands are unsigned.** Signed multiplication is not described.
- Timing, power and FPGA LUT figures reported for the reference design
  come from an FPGA flow and are not reproduced here.
