# A 4x4 reversible multiplier built from ABC and GPS gates

A reversible logic gate maps its inputs to its outputs one-to-one. No
information is erased, so in principle no energy has to be dissipated for
erasing it. To be reversible, a gate has as many outputs as inputs and
never fans a signal out. A useful gate therefore needs two extra things:

- **constant inputs**, tied to 0 or 1, to select the function wanted;
- **garbage outputs**, which are only there to keep the mapping one-to-one.

Reversible designs are judged by how few gates, constant inputs and garbage
outputs they use.

This RTL describes an unsigned 4-bit x 4-bit multiplier made only of
reversible gates:

- a **partial product generator** (PPG) of 16 Toffoli gates;
- a **multi-operand adder** (MOA) of 4 *ABC* gates and 8 *GPS* gates. ABC
  and GPS are two purpose-made reversible gates: an ABC gate serves as a half
  adder and a GPS gate as a full adder.

That is 28 gates in all. Every gate is described as a network of
**Gate-Diffusion-Input (GDI)** cells. A GDI cell is a two-transistor
structure meant for a low-power, low-transistor-count implementation.

The whole design is combinational. It has no clock and no reset, and
`prod` follows `x` and `y` after the propagation delay.

```
 x[3:0] ─┐   ┌─────────── ppg ───────────┐  pp[i][j]   ┌────── moa ──────┐
         ├──►│ 16 x toffoli_gate (C = 0) ├────16──────►│ 4 x abc_gate    ├──► prod[7:0]
 y[3:0] ─┘   │ operands ripple through   │             │ 8 x gps_gate    │
             └─────────────┬─────────────┘             └────────┬────────┘
                           └──── garbage[27:20] ────────────────┴── garbage[19:0]
```

## The three reversible gates

| gate | inputs | outputs | used as |
|------|--------|---------|---------|
| Toffoli | A B C | P = A, Q = B, R = AB ⊕ C | C = 0: R = A·B (one partial product) |
| ABC | A B C | P = A, Q = A ⊕ B, R = A'C + B'C + ABC' | C = 0: Q = sum, R = carry of A+B; P is garbage |
| GPS | A B C D | P = B ⊕ C, Q = AB' + (A ⊙ B)C, R = A ⊕ B ⊕ C ⊕ D, S = AB + BC + CA | D = 0: R = sum, S = carry of A+B+C; P, Q are garbage |

(⊙ is XNOR.) The ABC gate's R simplifies to AB ⊕ C. The ABC gate is
therefore "Toffoli on the third line plus a CNOT on the second". With C = 0,
R is the AND of A and B, which is the half-adder carry.

The GPS gate's Q and S are both selects on A ⊕ B:

| | S (majority) | Q |
|-|--------------|---|
| A ≠ B | C | A |
| A = B | A | C |

Between them, Q and S hold both A and C. Together with P = B ⊕ C and R, they
make all 16 output patterns distinct. The testbenches check by enumeration
that all three gates are permutations. If Q were simply A, four pairs of
inputs would collide and the gate would not be reversible. For that reason
Q is the expression above.

The constant is always on the last input: C for ABC, D for GPS. Only there
does the gate act as an adder.

## GDI cells

`gdi_cell` is the logic view of one GDI cell. It is a PMOS and an NMOS with
one shared gate `g` and one shared drain `d`. The PMOS source is input `p`
and the NMOS source is input `n`:

```
d = g ? n : p
```

One cell, depending on what is wired to its inputs, gives the following
functions:

| n | p | g | d |
|---|---|---|---|
| 0 | B | A | A'B |
| B | 1 | A | A' + B |
| 1 | B | A | A + B |
| B | 0 | A | AB |
| C | B | A | A'B + AC |
| 0 | 1 | A | A' |

The gates are written as nets of these cells. An XOR is a select of a signal
and its inverse, and the GPS majority and Q outputs are selects on A ⊕ B. The
netlists are:

| gate | cells | netlist |
|------|-------|---------|
| `toffoli_gate` | 3 | AND, inverter, select on C |
| `abc_gate` | 5 | inverter, XOR-select, AND, inverter, select on C |
| `gps_gate` | 10 | 3 inverters, 3 XOR-selects, 1 inverter, 1 XOR-select for the sum, 2 selects for S and Q |

This decomposition belongs to this RTL. It is not a transcription of a
particular transistor schematic. The whole multiplier has 148 cells:
16 x 3 + 4 x 5 + 8 x 10. At two transistors per cell that would be 296
transistors. A transistor-level GDI implementation of the same multiplier
has been reported at 416 transistors, against 880 in static CMOS. It was
also reported to use 43 µW against 115 µW, about 62 % less output power.

The RTL models only logic values. It does not model the threshold drop that a
real GDI cell shows for some input patterns, or the body ties that need a
twin-well or SOI process. Synthesis treats `gdi_cell` as an ordinary 2:1
multiplexer.

## Partial products: the Toffoli array (`ppg`)

Gate (i, j) receives `x[i]` on A, `y[j]` on B and 0 on C, and its R output
is `pp[i][j] = x[i] & y[j]`. A reversible net may not fan out, so the
operands are threaded through the array instead of being broadcast:

- P (= x_i) goes to the next gate in row i;
- Q (= y_j) goes to the gate below in column j.

The lines leaving the last row and column are copies of `y` and `x`. They
appear as eight garbage outputs.

`ppg` has a parameter `N` (default 4), which sets the array size. Only the
adder below is fixed at 4x4.

## Adding 16 partial products with 12 gates (`moa`)

Column k of the multiplication holds the products with i + j = k:

```
column   6     5     4     3     2     1     0
        x3y3  x3y2  x3y1  x3y0  x2y0  x1y0  x0y0
              x2y3  x2y2  x2y1  x1y1  x0y1
                    x1y3  x1y2  x0y2
                          x0y3
```

Three ripple chains reduce them. Below, HA is an ABC gate with C = 0 and FA
is a GPS gate with D = 0. `c` is the carry from the previous gate in the same
chain.

```
upper right   HA(x1y0, x0y1)      -> P1          carry -> col 2
              FA(x0y2, x2y0, c)   -> col-2 sum   carry -> col 3
              FA(x0y3, x3y0, c)   -> col-3 sum   carry -> col 4
              HA(x1y3, c)         -> col-4 sum   carry -> col 5 (cUR5)

upper left    HA(x1y2, x2y1)      -> col-3 sum   carry -> col 4
              FA(x3y1, x2y2, c)   -> col-4 sum   carry -> col 5
              FA(x2y3, x3y2, c)   -> col-5 sum   carry -> col 6 (cUL6)

lower         HA(x1y1, col-2 sum)                  -> P2
              FA(col-3 sum UR, col-3 sum UL, c)    -> P3
              FA(col-4 sum UR, col-4 sum UL, c)    -> P4
              FA(cUR5, col-5 sum UL, c)            -> P5
              FA(x3y3, cUL6, c)                    -> P6, carry = P7

x0y0 -> P0
```

The upper two chains each turn two rows of a column into one sum bit. The
lower chain merges the two upper results with a ripple carry, so its five
gates produce P2 to P7 one per gate. The longest path is seven gates: from
x1y0/x0y1 through the first two upper-right gates to the column-2 sum, then
along the whole lower chain to P7.

The adder leaves 20 garbage outputs, `garbage[19:0]` = g19..g0, numbered
right to left along the upper chains and then the lower chain:

| gates | garbage |
|-------|---------|
| upper right (ABC, FA, FA, ABC) | g0, g1 g2, g3 g4, g5 |
| upper left (ABC, FA, FA) | g6, g7 g8, g9 g10 |
| lower (ABC, FA x4) | g11, g12 g13, g14 g15, g16 g17, g18 g19 |

The lower index of a GPS pair is its P output. The carry-out of each chain's
last gate is either a product bit (P7) or an input of the lower chain, so no
carry is thrown away.

Because the adder only weights and sums, it gives the right answer for *any*
16-bit pattern on `pp`. The weighted sum is never more than 225, so it always
fits in 8 bits. `tb_moa` uses this to test all 65536 patterns rather than
only the 256 that a multiplication produces.

## Resource counts

| | this RTL | reported for the original design |
|-|----------|----------------------------------|
| reversible gates | 28 (16 Toffoli, 4 ABC, 8 GPS) | 28 |
| constant inputs | 28 (one per gate) | 16 |
| garbage outputs | 28 (20 in the adder, 8 operand lines out of the PPG) | 23 |

The gate count matches. The other two differ because this RTL counts every
constant and every unused output of the circuit as drawn: one constant per
gate and the operand lines that run off the Toffoli array. The smaller
reported figures appear to count only some of them. For example, 16 matches
the Toffoli constants alone. The logic function does not depend on how they
are counted.

The original design was compared with earlier reversible 4x4 multipliers that
need 32 to 44 gates. Those designs are not part of this RTL.

## Where this RTL makes its own choices

The following are this RTL's own decisions:

- **GPS output Q.** Q is taken as AB' + (A ⊙ B)C, not A, because only then is
  the gate reversible.
- **Constant placement.** The constants sit on ABC input C and GPS input D,
  because the gate equations work as adders only there.
- **Operand order.** Which operand goes on which adder input follows the
  order the operands are listed in. The results do not depend on it.
- **Array threading.** The operands are threaded through the Toffoli array,
  x along rows and y down columns.
- **Garbage order.** The P/Q order of the garbage outputs follows the
  numbering above.
- **Gate netlists.** The GDI-cell netlists of the three gates are this RTL's
  own (see above).
- **No timing.** The design has no clock, no registers and no handshake,
  because the multiplier is purely combinational.

## Files

| file | contents |
|------|----------|
| `rtl/rev_mult_pkg.sv` | widths, gate and garbage counts, the `pp_t` partial-product type |
| `rtl/gdi_cell.sv` | GDI cell, `d = g ? n : p` |
| `rtl/toffoli_gate.sv`, `rtl/abc_gate.sv`, `rtl/gps_gate.sv` | the three reversible gates |
| `rtl/ppg.sv` | N x N Toffoli partial-product array |
| `rtl/moa.sv` | 4x4 multi-operand adder |
| `rtl/rev_mult4x4.sv` | top: `x`, `y` → `prod`, `garbage[27:0]` |
| `tb/tb_*.sv` | one self-checking testbench per module |

Top-level ports of `rev_mult4x4`:

| port | dir | width | meaning |
|------|-----|-------|---------|
| `x` | in | 4 | multiplicand |
| `y` | in | 4 | multiplier |
| `prod` | out | 8 | x * y |
| `garbage` | out | 28 | [19:0] adder garbage g19..g0; [23:20] x and [27:24] y as they leave the Toffoli array |

## Tests and simulation

Every testbench is exhaustive over its module's inputs:

| testbench | what it checks |
|-----------|----------------|
| `tb_gdi_cell` | 8 raw patterns and the six cell configurations |
| `tb_toffoli_gate` | 8 inputs; permutation; the gate undoes itself |
| `tb_abc_gate` | 8 inputs; permutation; half-adder sum |
| `tb_gps_gate` | 16 inputs; permutation; full-adder sum |
| `tb_ppg` | 256 operand pairs, every partial product and pass-through line |
| `tb_moa` | all 65536 partial-product patterns against the weighted sum |
| `tb_rev_mult4x4` | all 256 products and pass-through lines |

`tb_rev_mult4x4` also counts how often each of the 12 adder carries is 1 and
how often P7 is used. A carry that is never exercised counts as a failure.

Each testbench prints `TB_RESULT checks=N failures=M` and has a time-out
watchdog. To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/rev_mult_pkg.sv tb/tb_rev_mult4x4.sv --top-module tb_rev_mult4x4
./obj_dir/Vtb_rev_mult4x4
```

`-Irtl` lets Verilator find the submodules by file name. Replace the
testbench name to run the others. Every module is also clean under Verilator
`--lint-only -Wall`, apart from two unused-constant notes from the package
when a module that does not use them is linted alone.
