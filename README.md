# 4x4 unsigned array multiplier from reversible gates

A reversible gate has as many outputs as inputs, and its outputs determine its
inputs uniquely. A circuit built only from such gates, with no fan-out and no
feedback, loses no information. By Landauer's principle it therefore need not
dissipate the energy that an irreversible gate must spend on each erased bit.
This RTL describes an unsigned 4-bit x 4-bit array multiplier written entirely
in three reversible gates:

* the **Toffoli** gate, used as an AND cell;
* the **Peres** gate, used as an AND cell or as a half adder;
* the **Dual Key Gate (DKG)**, used as a full adder.

The cost of reversibility is extra wiring. Every gate needs a constant input,
and most have outputs that the computation does not use, called *garbage*.
Both kinds are kept and brought out, so the multiplier stays a one-to-one map
from `(x, y)` to `(z, garbage)`.

| figure of merit | value |
|---|---|
| gates | 28 (9 Toffoli, 11 Peres, 8 DKG) |
| constant inputs | 28 (one `0` per gate) |
| garbage outputs | 28 (8 from product generation, 20 from addition) |
| quantum cost | 129 (Toffoli 5, Peres 4, DKG 5 each) |

For comparison, a multiplier built from Toffoli gates only is quoted at
56 gates and quantum cost 160. That design is not part of this RTL.

The circuit is purely combinational. There is no clock and no reset. The
product is valid one propagation delay after the operands change.

## The three gates

| module | inputs | outputs | role here |
|---|---|---|---|
| `toffoli_gate` | a, b, c | p = a, q = b, r = c ^ ab | AND cell (c = 0) that passes both operands on |
| `peres_gate` | a, b, c | p = a, q = a ^ b, r = ab ^ c | AND cell or half adder (c = 0: q sum, r carry) |
| `dkg_gate` | k, a, b, c | p = a, q = b, r = (k ^ a)(b ^ c) ^ bc, s = a ^ b ^ c | full adder (k = 0: r carry, s sum) |

With `k = 0`, the DKG's `r` reduces to `a(b ^ c) ^ bc`, the majority of the
three operands. A DKG is also described as a full subtractor when its key is
1, but no subtractor equation is given for it. The `k = 1` behaviour here, a
borrow of `a - b - c` on `r`, is this design's own completion. The multiplier
never uses it; the gate testbench checks it.

The gate's `p` and `q` outputs are copies of `a` and `b`. With the key held
constant, `(p, q, s)` already determine `(a, b, c)`, so the gate is reversible
for each key value. The key itself does not reach an output.

## Stage 1: partial products (`ppg`)

A grid of AND cells forms `pp[i*N+j] = x[i] & y[j]`, which has weight
`2^(i+j)`. Since nothing may fan out, each operand bit is handed from cell to
cell on the gates' pass-through outputs:

```
            y0      y1      y2      y3         (y[j] enters at the top, moves down)
 x0 ->     TG  ->  TG  ->  TG  ->  PG          (x[i] enters at column 0, moves along the row)
 x1 ->     TG      TG      TG      PG
 x2 ->     TG      TG      TG      PG
 x3 ->     PG      PG      PG      PG
```

* An interior Toffoli cell has `a = x` and `b = y`. It gives `x` to the next
  column on `p`, `y` to the next row on `q`, and the product on `r`. It
  produces no garbage.
* A last-column Peres cell has `a = y`. Its `p` carries `y` down, and
  `q = x ^ y` is garbage.
* A last-row Peres cell has `a = x`. Its `p` carries `x` along, and `q` is
  garbage.
* The corner cell's `p` and `q` are both garbage.

The garbage outputs are numbered G1–G3 down the last column, G4–G6 along the
last row, and G7–G8 at the corner. They come out as `garbage[0..7]`.

The 4x4 grid is the reference. The module generates the same pattern for any
`N`, which gives `(N-1)^2` Toffoli cells, `2N-1` Peres cells and `2N` garbage
bits.

## Stage 2: multi-operand addition (`moa`)

This network is the least obvious part. It adds the sixteen partial products
in three rows of four cells. FA is a DKG with `k = 0`; HA is a Peres gate
with `c = 0`. Weights are written w0 to w7.

```
column           w1          w2              w3                w4                 w5                  w6
row 1 (CSA)   ha1(P10,P01) fa1(P20,P11,P02) fa2(P21,P12,P03)  fa3(P31,P22,P13)
                 -> z1
row 2                      ha2(c_ha1,s2)    fa4(s3,c2,c_ha2)  fa5(s4,c3,c_fa4)   fa6(P23,c4,c_fa5)
                              -> z2
row 3                                       ha3(P30,s_fa4)    ha4(s_fa5,c_ha3)   fa7(P32,s_fa6,c_ha4) fa8(P33,c_fa6,c_fa7)
                                               -> z3            -> z4               -> z5              -> z6, carry -> z7
```

`z0` is `P00` itself.

* **Row 1** is a carry-save row. Each column's partial products are reduced
  independently, and the carries move one column up.
* **Rows 2 and 3** ripple their carries from low to high columns and act as
  the final carry-propagate adder.

Each adder appears in the RTL as an instance of the same name (`u_fa1`,
`u_ha2`, ...). The wire `s2`, the sum of `fa1`, enters `ha2` on input `b`.

The garbage outputs of this stage are G1–G20, as `garbage[0..19]`:

| garbage | cell |
|---|---|
| G1 | ha1 |
| G2, G3 | fa1 |
| G4, G5 | fa2 |
| G6, G7 | fa3 |
| G8 | ha2 |
| G9, G10 | fa4 |
| G11, G12 | fa5 |
| G13, G14 | fa6 |
| G15, G16 | fa7 |
| G17, G18 | fa8 |
| G19 | ha3 |
| G20 | ha4 |

The cell list, the partial products each cell takes, the output each cell
drives and the garbage labels come from the design description. The
connections between cells in rows 2 and 3 are not named there. They were
assigned by column weight: it is the only assignment that gives every cell
three (or two) inputs of the same weight. The testbench confirms the result
against integer addition for all 65 536 partial-product patterns.

This stage is fixed at 4x4, because the addition network is defined only for
that size.

## Top level (`rev_mult4`)

`rev_mult4` connects `ppg` (with `N = rev_pkg::MULT_N = 4`) to `moa`:

| port | dir | width | meaning |
|---|---|---|---|
| `x` | in | 4 | multiplicand |
| `y` | in | 4 | multiplier |
| `z` | out | 8 | product `x * y` |
| `ppg_garbage` | out | 8 | G1–G8 of stage 1 |
| `moa_garbage` | out | 20 | G1–G20 of stage 2 |

If only the product is wanted, leave the garbage ports open. Synthesis then
removes the gates' pass-through logic, and what remains is an ordinary AND
array with adders. The reversible structure matters only when the gates are
mapped to a reversible technology.

`rev_pkg` holds each gate's quantum cost and the cell counts, and derives the
four figures of merit in the table at the top. The top-level testbench checks
them.

## Files

| file | contents |
|---|---|
| `rtl/rev_pkg.sv` | quantum costs, cell counts, derived totals |
| `rtl/toffoli_gate.sv`, `rtl/peres_gate.sv`, `rtl/dkg_gate.sv` | the three gates |
| `rtl/ppg.sv` | partial-product grid, parameter `N` (default 4) |
| `rtl/moa.sv` | 4x4 addition network |
| `rtl/rev_mult4.sv` | top level |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. Each also has
a watchdog that counts a failure if the run hangs. For example:

```
verilator --binary --timing --assert -Irtl rtl/rev_pkg.sv tb/tb_rev_mult4.sv --top-module tb_rev_mult4
./obj_dir/Vtb_rev_mult4
```

Replace `rev_mult4` with `toffoli_gate`, `peres_gate`, `dkg_gate`, `ppg` or
`moa` to test a single module. All of them finish in well under a second.

What each testbench checks:

* **`tb_toffoli_gate`, `tb_peres_gate`, `tb_dkg_gate`:** every input
  combination against the gate equations. Also the half-adder and full-adder
  readings, the DKG subtractor mode, and that the outputs are all distinct
  (reversibility).
* **`tb_ppg`:** all operand pairs at `N = 4` and `N = 3`, comparing every
  product bit and every garbage bit.
* **`tb_moa`:** all 2^16 partial-product patterns against the weighted sum,
  plus the first-row garbage copies.
* **`tb_rev_mult4`:**
  * all 256 operand pairs against `x * y`, including 0001 x 1010 = 00001010;
  * that the 256 output words `{z, garbage}` are all distinct, so the
    multiplier is reversible as a whole;
  * the derived totals 28 / 28 / 28 / 129;
  * that the carry chain reaches `z[7]` at least once.

## Where this RTL makes its own choices

* **DKG subtract mode:** `r = (k ^ a)(b ^ c) ^ bc`. The multiplier does not
  use it.
* **Routing in the product grid:** which pass-through output carries `x` and
  which carries `y` is this design's choice. Each cell's gate type and
  product bit follow the reference design.
* **Row 2 and 3 adder connections:** assigned by column weight, as described
  under Stage 2.
* **Operand order inside a DKG:** arbitrary. The sum and carry are symmetric
  in `a`, `b` and `c`; only which values appear on the garbage outputs
  changes.
* **Generic `N` in `ppg`:** a generalisation. The top level and `moa` stay
  at 4x4.
* **Not included:**
  * the Feynman (CNOT) and Fredkin gates, which are standard reversible gates
    that this multiplier does not use;
  * the Toffoli-only comparison multiplier;
  * the Baugh-Wooley, Wallace and Dadda multipliers, which are only mentioned
    as future work.
