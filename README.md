# 4-tap FIR filter on an approximate 8x8 Dadda multiplier

A four-tap FIR filter spends most of its area and delay in its multipliers. This
design replaces each exact 8x8 multiplier with an **approximate Dadda multiplier**.
Its partial-product tree uses cheaper, slightly wrong adder cells: half adders, full
adders and 4-2 compressors in which some XOR gates become OR gates. The filter trades
exactness for area and delay; small products stay exact, larger ones pick up errors.

```
            x(n) ──┬──[D]── x(n-1) ──┬──[D]── x(n-2) ──┬──[D]── x(n-3)
                   │                 │                 │                 │
              b0 ─(×)           b1 ─(×)           b2 ─(×)           b3 ─(×)
                   │A0               │A1               │A2               │A3
                   └──────────────(+)┴── Add0 ──────(+)┴── Add1 ──────(+)┴──► y(n)
```

All operands are unsigned. Samples and coefficients are 8 bits wide; products and the
output are 16 bits wide.

## Files

| file | module | role |
|---|---|---|
| `rtl/fir_pkg.sv` | package | widths (`DATA_W=8`, `PROD_W=16`, `TAPS=4`, `OUT_W=16`) and types |
| `rtl/fir_filter_4tap.sv` | `fir_filter_4tap` | **top**: delay line, four multipliers, adder chain |
| `rtl/delay_reg.sv` | `delay_reg` | one D element of the delay line |
| `rtl/approx_dadda_mult.sv` | `approx_dadda_mult` | 8x8 approximate multiplier |
| `rtl/pp_gen.sv`, `rtl/pp_row.sv` | `pp_gen`, `pp_row` | AND-array partial products |
| `rtl/approx_half_adder.sv` | `approx_half_adder` | approximate half adder |
| `rtl/approx_full_adder.sv` | `approx_full_adder` | approximate full adder |
| `rtl/approx_compressor_4_2.sv` | `approx_compressor_4_2` | approximate 4-2 compressor |
| `rtl/cla_adder.sv` | `cla_adder` | exact carry-lookahead adder (multiplier's last step, filter's adders) |

Each module has a testbench `tb/tb_<module>.sv`. `tb/tb_ref_pkg.sv` holds a bit-level
reference model of the multiplier that the testbenches use.

## The approximate cells

| cell | equations | inexact cases |
|---|---|---|
| half adder | `sum = x1 \| x2`, `carry = x1 & x2` | 1 of 4 (1+1 gives 3) |
| full adder | `w = x1 \| x2`, `sum = w ^ x3`, `carry = w & x3` | 2 of 8 (110 gives 1, 111 gives 2) |
| 4-2 compressor | `w1 = x1&x2`, `w2 = x3&x4`, `sum = (x1^x2) \| (x3^x4) \| (w1&w2)`, `carry = w1 \| w2` | 5 of 16 |

The 4-2 compressor has no carry-in and no carry-out. It squeezes four bits of one
column into a sum bit of the same weight and a carry bit of the next weight. The
sum can therefore reach at most 3. The `w1&w2` term in the sum makes the input 1111
give 3 rather than 2. Every cell's error is at most 1 in its own weight.

## How the multiplier reduces its partial products

This is the hard part of the design. `approx_dadda_mult.sv` wires it cell by cell.

**1. Partial products.** `pp_gen` forms `a[i][j] = B[i] & A[j]` with weight 2^(i+j).
Column k holds every `a[i][j]` with i+j = k.

**2. Altered partial products.** For i > j, the two bits `a[i][j]` and `a[j][i]` sit
in the same column. They are replaced by `p[i][j] = a[i][j] | a[j][i]` and
`g[i][j] = a[i][j] & a[j][i]`. This step is exact, because a+b = (a|b) + (a&b). It
helps because a `g` bit is one only when all four operand bits involved are one.
That is rare, so the reduction can merge `g` bits cheaply with an OR. Diagonal bits
`a[i][i]` have no partner and stay as they are.

**3. Stage 1.** Column by column:

| column (weight) | cell | inputs | outputs |
|---|---|---|---|
| 12 | approx. half adder | a[7][5], a[5][7] | S12, C12 |
| 11 | approx. half adder | p[7][4], p[6][5] | S11, C11 |
| 10 | approx. full adder | p[7][3], p[6][4], a[5][5] | S10, C10 |
| 9 | approx. full adder | p[7][2], p[6][3], p[5][4] | S9, C9 |
| 8 | approx. 4-2 compressor | p[7][1], p[6][2], p[5][3], a[4][4] | S8, C8 |
| 7 | approx. 4-2 compressor | p[7][0], p[6][1], p[5][2], p[4][3] | S7, C7 |
| 6 | approx. 4-2 compressor | p[6][0], p[5][1], p[4][2], a[3][3] | S6, C6 |
| 5 | approx. full adder | p[5][0], p[4][1], p[3][2] | S5, C5 |
| 4 | approx. half adder | p[4][0], p[3][1] | S4, C4 |

`Sk` has weight 2^k and `Ck` has weight 2^(k+1). In each of columns 3 to 11, one OR
gate merges all the `g` bits of that column into `Gk`. Merging with an OR is an
approximation: two or more `g` bits that are one count as a single one.

**4. Stage 2.** Every column is reduced to at most two bits, `x[k]` and `y[k]`:

| column | cell | inputs |
|---|---|---|
| 0, 1 | none | x0 = a[0][0]; x1 = a[1][0], y1 = a[0][1] |
| 2 | approx. half adder | a[2][0], a[0][2] (a[1][1] goes straight to y2) |
| 3 | approx. full adder | p[3][0], p[2][1], G3 |
| 4 | approx. full adder | S4, a[2][2], G4 |
| 5 to 11 | approx. full adder | Sk, Gk, C(k-1) |
| 12 | approx. full adder | S12, C11, a[6][6] |
| 13 | approx. full adder | a[7][6], a[6][7], C12 |
| 14 | none | x14 = a[7][7] |

The carry of the cell in column k becomes `y[k+1]`.

**5. Final addition.** An exact 16-bit carry-lookahead adder adds `x + y`.

### Accuracy

Over all 65,536 operand pairs, 11,937 products (18%) are exact. Examples:

| A × B | exact | this multiplier |
|---|---|---|
| 10 × 1, 2, 3, 8 | 10, 20, 30, 80 | 10, 20, 30, 80 |
| 7 × 9 | 63 | 63 |
| 21 × 85 | 1785 | 1389 |
| 26 × 84 | 2184 | 2056 |
| 255 × 255 | 65025 | 49157 |

The errors come from three places: the OR-merged `g` bits, the approximate cells of
stage 1, and the approximate full adders of stage 2. Errors of different cells can
partly cancel, but on average they lower the product: the mean of all approximate
products is 14,832, against 16,256 for the exact ones.

## Filter timing and interface

`fir_filter_4tap` ports: `clk`, `rst`, `xn[7:0]`, `b0..b3[7:0]`, `yn[15:0]`.

* The delay line shifts on each rising edge of `clk`.
* `rst` is active high and synchronous. It clears the three delay registers.
* `yn` is **combinational**: it is the output for the sample on `xn` in the same
  cycle. There is no output register. Register `yn` outside if the multiplier and
  adder path is too long for your clock.
* The coefficients are ordinary inputs and may change at any time.
* The output is the sum modulo 2^16. Four products can add up to 18 bits
  (4 × 49157 here), and the top bits are dropped.

After reset, with `xn` held at 10 and coefficients 1, 2, 3, 8, the output steps
through 10, 30, 60, 140 on consecutive cycles as the delay line fills.

## Where the design departs from, or fills in, the design it implements

* **Meaning of p and g.** The reduction diagram names `p[i][j]` and `g[i][j]` but does
  not define them. They are read as the OR and the AND of the mirrored bit pair, the
  usual altered-partial-product scheme. This reading lines up with every column of
  the diagram.
* **Column 2 of stage 2.** The diagram draws one half-adder box around three bits.
  This design reads it as a half adder on `a[2][0]` and `a[0][2]`, with `a[1][1]`
  passed on. That is the only reading under which the output rows add up.
* **Stage-2 cells** are drawn as approximate full adders and are built that way. If
  exact full adders were used there instead, the mean error would fall by more than
  half.
* **Reference products.** The original simulation shows exact results for
  21 × 85 (1785) and 26 × 84 (2184). The approximate cells and tree do not produce
  those values: they give 1389 and 2056. This design follows the cell equations and
  the tree, not those two waveform values. The filter example (10, 30, 60, 140) is
  reproduced exactly.
* **Adders.** The source names a carry-lookahead adder and, in one place, a "square
  root" CLA and a carry-select adder with a binary-to-excess-one converter. It gives
  the structure of none of them. This design uses one plain CLA: 4-bit groups with a
  second level of lookahead between the groups.
* **Not built:**
  * an "adaptive and recursive" optimisation of the product, which is mentioned but
    never described;
  * run-time reconfigurable exact/approximate 4-2 compressors, which are also
    mentioned but never described;
  * the exact ("normal") Dadda multiplier, which is only a baseline for comparison.
* **Reset style, clock edge, output width and output timing** are read from the
  published filter waveform (the widths printed, `Rst` high at start, `Yn` changing
  with the delay line). They are not stated elsewhere.

## Size

Synthesised with yosys for 4-input-LUT Spartan-3 fabric (`synth_xilinx -family xc3s`):

* the multiplier maps to about 299 LUTs;
* the whole filter maps to about 1544 LUTs and 24 flip-flops.

This is well within an XC3S200 (3840 LUTs). The source reports 137 LUTs for its
multiplier with the vendor tool; a different flow and different logic sharing
account for the gap.

## Simulating

The testbenches are self-checking. Each prints `TB_RESULT checks=N failures=M`
and then calls `$finish`. With Verilator 5:

```sh
# the whole filter (also runs at the default sizes)
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/fir_pkg.sv tb/tb_ref_pkg.sv tb/tb_fir_filter_4tap.sv --top-module tb_fir_filter_4tap
./obj_dir/Vtb_fir_filter_4tap

# the multiplier, checked over all 65,536 operand pairs
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/fir_pkg.sv tb/tb_ref_pkg.sv tb/tb_approx_dadda_mult.sv --top-module tb_approx_dadda_mult
./obj_dir/Vtb_approx_dadda_mult
```

The other testbenches build the same way with their own file and top module. What
they cover:

* **Cells:** each cell is checked exhaustively against its truth table, including
  the number of inexact cases.
* **Adder:** `cla_adder` is checked against `+`: 16 bits at random, and 7 bits (a
  short last group) exhaustively.
* **Multiplier:** every product is compared with `tb_ref_pkg`. The test also checks
  totals worked out separately: the sum of all 65,536 products is 972,052,864, and
  11,937 of them are exact.
* **Filter:** the test replays the 10/30/60/140 example, including the partial sums
  30 and 60. It then compares 1,500 cycles of random traffic with a model and applies
  one mid-run reset. It counts resets, the last tap being reached, approximate
  products and output wrap-around, and fails if any of these never occurs.

## Changing the design

* **Widths:** the widths live in `fir_pkg`. The multiplier's tree is written out for
  8×8 operands only. Other sizes need a new reduction diagram.
* **Exact stage 2:** to trade area for accuracy, swap the stage-2 `approx_full_adder`
  instances for exact full adders. The reference function in `tb/tb_ref_pkg.sv` must
  change the same way.
* **Pipelining:** adding an output or pipeline register changes the filter's
  timing. The filter testbench samples `yn` just before each rising edge and expects
  it to belong to the current input.
