# Approximate 8x8 Dadda multiplier with NAND/NOR 4:2 compressors

This design multiplies two 8-bit unsigned numbers. It trades exactness for a
smaller, shallower partial-product tree. The partial-product columns are
reduced by approximate 4:2 compressors. Each compressor turns four bits into
two (a sum and a carry) and keeps no carry-out chain. So each compressor is
one gate level of XOR plus a multiplexer, not two full adders in series. The
two rows that are left are added by a Ladner-Fischer parallel-prefix adder.
The result is a combinational multiplier whose product is close to `a*b`, but
is not always equal to it.

```
 a[7:0] ─┐   ┌────────┐ 64 bits ┌────────────┐ row_s[15:0] ┌──────────┐
         ├──►│ pp_gen │────────►│ dadda_tree │────────────►│ lf_adder │──► y[15:0]
 b[7:0] ─┘   └────────┘         │ stage 1, 2 │ row_c[15:0] │ (16 bit) │
                                └────────────┘────────────►└──────────┘
```

No clock, no reset: `y` is valid one combinational delay after `a` and `b`
change.

## The approximate compressor

This is the part that sets the multiplier's accuracy, and it is the least
obvious. An exact 4:2 compressor has five inputs (four bits plus a carry-in)
and three outputs. This one has four inputs and two outputs, so it cannot
count to 4. It computes

```
carry = a1 | a2
sum   = (a1 ^ a2) ? (a3 & a4) : (a3 | a4)
```

and `2*carry + sum` stands for the number of ones at the inputs. The carry
depends only on `a1` and `a2`, so the pins are not interchangeable. Four of
the 16 input patterns (written `a1 a2 a3 a4`) come out wrong:

| pattern       | ones | 2*carry + sum | error |
|---------------|------|---------------|-------|
| `0100`, `1000`| 1    | 2             | +1    |
| `0011`, `1111`| 2, 4 | 1, 3          | −1    |

The gates are built to save transistors (`dsc_cell`):
- the carry is a NOR;
- the two multiplexer data inputs are a NAND and a NOR of `a3`, `a4`;
- the multiplexer select is `a1 XOR a2`.

NAND and NOR are cheaper in CMOS than AND and OR, but the cell then returns
both outputs inverted. In a two-stage cascade a complementary second stage
absorbs the inversion. `approx_compressor` models that stage as an inverter
on each output, so its function is the true-polarity one above. Synthesis
merges those inverters into the logic that follows.

Design choices to know about:
- The multiplexer's data order is not fixed by the cell's gate list. The
  order used here is the one with the fewest wrong patterns: the other order
  gets 12 of 16 wrong.
- A compressor that was wrong only for `1111` would need a carry that also
  depends on `a3` and `a4`. This gate structure cannot do that.

## The reduction tree (`dadda_tree`)

Columns are numbered by weight, 0 to 15. Partial product `pp[j][i] = b[j] & a[i]`
lies in column `i+j`.

**Stage 1** splits the eight partial-product rows into two groups of four:
- rows 0–3 occupy columns 0–10;
- rows 4–7 occupy columns 4–14.

Each group is reduced on its own, cell by cell, counting columns from the
group's lowest one:

| local column | 0 | 1 | 2 | 3–7 | 8 | 9 | 10 |
|---|---|---|---|---|---|---|---|
| height       | 1 | 2 | 3 | 4   | 3 | 2 | 1  |
| cell         | pass | HA | FA | compressor | FA | HA | pass |

Compressor pins `a1..a4` take rows `4g..4g+3` in order.

**Stage 2** receives these column heights:

| column | 0 | 1 | 2 | 3 | 4 | 5 | 6–10 | 11–14 |
|---|---|---|---|---|---|---|---|---|
| height | 1 | 1 | 2 | 2 | 3 | 3 | 4 | 2 |
| cell   | pass | pass | HA | HA | FA | FA | compressor | HA |

Compressor pins are: group-0 sum, group-0 carry, group-1 sum, group-1 carry.

Every cell leaves its sum in its own column and its carry in the next one.
No carry moves sideways within a stage. The result is two rows:
- `row_s` holds the sums and passed bits;
- `row_c` holds the carries, already shifted up one column.

Columns 3–14 hold two bits each; columns 0–2 and 15 hold one.

The fifteen compressors are the only inexact cells: 10 in stage 1 and 5 in
stage 2 (the full adders and half adders are exact).

## The final adder (`lf_adder`)

This is a Ladner-Fischer prefix adder with no carry-in, generic in `WIDTH`
(default 8; the multiplier uses 16). It has three stages:
1. **Pre-processing:** `p = a ^ b`, `g = a & b`.
2. **Carry generation:** `log2(WIDTH)` levels of prefix cells over the odd
   bit positions. At level `l`, each odd position `i` with bit `l` set merges
   with the group ending just below its aligned block, at
   `j = (i with low l bits cleared) − 1`. A black cell computes
   `G = Gi | Pi&Gj, P = Pi&Pj`. A gray cell, used when the group reaches
   bit 0, needs only `G`.
   - At 8 bits this forms 1:0, 3:2, 5:4, 7:6, then 3:0, 7:4, then 5:0, 7:0.
   - One further gray level fills in the even positions:
     `G[i:0] = g[i] | p[i] & G[i−1:0]`.
3. **Post-processing:** `s[i] = p[i] ^ G[i−1:0]`, `s[0] = p[0]`.

The carry-out is an output of `lf_adder`. The multiplier drops it. Over all
operand pairs the two rows never add up to 2^16 or more. An assertion in
`dadda_mult_8x8` checks this during simulation.

## Half and full adders from reversible gates

The exact cells of the tree are built from reversible logic gates, used here
as ordinary combinational cells:
- `half_adder` is one Peres gate `(A, B, C) → (A, A^B, AB^C)` with `C = 0`.
- `full_adder` uses three Feynman gates `(A, B) → (A, A^B)` and one Fredkin
  (controlled-swap) gate.
  - The Feynman gates form `p = in1 ^ in2` and `sum = p ^ cin`.
  - The Fredkin gate, controlled by `p`, selects `cin` or `in1` as the carry.

Outputs that a reversible circuit needs but the adder does not use ("garbage
outputs") are left unconnected. Lint therefore reports them as unused
signals. Quantum cost and the other reversible-logic metrics are not modelled.

## Accuracy

The multiplier testbench measures these figures exhaustively over all 65,536
operand pairs:

| metric | value |
|---|---|
| exact products | 3,229 (error rate 95.1 %) |
| mean error distance | 1279 |
| mean relative error distance (nonzero products) | 22.4 % |
| largest error | 5952 |
| compressor events, reading one too high | 198,864 |
| compressor events, reading one too low | 46,992 |

Two features cause most of this error:
- `0100` and `1000` are among the most frequent compressor input patterns,
  and both read high.
- The compressors sit in high-weight columns too (up to column 11).

The error is therefore large compared with approximate multipliers that keep
the upper columns exact. Use this design only where that error is acceptable.

## How far to trust it, and where it departs from the source description

- **Tree structure.** The cell in every column of both stages follows the
  published dot diagram. Which bit goes to which compressor pin is this
  design's choice, and it changes the error statistics, because the
  compressor is asymmetric.
- **Compressor function.** The gate structure is given. The multiplexer
  order and the "inversion absorbed by the second stage" reading are this
  design's own. The source also states that the compressor errs only on
  `1111`. This gate structure cannot do that, so the structure was followed.
- **Unsigned operands.** The source's title material mentions Baugh-Wooley
  (signed) multiplication, but its dot diagram is a plain unsigned array. The
  design follows the diagram and is unsigned.
- **Approximation everywhere.** All compressor positions are approximate. The
  source also mentions approximating only the low 9 of 16 product bits. That
  remark is about array multipliers in a MAC unit and is not applied here.
- **MAC unit not built.** The source names a multiply-accumulate unit
  (multiplier, adder, accumulator, controller) without describing it. It is
  not built.
- **Full adder wiring.** The full adder's gate list is given. Which gate
  output is the sum and which is the carry was chosen here so that the sum and
  carry equations hold.
- **Even prefix level.** The final gray level for even bit positions in
  `lf_adder` is implied by the adder's output labels, not drawn as cells.
- **Verification.** All 65,536 operand pairs are checked against an
  independent bit-count model of the same dot diagram (`tb/tb_dadda_ref_pkg.sv`).
  Every product must also equal `a*b` whenever no compressor errs, and stay
  within the summed weights of the erring compressors otherwise. Every
  sub-block is checked exhaustively, or with random vectors for the 16-bit
  adder.

## Files

| file | contents |
|---|---|
| `rtl/dadda_pkg.sv` | operand/product widths and types |
| `rtl/dadda_mult_8x8.sv` | top: `a`, `b` → `y` |
| `rtl/pp_gen.sv` | partial-product AND array |
| `rtl/dadda_tree.sv` | two-stage reduction |
| `rtl/approx_compressor.sv`, `rtl/dsc_cell.sv` | approximate 4:2 compressor and its NAND/NOR cell |
| `rtl/half_adder.sv`, `rtl/full_adder.sv` | exact cells |
| `rtl/peres_gate.sv`, `rtl/feynman_gate.sv`, `rtl/fredkin_gate.sv` | reversible gates |
| `rtl/lf_adder.sv` | Ladner-Fischer adder |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_dadda_ref_pkg.sv` | reference model of the approximate product |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. To run the end-to-end test (all 65,536 pairs, well under a
second):

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb \
  rtl/dadda_pkg.sv tb/tb_dadda_ref_pkg.sv tb/tb_dadda_mult_8x8.sv \
  --top-module tb_dadda_mult_8x8 -o sim
./obj_dir/sim
```

Other testbenches build the same way: replace the testbench file and the
top-module name. Always list `rtl/dadda_pkg.sv` first. Add
`tb/tb_dadda_ref_pkg.sv` when the testbench imports the reference model.
