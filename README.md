# Approximate 12x12 Wallace tree multiplier with 8:4 AND-OR compressors

An unsigned 12 x 12 multiplier that is faster and smaller than an exact one
because it gives up a little accuracy. It adds the partial products as a Wallace
tree does. The difference is that the first reduction layer uses cheap
compressors made only of AND and OR gates instead of full adders. Each compressor
takes eight bits of one column and returns four bits of the same column. This cuts
the tallest column of a 12 x 12 product from 12 bits to 8. The carry-save tree then
needs 4 layers instead of 5.

The price: a compressor whose eight inputs hold more than four ones reports only
four. So the product can come out low, never high. Over all 2^24 operand pairs,
88.8 % of the products are exact. The mean relative error is 0.039 %.

Everything is combinational. There is no clock and no reset. The product `p`
follows the operands `a` and `b` after the delay of the logic.

## The 8:4 compressor (`compressor_8_4`)

This cell is the idea the design rests on, and it works differently from an exact
compressor.

An exact 4:2 compressor is a pair of chained full adders. It produces a sum bit
and carry bits of higher weight, and it needs XOR gates and a carry between
neighbouring cells. The AND-OR cells drop all of that. Their outputs all keep the
**weight of the inputs**, so no carry leaves the column. They only make the column
shorter.

- **4-input AND-OR cell.** It computes W1 = p0·p1 + p2 + p3 and
  W2 = p2·p3 + p0 + p1. It is not part of this design, but the 8:4 cell extends
  it. Working through the cases shows W1 + W2 = min(popcount, 2). The cell is
  exact for up to two ones and saturates above that.
- **8-input cell (this design).** It does the same on eight inputs: four outputs
  of the input weight whose sum is min(popcount, 4). The outputs form a
  thermometer code: `w[k]` is 1 when at least k+1 inputs are 1. The cell is exact
  for up to four ones and loses `popcount − 4` units of the column weight above
  that.

Inside, the cell is an AND-OR merging network:

1. Each pair of inputs (x, y) is sorted to (x|y, x&y).
2. Two sorted pairs are merged into a 4-bit thermometer for each half of the
   input.
3. The two halves are merged into the final four outputs, with at most four
   levels of logic.

A merge of sorted sequences A and B uses
`t[k] = OR over i+j = k+1 of (A ≥ i) AND (B ≥ j)`, where `(A ≥ i)` is simply bit
i−1 of A. The cell is about 40 two-input gates and has no XOR.

Of the 256 input patterns, 163 are compressed exactly. If each input is 1 with
probability 1/4, as for partial-product bits of random operands, a group
saturates about 2.7 % of the time.

## Datapath (`wallace_mult_8_4`)

```
a,b ──► partial_product_gen ──► pp_compress_stage ──► wallace_tree ──► cpa ──► p
        12 rows x 24 bits       8 rows x 24 bits       2 rows           24 bits
```

1. **`partial_product_gen`** builds row i = `(a & {12{b[i]}}) << i`. Column c
   holds `a[c-i] & b[i]` for every row that reaches it. So column c has c+1 bits
   for c ≤ 11 and 23−c bits above that.
2. **`pp_compress_stage`** walks the columns:
   - It takes the bits of each column in row order.
   - Each complete group of eight goes into a `compressor_8_4`.
   - The leftover bits (fewer than eight) pass through unchanged.
   - It repacks each column from row 0 upwards: compressor outputs first, then
     the leftovers.

   For N = 12, only columns 7 to 15 have eight or more bits, so nine compressors
   are used. Their heights change as follows:

   | column           | 7 | 8 | 9  | 10 | 11 | 12 | 13 | 14 | 15 |
   |------------------|---|---|----|----|----|----|----|----|----|
   | bits before      | 8 | 9 | 10 | 11 | 12 | 11 | 10 | 9  | 8  |
   | bits after       | 4 | 5 | 6  | 7  | 8  | 7  | 6  | 5  | 4  |

   The output has as many rows as the tallest column after compression: 8.
3. **`wallace_tree`** reduces the rows with layers of `csa_3_2` carry-save adders.
   - Each `csa_3_2` is a row of full adders that turns three words into a sum word
     and a carry word shifted left by one.
   - Each layer groups consecutive words by three and passes the one or two
     leftovers on.
   - For 8 rows the counts go 8 → 6 → 4 → 3 → 2. That is 4 layers, against 5 for
     the uncompressed 12 rows. This matches ⌈log1.5(n/2)⌉.
   - Where a full adder has a constant-zero input, as at the ragged edges of the
     matrix, synthesis reduces it to a half adder.
4. **`cpa`** adds the last two words. It is written as `+`, so synthesis chooses
   the adder structure.

The shared constant functions are in `mult_pkg`:

- `pp_height`: the height of a column.
- `comp_count`: the number of compressors in a column.
- `cmp_height`: the height of a column after compression.
- `max_cmp_height`: the number of rows after compression.
- `csa_stages` and `csa_ops_after`: the shape of the carry-save tree.

The modules use these functions at elaboration to size their arrays and to
place their cells.

## Accuracy

The error comes only from saturated compressor groups. A group in column c that
holds k > 4 ones makes the product low by (k − 4)·2^c. The exhaustive run over all
operand pairs gives:

| configuration                          | exact products | mean error | max error | MRED     |
|----------------------------------------|----------------|------------|-----------|----------|
| every column compressed (default)      | 88.76 %        | 2088       | 261 632   | 0.0386 % |
| only columns 0–11 compressed           | 92.45 %        | 127        | 15 872    | 0.0060 % |

MRED is the mean of |error| / (a·b) over all pairs with a nonzero product.

The second row is the same design with `APPROX_COLS = 12`. It keeps the high
columns exact, which removes most of the error. But its tallest column stays at
11 bits, so the tree needs 5 layers and the speed advantage is lost. The default
compresses every column, because the point of the design is to replace the adder
layers with compressors.

Published figures for this kind of multiplier are 91.67 % accuracy for the 8:4
version and 87.55 % for a 4:2 version. Those figures were obtained with a metric
that is not specified, so they cannot be compared directly with the table above.
The same source reports, for an FPGA implementation, 50 three-input LUTs plus 3
MUXF5 and a delay of 17.127 ns. This RTL has not been mapped to that device.

## What is specified and what is chosen here

These parts come from the design as specified:

- unsigned operands
- 12-bit size
- AND-array partial products
- compressors built only from AND and OR gates, with eight inputs and four outputs
- compressors taking the place of the full and half adders
- a Wallace carry-save tree
- a final carry-propagate adder

These are choices made in this implementation. Each is easy to change:

- **Compressor function.** The 8:4 cell computes min(popcount, 4). This follows
  from doing the 4-input AND-OR cell's operation on eight inputs. Its exact gate
  netlist is this implementation's own.
- **Where compressors go.** There is a single compression layer, in every column
  (`APPROX_COLS = 2N`). Groups are taken in row order, and compressor outputs are
  packed below the leftover bits.
- **Tree grouping.** The carry-save tree groups consecutive rows.
- **No registers.** The design has no pipeline registers. Add them around the top
  if a clocked interface is needed.

The exact 4:2-compressor multiplier that this design is usually compared with is
not included.

## Files

Design sources, in `rtl/`:

| file                      | contents                                             |
|---------------------------|------------------------------------------------------|
| `mult_pkg.sv`             | constants and the constant functions for the matrix shape |
| `compressor_8_4.sv`       | the AND-OR 8:4 compressor                            |
| `partial_product_gen.sv`  | the AND array                                        |
| `pp_compress_stage.sv`    | the compression layer and the row repacking          |
| `csa_3_2.sv`              | the carry-save adder                                 |
| `wallace_tree.sv`         | the carry-save tree                                  |
| `cpa.sv`                  | the final adder                                      |
| `wallace_mult_8_4.sv`     | the top module                                       |

The top module has these parameters:

- `N`, the operand width (default 12).
- `APPROX_COLS`, the number of least significant columns that get compressors
  (default 2N).

It has these ports:

- `a`, input, `[N-1:0]`
- `b`, input, `[N-1:0]`
- `p`, output, `[2N-1:0]`

The testbenches are in `tb/`. Each one checks its module against values computed
independently, and each prints `TB_RESULT checks=… failures=…` at the end.

| testbench                 | what it checks                                                          |
|---------------------------|-------------------------------------------------------------------------|
| `tb_compressor_8_4`       | all 256 input patterns                                                  |
| `tb_partial_product_gen`  | rows and their sum, for random and corner operands                      |
| `tb_pp_compress_stage`    | every output bit, for the default, low-half-only and uncompressed configurations, with junk outside the partial-product band |
| `tb_csa_3_2`, `tb_cpa`    | arithmetic identities                                                   |
| `tb_wallace_tree`         | 3, 8 and 12 operands, plus the layer counts                             |
| `tb_wallace_mult_8_4`     | see below                                                               |
| `tb_mult_accuracy`        | all 2^24 pairs, for both configurations; prints the accuracy table above (about 15 s) |

`tb_wallace_mult_8_4` runs the top at its defaults for 100 000 operand pairs and
checks three things:

- Each product matches a counting model of the approximation.
- No product exceeds a·b.
- Each product is exact when no group saturated.

It also makes sure that saturation, fully exact products and long carry chains in
the final adder all occur.

## Simulating

With Verilator 5:

```
verilator --binary --timing -Irtl rtl/mult_pkg.sv tb/tb_wallace_mult_8_4.sv -y rtl \
          --top-module tb_wallace_mult_8_4
./obj_dir/Vtb_wallace_mult_8_4
```

To run another testbench, replace the testbench file and the top-module name.
`-y rtl` finds the design modules by file name. The package must be listed first.
