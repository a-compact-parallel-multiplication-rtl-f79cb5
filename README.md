# A 32x32 multiplier reduced by self-timed threshold-logic counters

A parallel multiplier spends most of its area and delay reducing the partial
product matrix (32 rows of 32 bits for a 32x32 multiply) to two rows. This
design does that reduction with large parallel counters: (15,4) and (7,3)
counters. Each is built as a network of threshold gates only two gates deep.
With those counters the 32-row matrix shrinks to 10 rows, then 4, then 2, in
three stages:

```
a, b ──► AND array ──► Stage I ──► Stage II ──► Stage III ──► row_s, row_c
         32 x 32       (15,4),(7,3)  (15,4),(7,3)  60 x (4:2)     row_s + row_c = a*b
                       full adders   full adders   compressors
         height 32     → 10          → 4           → 2
```

The threshold gates are *self-timed*. There is no clock. Each gate
precharges, then evaluates, and it tells the next stage when its result is
ready. The RTL models these gates at the logic level. It keeps their
precharge/evaluate phases and their enable handshake, but has no analog
behaviour and no delays.

The whole structure uses 85 (15,4) counters, 46 (7,3) counters, 17 full
adders and 60 (4:2) compressors. That is 1354 equivalent threshold gates if
a (15,4) counter counts as 10 gates, a (7,3) as 5, a full adder as 2 and a
compressor as 4. Each counter stage is two threshold gates deep. The
compressor stage costs less than two threshold-gate delays. So the whole
reduction takes less than six threshold-gate delays. The final
carry-propagate adder (CPA) that would add the two rows is not part of the
design.

## Threshold gates and the STTL gate (`sttl_gate`)

A threshold gate outputs 1 when the weighted sum of its binary inputs
reaches its threshold T: `y = [Σ w_i x_i ≥ T]`. In the circuit, the sum is a
voltage φ on a floating gate, formed through input capacitors sized to the
weights. A differential sense amplifier compares φ with a threshold voltage
T. In the model both are unsigned integers in units of the unit weight:
`i1` is φ and `i2` is T, and both are `W` = 5 bits wide.

The gate has a dual-rail enable, `e`/`eb`:

| phase     | e | eb | q, qb                  | e_next, eb_next |
|-----------|---|----|------------------------|-----------------|
| precharge | 1 | 0  | 1, 1                   | 1, 0            |
| evaluate  | 0 | 1  | `i1>=i2`, `!(i1>=i2)`  | 0, 1            |

`eb_next` is NAND(q, qb) and `e_next` is its inverse. A gate fed by
`e_next`/`eb_next` therefore stays in precharge until this gate has
decided. An assertion flags an enable pair that is not complementary.

The circuit latches its decision in a cross-coupled transistor pair. The
model does not: it is combinational, and it relies on its inputs staying
steady while it evaluates. The enable chain guarantees this inside the
counters.

## The counters (`counter_7_3`, `counter_15_4`)

An (m,n) counter outputs, as an n-bit binary number, how many of its m
inputs are 1. Here `v` is that count. The design builds `v` once per
counter, just as the circuit has one shared capacitive network. Every gate
of the counter compares `v` with its own threshold. `k+` denotes "the gate
with threshold k has fired".

* **First layer.** The gates have thresholds 2, 4, 6 in the (7,3) counter
  and 2, 4, ..., 14 in the (15,4) counter. The MSB comes straight from this
  layer: `y2 = 4+` and `y3 = 8+` respectively.
* **Second layer.** These gates compute the lower bits. Each one subtracts
  weighted first-layer outputs, which cuts out the ranges of `v` where its
  bit is 0:

```
(7,3):  y1 = [v - 2 - 4·4+ ≥ 0]
        y0 = [v - 1 - 2·(2+ + 4+ + 6+) ≥ 0]
(15,4): y2 = [v - 4 - 8·8+ ≥ 0]
        y1 = [v - 2 - 4·(4+ + 8+ + 12+) ≥ 0]
        y0 = [v - 1 - 2·(2+ + 4+ + ... + 14+) ≥ 0]
```

The negative weights are added to the second-layer gate's threshold input.
The circuit does the same thing, with capacitors on the threshold side.

Timing inside a counter:

* All second-layer gates take their enable from one first-layer gate. This
  design uses 4+ in the (7,3) counter and 8+ in the (15,4) counter.
* The counter reports completion on `e_out`/`eb_out` once all its
  second-layer gates have evaluated.
* During precharge, every counter output reads 1.

Every (15,4) counter is built complete, even when a column leaves some of
its inputs at 0. For example, 12+ and 14+ can never fire in a column of 10
bits, but those gates are still built.

## How the matrix is reduced (`mult_pkg`, `reduce_layer`, `stage1_reduce`, `stage3_compress`)

This is the least obvious part of the design. The matrix is handled column
by column, and the number of bits in each column (its height) is known when
the design is elaborated. `mult_pkg` computes all of the wiring from those
heights with constant functions. Each matrix is identified by a profile
number:

* `0`, `1`: the two 15-row groups of Stage I
* `PROF_REM`: the 2 rows that Stage I passes through unchanged
* `PROF_STAGE2`, `PROF_STAGE3`: the matrices entering Stages II and III

`col_height(p, c)` returns the height of column `c` in profile `p`.

**One counter layer** (`reduce_layer`) gives every column exactly one cell,
chosen by the column's height:

| column height | cell           | outputs |
|---------------|----------------|---------|
| 8..15         | (15,4) counter | 4       |
| 4..7          | (7,3) counter  | 3       |
| 2..3          | full adder     | 2       |
| 1             | wire           | 1       |

* Unused counter inputs are tied to 0.
* Output bit k of the cell in column c has weight 2^(c+k), so it goes to
  column c+k.
* Each column holds only one cell, so column c receives at most one bit from
  each of the columns c, c-1, c-2 and c-3. No output column is taller than
  4 bits, whatever the input.
* Bits are stacked in the destination column in order of increasing k.
* Bits that would land at weight 2^64 or above are dropped. They are always
  0 for a 64-bit product.

**Stage I** (`stage1_reduce`):

* Rows 0–14 and rows 15–29 are each reduced by one layer, to at most 4 bits
  per column.
* Rows 30–31 are carried through unchanged.
* The three parts are stacked into the Stage II matrix, which is at most
  4 + 4 + 2 = 10 bits high. Within a column, group 0 comes first, then
  group 1, then the carried rows.

**Stage II** is one more `reduce_layer` over that matrix. Its output is at
most 4 bits high.

**Stage III** (`stage3_compress`) places a static (4:2) compressor in every
column that holds 2 or more bits. In the 32x32 design these are columns
3..62.

* Each compressor's `cout` is the `cin` of the compressor in the next
  column. `cout` does not depend on `cin`, so the chain does not ripple.
* Sums go to `row_s[c]`, carries to `row_c[c+1]`.
* Column 63 receives column 62's `cout` in `row_s` and its carry in
  `row_c`.

The compressor (`compressor_4_2`) forms `x1^x2` and `x1^x2^x3^x4`. It
selects `cout` and `carry` with two multiplexers, and its longest path is
three XORs.

Applied to the 32x32 matrix, these rules give exactly 85 / 46 / 17 / 60
cells. That matches the published breakdown, but it is this design's
reconstruction. The per-column placement of the counters was never given,
only the shape of each stage and the totals. Column heights are
1,1,2,…,10,…,2,1,0 entering Stage II and at most 4 entering Stage III.
`row_c[3:0]` are always 0, so synthesis reports them as constant outputs.

## Self-timed operation of the whole multiplier (`mult32_sttl`)

1. Hold `e=1, eb=0`. All STTL gates precharge, and `eb_done=0`.
2. Apply `a` and `b`.
3. Set `e=0, eb=1`. Stage I evaluates.
4. When every counter in Stage I has evaluated, Stage II is enabled.
5. `eb_done=1` (and `e_done=0`) once every counter in Stage II has
   evaluated. `row_s` and `row_c` hold the result until the next precharge.

Step 4's rule, which waits for all of a stage's counters, is this design's
choice. The full adders, wires and compressors are static logic and take no
part in the handshake. In this zero-delay model every step settles
immediately. The order of enables is preserved, but no delay is modelled.

## Where this departs from the source design, or goes beyond it

* The transistor-level circuit is not modelled. That covers the sense
  amplifier, the current mirrors, the capacitive input network and its
  capacitor sizes. Only the logical weights and thresholds are kept.
* The following are this design's own choices, because the source leaves
  them open:
  * the integer width of the threshold model;
  * which first-layer gate enables a counter's second layer;
  * how completion is formed for a counter and for a stage;
  * the top-level ports;
  * how bits are ordered within a column;
  * the column-by-height cell rule.
* The full adder and the (4:2) compressor circuits are standard ones. Only
  their function (and the compressor's three-XOR delay) is specified by the
  source.
* No carry-propagate adder is included. Add `row_s + row_c` outside the
  block.
* Operands are unsigned.

## Files

`rtl/`, leaf first:

* `mult_pkg.sv`: sizes, cell types, the constant functions that describe
  the height profiles
* `sttl_gate.sv`
* `counter_7_3.sv`, `counter_15_4.sv`
* `full_adder.sv`, `compressor_4_2.sv`
* `ppm_and_array.sv`
* `reduce_layer.sv`, `stage1_reduce.sv`, `stage3_compress.sv`
* `mult32_sttl.sv`: the top

The operand width `MULT_N` and the group size `GROUP_ROWS` are package
constants. Other sizes can be elaborated, but the checks against the
published figures are for 32 and 15.

`tb/` has one self-checking testbench per module, `tb_<module>.sv`. Each
prints `TB_RESULT checks=N failures=M`.

* The gate and counter tests are exhaustive (all 32768 inputs for the
  (15,4) counter). They check the precharge outputs, the evaluated count
  and completion.
* The layer and stage tests fill the matrix with random bits. They check
  that weighted sums are preserved and that column heights stay within
  limits.
* `tb_mult32_sttl` runs the full-size multiplier through about 20,000
  precharge/evaluate operations. It uses corner cases and random operands,
  and compares `row_s + row_c` with `a*b`. It also checks the cell counts
  (85/46/17/60, 1354) and the stage heights (10, 4).

Running a test with Verilator:

```
verilator --binary --timing --assert -j 4 -y rtl -y tb rtl/mult_pkg.sv \
    tb/tb_mult32_sttl.sv --top-module tb_mult32_sttl -Mdir obj -o sim
./obj/sim
```

The full-size testbench takes about 30 s to build and under a second to run.

Keep constant-function calls in `localparam`s, never directly inside an
index expression. Verilator otherwise turns them into run-time code, and the
generated model becomes about 25 times larger.
