# Comparison-free sorter: sorting by transposing a one-hot matrix

This is a hardware sorter that never compares two elements. Each incoming
unsigned element is turned into a one-hot code: a bit vector with a single
`1` at the position given by the element's value. The code is stored as one
row of a bit matrix **E**. Once all elements are in, the matrix is read the
other way, one column at a time, from value 0 upwards. Column `v` of E has a
`1` in every row whose element equals `v`. So the columns, read in order,
give the elements in ascending order, and the number of `1`s in a column is
the number of copies of that value.

Reading column `v` of E is reading row `v` of the transpose Eᵀ. The value is
recovered as the product Eᵀ × B, where B is a buffer holding the elements in
arrival order. In hardware this product is an AND/OR: each register of B is
ANDed with its bit of the column, and the results are ORed together. The
design needs no comparators and no swap network. It has no feedback between
elements, and the run time is linear in the number of elements.

With the default parameters the sorter takes data sets of **N = 1024 elements
of 10 bits** and sorts each one in **2N to 3N−1 clock cycles**.

## How one sort runs

A sort has two stages. The sorter goes back and forth between them.

**Write stage (N cycles).** One element is accepted per clock on a
valid/ready input. For element number `i` (0 to N−1):

- `bin2ham` converts the value `v` into a K-bit one-hot code (K = 2^DW),
  with bit `v` set.
- `wr_addr_decoder` holds the row counter `i`. Its one-hot decoder enables
  row `i` of the Hamming matrix (`hamming_memory`), which stores the code.
- The binary value is shifted into buffer B (`shift_buffer`). After N shifts,
  register `B[i]` holds element `i`, next to matrix row `i`.

The element written into row N−1 ends the stage.

**Read stage (N + number of absent values cycles).** A column counter in
`sort_control` walks the columns `v = 0 … K−1`. On each cycle:

- `hamming_memory` returns column `v` as an N-bit vector.
- `one_detector` counts its `1`s. This count `c` is the number of copies of `v`.
- `transpose_and` forms `OR_i (B[i] AND col[i])`. Every selected register
  holds `v`, so the result is `v`.
- `sort_control` then acts on the count:
  - If `c = 0`, the column is passed over in one cycle and nothing is emitted.
  - If `c ≥ 1`, the value is emitted on `c` consecutive cycles. A decrementer
    counts the copies still to emit while the column counter waits.

Each emitted value is shifted into the sorted buffer S (a second
`shift_buffer`) and also appears on the `out_valid`/`out_data` stream. After
the last column, `sorted_valid` rises. `S[0] … S[N−1]` then holds the data
set in ascending order, and the sorter is ready for the next set.

### Worked example

Sort the four elements {3, 1, 2, 4}, with N = 4 elements and 4-bit values,
so K = 16 columns (`tb_cfree_sorter_fig1` runs exactly this):

| row i | B[i] | E row i (columns 15…0) |
|-------|------|------------------------|
| 0     | 3    | `0000000000001000`     |
| 1     | 1    | `0000000000000010`     |
| 2     | 2    | `0000000000000100`     |
| 3     | 4    | `0000000000010000`     |

- Column 0 is empty.
- Column 1 selects row 1, so B[1] = 1 is emitted.
- Columns 2, 3 and 4 select rows 2, 0 and 3 in turn.
- Columns 5 to 15 are empty.

S ends up as {1, 2, 3, 4}. The sort takes 4 write cycles and 16 read cycles,
20 in all. With {3, 3, 1, 4}, column 3 holds two `1`s and takes two cycles;
S = {1, 3, 3, 4} after 21 cycles.

## Why duplicates and the AND/OR product work

Two different values have one-hot codes with no `1` in common, so the matrix
rows of unequal elements never share a column. All elements in one column are
therefore equal. That has two consequences:

- OR-ing the selected B registers gives exactly the value. An AND/OR tree is
  enough; no adder or selection logic is needed.
- The column's population count is the number of times the value must be
  repeated. Rows are never told apart, so the relative order of equal
  elements is lost. That does not matter for plain integers, which are
  indistinguishable anyway.

The value written into S is also always equal to the column counter.
`cfree_sorter` asserts this (`a_value_is_column`). In effect, the B buffer
and the AND/OR product are the method's way of *reading* the value. The
counter alone would give the same number.

## Timing

| quantity | cycles |
|----------|--------|
| write stage | N (one element per clock; idle input cycles add to it) |
| read stage | K − d + N, where d is the number of distinct values |
| whole sort, N = K | 2N (all values distinct) to 3N − 1 (all values equal) |
| default, N = K = 1024 | 2048 to 3071 |

While the read stage runs (`busy`), `in_ready` is low. An element offered
then is held off until the read stage ends. The first element of the next set
can be accepted on the clock right after the last read cycle.

All stages are single-cycle with no pipelining. The read path runs in one
clock, through the column multiplexer (N × K), the N-input population count,
the N-input AND/OR, and into the control and S registers. At N = 1024 this is
a long combinational path. Nothing here has been timed against a clock target.

## Interface of `cfree_sorter`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | clock, rising edge |
| `rst_n` | in | 1 | asynchronous reset, active low; puts the sorter in the write stage at row 0 |
| `in_valid`, `in_data` | in | 1, DW | element offered |
| `in_ready` | out | 1 | element accepted on this clock if `in_valid` (write stage only) |
| `out_valid`, `out_data` | out | 1, DW | sorted stream, ascending; gaps where a value is absent |
| `busy` | out | 1 | read stage in progress |
| `sorted_valid` | out | 1 | `sorted` holds a complete result; cleared when the next read stage starts |
| `sorted` | out | DW × N | sorted buffer S, `sorted[0]` smallest |

A data set is always exactly N elements. There is no "last" input; the N-th
element starts the read stage.

## Parameters and size

| parameter | default | meaning |
|-----------|---------|---------|
| `DW` | 10 | element width; K = 2^DW matrix columns, one per value |
| `N` | 2^DW = 1024 | elements per data set = matrix rows = depth of B and S |

Storage is N × K matrix bits plus 2 × N × DW buffer bits. At the defaults
that is 1,048,576 flip-flops for the matrix and 20,480 for B and S. The matrix
grows with the product of the set size and the value range. Sorting wider
values, or larger sets with N = 2^DW, grows it quadratically.

## Module map

```
cfree_sorter                top
├── bin2ham                 value -> thermometer and one-hot code
├── wr_addr_decoder         row counter + one-hot row enable
├── hamming_memory          N x K bit matrix E, row write, column read
├── shift_buffer  (u_bbuf)  buffer B, elements in arrival order
├── one_detector            copies in the current column
├── transpose_and           AND/OR product of the column with B
├── sort_control            write/read sequencing, column counter, decrementer
└── shift_buffer  (u_sbuf)  sorted buffer S
sort_pkg                    state type of sort_control
```

## Where this design makes its own choices

The following choices belong to this implementation, not to the method:

- **Value → column mapping.** Value `v` sets bit `v`, with a thermometer code
  of `v+1` ones. This keeps the value 0, so every DW-bit value has a column.
  Mapping `v` to bit `v−1` would lose 0.
- **Registers, not SRAM.** The matrix is a register array, so a whole column
  can be read in one cycle. A conventional memory reads rows, not columns.
- **Thermometer code unused.** The converter also produces the thermometer
  code, but only the one-hot code is stored; the thermometer output has no
  load in the top.
- **N separate from DW.** The default is N = 2^DW, with one row per possible
  value. N can be set on its own, as in the 4-element example.
- **Handshake and skipping.** The valid/ready handshake, the output stream,
  one cycle per empty column, the reset style and the return to the write
  stage after each sort are all implementation choices.

## Verification

Each module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=<n> failures=<n>`, and each has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_bin2ham` | all 16 values at DW = 4 against 2^(v+1)−1 and 2^v |
| `tb_wr_addr_decoder` | random strobes, N = 6: address, one-hot enables, last-row flag, return to row 0 |
| `tb_hamming_memory` | random rows in a 6 × 8 matrix; every column read against a model |
| `tb_shift_buffer` | random shifts against a queue model |
| `tb_one_detector` | random and edge-case columns against `$countones` |
| `tb_transpose_and` | sorter-like columns (one value) and arbitrary columns (OR of selected) |
| `tb_sort_control` | control alone with modelled counts: emit order, read-stage length, handshake |
| `tb_cfree_sorter` | 24 data sets at DW = 4 (see below) |
| `tb_cfree_sorter_fig1` | the {3,1,2,4} example at DW = 4, N = 4, with its 20-cycle timing |
| `tb_cfree_sorter_full` | four data sets at the default size, N = 1024, no parameter override |

The data sets in `tb_cfree_sorter` cover:

- random values, permutations, all-equal sets and narrow-range sets;
- idle input cycles;
- sets offered while the previous one is still being read.

For every set, `tb_cfree_sorter` and `tb_cfree_sorter_full` compare the output
stream and the S buffer with a reference sort. They also check the exact cycle
count, 2N + idle input cycles + absent values. Each testbench counts, and
requires at least once:

- a repeated duplicate;
- a skipped empty column;
- an idle input cycle;
- an element held off by `in_ready`;
- a sort in exactly 2N cycles;
- a sort in exactly 3N−1 cycles.

The full-size test simulates in well under a second.

Concurrent assertions check:

- at most one matrix row is written per clock;
- the one detector's flag agrees with its count;
- an emitted value equals the column being read.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/sort_pkg.sv tb/tb_cfree_sorter.sv \
          --top-module tb_cfree_sorter -o sim
./obj_dir/sim
```

For a lint-only check of any module:
`verilator --lint-only -Wall -Irtl rtl/sort_pkg.sv rtl/<module>.sv`.

The remaining lint warnings are deliberate:

- Unused outputs in the top: the thermometer code, the write address and the
  `dout` taps of the two buffers.
- The reset net feeds both the flip-flops' asynchronous reset and the
  `disable iff` of the assertions.

## Limits

- Sets must have exactly N elements. A shorter set would need a way to end
  the write stage early and to ignore the rows left from the previous set.
- The default matrix is a million flip-flops. It simulates quickly, but
  synthesis of that size is slow. The one-hot matrix and the N-input reduction
  trees are the cost of avoiding comparisons.
- Sets larger than 1024, or values wider than 10 bits, need a larger DW
  and/or N, and storage grows as N × 2^DW.
