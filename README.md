# Pipelined linear-algebra engines: dot product, matrix-vector, matrix-matrix

Dot products and matrix products take most of the run time in many compute-heavy
applications. A fully combinational multiply-and-sum gets too deep to be practical as
vectors and word widths grow. This design pipelines each of the three kernels instead.
Every kernel is built from one small repeated *pipeline*:

| engine | its pipeline | how many | work per operation |
|---|---|---|---|
| dot product (`dot_product`) | two multipliers and an adder | N/2 for N-element vectors | 1 iteration, then an adder tree |
| matrix-vector (`matvec_unit`) | one multiply-accumulate (MAC) unit | ideally one per output row | COLS iterations per pass |
| matrix-matrix (`matmat_unit`) | one MAC unit | D x D | D iterations per D x D block product |

The execution time then follows from three things: the number of pipelines, the
iterations each one needs, and how fast operands arrive. The RTL makes those
counts exact and states them per engine below.

The organisation follows the paper "Performance Modeling of Pipelined Linear Algebra
Architectures on ASIC" (S. Sharma, V. Jambhale, A. Shinde, S. Sivanantham). That
paper names the structures but gives few implementation details. Register
placement, handshakes, control and operand storage are choices made here. They are
listed under [Departures and choices](#departures-and-choices).

All three engines sit side by side in `linalg_top`. They share only `clk` and `rst`.
Each engine's ports are brought out with a prefix: `dp_`, `mv_` or `mm_`.

## Number format and widths

- All operands are unsigned integers.
- All results are exact: nothing is truncated and nothing overflows.
- `linalg_pkg` holds the width rule that every engine uses. A sum of T products of
  two DW-bit numbers needs `2*DW + clog2(T)` bits.
- Reset `rst` is active high and synchronous. It clears valid bits, counters and
  accumulators. Data registers behind a valid bit are not reset.

## Dot product (`dot_product`, `dp_pipeline`, `adder_tree`)

A vector pair `a`, `b` of N elements is accepted in one cycle, and a new pair may
follow every cycle.

Pipeline k (`dp_pipeline`) computes `a[2k]*b[2k] + a[2k+1]*b[2k+1]`. It has two
register stages: the two products, then their sum. The N/2 pipeline results are
summed by `adder_tree`, a balanced binary tree with one register per level. The tree
widens by one bit per level. When the leaf count is not a power of two, the missing
leaves are padded with zeros.

| output | latency after `in_valid` | N = 8 |
|---|---|---|
| `pair_y[k]`, `pair_valid` (each pipeline's result) | 2 cycles | 2 |
| `y`, `out_valid` (the dot product) | 2 + clog2(N/2) cycles | 4 |

The latency grows with the number of pipelines because every doubling of N adds a
tree level. Throughput stays at one dot product per cycle.

Defaults: `N = 8`, `DW = 1`. These are the paper's example: eight one-bit elements
per vector, on four pipelines. Set `DW` higher for multi-bit elements. The
testbenches also run `DW = 6` and `DW = 8`, and `N = 6`.

## Matrix-vector product (`matvec_unit`, `mac_unit`, `vector_store`)

This engine computes y = A·x, where A is ROWS x COLS. It has PIPES MAC pipelines.

Each matrix element is used only once, but each vector element is used by every
row. The vector is therefore written once into a local `vector_store`, and every
pipeline reads that same store.

The matrix arrives as a stream. Each beat carries one column j of PIPES consecutive
rows: lane p carries `A[g*PIPES + p][j]`. For that beat the engine reads `x[j]` once
and broadcasts it to all pipelines. `x[j]` therefore stays in use until every
multiplication that needs it is done. The engine then moves on to `x[j+1]`.

Each `mac_unit` is a multiplier feeding an adder. The adder's other input is the
stored running sum. `clr` restarts the sum at the current product, on beat j = 0.
After COLS beats each pipeline holds one element of y.

**Passes.** When PIPES < ROWS, the rows are processed in `GROUPS = ceil(ROWS/PIPES)`
passes, and each pipeline computes several elements of y.

- In the last pass, lanes beyond row ROWS-1 carry don't-care data. The tests send
  zeros. Those lanes are marked invalid in `y_mask`.
- The best case is PIPES = ROWS: one pass.

**Protocol**

1. Write x with `x_we`/`x_addr`/`x_wdata`. An assertion forbids writing while
   `busy`.
2. Pulse `start`. `busy` rises and `a_ready` follows `busy`.
3. Stream GROUPS*COLS beats with `a_valid`. Gaps are allowed.
4. One cycle after the last beat of each pass, `y_valid` pulses with `y_group`,
   `y_mask` and the PIPES results `y`.
5. `done` pulses with the final `y_valid`.

**Time.** One beat per cycle, so a product takes `GROUPS * COLS` cycles plus any
gaps in the stream.

Defaults: `ROWS = COLS = PIPES = 8`, `DW = 5`. These match the paper's example of
eight 5-bit matrix and vector values. The 8 x 8 shape is a reading of that example.

## Matrix-matrix product (`matmat_unit`, `mac_array`)

This engine computes C = A·B, where A is M x N and B is N x P. It works in square
basic blocks of D x D on a `mac_array` of D x D MAC units.

In one iteration the array receives:

- column k of a D-row slice of A (`a_col`);
- row k of a D-column slice of B (`b_row`).

MAC (i, j) adds `a_col[i] * b_row[j]`. Every element of the column meets every
element of the row, an outer product. After D iterations the array holds the
product of two D x D blocks.

For a larger matrix, output block (bi, bj) needs N iterations. These are N/D
basic-block products, which the MACs accumulate without clearing. When
M = N = P = D, this reduces to the plain scheme: N² MACs, N iterations.

A and B are held in local operand buffers. Load them element by element with
`a_we`/`a_r`/`a_c`/`a_wdata` and `b_we`/`b_r`/`b_c`/`b_wdata`, then pulse `start`.

The sequencer visits the output blocks row by row, with bj changing fastest. A
finished block is copied into the result array `c` in the cycle after its last
iteration. Meanwhile the array already begins the next block (its `clr` iteration),
so blocks follow without gaps. `blk_valid` pulses when a block first shows on `c`.
`done` pulses with the last block.

**Time.** `busy` lasts exactly `(M/D) * (P/D) * N` cycles. M and P must be multiples
of D; elaboration stops with an error otherwise.

Defaults: `M = N = P = D = 2`, `DW = 8`. These are the paper's example. With
A = [1 2; 3 4] and B = [5 6; 7 8], `c` = [0x13 0x16; 0x2b 0x32] after 2 cycles of
`busy`. `tb_matmat_unit` and `tb_linalg_top_full` both check this case.

## Top level (`linalg_top`)

`linalg_top` instantiates the three engines, with parameters prefixed `DP_`, `MV_`
and `MM_`. Their defaults are the sizes given above. The ports are plain signals and
unpacked arrays.

With those defaults, synthesis gives roughly 290 word-level cells, 290 flip-flop
bits and 117 bits of memory arrays.

## Departures and choices

Taken from the paper:

- the two-multiplier/one-adder dot-product pipeline, N/2 of them, in one iteration,
  followed by an adder tree;
- the MAC as the pipeline of both matrix engines;
- a single on-chip vector store shared by all matrix-vector pipelines, with each
  vector element held until all its uses are done;
- several passes when there are fewer pipelines than output values;
- the D x D MAC array doing column-times-row iterations, D per block product;
- the example sizes used as defaults.

Chosen here:

- the register stages of `dp_pipeline` (two) and of `adder_tree` (one per level);
- the beat order, the valid/ready handshake and the start/busy/done control of
  `matvec_unit`;
- a register-file vector store with a combinational read port;
- the local A/B operand buffers and the result array of `matmat_unit`. The paper
  does not say where block operands are held.
- the block order;
- the `clr` input of the MAC;
- unsigned, full-precision arithmetic.

Departures:

- The paper's dot-product example shows one-bit outputs. This RTL keeps the full
  sum: a 5-bit `y` for eight one-bit elements. The paper's 2 x 2 example prints
  8-bit results. Here they are 17 bits wide, and the example's values are the same.
- The paper also names main-memory bandwidth as a limit on execution time. No
  memory or memory controller is part of this design. Operands enter through the
  ports described above, and the `mv_` stream's `a_valid` gaps model a slow
  supply.
- Floorplanning, power grid, placement and routing are outside the RTL.

## Simulation

Every testbench is self-checking. Each ends with a line
`TB_RESULT checks=<n> failures=<n>` and has a cycle watchdog. For example, with
Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv -Irtl \
    rtl/linalg_pkg.sv tb/tb_linalg_top.sv --top-module tb_linalg_top -Mdir obj -o sim
obj/sim
```

| testbench | what it covers |
|---|---|
| `tb_dp_pipeline` | all 16 one-bit operand sets, random 8-bit sets, latency 2 |
| `tb_adder_tree` | 4 and 5 leaves, random valid, maximal inputs, latency |
| `tb_dot_product` | N = 8 (DW 1 and 6) and N = 6; every one-bit vector pair, back-to-back issue, both latencies |
| `tb_mac_unit` | random runs with idle cycles, clear, reset, maximal sums |
| `tb_vector_store` | random writes with and without enable, reads |
| `tb_mac_array` | D = 2 and D = 3 block products, maximal operands |
| `tb_matvec_unit` (uses `matvec_harness`) | 8x8 on 8 pipelines; 10x5 on 4 pipelines (3 passes, masked lanes, stream gaps); 3x6 on 4; 5x3 on a single pipeline (5 passes) |
| `tb_matmat_unit` (uses `matmat_harness`) | the 2x2 example; 4x6·6x6 on a 2x2 array (6 blocks of 3 basic blocks); 3x2·2x6 on a 3x3 array; busy-cycle counts |
| `tb_linalg_top` (uses `linalg_top_harness`) | all engines at once at scaled sizes. It counts back-to-back dot products, multi-pass matrix-vector products, stream stalls and block-tiled matrix products, and fails if any never happens. |
| `tb_linalg_top_full` | the same harness on `linalg_top` with its default parameters |

Each testbench finishes in well under a second of simulation time. Anything the
testbenches read is generated with `$urandom`; no data files are needed.
