# Transitive-closure coprocessor for explicit-state model checking

Many model-checking algorithms need the set of states reachable from a given
set. For an explicit state graph with N states this is the transitive
closure of the N x N Boolean adjacency matrix: bit `T[i][j]` is 1 when a path
of one or more transitions leads from state `i` to state `j`. This repository
holds synthesizable SystemVerilog for a coprocessor that computes that closure
with the Warshall algorithm on a systolic array.

A systolic array that handles the whole matrix at once would need N² cells,
far too many for real state spaces. So the design builds one small, fixed
**partition** of n x n cells (n = 32 by default). It time-shares that
partition over a large *virtual* array, one tile at a time. Between tiles, the
data that crosses tile edges is parked in two places:

* an external **RAM**, which holds one vertical slice of about N·n bits;
* an external **disk**, which holds the horizontal slices, the input matrix and
  the result. Everything on the disk is run-length coded.

The architecture follows *Hardware Acceleration for Model Checking*: the
coprocessor block diagram, the shearing and tiling of the virtual array, the
five tile phases and the run-length code. That publication does not describe
the inner data flow of the array. It refers to earlier work for it. The cell
design, the timing, the interfaces and the stream formats below are therefore
this implementation's own, and the section "Where this differs from the
published design" lists every difference.

## 1. The virtual array

### Warshall as a pipeline of stages

Warshall's algorithm applies the pivots k = 0 … N-1 in turn:
`t[i][j] |= t[i][k] & t[k][j]` for all i, j. The array assigns one **stage**
(one row of cells) to each pivot k and one cell per matrix column. Matrix rows
stream through the stages, one row per step. This maps j and k to space and i
to time.

A stage applies its pivot to a row `i` only if it already holds the pivot row
`k`, updated by all earlier pivots. Rows with i < k arrive before that row. To
solve this, every stage **rotates** its stream:

* Stage k receives the rows in the order k, k+1, …, N-1, 0, …, k-1, so its
  pivot row comes first. It receives the columns in the same rotated order, so
  the pivot column is local column 0.
* The pivot row leaves the stage unchanged, because pivot k does not alter row
  k. It is held in the cells and sent on *last*.
* The pivot column also leaves unchanged. It is sent to the next stage as its
  last local column.

The output order of stage k is then exactly the input order that stage k+1
needs. After N stages the rotation has gone full circle, so the result leaves
in natural row and column order. One extra step per block, the **flush slot**,
pushes the held pivot rows out. A block is therefore S = N + 1 slots long.

### Cell roles (`dpu.sv`)

Each cell holds one pivot bit `p` and three output registers: `d_out`
(down), `x_out` (right) and `fx_out` (the marker, to the right). The marker
`fx` ("first row of the block") travels along the row together with `x`, the
pivot-column bit of the row being processed.

| role   | on the marker slot                        | on other slots                       |
|--------|-------------------------------------------|--------------------------------------|
| PIVOT  | `p <= d_in`, send old `p` to the right    | send `d_in` to the right (this is x) |
| NORMAL | `p <= d_in`, send old `p` down            | send `d_in \| (x_in & p)` down, pass x right |
| EDGE   | send `x_in` down (always)                 | same                                 |
| IDLE   | pass x right, send 0 down                 | same                                 |

### Shearing

In the plain layout the rotation makes data move down *and to the left*. Shift
stage k right by k positions: stage k then sits at virtual columns
c = k … k+N-1, and all data moves straight down or to the right. The
pivot-column stream runs right along the stage, and an **EDGE** cell at
c = k + N turns it down into the last column of the next stage. The virtual
array is a parallelogram inside a box of N rows × 2N columns. The role of cell
(k, c) depends only on c − k:

* 0 → PIVOT
* 1 … N−1 → NORMAL
* N → EDGE
* anything else → IDLE

### Timing

Cell (k, c) handles slot s at step s + c + 2k. Consequences:

* Links down and to the right each hold one register.
* The input matrix enters the top of the box with column c delayed by c steps.
* The result leaves the bottom of columns N … 2N−1. Output column j appears at
  virtual column N + j.

## 2. Tiles and the schedule (`partition.sv`, `copro_ctrl.sv`)

The box is cut into n x n tiles (R, C). Only tiles with R ≤ C ≤ R + N/n touch
the parallelogram, so each tile row has N/n + 1 tiles. There are three kinds
of tile:

* **A** — the left border. It contains the PIVOT diagonal, with IDLE cells
  below it.
* **B** — an interior tile, all NORMAL cells.
* **C** — the right border. It contains the EDGE diagonal, with IDLE cells
  above it.

The partition derives every cell's role from its local position and a 2-bit
`kind` input. Because data only moves down and to the right, a tile can be
computed on its own once its top and left edge streams are known.

Tiles are processed **one tile column at a time, top to bottom within the
column, then the next column to the right**. What crosses a tile's edges:

* The **vertical slice** crosses the bottom edge. It is consumed by the next
  tile in the same column, so it goes to RAM (n bits per step).
* The **horizontal slice** crosses the right edge. It is consumed one column
  later, so one such slice per tile row is kept on the disk.

Each tile's job is a **phase**:

| phase | tile | RAM read            | disk read          | disk write          | RAM write            |
|-------|------|---------------------|--------------------|---------------------|----------------------|
| LOAD  | –    |                     | input slice 0      |                     | input slice 0        |
| A1    | A, R < N/n−1 | top edge    | input slice C+1    | right edge          | input slice C+1      |
| A2    | A, last row  | top edge    |                    | right edge          |                      |
| B     | B    | top edge            | left edge          | right edge          | bottom edge          |
| C1    | C, R = 0     |             | left edge          |                     | bottom edge          |
| C2    | C, R > 0     | output slice C−1−N/n | left edge         | that output slice   | bottom edge          |
| FINAL | –    | last output slice   |                    | last output slice   |                      |

Each phase uses at most one RAM read stream, one RAM write stream, one disk
read stream and one disk write stream. That is what allows a single RAM slice
area, one compressor and one decompressor.

### Slice streams

All slices are stored as raw, time-ordered n-bit words, so no skew or de-skew
logic is needed at the tile edges:

| stream           | length (words) | written from tile step | read by next tile at step |
|------------------|----------------|------------------------|---------------------------|
| vertical slice   | Lv = N + n     | 2n                     | 0                         |
| horizontal slice | Lh = N + 2n    | n                      | 0                         |

A tile runs for N + 3n partition steps. The controller generates the marker
inputs on the tile's left edge: row r gets markers at steps 2r and N + 2r.

The RAM slice is used **in place**. The RAM is read at address a before the
tile writes address a, and the controller holds back any write whose address
has not been read yet in the current phase. One slice of N + n words of n bits
is therefore enough: about N·n bits.

## 3. Run-length coding (`rle_compressor.sv`, `rle_decompressor.sv`)

Every horizontal, input and output slice on the disk is coded **per bit lane**:
n independent streams, each with one encoder and one decoder. The code is:

* a `1` is written as a single `1`;
* a run of zeros is written as a single `0` followed by its length in W bits
  (W = 8 by default, least significant bit first, lengths 1 … 2^W−1);
* a longer run is split into several runs.

Closing a run needs the next `1` or the end of the slice. Because of that, one
input bit can yield up to 2W+2 output bits. The encoder still takes one bit per
lane per cycle and never stalls. It emits one token per lane per cycle, with a
length field, on the disk write port.

On the read side, the disk pushes chunks of up to CW bits per lane into a
per-lane bit queue (`bit_fifo.sv`). The decoder (`rle_dec_lane.sv`) reads a
whole code from the queue's window and then delivers one bit per cycle. The
decompressor offers a word only when **all** lanes have their next bit. When
the disk is too slow, this is where the partition stalls.

## 4. Buffers, stalls and the top level (`mc_coprocessor.sv`)

The top level contains:

* the partition;
* the compressor and the decompressor;
* four small FIFOs (`sync_fifo.sv`): RAM → partition, RAM → compressor,
  partition → RAM and decompressor → RAM;
* the multiplexers that route each path according to the phase.

The partition has a single enable. It steps only when three conditions hold:

* its RAM word is in the top FIFO;
* its disk word is in the decompressor;
* the bottom FIFO has room.

The `stall` output shows every cycle in which a tile is active but cannot
step. Even without a slow disk, a tile that reads RAM waits about two cycles at
its start because of the RAM read latency.

### External interfaces

* **RAM**
  * A read port with one-cycle latency: `ram_rd_en`, `ram_rd_addr`,
    `ram_rd_data`.
  * A write port: `ram_wr_en`, `ram_wr_addr`, `ram_wr_data`.
  * Words are n bits. Addresses run 0 … N+n−1.
* **Disk write**
  * `hd_wr_valid`, then one token per lane in `hd_wr_code` / `hd_wr_len`.
  * The tokens belong to the stream named by `hd_wr_file`.
  * The disk must accept a token in every cycle.
* **Disk read**
  * While `hd_rd_req` is high, the disk may push up to CW bits per lane of
    stream `hd_rd_file` (`hd_rd_bits`, `hd_rd_len`).
  * It may push only when `hd_rd_space` of that lane is at least the chunk
    size.
* **Stream names** (`mc_pkg::file_id_t`) are a kind plus two indices:
  * `FILE_INPUT` with column C;
  * `FILE_HSLICE` with (row R, column C) of the tile that reads it;
  * `FILE_OUTPUT` with column C.
* **Data layout.** In input slice C, lane q, step t holds `A[t−q][C·n+q]` for
  0 ≤ t−q < N, and 0 otherwise. The stream is Lv = N + n steps long. Output
  slice C holds `T[t−q][C·n+q]` in the same layout. The host must skew the
  input this way and de-skew the result.
* **Control**
  * Pulse `start` with `mat_size` = N, a multiple of n.
  * `done` rises after the last output slice has been written.
  * `phase` shows the current phase.

### Run time and capacity

* A run takes (N/n)(N/n + 1)(N + 3n) partition steps plus stalls.
* With n = 32 at 200 MHz this is about:
  * 5 s for N = 10⁴;
  * 82 min for N = 10⁵;
  * 57 days for N = 10⁶.
* `mat_size` is 27 bits wide, so N can reach 2²⁷−1 = 134,217,727.
* The RAM slice for N = 67,100,000 is 67,100,032 words × 32 bits, just under
  256 MiB.

## 5. Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `PN`      | 32 | partition edge n. Must be a power of two. |
| `RLE_W`   | 8  | run-length field width W |
| `CNT_W`   | 27 | width of N |
| `FDEPTH`  | 4  | depth of the four slice FIFOs |
| `QDEPTH`  | 64 | bits per lane in the decompressor queue |
| `CW`      | 16 | largest disk push per lane and cycle |

## 6. Where this differs from the published design

* **Cells and timing are this implementation's own.** The published design
  uses an array from the literature with 5N−4 steps per matrix and six
  flip-flops per cell. These cells have four flip-flops, and a tile takes
  N + 3n steps.
* **Edge bandwidth.** The published partition consumes 2n bits and produces n
  bits per cycle. This one consumes 2n and produces 2n bits per cycle in
  interior tiles, because the horizontal stream is both read and written.
* **What A1 stores in RAM.** The published phase list has A1 store "the
  vertical slice" in RAM for the next step. Here that slice is the next input
  column, loaded from disk while the A1 tile runs. Nothing lies below an A1
  tile, so its own bottom output is not kept.
* **Disk data layout and the RAM and disk interfaces are this
  implementation's choices.** This includes the per-lane token and chunk
  ports and the named streams. The DDR2 RAM, its controller, the SATA disk and
  its controller are external and not included.
* **Optional optimisations are not built:**
  * merging a rectangle of cells into one bigger cell to save flip-flops;
  * rectangular (non-square) partitions.

## 7. Simulating

Every testbench checks against values computed independently and prints
`TB_RESULT checks=… failures=…`. The testbenches are:

| testbench | what it checks |
|-----------|----------------|
| `tb_dpu` | Random inputs in every cell role against the cell rules. |
| `tb_partition` | The testbench runs every tile of N = 4, 8 and 12 itself, and compares the result with a software Warshall closure. It also checks the N + 3n tile length. |
| `tb_copro_ctrl` | The controller alone: the tile and phase order, the stream names, the word counts per path, the marker timing and stalls. |
| `tb_rle_compressor`, `tb_rle_decompressor` | Round trips through the run-length code, including split runs and the throughput. |
| `tb_sync_fifo` | The FIFO against a queue model. |
| `tb_mc_coprocessor` | The whole design with n = 4, W = 3 and a throttled disk, on N = 16, 8 and 24. It checks every closure bit and that every phase, partition stalls and split runs occurred. |
| `tb_mc_coprocessor_full` | The whole design at its default parameters on a 1024 × 1024 relation (1056 tiles, about 1.19 million cycles). It also checks that the run takes no more than a few cycles per tile beyond the schedule. |
| `tb_mc_workload` | The default design on N = 10⁴ (padded to 10016), 10⁵ and 10⁶ with a sparse relation (two successors per state). Each run covers the input load and the first 6, 3 or 2 tiles, then resets the design. It checks the tile order, exactly N + 3n partition steps per tile, at most 8 extra cycles per tile, that each horizontal slice read was used up, and that the last slice written decodes to N + 2n bits per lane. It also checks that compressed disk traffic stays under 100 MB/s at 200 MHz (measured: 57–66 MB/s). Finally, it projects the full run time from the measured tile length and checks it is within 5 % of 5 s, 80 min and 57 days. |

The end-to-end testbenches share `tb/mc_tb_env.svh`. It holds the RAM model,
the disk model (named per-lane bit queues) and a software run-length coder.
`tb/mc_tb_body.svh` adds the random relations and the software Warshall
reference used by the two closure tests.

Run a testbench with plain Verilator:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv -Irtl -Itb \
    rtl/mc_pkg.sv tb/tb_mc_coprocessor.sv --top-module tb_mc_coprocessor
./obj_dir/Vtb_mc_coprocessor
```

To run another testbench, change its name in both places. The full-size run
builds in about 20 s and simulates in about 12 s. The workload test
simulates in about 30 s.
