# SCALER: sparse LU factorisation on an HBM FPGA, in SystemVerilog

This is synthesizable SystemVerilog for an accelerator that computes the
numerical phase of a sparse LU factorisation, A = L·U, with the
left-looking (Gilbert–Peierls) column algorithm. It targets an FPGA with High
Bandwidth Memory (HBM), such as the AMD/Xilinx Alveo U280:

- Matrix A, the L/U factors and the scheduling metadata each live on their
  own HBM channels (26 in all).
- Twelve processing element groups (PEGs) each factorise one column at a time.
- Columns that do not depend on each other run in parallel.

The matrix's sparsity pattern is assumed fixed, as in circuit simulation,
where one pattern is factorised thousands of times with new values. The host
therefore does the expensive analysis once:

- symbolic factorisation;
- the dependency levels;
- packing the data into 512-bit HBM datawords.

The hardware then runs the numerical factorisation on every call.

The architecture is SCALER, a published stream-aware HBM-FPGA design. The
RTL follows its structure:

- a Matrix A loader;
- two metadata loaders;
- a dispatcher made of a controller and a data prefetcher;
- 12 PEGs, each with a Local Memory;
- a Shared Memory;
- an L/U writer.

The internals of most blocks, and every port protocol, are this
implementation's own. Section 9 lists where the RTL is simpler than the
architecture it follows.

## 1. The algorithm as the hardware runs it

Column j of the result is computed from column j of A and the finished
columns to its left:

```
x      = A(:, j)                         (dense copy of the column)
for k < j with U(k, j) != 0, ascending:  (the dependencies of j)
    x(r) = x(r) - L(r, k) * x(k)         for every r > k with L(r, k) != 0
U(0..j, j)   = x(0..j)
L(j+1.., j)  = x(j+1..) / x(j)           (x(j) is the pivot U(j, j))
```

Column j depends on column k exactly when U(k, j) is non-zero. Those pairs
form a directed acyclic graph. The host gives every column a level:

```
level(j) = 1 + max(level(k) over the dependencies k of j), or 0 if j has none
```

Columns in the same level are independent. The accelerator processes one
level at a time. Within a level, column j goes to PEG j mod 12. A level
starts only when every column of the previous level has been computed and
handed on. When a PEG starts a column, everything that column needs is
therefore finished and can be found on chip or in HBM.

No pivoting is done: the row order is fixed by the host. A pivot whose
magnitude is below 2^-27 is replaced by ±2^-27 (+2^-27 for an exact zero) and
counted (`piv_fixes`). This keeps the factorisation finite on matrices with
structurally zero or cancelled diagonals.

## 2. What is in HBM

All HBM addresses in this design count 512-bit datawords.

| Port of `scaler_top` | HBM channel | Contents |
|---|---|---|
| `a_*[0..11]` | 0–11 | Matrix A. Column j is on channel j mod 12. |
| `m_*[0]` | 12 | Header 0, dependency metadata, matrix-A layout |
| `m_*[1]` | 13 | Header 1, L/U layout |
| `lu_*[0..11]` | 14–25 | L and U. Column j is on L/U channel j mod 12. |

### Matrix elements

One non-zero takes 64 bits. Eight of them fill a dataword; element i is at
bits `[64*i +: 64]`.

```
 63            32 31      16 15       0
+----------------+----------+----------+
|  value (fp32)  |  column  |   row    |
+----------------+----------+----------+
```

- An unused lane is a *dummy*: row = `16'hFFFF`.
- Indices are 16 bits, so N ≤ 65535.
- Matrix A datawords hold one column each.

The elements of a column are placed in ascending row order, with one rule:
the eight rows in a dataword must all differ modulo 8. When the next row's
`row mod 8` has already been used in the current dataword, the dataword is
closed and padded with dummies, and a new one is started. This packing is
what lets a PEG write a whole dataword into its 8-bank dense buffer in one
clock (Section 4).

Example column with rows 0, 3, 8, 9, 20:

```
dataword 0: (0) (3) dummy x6          row 8 has bank 0 again, so a new dataword
dataword 1: (8) (9) (20) dummy x5
```

L/U datawords carry the same elements, eight per dataword in the order the
PEG produced them, with no row-mod-8 rule. A column's unused reserved
datawords are written as all-dummy datawords.

### Metadata

Metadata entries (MetaVal) are 32 bits, sixteen per dataword. Entry i of an
array starting at dataword `base` is entry `i mod 16` of dataword
`base + i/16`.

Dataword 0 of channel 12 is **header 0**:

| Entry | Meaning |
|---|---|
| 0 | N, the matrix size |
| 1 | nlev, the number of levels |
| 2 | base dataword of LevelPtr |
| 3 | base dataword of LevelColIdx |
| 4 | base dataword of DepPtr |
| 5 | base dataword of DepIdx |
| 6 | base dataword of matrix-A DatawordOffset |
| 7 | base dataword of matrix-A DatawordCount |

Dataword 0 of channel 13 is **header 1**:

| Entry | Meaning |
|---|---|
| 0 | base dataword of L/U DatawordOffset |
| 1 | base dataword of L/U DatawordCount |

The `HDR_*` constants in `scaler_pkg` define these positions.

The arrays:

- **LevelPtr[0..nlev]**: level l occupies positions `LevelPtr[l]` to
  `LevelPtr[l+1]-1` of LevelColIdx.
- **LevelColIdx[p]**: the column at position p, listed level by level.
- **DepPtr[p], DepPtr[p+1]**: the dependencies of the column at *position p*,
  given as a range in DepIdx. DepPtr is indexed by position in LevelColIdx,
  not by column index.
- **DepIdx**: dependency column indices. Each column's dependencies are in
  ascending order.
- **DatawordOffset[j], DatawordCount[j]**: where column j's datawords are on
  its channel. There is one pair of arrays for matrix A (channel 12) and one
  for L/U (channel 13).

The host reserves L/U space from the symbolic factorisation:
`DatawordCount = ceil((nnz(L(:,j)) + nnz(U(:,j))) / 8)`, U including the diagonal.

## 3. Dispatch: controller and data prefetcher

After `start`, the **controller** (`controller.sv`) reads both headers. Then,
for every level, it does the following for each position p:

1. It reads the column j and the column's A and L/U layouts.
2. It sends PEG j mod 12 a **header task word**:
   - j;
   - A offset and count;
   - L/U offset and count;
   - `last` set if j has no dependencies.
3. It sends the data prefetcher a **data request**: j with its A offset and
   count.
4. It sends the same PEG one **dependency task word** per DepIdx entry k.
   Each word carries k and k's L/U offset and count, so the PEG can have k
   fetched from HBM if it is not on chip. `last` marks the final word.

At the end of a level it waits in a barrier until two things hold:

- every column of the level has pulsed `col_done`;
- the Shared Memory and L/U writer are idle.

`barrier_cycles` counts the wait. `done` rises after the last level and stays
high until the next `start`. Metadata is read one entry at a time through the
two **metadata loaders** (`metadata_loader.sv`). Each loader keeps the last
dataword it read, so a run of consecutive entries costs one HBM read per
sixteen.

Task words are a packed struct, `scaler_pkg::task_t`, with these fields:

- `is_dep`, `last`;
- `col`;
- `a_off`, `a_cnt`;
- `lu_off`, `lu_cnt`.

The **data prefetcher** (`data_prefetcher.sv`) fetches only what the
controller asks for, which is the columns of the current level. Each request
goes to a queue for channel j mod 12. That channel of the **Matrix A loader**
(`matrix_a_loader.sv`: 12 × `hbm_stream_reader.sv`) streams the column's
datawords with up to `MAX_OUT` reads in flight.

Returning datawords go into a per-channel prefetch buffer of `PF_DEPTH`
entries. The buffer feeds PEG c, with `col_last` on each column's final
dataword. Before a read is issued, buffer space is reserved for it: the
buffered words plus the reads in flight must stay below `PF_DEPTH`. The read
data therefore never needs back-pressure. Cycles lost to a full buffer are
counted in `pf_stall_cycles`.

## 4. Inside a PEG

A PEG (`peg.sv`) turns one header task, its dependency tasks and its A
datawords into a finished column. This is the densest part of the design.

**Dense buffer.** Column j is held as a dense vector x of `MAX_N` single-
precision entries. Each entry also has a *touched* flag. The vector is split
into 8 banks by row mod 8. Each bank also keeps a list of its touched rows,
and together the lists are the column's sparsity pattern.

- Because of the packing rule in Section 2, the up-to-8 elements of a matrix-A
  dataword hit 8 different banks, so a dataword is scattered in one clock.
- After reset, the flags are cleared in `MAX_N/8` clocks (`init_done`, and
  `ready` on the top).
- After that, nothing is ever cleared in bulk: a row's flag is cleared when
  its result is streamed out. This makes the buffer's cost independent of N
  for every column after the first.

**Dependencies.** For each dependency k, in ascending order:

1. The PEG reads x(k). This is already final, because every row j' < k that
   could change x(k) came earlier in the list.
2. It looks k up in its **Local Memory** (LM), a `column_store`.
3. On a hit it reads the stored column of k element by element. On a miss it
   asks the Shared Memory and receives the column as a stream; the streamed
   column is also written into the LM.
4. Every element L(r,k) with r > k goes into the **MAC unit** (`pe_mac.sv`),
   which returns `x(r) - L(r,k)·x(k)`, with the row as a tag. Elements with
   r ≤ k are U entries of column k and are skipped.
5. The result is written back into x(r). If r was untouched, it is a
   *fill-in*: the flag is set and r is added to its bank's list.
6. Before the next dependency starts, the MAC pipeline drains. Within one
   dependency all rows differ, so there are no read-after-write hazards.

**Pivot and division.**

- x(j) becomes the pivot. If row j was never touched, it is added with value
  0, which the guard in `pe_div.sv` then replaces.
- The PEG walks the 8 row lists. Each entry goes through the **DIV unit**:
  rows below j are divided by the pivot, and the others pass through
  unchanged. The diagonal is emitted as the guarded pivot.
- The results go to a small output FIFO. Division is issued only when the
  FIFO has room for everything in flight.
- The FIFO drains to the Shared Memory (`sm_wr_*`) and, at the same time,
  into the PEG's own LM, so the next column on this PEG finds it there.

`col_done` pulses once the Shared Memory has accepted the last element.

**Element order.** The output column is not sorted by row: it comes out bank
by bank, in the order rows were touched. Consumers that need sorted columns
must sort on the host.

## 5. The two-tier L/U memory

`column_store.sv` holds sparse columns:

- `SLOTS` slots of `MAX_NNZ` (row, value) entries;
- a mapping table from slot to column index;
- a validity flag per slot.

Column c goes to slot c mod `SLOTS`, and the newest column wins. A column
longer than `MAX_NNZ` is written but never marked valid, so it is never
reported as a hit. It is fetched again whenever it is needed, and the result
stays correct.

- **Local Memory**: one `column_store` per PEG (`LM_SLOTS` slots). It holds
  the PEG's own recent results and the columns it recently fetched.
- **Shared Memory** (`shared_memory.sv`): one `column_store` with `SM_SLOTS`
  slots, shared by all PEGs. It does three jobs:
  - **Result path.** A finishing PEG streams its column in. Every element is
    stored and passed in the same cycle to the **L/U writer**
    (`lu_writer.sv`). The writer packs eight elements per dataword and writes
    them to L/U channel j mod 12 at the column's reserved offset. It pads the
    rest of the reservation with dummy datawords. Elements beyond the
    reservation are dropped and counted in `lu_overflows`.
  - **Hit path.** An LM miss that the SM holds is streamed back, one element
    per clock (`sm_hits`).
  - **Miss path.** Otherwise the SM reads the column's reserved L/U
    datawords from HBM, one at a time. It streams the non-dummy elements and
    keeps the column (`sm_misses`).

The SM serves one PEG at a time, chosen round-robin.

## 6. Arithmetic

`fp32_pkg.sv` implements single-precision multiply, add/subtract and divide
as combinational functions:

- rounding is round-to-nearest-even;
- subnormal inputs read as zero, and subnormal results are flushed to zero;
- Inf or NaN inputs give an infinity (no NaN propagation);
- the MAC rounds after the multiply and again after the subtract (not fused).

`pe_mac` and `pe_div` each register their result through two stages. The
divide is a single 50-by-24-bit integer division in one stage. It is correct
but far too slow for the 300 MHz the architecture targets. An FPGA build
would replace it with a pipelined divider (vendor IP or a radix-4
recurrence) and would retime the multiplier and adder onto DSP blocks.

## 7. Parameters

Defaults of `scaler_top`:

| Parameter | Default | Meaning |
|---|---|---|
| `NUM_PEG` | 12 | PEGs, and matrix-A channels and L/U channels |
| `MAX_N` | 65536 | dense-buffer entries per PEG (the 16-bit index range) |
| `LM_SLOTS` | 64 | Local Memory slots per PEG |
| `SM_SLOTS` | 1024 | Shared Memory slots |
| `MAX_NNZ` | 256 | elements per LM/SM slot |
| `PF_DEPTH` | 64 | prefetch-buffer datawords per channel |
| `MAX_OUT` | 32 | reads in flight per matrix-A channel |
| `TASK_DEPTH` | 32 | task words buffered per PEG |

- The 12 PEGs, the 12 + 2 + 12 channel split, the 512-bit dataword, the
  64-bit element and the 32-bit MetaVal are the architecture's numbers.
- The memory sizes are this implementation's choices.
- 12 × 64 × 256 LM entries plus 1024 × 256 SM entries (48 bits each) come to
  about 22 Mbit, which would go to URAM.
- The dense buffers (12 × 65536 × 49 bits) would go to BRAM.

Matrices of the size this architecture is aimed at (a few thousand to
about 51,000 rows, up to about 250k non-zeros) fit the defaults:

- N stays within the 16-bit index range and the dense buffers.
- Matrix A needs at most about 21,000 datawords per channel.

The L/U storage each matrix needs depends on its fill-in. Columns with more
than `MAX_NNZ` entries are still computed correctly, but they are fetched
from HBM each time they are needed.

## 8. Simulation

Everything simulates with Verilator 5 (`--binary --timing`). From the
repository root, for example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/scaler_pkg.sv rtl/fp32_pkg.sv tb/tb_fp_util.sv tb/tb_peg.sv \
    --top-module tb_peg -j 8
./obj_dir/Vtb_peg
```

Replace `tb_peg` with any testbench below. Each testbench prints
`TB_RESULT checks=<n> failures=<m>` and ends with `$finish`. Each has a
watchdog that counts a failure if the run hangs.

| Testbench | What it checks |
|---|---|
| `tb_pe_mac` | 300 random multiply-subtracts at one per clock against a real-number reference (within 1 ulp); latency of 2 clocks; tags |
| `tb_pe_div` | random divisions (within 1 ulp) and pass-through; the pivot guard for zero and tiny pivots; latency of 2 clocks |
| `tb_column_store` | random columns against a reference model: hits, eviction by slot sharing, over-long columns never hit |
| `tb_hbm_stream_reader` | random bursts return the right words in order; reads overlap (a 32-word burst within 128 clocks); `issue_ok` throttling |
| `tb_matrix_a_loader` | 12 channels, each returning its own words in order, all with reads in flight at once |
| `tb_metadata_loader` | random MetaVal reads from three arrays; 64 consecutive entries cost exactly 4 HBM reads |
| `tb_data_prefetcher` | per-channel routing, order and `col_last`; empty columns; stalls with a 4-entry buffer |
| `tb_lu_writer` | packing, dummy padding of reserved space, channel choice, overflow |
| `tb_shared_memory` | result forwarding, hits, HBM-fetch misses, empty and over-long columns, four concurrent requesters |
| `tb_controller` | task-word and data-request sequence for a random 14-column graph; level barrier |
| `tb_peg` | a 40×40 random sparse matrix through one PEG, compared **bit-exactly** with a reference in the same operation order; LM hits and misses; pivot guard |
| `tb_scaler_top` | end to end, 48×48 matrix, small LM/SM/prefetch sizes; every L/U entry checked; each mechanism required |
| `tb_scaler_full` | end to end, 160×160 matrix (140 levels, about 1.4 million clock cycles), every parameter of the top at its default |

The end-to-end benches are `tb/scaler_bench.sv` (stimulus and checker) and
`tb/hbm_model.sv` (channel model with latency and random ready). The bench
does the host's work:

- it generates a diagonally dominant random matrix with some denser columns
  and one column that is only a zero diagonal;
- it computes the symbolic pattern, the levels and all arrays;
- it packs and loads everything into the HBM models;
- it runs the accelerator;
- it reads L and U back from the L/U channel models and compares every entry
  with a double-precision factorisation (relative tolerance 1e-3).

It also counts how often each mechanism occurred and fails any that did not:

- LM hits and misses;
- SM hits and misses;
- pivot guards;
- prefetch stalls;
- barrier waits;
- dummy lanes;
- row-mod-8 dataword breaks;
- metadata reads.

`tb_scaler_full` does not require SM misses or prefetch stalls, because the
default sizes are too large for a 160×160 matrix to cause them. The largest
matrix simulated end to end is 160×160.

Verilator reports a few warnings that are left as they are:

- SYNCASYNCNET, because the assertions sample the asynchronous reset;
- unused bits of some shared buses.

## 9. Where this RTL is simpler than the architecture

- **One lane per PEG.** The architecture's PEs work on 8 floating-point values
  at a time, with several dividers. Here each PEG has one MAC lane and one
  divider. Throughput per PEG is one L(r,k) update per clock.
- **Shared Memory serialised.** The architecture describes a fully
  partitioned, highly concurrent SM. Here it serves one request at a time and
  fetches one HBM dataword at a time.
- **Direct-mapped LM/SM with combinational reads.** This is functionally
  complete. For URAM it would need a registered read and a one-cycle-deeper
  stream pipeline.
- **Single-cycle divide and unpipelined floating point.** See Section 6. No
  synthesis for the FPGA, and no timing analysis, has been done.
- **Metadata read one entry at a time.** The controller needs several clocks
  per column, plus 3–4 per dependency, to issue tasks. On matrices with very
  short columns this, not the PEGs, limits the rate.
- **Simplified HBM interface.** The ports are AXI-like but not AXI:
  - a dataword address;
  - in-order read data that is never back-pressured;
  - a write that carries address and data together.

  Connecting the vendor HBM controller needs a thin adapter per channel.
- **No row pivoting.** Only the near-zero pivot guard is provided; the host
  must supply a suitable ordering.
- **Host software not included.** Reordering, symbolic factorisation,
  levelling and packing happen outside the RTL; the testbench has a
  straightforward version of them.

## 10. Files

| File | Contents |
|---|---|
| `rtl/scaler_pkg.sv` | dataword, element, task-word types; header positions |
| `rtl/fp32_pkg.sv` | single-precision arithmetic functions |
| `rtl/sync_fifo.sv` | synchronous FIFO used by several blocks |
| `rtl/pe_mac.sv`, `rtl/pe_div.sv` | MAC and DIV units |
| `rtl/column_store.sv` | LM/SM column storage |
| `rtl/peg.sv` | processing element group |
| `rtl/shared_memory.sv` | Shared Memory |
| `rtl/hbm_stream_reader.sv`, `rtl/matrix_a_loader.sv` | matrix-A loading |
| `rtl/metadata_loader.sv` | metadata loading |
| `rtl/data_prefetcher.sv` | prefetcher |
| `rtl/controller.sv` | controller |
| `rtl/lu_writer.sv` | L/U writer |
| `rtl/scaler_top.sv` | top level |
| `tb/` | testbenches, the HBM channel model, the end-to-end bench, floating-point test helpers |
