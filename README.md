# Two FPGA accelerators: a merge sorter with compression, and a multi-FPGA stencil array

This repository holds synthesizable SystemVerilog for two independent
accelerators that come from the same line of work on FPGA development
infrastructure:

1. **A merge-sort accelerator for large data sets in external DRAM.** It sorts
   32-bit keys in three steps. First, a 16-input sorting network turns the data
   into sorted runs of 16. Next, K-way merge sorter trees repeatedly merge K
   runs into one, streaming through memory. Finally, it compresses what it
   writes with a base+delta code: two sorted 64-byte lines whose neighbouring
   keys differ by little are stored as one line. This raises the effective
   memory bandwidth once the trees are duplicated.
2. **A 2D Jacobi stencil accelerator for an array of small FPGAs.** Each FPGA
   (node) owns a 64 × 128 block of single-precision values and updates it with
   eight multiply-adders. It exchanges its boundary values with its four
   neighbours, and all nodes start each time step on a synchronisation pulse.
   This keeps nodes in step even though each one runs from its own crystal.

The top level `accel_top` places both side by side. They share only clock and
reset.

## Sorter: how a data set is sorted

Keys travel in 512-bit **lines** of 16 keys, with key 0 in bits 31:0. Sorting
N keys runs in **Phases**:

* **Phase 1** reads the source lines and sorts each line with the 16-input
  odd-even merge network (`oem_sort_net`: 10 register stages, 63
  comparators). Each line becomes a sorted run of 16 keys.
* **Phase 2 and later** merge K runs of length E_p into one run of length
  E_{p+1} = K·E_p. A **merge sorter tree** (`merge_tree`) is a binary tree of
  K-1 sorter cells. Each cell has a 2-entry FIFO and forwards the smaller of
  its two children's heads, so the root emits one key per cycle.
  Each of the K leaves is fed by an **input buffer** (`input_buffer`). The
  buffer holds a FIFO of lines and a shift register that hands out one key at
  a time. A key counter compares against E_p. Once a run's E_p keys have been
  sent, the buffer sends the largest key value 0xFFFFFFFF as a separator, so
  a finished way never blocks the merge of the others.
  The **output buffer** (`output_buffer`) packs keys back into lines and
  counts against E_{p+1}. When a whole merged run has left, it resets the
  tree, clearing all FIFOs and both counters, and the next group of runs
  begins.
* There are log_K(N/16) merging Phases. The data moves between a source and a
  work area, and the last Phase leaves the result in one of them
  (`result_base`).

**Duplicated trees.** With one tree the sorter moves 2 × 4 bytes per cycle,
far below DRAM bandwidth. `sort_accel` therefore runs P trees in parallel in
all merging Phases except the last, which has only one run left to produce and
uses a single tree. The main configuration is K = 8 ways × P = 8 trees. At
200 MHz this merges at 8 × 2 × 4 B × 200 MHz = 12.8 GB/s, which matches the
memory.

**Memory layout (the part most worth reading before the code).** Each area
(source, work) is split into S = K·P equal **slices**.

* Tree t reads slice w·P + t as its way w.
* It writes its merged runs into its own K slices, t·K … t·K+K-1.
* Because compressed lines make the amount written unpredictable, every slice
  keeps an **end pointer**. The next Phase reads a slice only up to that
  pointer, and a compressed pair never straddles two slices.
* The last Phase treats each group of P slices as one way.
* Reads are issued round-robin over all tree inputs. A read is issued only
  when the input buffer has room for two lines, because a packed line expands
  to two. Data returns in request order, and a tag FIFO steers it.
* Writes from the P trees are queued per tree and served round-robin.

**Compression** (`bd_compressor`, `bd_decompressor`).

* A sorted line is compressible when each of its 15 neighbour differences is
  at most 0x1fff.
* Two consecutive compressible lines of the same slice are packed into one
  line. From MSB to LSB it holds:

  | Field       | Bits | Contents                    |
  |-------------|------|-----------------------------|
  | Flag        | 33   | value 1                     |
  | Void        | 25   | unused                      |
  | Compressed1 | 195  | 15 × 13-bit deltas, line 2  |
  | Base1       | 32   | first key of line 2         |
  | Compressed0 | 195  | 15 × 13-bit deltas, line 1  |
  | Base0       | 32   | first key of line 1         |

* A plain sorted line can never carry the flag pattern.
* The compressor holds one line in a temporary slot until it knows whether
  the next line pairs with it.
* The decompressor splits a packed line into its halves and rebuilds the keys
  with a 15-stage pipelined prefix adder.
* Phase 1 reads raw input, so decompression is off there.

**Initial data generator** (`init_data_gen`). It fills the source area with
one of three key orders:

* xorshift128 pseudo-random keys, using the standard seeds with the last word
  XORed with a user seed;
* ascending keys 1, 2, …;
* descending keys 16·n … 1.

It produces one key per cycle and shares the memory write port with the
sorter while the sorter is idle.

### Sorter interface

| Port group | Meaning |
|---|---|
| `sort_start`, `n_lines`, `src_base`, `tmp_base` | start a sort of `n_lines` lines (a power of two) at `src_base`, using `tmp_base` as the work area |
| `sort_busy`, `sort_done`, `result_base`, `result_end[K*P]` | the sorted data are the concatenation of slice s from `result_base + s·(n_lines/S)` up to `result_end[s]`, lines possibly packed |
| `rd_req/rd_addr/rd_gnt`, `rd_valid/rd_data` | read port: a request is accepted when `rd_gnt` is high; data come back in order, after any latency |
| `wr_req/wr_addr/wr_data/wr_gnt` | write port, accepted when `wr_gnt` is high |
| `gen_start/gen_mode/gen_seed/gen_done` | data generator |
| `st_*` | counters: Phases, Iterations, packed lines, read stalls, separator cycles, sort cycles |

## Stencil array: how a time step is computed

The array computes
`v'(i,j) = c0·v(i-1,j) + c1·v(i,j-1) + c2·v(i,j+1) + c3·v(i+1,j)` in IEEE-754
single precision over a grid split into blocks. The default array is 4 × 4
nodes, each with 64 columns × 128 rows, which makes a 256 × 512 grid.

**Inside a node** (`stencil_node`):

* The block is stored as 8 vertical strips of 8 columns, one memory bank per
  **MADD** (`madd`).
* A MADD is an 8-stage multiplier followed by an 8-stage adder whose output
  feeds back into its own input. Eight points are in flight at once. For
  these 8 points the MADD receives, in order:
  1. the row processed before (8 cycles);
  2. the left neighbours (8 cycles);
  3. the right neighbours (8 cycles);
  4. the row processed after (8 cycles).

  Each product is added to the partial sum of the same point leaving the
  adder at that moment.
* A row therefore takes 32 cycles, and a point's result is ready 40 cycles
  after its first operand. It is written back in place, after its old value
  was last read. One time step (an **Iteration**) takes 4·8·128 = 4096 cycles.
* Values outside the block come from halo storage:
  * the row above and the row below, one value per column;
  * the columns to the left and right, one value per row.
* Finished boundary values go to the neighbours through per-MADD FIFOs and a
  round-robin 8-to-1 multiplexer (`halo_sender`).

**Why rows run in two directions.**

* A node on an even row of the array works top-down, and a node on an odd row
  works bottom-up. The boundary row a neighbour needs first is therefore
  computed first, almost a full Iteration before it is needed. Each node
  learns its parity from a one-inverter-per-node chain starting at the bottom
  row (`row_parity`).
* Floating-point addition is not associative, and bottom-up nodes add their
  four terms in the order c3, c1, c2, c0. Results on odd rows therefore
  differ in the last bit from a top-down evaluation. The testbenches model
  this order exactly.

**Synchronisation** (`sync_unit`).

* Node (0,0) is the master. Every α + β cycles it drives a pulse: α is one
  Iteration (4096 cycles) and β is a 64-cycle margin for clock drift.
* Every other node watches its left and upper neighbours. A pulse that stays
  high for 4 cycles counts as an event; the node then starts its Iteration and
  passes the pulse right and down.
* A node that finishes early stalls until the next event.

**Array** (`stencil_array`).

* It wires each node to its four neighbours: boundary links, sync chain and
  parity chain.
* Halos on the outer edge keep the values loaded by the host, which gives a
  fixed boundary.
* The host loads and reads any node through `ld_*`/`rb_*`. `ld_sel` selects
  the target:
  * 0: the block, address row·64+col;
  * 1: the halo rows, above then below;
  * 2: the halo columns, left then right.

## Where this RTL departs from the original system or fills gaps

* **DRAM controller.** The DDR3 controller is vendor IP and is not included.
  The sorter talks to a simple request/grant line port, shown above.
* **Inter-FPGA links.** The serial links between FPGAs (SER/DES with clock
  recovery) are not included. Nodes are joined by direct valid/index/data
  links.
* **Host access.** There is no UART host link. Control and results are
  top-level ports.
* **Floating-point units.** `fp_mul` and `fp_add` are this design's own:
  * round to nearest even;
  * subnormals flushed to zero;
  * IEEE infinities and NaN.

  Each has 8 cycles of latency, matching a 7-stage core plus one register.
* **End-of-Phase writes.** The original shrinks write bursts at the end of a
  Phase. Here, writes are handled by the per-slice end pointers described
  above.
* **Separator timing.** A separator starts with the (E_p+1)-th key of a run,
  and the tree reset follows the E_{p+1}-th output key.
* **Assumed sizes.** The original gives none for these:
  * FIFO depths of 8 lines;
  * the sync margin β = 64;
  * a pulse length of 32 cycles;
  * detection after 4 high cycles.
* **Node memories.** The halo rows and columns are register arrays beside the
  8 block banks.

## Verification

Every block has a self-checking testbench in `tb/` that compares against
independently computed values. Each prints
`TB_RESULT checks=<n> failures=<n>`.

| Testbench | What it checks |
|---|---|
| `tb_oem_sort_net` | 2000 random vectors (with ties); sorted output, tag, latency of 10 cycles |
| `tb_merge_tree` | random sorted runs with back-pressure, separators, tree reset, one key per cycle when unstalled |
| `tb_input_buffer`, `tb_output_buffer` | key order, separator after E_p keys, tree reset after E_{p+1} keys, long back-pressure |
| `tb_bd_compressor`, `tb_bd_decompressor` | round trip against an own encoder/decoder and a pairing model |
| `tb_init_data_gen` | all three orders against an own xorshift model; one key per cycle |
| `tb_sort_accel` | K = 4, P = 2, 256 keys: reversed, random (with and without a stalling memory), small-range keys. Checks sorted output, Phase and Iteration counts, and a cycle bound from the Phase cost model |
| `tb_sort_configs` | further tree configurations: 16-way × 2, 4-way × 4, 8-way × 2, 8-way × 4, random and descending keys, up to 8192 keys |
| `tb_fp_mul`, `tb_fp_add` | 4000 random and special operands each against a real-number reference with the same rounding; latency 8 |
| `tb_madd` | 200 blocks against the reference sum order; result 40 cycles after the first operand |
| `tb_sync_unit`, `tb_row_parity` | period, forwarding delay, glitch rejection, parity pattern |
| `tb_stencil_node` | one reduced node in each direction, 3 Iterations value-exact; Iteration spacing, stalls, boundary traffic |
| `tb_accel_top` | reduced top end to end (described below) |
| `tb_accel_full` | the top with every parameter at its default (described below) |

`tb_accel_top` runs a reduced top end to end:

* sorter with K = 4 and P = 2;
* 2 × 2 stencil nodes of 16 × 8 values.

It counts that each mechanism fired at least once:

* separator insertion;
* two Phases;
* packed lines;
* read stalls;
* stencil stalls;
* boundary transfers between nodes;
* both row directions.

`tb_accel_full` instantiates `accel_top` with every parameter at its default:

* 8 × 8 sorter, with 8192 keys in three Phases;
* 4 × 4 array of 64 × 128 nodes, running two Iterations on the 256 × 512 grid.

It checks every value. Building it with verilator takes about 2.5 minutes,
and it runs in about 10 seconds. The 256M-key sort and the 5.8 million
Iteration runs of the original evaluation were not simulated. The design
holds them at its default sizes: `LINE_AW = 26` addresses 4 GiB, and the
Iteration counter is 32 bits wide.

To run a testbench with plain verilator, from the repository root:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/sort_pkg.sv tb/fp_ref_pkg.sv tb/tb_accel_top.sv --top-module tb_accel_top
    ./obj_dir/Vtb_accel_top

## Files

* `rtl/`: one module or package per file.
  * Sorter: `sort_pkg`, `sync_fifo`, `oem_sort_net`, `merge_tree`,
    `input_buffer`, `output_buffer`, `bd_compressor`, `bd_decompressor`,
    `sort_tree` (one tree with its buffers and compressor), `sort_accel`,
    `init_data_gen`.
  * Stencil: `fp_mul`, `fp_add`, `madd`, `row_parity`, `sync_unit`,
    `halo_sender`, `stencil_node`, `stencil_array`.
  * Top: `accel_top`.
* `tb/`: the testbenches above, plus `fp_ref_pkg`, the single-precision
  reference used by the stencil tests, and `sort_run`, one sorter
  configuration with its memory model, used by `tb_sort_configs`.
