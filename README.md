# Cuper-style SpMV accelerator in SystemVerilog

This is a streaming sparse matrix-vector multiplier, y = A·x, in FP32, built for an FPGA with
high-bandwidth memory (HBM). It follows the Cuper architecture. Its main idea is to move the hard
work of sparse multiplication out of the hardware and into the layout of the data:

* A host program stores the matrix as packets of eight non-zeros. Each packet is one 512-bit
  memory beat.
* The host orders the non-zeros so that:
  * the adder never needs a sum that is still in its pipeline (no read-after-write stall);
  * equal column indices follow each other, so the x value just read can be used again from a
    register instead of from block RAM.
* The hardware then only has to stream. It needs no conflict detection in the normal case and
  no scheduling.

The matrix is processed in **batches** of 128 columns. The rows are dealt out cyclically to 16
**cores**, one HBM channel each: global row g belongs to core g mod 16 and is that core's local
row g div 16. Every core has its own accumulator lane. A sorting tree merges the 16 lanes' results
back into row order before y is written.

```
 HBM ch 1..16 ─► matrix_loader ─► crossbar_switch ─► 16 × compute_core ─► accumulator (16 lanes)
 HBM ch 0 ────► vector_loader ──(x segment broadcast)──┘                        │
 HBM ch 17 ◄── vector_writer ◄── result_receiver ◄── sort_tree (15 nodes) ◄────┘
                         batch sequencer (in cuper_top)
```

## Data layout in memory

| Item | Layout |
|---|---|
| Non-zero element, 64 bit | `{value[63:32], local_row[31:16], column_in_batch[15:0]}` |
| Packet, 512 bit | eight elements; element 0 is in bits [63:0] |
| Idle slot | column field = `16'hFFFF`. The slot carries nothing; it only delays the following elements. |
| Batch header, 512 bit | bits [31:0] = number of packets this channel has in this batch |
| Matrix channel c | for batch 0, 1, …: a header, then that many packets. It starts at beat 0. |
| x (vector channel) | 16 FP32 values per beat. Batch b's 128 values are at beats 8b … 8b+7. |
| y (channel 17) | 16 FP32 values per beat in row order. Row r is at beat r/16, lane r mod 16. |

A header count of zero means the core's slice column is blank in this batch. The core then skips
writing that batch's x segment into its block RAM. This is the "perceptual" skip of blank
structure. The header beat is this design's way of telling the core. It replaces the slice pointer
array of the original storage format, which the hardware would otherwise need to read.

The 32 index bits are split 16/16 between row and column. The 16-bit local row limits the design
to 16 × 65,536 = 1,048,576 rows. The column needs only 7 bits inside a batch.

## One batch, step by step

1. **Header barrier.** Each core reads its channel's header beat and waits. The sequencer in
   `cuper_top` waits until all 16 cores are waiting.
2. **x load.** `vector_loader` reads the 8 beats of the batch's x segment and broadcasts them.
   Every core with a non-zero count writes them into its own 128-entry block RAM. Cores with a
   count of zero do not.
3. **Run.** The sequencer pulses `batch_go`.
   * Each core's `perceptual_decoder` takes one packet per cycle.
   * `vector_fetcher` supplies one x value per element.
   * `pe_group` multiplies the 8 elements in 8 pipelined FP32 multipliers.
   * The products are queued per PE and read out round robin. The core thus sends one token per
     cycle to its accumulator lane, in the same order the host packed them.
   * An idle slot becomes a *bubble* token. After the last packet the core sends an end-of-batch
     token.
4. **Next batch.** Once every core is waiting at its next header, or has finished, the sequencer
   starts the next x load. This barrier is why a core's x RAM is never overwritten while the core
   still reads it.

After the last batch the accumulator lanes stream their sums. Then `sort_tree`,
`result_receiver` and `vector_writer` write y. `done` rises after the last y beat has been
accepted.

## Vector reuse (vector_fetcher, perceptual_decoder)

Each core has one reuse register pair: the last x value it fetched and that value's column.

* Within a packet, lane k compares its column with the nearest earlier lane that holds an element.
* Lane 0 compares with the register.
* On a match, lane k takes that lane's x through a multiplexer chain instead of reading block RAM.
* The last element's value and column go into the register for the next packet.

So a run of equal columns costs one block RAM read, however many packets it spans. The register
is cleared at every batch start because x changes. Block RAM reads are registered (one cycle).
All 8 lanes read in parallel.

The decoder counts hits and reads (`st_reuse_hits`, `st_bram_reads`). It also counts the x
segments it wrote or skipped (`st_vec_writes`, `st_vec_skips`).

## Accumulation without stalls (accumulator_lane)

This is the part that depends most on the host's ordering.

* Each lane has an input FIFO (16 tokens) and a 4-stage pipelined FP32 adder. The adder does
  `buf[row] += product`: the old value is read when a token issues, and the sum is written back
  4 cycles later.
* If any 4 consecutive tokens of a core are on distinct rows, every read sees the latest sum:
  * a sum being written in the same cycle as a read of its row is forwarded;
  * nothing else can be in flight for that row.
* The host guarantees this spacing. Where it cannot find a fitting non-zero, it inserts idle
  slots, which arrive as bubbles (`st_bubbles`).
* A guard still checks the first three adder stages. If a token's row is in them, the token is
  held, and `st_raw_stalls` counts the cycles. With correctly ordered input the count stays 0.
  With unordered input the result is still exact, only slower. The testbenches check both cases.

### Ping-pong batch buffers

Each lane has two batch buffers and a partial-sums buffer, each holding ROWS words.

* At the end-of-batch token, once the adder has drained, the lane swaps the batch buffers.
* A merge engine then walks the finished buffer one row per cycle. It adds each row into the
  partial sums through a second adder (for the first batch it copies), then clears the row.
* Meanwhile the other buffer already takes the next batch.
* A second end-of-batch token waits until the earlier merge is done. Merges are counted in
  `st_merges`, one per lane per batch.
* On `start` both batch buffers are cleared, which takes `cfg_rows` cycles.

**Cost of the merge.** The merge visits every row of the lane, not only the rows the batch
touched. A batch therefore takes at least `cfg_rows` cycles, even when it has few non-zeros. For
large, very sparse matrices this, and not memory bandwidth, sets the run time. Example: a matrix
shaped like finance256 (37,376 rows, 292 batches, 298K non-zeros) takes about 724,000 cycles, of
which about 682,000 are this floor. A merge that only visits the rows touched in the batch, kept
in a list per buffer, would remove the floor. It is not built here.

After the last batch the lane streams `(address = r·16 + lane, value)` for r = 0 … cfg_rows−1.
The last one is flagged.

## Sorting tree (sort_tree, sort_node)

There are 16 leaf FIFOs and 15 two-input comparator nodes in a heap: node n reads streams 2n and
2n+1. That is 8 + 4 + 2 + 1 comparators. Each node moves the smaller address of its two child
heads into its own 2-entry FIFO. Once one child has delivered its flagged last element, the node
forwards the other child. The root therefore delivers one address-sorted stream with a single last
flag. Since lane streams are interleaved by address, the root delivers rows 0, 1, 2, … in order.
`result_receiver` packs 16 values per beat and zero-pads the final beat.

## Top-level interface (cuper_top)

| Port | Meaning |
|---|---|
| `start`, `done` | pulse to run; high when y is written |
| `cfg_batches[15:0]` | number of 128-column batches |
| `cfg_rows[16:0]` | rows per lane (y has 16 × cfg_rows entries), ≤ ROWS |
| `cfg_mat_beats[c]` | beats to stream from matrix channel c, headers included |
| `cfg_xbar_sel[k][3:0]` | matrix channel that feeds core k; must be a permutation (assertion) |
| `mat_rd_req_*`, `mat_rd_rsp_*` | 16 read channels: request `{addr, len}` in beats, 512-bit responses in order |
| `vec_rd_*` | the x read channel, same protocol |
| `y_wr_valid/ready`, `y_wr_req` | y writes, `{addr, data}`, one beat each |
| `st_*` | counters of one run: reuse hits, BRAM reads, x writes/skips, RAW stall cycles, bubbles, merges, y beats |

All handshakes are valid/ready. Transfers happen on rising edges where both are high. Reset is
active-low `rst_n`.

The matrix loader issues bursts of up to 32 beats per channel. It keeps no more requests
outstanding than its 64-beat FIFO can take. The crossbar is a static permutation set by
`cfg_xbar_sel`. It is identity in the testbenches, and rotated in one run to exercise it.

Parameters come from `cuper_pkg`: 16 channels and cores, 8 PEs, 16 values per beat, 128 columns
per batch, adder latency 4. `cuper_top` has the parameter `ROWS = 65536` (rows per lane). Coarse
synthesis at the defaults gives about 46,000 word-level cells and 46,600 flip-flop bits. Memory is
about 101 Mbit; most of it is the three 65,536 × 32 buffers per lane. On a real device the
partial-sums buffers would map to UltraRAM.

## FP32 arithmetic

`fp32_mul` has 2 pipeline stages. `fp32_add` has 4.

* Both round to nearest, ties to even.
* Subnormal inputs and results are flushed to zero.
* NaN results are the canonical quiet NaN `7FC00000`.
* Infinities follow IEEE rules.

Sums depend on the order of addition. The end-to-end testbenches therefore build the reference
in the hardware's order: per lane, in token order within a batch, then batch after batch into the
partial sum.

## Where this design departs from, or fills in, the original architecture

* **Taken from the architecture:**
  * the channel allocation (16 matrix, 1 x, 1 y);
  * 16 cores of a decoder plus 8 PEs;
  * reuse registers and the MUX path;
  * skipping blank slice columns;
  * the FIFO per adder, the 4-cycle adder latency, and ping-pong buffers merged into a
    partial-sums buffer;
  * the comparator sorting tree, the result receiver, and 512-bit vector load and write;
  * 128-column batches;
  * the 64-bit element with 32-bit index and 32-bit value;
  * cyclic row allocation.
* **This design's own choices:**
  * the header beat and its count encoding;
  * the 16/16 index split and `16'hFFFF` for idle slots;
  * the batch sequencer and its barrier;
  * loading the whole x segment into each core's RAM at batch start (see below);
  * the round-robin read of the PE FIFOs;
  * the RAW guard and forwarding;
  * clearing the batch buffers through the merge engine;
  * the last-flag protocol of the sorting tree;
  * all FIFO depths, burst sizes and ROWS;
  * rounding and flush-to-zero.
* **How x reaches the core's RAM.** In the original description, a core fetches x from the
  vector loader on a reuse miss and then stores it in block RAM. Here the loader broadcasts the
  whole 128-value segment once per batch, and every core reads its RAM on a miss. The effect on
  reuse and on skipped writes is the same. The transfer is simpler.
* **The adder.** The original text describes the adder as taking a new input once it has
  finished the present one. Here the adder is fully pipelined and takes one token per cycle. The
  ordering then only needs to keep 4 consecutive tokens on distinct rows.
* **Host side is not hardware.** Slice partitioning, the two-step reordering and packing are
  host software. The testbench package `tb_spmv_pkg` has a simple stand-in:
  * a greedy window that never puts a row within 3 slots of itself;
  * otherwise it prefers the previous column;
  * it pads with idle slots when nothing fits.
* **Not modelled.** HBM and its controller are not modelled beyond a behavioural read model
  (`hbm_rd_model`, with latency and random stalls).
* **Not a goal.** Clock frequency and resource use on a real FPGA were not targeted.

## Capacity against the twelve benchmark matrices

The benchmark set is 12 SuiteSparse matrices, from sit100 (10K rows) to webbase-1M (1,000,005
rows). All of them fit the default build.

* **Rows:** the limit is 1,048,576. The largest matrix needs 62,501 rows per lane, against
  65,536.
* **Columns:** the limit is 65,535 batches × 128. webbase-1M needs 7,813 batches.
* **Non-zeros:** the non-zero count only sets stream length. The largest, mycielskian17 with 100M
  non-zeros, needs about 48 MiB per matrix channel.

## Simulating

All testbenches are self-checking and print `TB_RESULT checks=N failures=M`. They use
`verilator` 5 with timing support. Example for the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/cuper_pkg.sv tb/tb_fp_pkg.sv tb/tb_spmv_pkg.sv tb/tb_cuper_top.sv \
    --top-module tb_cuper_top -Mdir obj_top && obj_top/Vtb_cuper_top
```

Uninitialised state is random in verilator (`+verilator+rand+reset+2`). The design resets or
clears everything it reads.

| Testbench | What it checks |
|---|---|
| `tb_cuper_top` | Default parameters, 128 rows. Run 1: 3 batches, host-ordered input with one blank core and one crowded core. Every y value must be bit-exact, and reuse, skipped x writes, bubbles and merges must each occur, with zero RAW stalls. Run 2: one core's input unordered and the crossbar rotated; RAW stalls must occur and y must stay exact. |
| `tb_cuper_top_full` | Default parameters and full capacity: 1,048,576 rows, 2 batches, every y value checked. About 1.2 M cycles; roughly 1.5 min build plus run. |
| `tb_cuper_workloads` | Default parameters on random matrices with the row count, batch count and approximate non-zero count of three benchmark matrices: sit100 (10,272 rows, 81 batches), Si10H16 (17,088 rows, 134 batches, 875K non-zeros) and finance256 (37,376 rows, 292 batches). Every y value is checked. |
| `tb_<block>` | One per block: random and directed stimulus against independent reference models. Includes rate checks: the PE group sustains one token per cycle, and with ordered input the lane has no stalls. |

`tb_cuper_env.svh` holds the shared environment of the two top-level benches: DUT, HBM models, y
capture and the `run_op` task that builds, packs, runs and checks one multiplication.
`tb_fp_pkg` provides FP32 reference arithmetic built on `real`. `tb_spmv_pkg` provides the host
ordering and packing.

## Files

* `rtl/cuper_pkg.sv`: shared types and constants.
* `rtl/fp32_mul.sv`, `rtl/fp32_add.sv`, `rtl/sync_fifo.sv`: building blocks.
* `rtl/matrix_loader.sv`, `rtl/crossbar_switch.sv`, `rtl/vector_loader.sv`,
  `rtl/vector_writer.sv`: memory side.
* `rtl/compute_core.sv`, made of `perceptual_decoder.sv` (which contains `vector_fetcher.sv`) and
  `pe_group.sv` (made of `pe.sv`).
* `rtl/accumulator.sv`, made of 16 × `accumulator_lane.sv`.
* `rtl/sort_tree.sv`, made of `sort_node.sv`, then `rtl/result_receiver.sv`.
* `rtl/cuper_top.sv`: everything wired, plus the batch sequencer.
