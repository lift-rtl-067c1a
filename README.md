# Lift: GCN aggregation inside 3D-stacked memory

Lift is an accelerator for graph convolutional networks (GCNs). It moves the compute into a
high-bandwidth memory (HBM) stack instead of moving feature vectors out to a chip. One GCN layer is
`X' = σ(Â · X · W)`. Computing it as `Â · (X · W)` turns both phases into the same kernel: a sparse
matrix times a dense matrix (SpMM). Combination is sparse `X` times rows of `W`. Aggregation is the
sparse adjacency `Â` times rows of `XW`.

The design rests on two ideas:

* **Push-based dataflow.** The sparse matrix is walked column by column, in compressed sparse
  column (CSC) order. Column `j` needs one input vector, row `j` of `XW`. That vector is fetched
  once and broadcast to all multiply-accumulate (MAC) arrays. Every non-zero `a(i,j)` of the
  column then adds `a(i,j) · x_j` into the partial output vector of row `i`. Input vectors are
  never fetched twice. The partial sums are the data that gets touched at random, so they are
  kept where that is cheap.
* **Hybrid placement.** Most vertices have a low degree. Their partial sums live in the DRAM
  banks of the bank group that computes them. A *lightweight processing unit* (LPU) sits next to
  those banks and updates them through the banks' I/O sense amplifiers and write drivers. The few
  high-degree vertices would pull data across many bank groups and channels. They go to one
  *auxiliary processing unit* (APU) on the HBM base die, which keeps their partial sums in on-die
  SRAM output buffers.

This RTL implements both units, their buffers and controller, the shared fetch path, and a top
level with 32 LPUs (one per compute-enabled bank group) plus the APU. That is 32 × 16 + 256 = 768
MACs at 500 MHz.

## Block map

```
lift_top
├── tsv_bus                 round-robin share of the input-vector fetch path (33 requesters)
├── lpu × 32                one per CIM bank group; partial sums in the group's 4 DRAM banks
│   ├── lookahead_fifo      1 KB = 128 non-zeros, with a look-ahead read port
│   ├── prefetcher          one vector fetch per column, into a free slot
│   ├── input_vector_buffer 2 KB = 8 vectors
│   ├── spmm_controller     pass scheduler + flush sequencer
│   └── mac_array × 4       4 MACs each, one per bank, read-modify-write through the bank port
└── apu                     base die; partial sums of high-degree vertices in SRAM
    ├── sync_fifo           sparse matrix buffer, 8 KB = 1024 non-zeros
    ├── lookahead_fifo      128 non-zeros
    ├── prefetcher
    ├── input_vector_buffer 16 KB = 64 vectors
    ├── spmm_controller
    ├── mac_array × 64      4 MACs each
    └── output_buffer × 64  8 KB each, 512 KB total = 2048 output vectors
```

`lift_pkg` holds the shared types and constants.

The LPU and the APU are the same engine with different accumulator stores:

| | LPU | APU |
|---|---|---|
| MAC arrays × lanes | 4 × 4 | 64 × 4 |
| accumulator store | DRAM bank (external port) | `output_buffer` SRAM |
| store read latency | 7 cycles (tCAS 14 ns at 500 MHz) | 1 cycle |
| vector slots | 8 | 64 |
| non-zero buffering | 128-entry look-ahead FIFO | 1024-entry buffer + 128-entry look-ahead FIFO |
| output rows per unit | up to 2^18 (4 banks × 2^21 words) | 2048 |

## Data formats

* **Element:** 16-bit signed fixed point with 8 fraction bits (Q8.8). A MAC computes
  `acc + ((a · x) >>> 8)`. The product is truncated to 16 bits and the sum wraps; nothing
  saturates.
* **Vector:** 128 elements, the GCN hidden size. It moves as 32 *chunks* of 4 elements (64
  bits). One chunk is what one MAC array handles per cycle.
* **Non-zero record (`lift_pkg::nz_t`, 64 bits):** `{last, 3 spare, col[21:0], row[21:0],
  val[15:0]}`.
  * `col` selects the input vector.
  * `row` is the *unit-local* output row.
  * `last` marks the final non-zero of a CSC column. Whoever reads the matrix turns the CSC
    column pointers into this flag.
* **Row placement:** local row `r` belongs to MAC array `r mod NARR`. Its vector occupies words
  `(r div NARR)·32 … +31` of that array's store. In an LPU, this means bank `r mod 4`.

Which vertex goes to which unit, and which local row it gets, is decided by software before the
run (see *Mapping* below). The hardware only sees the local row numbers in the records.

## How a unit runs an SpMM

The flow is the same in both units:

1. **Look-ahead.** Non-zeros enter `lookahead_fifo`. A second read pointer runs ahead of the
   head. The `prefetcher` reads each record there. At the first record of a column it claims the
   lowest free slot of `input_vector_buffer` and issues a fetch request `(col, slot)`. It then
   tags every record of that column with the slot. Records become visible at the head only after
   they have been tagged. A new column waits while no slot is free (`ev_noslot`) or the fetch
   request is not accepted. Records inside an open column pass at one per cycle.
2. **Fill.** The fetch path returns the vector as 32 in-order chunks tagged with the slot. The
   slot counts as *loaded* once chunk 31 has arrived.
3. **Passes.** The `spmm_controller` repeats three states:
   * **GATHER.** It takes head records, one per cycle, once their slot is loaded. Each record
     becomes the job of its MAC array. The pass closes at any of these events:
     * the column's `last` record;
     * a record whose array already has a job (a *conflict*; the rest of the column follows in
       another pass);
     * the FIFO running empty.

     A head record whose vector is not loaded yet stalls the gather (`ev_vec_wait`).
   * **BCAST (32 cycles).** In cycle `c`, chunk `c` of the column's vector is read from the
     buffer and broadcast. Every array with a job issues a read-modify-write of chunk `c` of its
     row.
   * **DRAIN (`ACC_LAT + 1` cycles).** This lets the last write-back land before the next pass can
     read the same rows. If the column has finished, its slot is released.
4. **MAC pipeline (`mac_array`).** The read of the partial chunk goes out in the issue cycle. The
   input-vector chunk arrives one cycle later and is delayed to meet the partial sum `ACC_LAT`
   cycles after issue. The sum is written back to the same address one cycle after that.
5. **Flush.** `flush_start` is accepted only while the unit is idle. The flush then reads rows
   `0 … flush_count-1`, chunk by chunk, and streams them out on `out_*` (valid/ready, tagged with
   row and chunk). It writes each word back as zero. Reads are issued only while the 16-entry
   output queue has room for everything in flight, so back pressure never loses data. After a
   flush the store is clear for the next layer. The APU's SRAM is not reset, so after power-up
   it is cleared by flushing all 2048 rows once.

Cost of one pass: `k + 32 + ACC_LAT + 2` cycles, where `k` is the number of records gathered
(at most `NARR`). With all arrays busy, an LPU performs 16 MACs per cycle during BCAST and the APU
performs 256. A column whose non-zeros hit the same array several times needs that many passes.
The input vector is read again for each pass, but it is fetched from memory only once.

## Top-level interface (`lift_top`)

Everything the units need from the memory stack is a port:

* `lpu_nz_*[i]`, `apu_nz_*`: each unit's share of the sparse matrix, as `nz_t` records
  (valid/ready).
* `mem_req_*` / `mem_rsp_*`: the single input-vector fetch channel to the non-CIM bank groups.
  * A request carries the requester id (LPU `i` is id `i`, the APU is id 32), the column and the
    slot. It is valid/ready.
  * A response is one chunk per cycle with id, slot and chunk index. It has no back pressure:
    the slot was reserved before the request left.
* `bank_*[i][b]`: column read/write ports to bank `b` of LPU `i`'s bank group. Read data must
  arrive exactly `BANK_LAT` (7) cycles after `rd_en`. A read and a write to the same word in one
  cycle must return the old data.
* `flush_start`, `lpu_flush_count[i]`, `apu_flush_count`, and the `*_out_*` streams: flush
  control and the finished output vectors.
* `idle`: every unit is idle. `lpu_events[i]` / `apu_events` carry one-cycle pulses
  `{flush_done, noslot, vec_wait, conflict, pass}`. `ev_bus_contention` pulses when more than
  one unit requests a fetch in the same cycle.

All logic runs on one clock (500 MHz in the target configuration) with an active-low
asynchronous reset. Handshakes are valid/ready, and no valid depends on its ready.

## Mapping (software side)

Splitting the vertices between the units is not hardware. The end-to-end testbench
(`tb/lift_top_driver.sv`) does it the way the architecture intends:

* **Degree threshold.** The APU's share of the edges is `capA / (capA + capL)`, with the compute
  capabilities taken as MAC counts (256 against 512). Vertices go to the APU in order of falling
  degree until their edges exceed that share.
  The APU takes at most 2048 vertices, which is what its output buffers hold.
* **LPU assignment.** The remaining vertices are assigned by a bounded depth-first search, depth
  4. It fills each LPU up to `edges · capL / ((capL + capA) · numLPU)` before moving to the next,
  which keeps neighbours together.

The second stage of the published mapping is not implemented anywhere. That stage rebalances edges
between units with a linear program over a latency model.

## What comes from the architecture and what is this implementation's choice

From the published configuration:

* the LPU/APU split;
* one LPU per CIM bank group and 32 such groups;
* 4 banks per bank group;
* MAC counts of 16 per LPU and 256 for the APU;
* buffer sizes: 1 KB look-ahead FIFO, 2 KB and 16 KB input vector buffers, 8 KB sparse matrix
  buffer, 512 KB output buffers;
* the push-based CSC dataflow with broadcast of the input vector;
* partial sums in the banks for the LPU and in on-die output buffers for the APU;
* the 500 MHz clock, the 128-element hidden size, and tCAS = 14 ns;
* four MACs per APU array, as drawn in the APU's block diagram.

Choices made here, where the architecture says nothing:

* **Number format:** 16-bit Q8.8 with truncation and wrap-around.
* **Record format:** the 64-bit non-zero record and its `last` flag.
* **Row placement:** row-to-array placement by `r mod NARR`.
* **Controller:** the gather/broadcast/drain schedule and its conflict rule.
* **Slots:** slot-based vector buffering, with release after a column.
* **Flush:** read-and-clear with a credit-limited output queue.
* **APU look-ahead FIFO:** 128 entries.
* **Fetch path:** `tsv_bus`, one shared channel with round-robin arbitration and id-tagged
  responses.
* **Bank port:** fixed-latency column access. Row activation, refresh and the rest of DRAM timing
  belong to the bank side.

Known simplifications:

* **One fetch channel.** A real HBM stack has 16 channels with their own TSVs. Here every fetch
  shares one channel that returns one 64-bit chunk per cycle, and in the end-to-end runs this
  channel is the bottleneck. Widening it means replicating `tsv_bus` per channel and steering
  requests by where the vector lives.
* **Sparse-matrix reads are a port.** An LPU reads its share of the sparse matrix from its own
  bank group. Here that share arrives on `lpu_nz_*` as a separate stream, and the bank ports carry
  only partial sums. Arbitrating one bank between the two uses is left to the bank side.
* **Finished vectors are a port.** Flushed output vectors leave on the `*_out_*` streams. Writing
  them into the non-CIM bank groups for the next layer happens outside these units.
* **No activation function.** σ is applied outside the units.
* **Fixed record fields.** Vertex and feature indices are 22 bits (4 M).
* **APU capacity.** The APU holds 2048 high-degree rows at a time, the number its 512 KB output
  buffers allow. Graphs with more such rows need several APU batches, each followed by a flush.

## Workload sizes

The evaluated datasets (Citeseer, Cora, DBLP, Pubmed, Reddit, with two-layer GCN, GraphSage and
GIN models of hidden size 128) all fit the index widths and per-unit row capacity:

* The largest has 232,965 vertices, against 4 M indices and 32 × 262,144 LPU rows.
* Input-feature widths are at most 3,703 columns during combination.
* The 128-element vectors match the hidden size. Output layers with fewer classes are padded to
  128.

The sparse matrices stream from memory, so the number of edges is limited only by the 8 GB stack.
The largest graph simulated end to end is Cora-sized (about 13,300 non-zeros, 202,000 cycles for one
aggregation step). A Pubmed-sized graph (19,717 vertices) takes more than 20 million cycles in this
configuration, mostly waiting on the single fetch channel, which is too long for routine simulation.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog. Arithmetic references are computed
independently in `tb/lift_tb_pkg.sv`. Behavioural models stand in for the parts outside the logic:

* `dram_bank_model`: one bank, with a fixed read latency;
* `vec_mem_model`: the non-CIM bank groups serving vector fetches, with latency and random
  refusal.

| testbench | what it shows |
|---|---|
| `tb_sync_fifo`, `tb_lookahead_fifo`, `tb_output_buffer` | ordering, full/empty, look-ahead tags, read-before-write |
| `tb_input_vector_buffer`, `tb_prefetcher` | slot allocation and release, one fetch per column, tagging, stall without a slot |
| `tb_mac_array` | fixed-point MAC against the reference, write-back exactly `ACC_LAT+1` cycles after issue (latency 7 and 1) |
| `tb_spmm_controller` | pass count equals the greedy split of each column, 32-cycle broadcasts, slot release order, flush data and clearing under back pressure |
| `tb_tsv_bus` | payload and id routing, round-robin fairness (no requester waits more than N−1 grants) |
| `tb_lpu`, `tb_apu` | full units at default size: random SpMM against the reference, 32 chunk updates per non-zero, 32 busy cycles per pass, two layers back to back |
| `tb_lift_top` | end to end with 4 LPUs + APU on a 700-vertex graph with hubs; counts every mechanism (passes, conflicts, vector waits, slot exhaustion, bus contention, back pressure on both streams, flushes) and fails if one never happens |
| `tb_lift_top_full` | the same at the default configuration (32 LPUs + APU, no parameter overrides) on a 1200-vertex graph |
| `tb_lift_top_cora` | default configuration on a synthetic graph of Cora's size (2,708 vertices, 10,556 directed edges plus self loops, four hubs); also stands for Citeseer, which is of the same size |

To run one with Verilator 5:

```
verilator --binary --timing --assert --top-module tb_lpu -y rtl -y tb +libext+.sv -Irtl \
          rtl/lift_pkg.sv tb/lift_tb_pkg.sv tb/tb_lpu.sv
./obj_dir/Vtb_lpu
```

`tb_lift_top_full` and `tb_lift_top_cora` each build and run in about a minute and need about 1.2 GB of memory.

To change the configuration, use the parameters of `lift_top`. For example, `NUM_LPU`, `NBANK`,
`BANK_LAT` and the buffer depths are parameters. The element width, lanes per array and vector
length are constants in `lift_pkg`. `NBANK`, `APU_NARR`, the FIFO depths and the slot counts must
be powers of two.
