# Two-step SpMV accelerator with radix-parallel multi-way merge

Multiplying a very large, very sparse matrix by a vector (y = A·x) is limited
by the random reads of x, not by arithmetic. When x does not fit on chip,
every nonzero turns into a random main-memory access. This design avoids those
accesses by splitting the product into two streaming steps:

1. **Partial products.** A is cut into column stripes A^k, each as wide as
   the slice x^k of the vector that fits in an on-chip scratchpad. The product
   A^k·x^k reads x only from the scratchpad. Its result is a sparse,
   row-sorted intermediate vector v^k, which is written back to main memory as
   a sequential stream.
2. **Multi-way merge.** The K intermediate vectors are read back as K sorted
   streams and merged by row. Entries for the same row are added, and the
   dense result y leaves as a sequential stream.

Both steps touch main memory only sequentially. What remains is to make the
merge fast enough. A single K-way merge tree delivers one record per cycle.
This design runs p = 2^q merge trees side by side, one per value of the q
low bits of the row index (the *radix*), and keeps them in lock-step by
making each one's output dense.

The RTL covers the computational core of the chip: the step-1 lanes and
scratchpad, the step-2 merge network, the delta-index compression of
intermediate vectors, the iteration-overlap mode and the Bloom filter for
high-degree nodes. Main memory and its page scheduler are outside it; the
testbenches model them.

## Data formats

`spmv_pkg` defines the shared types:

- a record `rec_t` = {32-bit row key, FP32 value};
- a step-1 input item `nz_t` = {row, column, value, last, empty};
- the reserved key `0xFFFFFFFF` (`KEY_END`), which marks the end of a list
  inside the merge trees.

Keys are 32 bits, so a vector can have up to 2^32 rows. Arithmetic is IEEE-754
single precision, rounded to nearest even. Subnormals are flushed to zero, and
NaNs are not handled specially (`fp32_mul`, `fp32_add`).

## Step 1: lanes on a banked vector segment

`step1_unit` holds `vector_scratchpad` and P = 16 `step1_lane`s.

- **Row assignment.** Each lane receives, in row-major order, the nonzeros of
  the rows assigned to it (row mod P in the testbenches).
- **Lane pipeline.** Stage 0 of a lane asks the scratchpad for x[col]. Stage 1
  multiplies the value with it and adds the product into a running row sum.
  When the row changes, a record {row, sum} goes into a small output FIFO.
- **Stripe end.** An item flagged `last` ends the lane's stripe. A lane with no
  work gets a single `empty` item.
- **Collector.** It waits until every lane that is not finished has a record
  ready, then emits the smallest row. The P streams thus become one
  row-sorted v^k.
- **Scratchpad.** It has NBANKS = 32 word-interleaved banks, each a
  one-read, one-write array. When lanes hit the same bank in one cycle, the
  lowest lane wins and the others stall and retry; `bank_conflict` marks such
  cycles. Read data returns one cycle after the grant.
- **Write port.** It stores 16 consecutive words per cycle, one per bank. It
  is used both to load x^k and, in ITS mode, to write back y beats.

## Step 2: the PRaP merge network

`prap_merge_network` is the core of the design. It holds the following, in
data-flow order:

```
 beats of <=16 records of one list
        |
  radix_presorter  (bitonic, 10 stages, stable)
        |
  prefetch_buffer  (per list, per radix: a small FIFO slot)
        |  16 read ports, one per radix
  merge_core x16   (2048-way binary trees)
        |
  mc_output_stage x16  (add equal rows, insert missing rows)
        |
  store_queue      (16 FIFOs dequeued together)
        |
   y: 16 consecutive rows per beat
```

### Pre-sorting a beat by radix

Main memory returns a list in beats of p = 16 records. The records of one
beat belong to different merge cores. `radix_presorter` orders them by the
radix (key bits [3:0]) with a pipelined bitonic network, so that each core's
records are contiguous.

A bitonic network is not stable on its own, and a core must see its records
in key order. So the compare key is {invalid, radix, input position}. Masked
slots of a partial beat sort to the end. The latency is 10 cycles, one per
network stage, and a new beat can enter every cycle.

### Prefetch buffer and flow control

`prefetch_buffer` keeps, for every list and every radix, a FIFO slot of
SLOT_DEPTH = 16 records. That is a 2 KB page per list, split over 16 radices.
Each merge core reads the slots of its own radix and never sees the others.
A slot whose list has ended and is empty reads as an end marker.

Because the pre-sorter is pipelined, room must be known before a beat enters
it:

- **Admission.** A beat is admitted only if, for every radix, its list's slot
  has room for that radix's records in the beat (`rsv_ok`). The room is then
  booked, so the sorted beat ten cycles later always fits.
- **Refusal.** A beat without room is refused. The memory side retries it
  later or sends a beat from another list.
- **Starvation report.** When a merge core waits on an empty slot, the buffer
  reports that list on `starve_valid/starve_list`. The memory-side scheduler
  should fetch those lists first.

**Limitation.** Finite per-list slots shared by several radices can deadlock.
This happens when core A waits for list L, whose next beat needs room in a
slot that core B has not drained, while core B waits on a list that needs
room in core A's slot. Serving starving lists first and retrying refused
beats made this disappear with 8- and 16-entry slots in all tests. With
4-entry slots it did occur.

### The merge core

`merge_core` is a K-way merge arranged as a binary tree of log2 K stages.

- **Storage.** Each stage keeps the small FIFOs of all its nodes in one
  memory, indexed by node. With DEPTH = 2 records per node, a whole stage is
  one SRAM-like array.
- **Activity.** Only one node per stage is active in a cycle.
- **Refill requests.** Popping the root's winner posts a refill request to
  the child it came from. That child pops its own winner and posts a request
  one stage down, and so on to a leaf. Each stage has a 4-entry queue of
  {node, count} requests.
- **Start-up.** At start the tree fills on demand. A node that has never
  been served first activates its children by asking each for DEPTH records.
- **End of input.** A node whose two children both show the end marker
  forwards the marker without popping, so exhausted sub-trees drain cleanly.
- **Rate.** In steady state the root delivers one record per cycle.
- **Ties.** They go to the lower-numbered list, so equal rows leave in list
  order.

### Summing and filling in missing rows

`mc_output_stage` first adds records with equal keys: the same row from
different v^k, summed in list order. It then checks that core r produces rows
r, r+16, r+32, ... without gaps. When a row is missing it emits {row, 0}
before the next real record; after the end marker it emits the remaining rows
up to `num_rows`.

This has two effects. y leaves dense, and all 16 cores produce exactly one
record per 16 rows. `store_queue` can therefore dequeue one record from each
core per cycle and output y rows 16c..16c+15 together, so the whole step runs
at up to 16 records per cycle.

`num_rows` must be a multiple of 16.

## Overlapping iterations (ITS mode)

Iterative algorithms (PageRank, for example) use y of one iteration as x of
the next. With `its_mode = 1` the scratchpad becomes two half-size buffers:

- step 1 reads buffer `rd_sel`;
- every y beat whose rows fall in the window [its_base, its_base + SEG/2)
  is also written into the other buffer (`wb_fire`).

So the next iteration's first x segment is on chip by the time step 2 ends.
The price is that the segment, and with it the largest matrix, is halved:
2048 × 1M rows instead of 2048 × 2M. In a write-back cycle the x load port
is held off (`ld_ready` low).

## Delta-index compression (VLDI)

Intermediate vectors are sorted, so the row gaps between consecutive records
are small. `vldi_encoder` replaces each key by its distance from the previous
key of the same list; the first key of a list is coded as its distance from
0. It then sends the distance in BLK-bit blocks, most significant first,
using only as many blocks as needed. Each block becomes a (BLK+1)-bit string
whose leading bit is 1 if another string of the same record follows and 0 on
the last one. The value travels uncompressed with the last string.

`vldi_decoder` reverses this. It keeps the previous key per list, so that
strings of different lists may arrive interleaved one record at a time, as
page fetches of many lists do. `beat_packer` collects the decoded records of
one list into beats for the pre-sorter. A beat is closed when:

- it is full;
- it holds the list's last record;
- a record of another list arrives; or
- no record has arrived for 4 cycles.

In the top, `vldi_en` switches both the step-1 output and the step-2 input
between plain records and strings. BLK = 8 is the default; BLK = 4 is the
better choice for a larger on-chip memory.

## High-degree nodes: Bloom filter

In power-law graphs a few rows have enormous degree. Such rows are meant to
go to a separate accumulation pipeline; that pipeline is not part of this
RTL.

Detection works as follows:

- **Population.** `hdn_populator` counts the run length of each row in a
  row-major stream of nonzero row indices. It inserts rows with more than
  1000 nonzeros into `bloom_filter`.
- **Filter layout.** The filter is 16384 words of 64 bits (1 Mbit). The
  hash of a key picks one word (14 bits) and 4 bit positions in it (4 × 6
  bits). An insert or a query therefore touches a single word.
- **Hash functions.** Each hash bit is the XOR of a fixed pseudo-random
  subset of the key bits (an H3 family). The subsets are generated at
  elaboration by an xorshift sequence.
- **Timing.** A query answers one cycle later. After reset and after
  `bf_clr`, the array is cleared one word per cycle.
- **Accuracy.** At full size, 100 000 inserted keys gave about 1.7 % false
  positives and no false negatives.

## The top: `spmv_accel_top`

It wires the parts above together. Its port groups:

| group | meaning |
|---|---|
| `its_mode, rd_sel, vldi_en, its_base` | modes, ITS buffer select, write-back window |
| `ld_*` | x segment load, 16 words per beat (physical address) |
| `s1_start, nz_*` (P streams of packed `nz_t`) | step-1 start and nonzeros |
| `v_*` / `vc_*` | v^k as records / as VLDI strings (`vc_first` starts a list) |
| `s1_done, bank_conflict` | step-1 status |
| `s2_start, num_rows, in_*` / `cs_*` | step-2 start; v^k beats or VLDI strings with their list |
| `starve_*` | lists the merge cores are waiting for |
| `y_*, inserted, wb_fire, s2_done` | dense y output and status |
| `deg_*, hq_*, hr_*, bf_clr` | HDN population, queries, results |

Step 1 and step 2 are independent and may run at the same time. This is how
ITS overlaps iteration i's merge with iteration i+1's partial products.

Default parameters:

- P = 16 lanes;
- 32 banks of a 2M-word (8 MB) segment;
- K = 2048 lists;
- q = 4 (16 merge cores);
- 16-record slots;
- BLK = 8;
- Bloom filter 16384 × 64 with G = 4;
- HDN threshold 1000.

At these sizes one pass handles up to 2048 × 2M ≈ 4.3 billion rows in plain
mode and 2.1 billion in ITS mode. That covers the 4000M-row (plain) and
2000M-row (ITS) design points and every graph the evaluation uses, the
largest being 2000M nodes.

## Departures and limits

- **Merge core.** The published merge core is described only at block level.
  Its tree, request queues and on-demand activation here are this design's
  own.
- **Interfaces.** Flow control, the slot reservation, the starvation report,
  the collector in step 1, the beat packer, the write-back window and all
  handshakes are likewise this design's choices.
- **No +y term.** y = A·x is computed; the `+ y` of y = A·x + y is not added.
- **Hashing.** The Bloom filter uses 4 hash groups (38 hash bits). The
  original text is inconsistent here: it also mentions three groups and 32
  bits.
- **Not built.** The HDN accumulation pipeline, the main-memory system and
  its page scheduler, and compression of the matrix itself.
- **Deadlock.** See the prefetch buffer section: with small slots the memory
  scheduler must serve starving lists first.
- **Synthesis.** The per-list slot counters of the prefetch buffer and the
  per-node counters of the merge cores are flip-flop arrays with reset. At
  the default K = 2048 this makes the merge network large and slow to
  synthesise; real silicon would keep them in SRAM.

## Simulation

All testbenches are self-checking and print
`TB_RESULT checks=N failures=M`. They use no files and no C code. Any
testbench can be run with plain Verilator:

```
verilator --binary --timing -Irtl rtl/spmv_pkg.sv rtl/*.sv tb/tb_fp_pkg.sv \
          tb/tb_spmv_accel_top.sv --top-module tb_spmv_accel_top -o sim
./obj_dir/sim
```

`tb_fp_pkg` holds the FP32 reference: it rounds a real result to single
precision (nearest even, flush to zero). The reference results are computed
independently of the RTL.

| testbench | block(s) | size | what it checks |
|---|---|---|---|
| `tb_fp32_mul`, `tb_fp32_add` | FP units | full | random and corner operands against the reference |
| `tb_step1_unit` | scratchpad, lanes, collector | P=4, 8 banks, 1K words | two stripes (plain and ITS buffer 1) against row sums; bank conflicts occur |
| `tb_vldi` | encoder + decoder | BLK=8 and the 7-bit, 17-bit-delta example | round trip, string count per delta |
| `tb_bloom_filter` | Bloom filter | full | no false negatives, false-positive rate, clear |
| `tb_radix_presorter` | pre-sorter | full | radix order, stability, 10-cycle latency |
| `tb_merge_core` | merge core | K=64 | merged order and one record per cycle |
| `tb_prap_merge_network` | step 2 | K=32 | dense y against list-order sums; a sparse run must deliver ~16 rows per cycle |
| `tb_spmv_accel_top_full` | whole design | defaults | see below |
| `tb_spmv_accel_top` | whole design | P=4, K=4, 1K words, BLK=4, 8-entry slots | both steps end to end, records and VLDI paths, ITS write-back read back through step 1, HDN detection; fails if a bank conflict, missing-row insertion, refused beat, starvation report, ITS write-back and mode switch, multi-string VLDI record or Bloom hit never happened |

**Full size.** `tb_spmv_accel_top_full` instantiates the top with every
parameter at its default and takes it through complete operations. It runs
four step-1 stripes, two of them in ITS mode with VLDI output. Step 2 merges
2048 lists, four with data and the rest empty, once in plain mode and once in
ITS mode with write-back. A final read-back of the written buffer through
step 1 closes the test. It runs in seconds.

It does not exercise HDN detection: the 1000-nonzero threshold needs longer
rows than its matrix has. Beat refusal and multi-string VLDI records are
also left to the reduced-size test.
