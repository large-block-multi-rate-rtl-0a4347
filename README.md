# Large-block multi-rate streaming sort

A merge sort laid out in space instead of time. Key-value pairs stream in
at P pairs per clock, and every level of the merge recursion is a hardware
stage of its own, so all levels work at once on successive runs. The
sorted block streams out at the same P pairs per clock while the next
block streams in. The default is P = 4 pairs of 128 bits, which is
12.8 GB/s at 200 MHz.

On-chip memory limits a single streaming pass to blocks of about
N = 2^18 pairs (4 MB). Larger blocks take more passes. The first pass
writes sorted runs of N pairs to external DRAM. A second pass reads K of
these runs back at once and merges them with a K-way merge tree. The hard
part of that pass is the memory traffic: DRAM is only fast for large
transfers, so runs are read a page at a time, and the merge tree's input
buffers must be refilled before any of them runs dry.

The design has two halves:

* `multirate_sorter`: the single-pass streaming sorter (rate P, any block
  size up to N).
* `multipass_sorter` (top): `multirate_sorter` feeding external memory
  through `rw_controller`, then K `input_buffer`s and a `kway_merge_tree`.
  It sorts blocks of K*N pairs (default 64 x 8192 pairs = 8 MB).

## Data format

A pair is a 64-bit key and a 64-bit value (`pair_t` in `sort_pkg`), ordered
by key only. A tuple is P pairs and moves in one beat. Every interface is
valid/ready. A transfer happens when both are high at a clock edge.

Inside the sorter every tuple also carries a block number and a rank, and
elements are ordered by the triple (block, rank, key). The next section
explains why.

## The streaming merge stage (the hard part)

### Why a tag is needed

A software merge sort knows where each run starts and ends. A stream has no
such marks. Stage r receives an endless stream of sorted runs of 2^(r-1)
tuples. It must merge run 0 with run 1, run 2 with run 3, and so on, and
never let a pair of run 2 overtake a pair of run 1.

The `tagger` solves this once at the input. It gives every tuple a
**block number** (counting blocks) and a **rank** (the tuple's index inside
its block). After stage 1 sorts each tuple on its own, the rank of a tuple
is the index of its one-tuple run. Each later stage then does this:

1. **Split** (`split_node`): send a tuple to queue A or queue B by the
   parity of its run index (`blk[0] ^ rank[0]`), and halve the rank. The
   two runs that must be merged now have the same rank. Two neighbouring
   pairs of runs differ in rank.
2. **Merge** (`merge_core`): repeatedly output the P smallest front
   elements of A and B, comparing (block, rank, key).

Because the rank is compared before the key, the merger finishes the run
pair with the lower rank before it starts the next pair. It needs no
counters and no end-of-run marks. The same holds across blocks through the
block number, so blocks of different sizes can follow each other directly.
A block must be a whole number of tuples; padding is up to the user.

Two choices here are this design's own:

* The block number is `RW + 2` bits wide and compared as a serial number:
  the top bit of the difference modulo 2^BW decides. This lets it wrap, as
  long as at most a quarter of its range is in flight at once.
* The split parity includes `blk[0]`. Without it, a block with an odd
  number of runs would put two runs in a row into the same queue.

### Merging P elements per cycle

`merge_core` = `min_select` + `bitonic_net` + one register.

* `min_select` holds the P front elements of A (ascending) and of B. It
  compares `a[j]` with `b[P-1-j]` and takes the smaller of each pair. The
  result is exactly the P smallest of the 2P elements, and it is bitonic
  (it rises, then falls). Ties go to B. Each side keeps a three-tuple window
  and an offset, because a side is consumed in pieces of 0..P elements per
  cycle.
* `bitonic_net` needs only the last (merging) stage of a bitonic sorter,
  since its input is already bitonic: log2(P) layers of P/2 compare-swaps.
* Stage 1 uses `oddeven_net`, a Batcher odd-even merge sort of the P pairs
  of one tuple.

Latency is two cycles from the queues to the output, and the rate is one
tuple per cycle.

### Queues: separate FIFOs, then one shared buffer

Stage r merges two runs of n/2 tuples into one of n = 2^r tuples. A
stage with separate FIFOs for A and B needs n/2 places on each side. In the
worst case A is full while B is still filling. But A and B together never
hold more than about n/2 + 1 tuples. So two layouts are used:

* **`split_stage`** (output runs of 2 and 4 tuples): `split_node` + two
  `tuple_fifo`s of 2^R tuples + `merge_core`. These stages are small, and
  simple FIFOs cost nothing.
* **`buffer_stage`** (output runs of 8 tuples and more): A and B share
  one memory (`shared_buffer`). Because tuples leave A and B in an order
  nobody knows in advance, a freed place can be anywhere. So the buffer
  keeps a free list of place indices and one index queue per side (A and
  B). This indirection costs n * log2(n) bits per stage but halves the
  data memory. The free list is filled by a counter after reset, so
  nothing has to be initialised.

The shared memory is read synchronously, one tuple per cycle. The tuple
goes into a small output queue (4 tuples) per side, and the side with
fewer queued tuples is read first. Each stage has 2^(R-1) + 9 places: half
a run, plus one, plus 8 tuples of slack. The extra places cover the read
pipeline and the tails of runs.

**Known limitation.** When one side's run ends before the other's, the
merger must see the other side's *next* run before it can finish. With the
slack above, random data keep rate 1 in every stage. Adversarial data
(every pair of one run below every pair of the other) can stall the input
of a stage for part of a run. Throughput then drops for a while, but
the result stays correct.

### Single-pass sorter

`multirate_sorter` chains `tagger`, `oddeven_net` (registered), two
`split_stage`s, and `buffer_stage`s up to output runs of N/P tuples:
log2(N/P) merge stages in all (16 for N = 2^18). One tuple enters and one
leaves per cycle. The latency is about one block.

There is no flush. The last pairs of the newest block stay inside until
more tuples enter; the next block's data push them out. To drain a final
block, feed a dummy block after it.

## Multi-pass sorting

### Round-robin memory slices

`rw_controller` shares one memory port between two jobs. It writes the
sorted runs coming out of the first pass, and it reads pages back for the
merge tree. Time is cut into slices of one page (C = 128 tuples = 8 KB):
a write slice, then a read slice, and so on. A slice with nothing to do is
skipped, so one job alone gets the whole port. Each slice costs two cycles
of command overhead.

Memory is split into two halves of K runs each (double buffering). Batch b
(K runs) is written to half b mod 2. A buffer reads pages of batch b only
after the whole batch is written. Batch b is not written until every
buffer has finished reading batch b-2. While it waits, `guard_hold` is
high. Addresses are {half, run, page, beat}, counted in tuples.

Run data first collect in a one-page FIFO. A write slice starts only when a
whole page is there. This rule is this design's own. Without it, a write
slice could hold the port waiting for the end of the newest run, which
stays in the first pass until more input comes (see "no flush" above).
The reads the merge tree needs to drain would then be blocked, and the
system would deadlock.

### Refilling the emptiest buffer

Each of the K `input_buffer`s reports a **level**: tuples stored plus
tuples already requested. `min_occupancy_select` picks, among the buffers
that have a page waiting in memory and room for it, the one with the
lowest level. It is a linear scan with a registered result, so the choice
takes one cycle. Ties go to the lower index. Pages come back in request
order. The controller routes each page to its buffer and tags it with its
batch number. The merge tree uses that tag as its block number, which keeps
successive batches apart.

### How big an input buffer must be

While the merge tree drains one buffer, the others may receive pages they
do not need yet. A buffer must never run dry while its page is in flight.
With page size C and latency allowance L (memory latency plus the
selection cycle), the total content needed across k buffers follows the
recurrence

    b(2) = 2 (C + L)
    b(k) = ceil( k (b(k-1) + C + L) / (k - 1) )

and each buffer gets `ceil(b(K)/K) + C + L` tuples (`merge_buf_depth` in
`sort_pkg`). For K = 64, C = 128, L = 10 that is 792 tuples. Other values:
(K, C, L) = (32, 128, 10) gives 695, (16, 64, 10) gives 321, and
(4, 4, 8) gives 34. L is only a sizing parameter: the design does not
measure latency. A memory slower than L cycles can make `tree_stall`
fire more often; the result stays correct.

A buffer asserts `page_space` when a further page fits, counting reserved
tuples, so it never overflows. Data arrive without backpressure.

### K-way merge tree

`kway_merge_tree` is a binary tree of K-1 `merge_core`s with a small FIFO
on every edge. Each level halves the number of streams, and the root
delivers P pairs per cycle. Elements compare as (batch, key), so batch b+1
never overtakes batch b. Like the sorter, the tree keeps the end of the
newest batch until the next batch arrives.

## Top module and interfaces

`multipass_sorter` parameters: `P = 4`, `N = 8192` pairs per run,
`K = 64`, `C = 128` tuples per page, `L = 10`. Derived: `DEPTH` (792),
`NT = N/P`, an 8-bit batch tag, `AW = 1 + log2 K + log2 NT` address bits.

| port group | meaning |
|---|---|
| `in_valid/in_ready/in_data/in_last` | unsorted tuples; feed whole runs of N pairs, K runs per output block |
| `dram_cmd_valid/ready/write/addr` | one command per page, address in tuples |
| `dram_wr_valid/wr_data` | C write beats after a write command; the memory takes one beat per cycle |
| `dram_rd_valid/rd_data` | C read beats per read command, in request order, any latency |
| `out_valid/out_ready/out_data/out_batch` | merged tuples; each batch of K*N pairs comes out sorted |
| `guard_hold` | a write waits for the other memory half to be read |
| `tree_stall` | data are buffered but the tree is idle because one input buffer is empty |
| `batches_written` | complete batches written to memory |

The external DRAM is not part of the RTL. `tb/dram_model.sv` is a
behavioural model of it for simulation.

Measured with the default parameters, one batch of 131072 tuples takes
about 198,000 cycles, i.e. about 1.5 cycles per tuple. The write and read
slices share one port, so the top runs below the single-pass rate. The
streaming sorter on its own runs at one tuple per cycle.

## Where this departs from the original design

* Shared buffer size per stage is 2^(R-1) + 9 tuples, not the bare
  n/2 + 1. Output queues of 4 tuples per side; with 2, one side starved.
* Adversarial data can stall a buffer stage (see the limitation above).
* No flushing of the last block, in the sorter or the merge tree.
* Only two passes (sort + one K-way merge). Passes that merge the merged
  output again, e.g. a third pass to 0.5 GB blocks or the five passes for
  512 GB, are not built.
* Only the round-robin memory schedule is built, plus the one-page write
  FIFO. The earlier two-phase (write all, then read all) schedule is not.
* Only the minimum-select merger ("min select + bitonic merge") is built.
  The feedback-merger alternative is not.
* Block numbers are serial numbers of `log2(N/P) + 2` bits.
* The minimum search is a linear scan with one cycle latency.
* The memory interface (command + beats, in-order reads) stands in for a
  DDR3 controller.

## Simulating

Everything is plain SystemVerilog and runs with Verilator 5. Put the
package first:

    verilator --binary --timing --assert -Wno-fatal \
      rtl/sort_pkg.sv $(ls rtl/*.sv | grep -v sort_pkg) \
      tb/dram_model.sv tb/tb_multipass_sorter.sv \
      --top-module tb_multipass_sorter -o sim
    ./obj_dir/sim

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and has a
watchdog. They compare against reference results computed in the
testbench, from random data (`$urandom`).

| testbench | what it checks |
|---|---|
| `tb_sort_pkg` | `merge_buf_depth` against hand-computed values |
| `tb_oddeven_net`, `tb_bitonic_net` | sorting networks, P = 4 and 8, random and tie-heavy keys |
| `tb_min_select`, `tb_merge_core` | merging of random runs; tie rule; rate 1 |
| `tb_tagger` | block numbers and ranks for random block lengths |
| `tb_split_stage`, `tb_buffer_stage` | one merge stage: output runs sorted and complete; rate 1 |
| `tb_multirate_sorter` | whole single-pass sorter: blocks of varied size sorted, permutation kept, rate 1 |
| `tb_kway_merge_tree` | K = 8 tree, several batches, rate |
| `tb_input_buffer` | level, reservation and page space |
| `tb_min_occupancy_select` | minimum choice and tie rule |
| `tb_rw_controller` | addresses, page routing, round-robin order, double-buffer guard, rate |
| `tb_multipass_sorter` | small top (N = 256, K = 4, C = 4): 6 batches end to end; counts guard holds, tree stalls and input stalls and fails if any never happens |
| `tb_multipass_full` | top with default parameters: one 8 MB batch sorted end to end, and its cycle count |

`tb_multipass_full` needs a few minutes to compile and under a minute to run.

## Files

`rtl/`: `sort_pkg`, `oddeven_net`, `bitonic_net`, `min_select`,
`merge_core`, `tagger`, `split_node`, `tuple_fifo`, `split_stage`,
`shared_buffer`, `buffer_stage`, `multirate_sorter`, `kway_merge_tree`,
`input_buffer`, `min_occupancy_select`, `rw_controller`,
`multipass_sorter` (top).
`tb/`: one testbench per block as listed above, plus `dram_model`.
