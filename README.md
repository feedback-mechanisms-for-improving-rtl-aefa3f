# Enhanced Adaptive Stream Detection prefetcher

A stream prefetcher placed in a memory controller has to guess whether a
Read is the start of a sequential run of cache lines, and how long that run
will be. A classic stream buffer guesses in favour of long streams: it stops
prefetching only after it has made a useless prefetch. Adaptive Stream
Detection (ASD) bases the guess on statistics instead. It counts, over a
window of recent Reads (an *epoch*), how many Reads belonged to streams of
each length. This count is the Stream Length Histogram (SLH). For the next
Read that is the i-th element of a stream, it prefetches the next line only
if the histogram says a longer stream is more likely than a stream ending
here. This makes it profitable to prefetch streams only two lines long, which
are common even in irregular, commercial-style workloads.

This RTL implements ASD with three feedback refinements, following the
technique described in *Feedback Mechanisms for Improving Probabilistic
Memory Prefetching*:

* **Length-based stream detection.** The time the stream filter waits for a
  stream's next element halves with every element the stream gains.
* **Adaptive epoch length.** A state machine grows or shrinks the epoch
  length. It acts on whether the last two histograms were similar.
* **Variable-length prefetching.** Up to two lines are prefetched at once
  when the histogram supports it. A multiline prefetch is reduced to a
  single line while the Read Reorder Queue is at least half full.

The design is written in synthesizable SystemVerilog. Every block has a
self-checking testbench, and an end-to-end testbench runs the whole
prefetcher at its default sizes.

## Where it sits

```
 Reads/Writes from L2/L3 ──┬──────────────► host reorder queues ─► CAQ ─┐
                           │                                          │
                           ├─► stream_filter ─► slh_histogram ──┐     │ regular commands
                           │        │                │          │     ▼
                           │        │         slh_similarity    │  final_scheduler ─► DRAM
                           │        │                │          │     ▲                 │
                           │        │         epoch_length_fsm  │     │ prefetches      │ data
                           │        │   (epoch length) ─────────┘     │                 │
                           │        └──► prefetch_generator ─► low_priority_queue       │
                           │                 ▲   (lht of last epoch)                    │
                           │                 └── Read Reorder Queue occupancy           │
                           └─► prefetch_buffer ◄────────────────────────────────────────┘
                                  (answers Reads that hit)
```

The host controller's reorder queues, its scheduler and the Centralized
Arbiter Queue (CAQ) are not part of this RTL. Neither is DRAM. The top
module `asd_prefetcher` connects to them through ports:

* `mc_cmd_*`: every command entering the controller.
* `rrq_occupancy`: how many Read Reorder Queue entries are in use.
* `caq_*`: the CAQ head, a valid/ready source.
* `dram_cmd_*`: the command going to DRAM, a valid/ready sink.
* `dram_rd_*`: data coming back from DRAM.
* `pb_rsp_*`: one cycle after each Read, whether the prefetch buffer served
  it, and the data. The host must then drop that Read from its own queues.

## The decision rule (`prefetch_generator`, `slh_histogram`)

The histogram is stored in cumulative form:
`lht(i)` is the number of Reads in the epoch that belong to streams of
length i or longer (`lht(i) = 0` for `i > FS`, the longest length tracked).
`lht(1)` is the number of Reads in the epoch.

Take a Read that is the i-th element of its stream. The Reads of streams
that end within the next s lines number `lht(i) - lht(i+s)`. The Reads of
streams that go beyond them number `lht(i+s)`. Prefetching s more lines
pays off when the second count is larger:

```
lht(i) - lht(i+s) < lht(i+s)     <=>     lht(i) < 2 * lht(i+s)
```

The generator checks this for s = 1..MAX_L. It prefetches the largest s for
which the test holds for every s' ≤ s. The comparison needs only a one-bit
shift and a compare per s. There is no division.

Example with FS = 4 and an epoch of 100 Reads: 30 are in streams of length
1, 40 in length 2, 20 in length 3 and 10 in length 4. Then
`lht = 100, 70, 30, 10`.

* First element (i = 1): 100 < 2·70 holds, so line +1 is prefetched.
  100 < 2·30 fails, so line +2 is not.
* Second element (i = 2): 70 < 2·30 fails, so nothing is prefetched. The
  stream is most likely done.

The histogram is built as Reads arrive. When a Read is the k-th element of
its stream, the stream is now known to have at least k elements. So
`lht(1..k-1)` each gain this one Read, and `lht(k)` gains all k Reads of
the stream. A Read of a stream longer than FS adds one to every counter.

When `epoch_len` Reads have been counted, the epoch ends:

* the running histogram becomes `lht_prev`, which drives all decisions of
  the next epoch;
* the old `lht_prev` becomes `lht_prev2`;
* counting restarts from zero.

A stream that crosses an epoch boundary puts its earlier Reads into the new
epoch's `lht(k)`. After reset both stored histograms are empty, so nothing
is prefetched in the first epoch.

## Stream detection with shrinking lifetimes (`stream_filter`)

The filter has `SF_ENTRIES` slots. Each slot holds:

* the last line of its stream;
* the stream's length so far (saturating at FS+1);
* a lifetime counter that counts down every cycle.

A slot whose counter reaches zero is free. A Read to line A extends the
stream whose last line is A-1. If no stream matches, the Read opens a new
stream of length 1, in a free slot if there is one. If there is none, it
takes the slot with the least lifetime left.

The lifetime loaded when a stream reaches length n is `LIFETIME >> (n-1)`
(t, t/2, t/4 …), but never less than `MIN_LIFETIME`. The reason is that the
payoff of keeping a slot falls as the stream grows. A two-line stream whose
second line is never detected loses half its prefetchable lines. Missing one
line of a long stream costs little. A slot that was loaded with L still
accepts the next element L cycles later, but not L+1 cycles later.

## Adaptive epoch length (`slh_similarity`, `epoch_length_fsm`)

**Similarity.** After every epoch, the newest histogram is compared with the
one before it. The comparison works on the bars: bar `a(k) = lht(k) -
lht(k+1)`. The bars are first normalised to equal Read counts. The average
difference is then `Σ|a(k)/na − b(k)/nb|`, where na and nb are the two Read
counts. The hardware evaluates

```
256 · Σ_k |a(k)·nb − b(k)·na|  <  SIM_THR_Q8 · na · nb
```

It processes one bar per cycle, with two multipliers and an accumulator. A
result is ready FS+1 cycles after the epoch ends. Epochs are at least 256
Reads long, so it always arrives early in the new epoch.

**State machine.** Each state's action is applied to the epoch length when
the state is entered:

| state    | action | on similar (s) | on dissimilar (d) |
|----------|--------|----------------|-------------------|
| GOOD_INC | keep   | GOOD_INC       | DEC1              |
| GOOD_DEC | keep   | GOOD_DEC       | INC1              |
| INC1     | ×2     | INC2           | DEC1              |
| INC2     | ×2     | GOOD_INC       | DEC1              |
| DEC1     | ×½     | DEC2           | INC1              |
| DEC2     | ×½     | GOOD_DEC       | INC1              |

The machine follows these rules:

* A good state is reached only after two similar results in a row, each
  following a change in the same direction. This stops it from swinging
  between two lengths.
* Each good state remembers the direction it was reached from. When a phase
  change makes two epochs dissimilar, it steps the other way.
* A dissimilar result after a change reverses the direction.
* Lengths stay within 256..8192 Reads. A change that would cross a bound is
  ignored, but the state still moves.

The table is reconstructed from the published description of how the
machine behaves, not copied from a state diagram.

## Queues and the prefetch buffer

**`low_priority_queue` (LPQ).** A collapsing FIFO for prefetch commands.
Entry 0 is the oldest. Up to MAX_L prefetches enter per cycle. A new
prefetch is dropped if its line is already queued or the queue is full. Any
regular Read or Write to a queued line squashes that entry, because the
demand request has overtaken it.

**`final_scheduler`.** Regular commands from the CAQ always win. A prefetch
is taken only in a cycle in which the CAQ offers nothing. The chosen command
sits in an output register until DRAM accepts it. If a regular command
arrives while a prefetch holds that register, it has to wait. The scheduler
flags these cycles (`reg_delayed`), which are the cost of memory-side
prefetching.

**`prefetch_buffer`.** 16 fully associative line entries. Each entry is free,
pending or valid:

* Issuing a prefetch to DRAM reserves an entry in round-robin order
  (pending). Reserving over a pending or valid entry that no Read used is
  reported as an unused prefetch.
* Returning data makes a pending entry valid.
* A Read that hits a valid entry is served from it, and the entry is freed.
* A Read of a pending line frees the entry. That Read goes to DRAM itself.
* A Write to a pending or valid line frees it.
* Data returning for a line that is no longer pending is dropped.

Reserving at issue time keeps the buffer coherent. Without it, a prefetch
that was in flight when a Write to its line arrived would install data older
than the Write. The prefetch generator also skips lines that are pending or
valid in the buffer.

## Timing

One command per cycle enters `mc_cmd_*`.

| cycle after a Read enters | what happens |
|---|---|
| +1 | `pb_rsp_*` answers the Read. The stream filter has classified it. |
| +2 | The histogram counts the Read. The generator has decided. |
| +3 | The Read's prefetch candidates are in the LPQ. |

A prefetch reaches `dram_cmd_*` at the earliest one cycle after it leaves
the LPQ. All state resets asynchronously on `rst_n` low.

## Parameters

Defaults live in `rtl/asd_pkg.sv`. The top re-exports them as parameters.

| parameter | default | origin |
|---|---|---|
| `PB_BLOCKS` | 16 lines | published configuration |
| `LINE_BITS` | 1024 (128-byte lines) | published system |
| `MAX_LINES` | 2 | published: going from 2 to 3 lines hurt |
| `EPOCH_MIN`, `EPOCH_MAX` | 256, 8192 Reads | published bounds |
| Queue Status Check threshold | half of `RRQ_DEPTH` | published rule |
| `LINE_ADDR_W` | 32 | own choice |
| `FS` (longest tracked length) | 16 | own choice |
| `SF_ENTRIES` | 8 | own choice |
| `LIFETIME`, `MIN_LIFETIME` | 512, 16 cycles | own choice |
| `LPQ_DEPTH` | 8 | own choice |
| `RRQ_DEPTH` | 8 | own choice |
| `EPOCH_INIT` | 1024 | own choice |
| `SIM_THR_Q8` | 64 (average difference 0.25) | own choice |
| `CNT_W` | 16-bit histogram counters | own choice |
| `SMT_THREADS` | 1 hardware thread | main configuration |

For runs with two hardware threads, the published evaluation doubles the
stream filter so that each thread tracks its own streams. Here that means
setting `THREADS = 2` and `SF_N = 16` on the top (`SMT_THREADS` and
`SF_ENTRIES` in the package), and driving `mc_cmd_tid`.
The slots are split evenly between the threads. A Read only continues, takes
or replaces a slot of its own thread. All threads share one histogram,
because the published description says nothing about splitting it.

## Where this RTL goes beyond the published description

The published description gives the decision rule, the lifetime policy, the
similarity metric, the epoch-length rules, the queue-status rule and the
buffer size. The following are choices made here:

* The incremental histogram update, and how streams that cross an epoch
  boundary are counted.
* The value of every parameter marked "own choice" above, and the lifetime
  floor.
* Streams are ascending only.
* The slot-replacement rule in the stream filter.
* The even split of stream-filter slots between hardware threads, with one
  histogram shared by all threads.
* Strict CAQ-over-LPQ priority, with a single output register.
* Everything in the prefetch buffer beyond its size and the overwriting of
  old lines: round-robin reservation at issue, the pending state, and
  freeing entries on hits, Reads and Writes.
* Duplicate suppression in the LPQ, and against the prefetch buffer.
* The reset state of the epoch machine (GOOD_INC, 1024 Reads), and no
  prefetching in the first epoch.
* The valid/ready interfaces to the host controller and to DRAM.

## Verification

Each block has a self-checking testbench in `tb/`:

| testbench | what it checks |
|---|---|
| `tb_stream_filter` | Directed lifetime boundaries for t, t/2, t/4, the floor, saturation and slot replacement. Then 4000 random Reads against a reference model. A second filter split between two threads is checked for thread separation, directed and against a thread-aware model. |
| `tb_slh_histogram` | Whole random streams. Each finished epoch is compared with `lht(i) = Σ L` over streams with L ≥ i. Also the epoch-end timing and the `lht_prev2` shift. |
| `tb_slh_similarity` | A floating-point evaluation of the metric on fixed and 600 random histogram pairs, plus the latency. |
| `tb_epoch_length_fsm` | A rule-based reference (direction, steps taken, good flag) over 3000 random results, including the bounds. |
| `tb_prefetch_generator` | The decision computed from bar sums (the probability form), with and without the Queue Status Check. |
| `tb_low_priority_queue` | A queue model under random enqueue, squash and dequeue traffic. |
| `tb_final_scheduler` | Ordering, priority, holding during stalls and the delay flag. |
| `tb_prefetch_buffer` | A state model (free, pending, valid) under random reservations, fills, Reads and Writes. |
| `tb_asd_prefetcher` | The whole design at default parameters. See below. |

`tb_asd_prefetcher` runs a synthetic workload of 150,000 Reads plus Writes.
The Reads form interleaved, bursty, ascending streams. The workload
alternates between short-stream and long-stream phases. Around the
prefetcher, the testbench models a CAQ and a DRAM. The DRAM has a 40-cycle
latency and alternates between busy and quiet periods. The testbench checks
that:

* data served from the prefetch buffer matches DRAM;
* a hit happens only after a prefetch issued after the line's last Read or
  Write;
* each prefetch follows a Read line;
* no regular command is lost or reordered;
* each epoch holds exactly `epoch_len` Reads;
* the epoch length stays a power of two within its bounds.

It also counts 19 mechanisms, and every one must occur: stream continuation
and replacement, epoch ends, similar and dissimilar results, growing,
shrinking and clamped lengths, single and multiline prefetches, Queue Status
Check cuts, candidates already in the buffer, LPQ duplicates, full drops and
squashes, prefetch issue, delayed regular commands, buffer hits and unused
evictions. It runs in a few seconds.

Two more testbenches run workloads whose answers can be worked out by hand,
both at default parameters:

* `tb_slh_workload` replays the motivating example: per 1024 Reads, 21.8%
  of them in streams of length 1, 43.7% in streams of length 2 and the rest
  in streams of length 3 and 5. The histogram handed over after the first
  epoch must be exactly 1024, 801, 353, 50, 50, 0. In the second epoch a
  first Read must prefetch, a second or third must not, and a fourth must.
  The buffer must then serve about a third of the Reads (34% in the run).
* `tb_multiline_workload` runs four copies of the prefetcher side by side on
  streams of 8 lines, one Read every 12 cycles, with a DRAM latency of 14
  cycles. The copies use 1, 2 and 3 lines with the Queue Status Check, and 2
  lines without it. Here the next line always comes back too late and the
  line after it comes back in time. So one-line prefetching gets no hits,
  while two or three lines get 6 hits per stream (768 of 1024 Reads). When
  the Read Reorder Queue is reported half full, the check cuts every
  decision to one line, and only the copy without the check keeps its hits.

Two properties of the detection scheme show up in these runs, and
they matter when choosing parameters:

* A stream survives only if each next Read arrives within the lifetime
  left: LIFE, then LIFE/2, LIFE/4 and so on, down to MIN_LIFE. With the
  defaults (512 cycles, floor 16), a stream whose Reads are 20 cycles apart
  breaks after its fifth Read and starts again as a new stream.
* Counters stop at length FS. A Read at position FS or deeper in its stream sees
  `lht(i+1) = 0`, so it never prefetches. FS therefore bounds how far into a
  long stream prefetching reaches.

These tests exercise the mechanisms. They make no performance claim: the
benchmark traces used in the published evaluation are not reproduced, and
the synthetic workload produces many late prefetches.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert --top-module tb_asd_prefetcher \
    -y rtl -y tb +libext+.sv rtl/asd_pkg.sv tb/tb_asd_prefetcher.sv
./obj_dir/Vtb_asd_prefetcher
```

Each testbench ends by printing `TB_RESULT checks=N failures=M`.

## Files

Each file in `rtl/` holds one module or package, and starts with a comment
on its behaviour, interface and timing.

* `rtl/asd_pkg.sv`: shared defaults, the epoch state type and the statistics
  struct `asd_events_t`.
* `rtl/asd_prefetcher.sv`: the top.
* `rtl/stream_filter.sv`, `slh_histogram.sv`, `slh_similarity.sv`,
  `epoch_length_fsm.sv`, `prefetch_generator.sv`, `low_priority_queue.sv`,
  `final_scheduler.sv`, `prefetch_buffer.sv`: the blocks.

Not included, because they belong to the host system: the controller's
reorder queues and scheduler, the CAQ, DRAM and its interface chips, the
caches and the processor-side prefetcher.
