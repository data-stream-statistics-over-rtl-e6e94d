# ECM-sketch updaters: sliding-window stream statistics at one to three tuples per clock

A network monitor that wants to know "how many packets did address X send in the
last two million time units" cannot keep an exact counter per address and per
time slot. The Exponential Count-Min (ECM) sketch answers such questions
approximately, with bounded error, in a few kilobytes: it is a Count-Min sketch
(D rows of W counters, one hash function per row) in which every counter is
replaced by an *exponential histogram* (EH) that counts arrivals over a sliding
window. The expensive part is the update: every tuple touches one EH per row,
and an EH update can cascade through many levels. This repository holds
synthesizable SystemVerilog for four hardware updaters of that sketch, from a
simple fully pipelined one to a multi-tuple design that accepts three tuples per
clock and survives a flood of one key, plus self-checking testbenches for every
block.

Default configuration (error eps = 0.05, failure probability delta = 0.05,
window N = 2,000,000 time units): W = 55 EHs per row, D = 3 rows, at most
BPL = 11 buckets per level, L = 20 levels per EH.

## 1. The exponential histogram and its level record

An EH keeps the arrivals of the window as *buckets*. A bucket of level j
(j = 1..L) stands for 2^(j-1) arrivals and is described by its end time (the
time of its newest arrival). A level holds at most BPL = 1 + ceil(1/(2 eps))
buckets. Inserting one arrival at time t:

1. **expire**: in the touched level, drop every bucket with `now - end >= window`
   (times are 32 bits and compared modulo 2^32, so the window must stay below
   2^31);
2. **insert**: put the new bucket (end time t) in front;
3. **merge**: if the level now holds BPL + 1 buckets, replace its two oldest by
   one bucket of twice the size whose end time is that of the *newer* of the two;
   that bucket is inserted into level j+1, and the same three steps repeat there.

The number of levels follows from the window: L = ceil(log2(2N/k)) + 1 with
k = ceil(1/eps) = 11, which gives 20 for N = 2e6. A merge that would leave level L
is dropped and counted (`n_drop`); with the right L this does not happen while the
window is respected.

In hardware a level of one EH is a single word, `lvl_rec_t` in `ecm_pkg`:
a 4-bit count plus BPL end times of 32 bits, newest first (356 bits). Start
times are not stored (a bucket starts where the next older one ends), and the
size is implied by the level. `ecm_level_update` is the whole per-level
algorithm as one combinational block: record in, arriving end time, current time
and window in; new record, spill flag and spilled end time out. Every engine in
the design (pipelined level, register-based escape EH, serial worker) is built
around it.

On average an update touches about two levels, but occasionally it walks up
many. The four architectures differ in how they pay for that tail.

## 2. A pipelined bucket level (`ecm_bucket_level`, `ecm_frontstage`)

Exactly one EH per row is touched by a tuple, so the level-j records of all EHs of
a row can live in one block-RAM-style memory indexed by the EH number. One
`ecm_bucket_level` is such a memory plus an update stage:

- cycle 1: the request (EH index, bucket end time, tuple time) addresses the
  memory (synchronous read);
- cycle 2: the record comes out, `ecm_level_update` runs, the new record is
  written back, and a merged bucket, if any, goes through a pipeline register to
  level j+1.

If the same EH is updated in two consecutive cycles, the read of the second
update would see the stale word; a one-entry write-forwarding register supplies
the word just written instead. A valid bit per EH, cleared at reset, replaces a
clearing pass over the memory.

`ecm_frontstage` chains NLVL such levels. It takes one bucket per cycle, never
stalls, and has a latency of 2 cycles per level; a merge leaving its last level
comes out on the `spill_*` port.

## 3. Four updaters

| top module | tuples per clock | levels on chip | levels elsewhere | stalls |
|---|---|---|---|---|
| `ecm_fp_top` (fully pipelined) | 1, guaranteed | all L, one memory per level and row | – | never |
| `ecm_ca_top` (cost-aware) | 1, unless workers overload | level 1 pipelined | 2..L in 2 serial workers per row, on-chip memory | when a worker's queue is almost full |
| `ecm_hybrid_top` | 1, unless the BackStage overloads | 1..K (K = 5) pipelined | K+1..L in one serial BackStage over external memory | when a spill queue is short of room |
| `ecm_mt_top` (multi-tuple) | up to 3 | 1..K in 9 FrontStages | K+1..L in one BackStage over external memory | input queue full or spill queues short of room |

**Fully pipelined.** Per row an `ecm_hash` and an `ecm_frontstage` with all L
levels. Simple and guaranteed, but it provisions memory and logic for the worst
case: a memory per level per row.

**Cost-aware.** Since most updates end in level 1 or 2, each row keeps only level
1 as a pipeline stage and sends its merges to *serial workers*
(`ecm_ca_worker`). A worker owns levels 2..L of a group of EHs in one on-chip
memory (`ecm_level_ram`). Spills wait in its *New Merge FIFO*. The worker
processes one bucket at a time: read the level word, update, write it back. If
the level overflowed, the merged bucket goes into the *Updates FIFO* and is
taken before any new merge, so a cascade finishes before the next one starts.
One level costs about five clocks. Two workers per row over-provision the
bandwidth (column mod 2 selects the worker, column div 2 the EH inside it).
`in_ready` falls when any New Merge FIFO has three or fewer free slots, early
enough for the spills already in the level-1 pipeline.

**Hybrid.** Levels above K are rarely touched, so they can live in slow, large
external memory. Per row, an `ecm_frontstage` with K = 5 levels feeds a spill
queue. A round-robin arbiter (`ecm_spill_arb`) merges the queues into one
`ecm_backstage`, the same serial engine as the cost-aware worker but with its
memory port brought out. The word of (EH g, level l) is at address
`g*(L-K) + (l-K-1)`. The input stops while any spill queue has fewer than 2K+2
free slots, which covers the spills still inside the pipeline.

**Multi-tuple.** This is the main design; see the next section.

`ecm_top` instantiates all four side by side with separate ports (prefixes `mt_`,
`fp_`, `ca_`, `hy_`). They share only clock and reset.

## 4. The multi-tuple updater (`ecm_mt_top`)

To take T = 3 tuples per clock, the sketch's 3 x 55 EHs are spread over T*D = 9
FrontStages, so that the T*D updates of one clock usually land in different
memories.

**Hashing and interconnect.** `ecm_hash` is instantiated T*D times (one per tuple
and row). `ecm_icn` sends the update for row r, column c to FrontStage
`f = r*T + (c mod T)`, as local EH `c div T` (19 EHs per FrontStage). Each
FrontStage has an input queue (`ecm_queue`, 16 entries) that can take up to 3
entries per clock. The interconnect accepts a clock's tuples only if every target
queue has room for all entries addressed to it; otherwise `in_ready` is low and
nothing of that clock is taken.

**FrontStage (`ecm_mt_frontstage`).** Its main pipeline (`ecm_frontstage`, 5
levels) serves one queue entry per clock. Colliding tuples, which hit the same
FrontStage in one clock, are thus served one after another.

**Escape path for heavy hitters.** A single key sending most of the traffic
(say, a denial-of-service source) would turn the design into a one-tuple-per-clock
machine at its FrontStage. `ecm_hh_detect` watches the queue:

- **Enable.** When the queue holds 12 or more entries, the EH at its head is taken
  as the culprit. It is assigned to the FrontStage's escape structure
  (`ecm_extra_eh`), which holds K levels of a *single* EH in registers.
- **Two per clock.** While the path is enabled, two entries can leave the queue
  per clock. Of the two oldest, one belonging to the culprit goes to the escape
  EH and the other to the main pipeline. The culprit's updates are thus split
  between two sub-EHs.
- **Answering queries.** Counts are additive, so a query for that EH adds both
  sub-EHs.
- **Disable.** The path is disabled once the queue drains below 4 entries. The
  assignment is kept.
- **Re-assignment.** The escape structure is given to another EH only after a
  full window has passed since it last recorded anything, so that it holds no
  live data.

**Spills and BackStage.** Merges leaving level 5 of either structure enter a
32-entry spill queue, up to two per clock, tagged with a global EH id:

- `row*W + col` for a main EH;
- `D*W + f` for the escape EH of FrontStage f, whose upper levels are kept apart.

A FrontStage stops serving its queue while the spill queue has fewer than 3K+2
free slots, so no spill is ever lost. `ecm_spill_arb` takes one spill per clock
round-robin from the 9 queues into the single `ecm_backstage`.

**What limits the rate.** The FrontStages accept up to 3 tuples per clock. The
sustained rate is set by collisions, by the serial BackStage (one read and one
write per level, plus memory latency) and by how skewed the keys are. In
simulation with 3000 uniformly drawn keys and a 2-cycle memory, the design
accepted about 1.9 tuples per clock on average. The testbench requires
at least 1.0.

## 5. Interfaces and timing

All blocks use one clock `clk` and an active-low asynchronous reset `rst_n`.
`window` is an input (in time units) and may be changed while the design is idle.
Tuples carry a 32-bit key and a 32-bit timestamp. Timestamps must not decrease.

- **Tuple input.** `in_valid`/`in_ready` (the multi-tuple port has `tup_valid[T]`,
  `tup_key[T]`, `tup_now[T]` and one `in_valid` for the group). A tuple, or a
  group, is taken in a clock where both are high. `in_ready` does not depend on
  `in_valid`. The fully pipelined updater has no `in_ready`.
- **External memory port** (`ecm_backstage`, brought out by the multi-tuple and
  hybrid tops).
  - `mem_req_valid`/`mem_req_ready`, `mem_req_we`, a 24-bit word address and a
    356-bit write word; `mem_rsp_valid` with read data.
  - One request is outstanding at a time, and reads must be answered in order,
    after any latency.
  - Memory must start all-zero (every level empty).
  - Words used: 2610 for the multi-tuple design, 2475 for the hybrid.
- **Status.** Counters of escape use and of stalls per FrontStage, BackStage
  operations and cascades, and drops off level L; `busy` signals show pending
  work.
- **Latency.** 2 clocks per pipelined level. A BackStage or worker level costs 4
  clocks plus memory read latency.

The updaters do not contain a query path. The sketch contents live in the level
memories (`mem` and `vld` arrays of each `ecm_bucket_level`, the escape
registers, the worker memories and the external memory), in the layout described
above.

## 6. Where the design makes its own choices

The architecture, the level algorithm and the sizes (W, D, k, BPL, L, K = 5,
T = 3, two workers per row) follow the published ECM-sketch accelerator design.
The following are this implementation's own decisions:

- **Hash.** H3 hash (XOR of per-key-bit 16-bit words generated from a seed by
  xorshift) with multiply-shift range reduction; one seed per row.
- **Timing.** Two clocks per pipelined level (synchronous memory read), with write
  forwarding.
- **Expiry.** Every expired bucket of a touched level is dropped at once. Levels
  that are not touched keep their expired buckets until their next update, so a
  reader must ignore buckets whose end time is a window old.
- **Queue depths.** 16 for the input queues, 32 for the spill queues, 16 for the
  New Merge FIFO, 2 for the Updates FIFO. The stall thresholds (3K+2, 2K+2,
  almost-full at 3 free) are derived from the pipeline depths.
- **Updates FIFO priority.** Cascades are taken before new merges.
- **Heavy-hitter thresholds** (12 on, 4 off) and the rule that the escape EH is
  re-assigned only after a full idle window.
- **Interconnect.** Mapping of columns to FrontStages by column mod T, and
  all-or-nothing acceptance of a clock's tuples.
- **Cost-aware split.** Columns are split between the two workers by column
  mod 2.
- **Memory word.** One word of 356 bits per (EH, level) in the external memory.
- **Widths.** 32-bit keys and timestamps.

The DRAM and its controller, and the host platform that delivers tuples, are not
part of the RTL. The memory port and a plain valid/ready tuple port stand in for
them.

## 7. Verification

Each block has a testbench in `tb/` that prints
`TB_RESULT checks=<n> failures=<n>`. All of them compare against
`eh_ref_pkg`, a queue-based EH model written independently of the RTL. Where a
testbench needs a hash, it uses its own copy of the row hash. The external
memory is modelled by `tb/ecm_dram_model.sv`, which has configurable read
latency and random request stalls.

| testbench | what it establishes |
|---|---|
| `tb_ecm_level_update` | worked merge and expiry examples, 20,000 random steps against the reference, across timestamp wrap |
| `tb_ecm_hash` | columns of random keys match a second H3 implementation, stay in range and spread evenly; two seeds give different functions |
| `tb_ecm_bucket_level`, `tb_ecm_frontstage` | memory contents and spills against the reference, back-to-back updates of one EH, latency |
| `tb_ecm_extra_eh`, `tb_ecm_hh_detect` | escape EH contents and clear; detection, release and re-assignment rules |
| `tb_ecm_queue`, `tb_ecm_icn`, `tb_ecm_spill_arb` | multi-push/multi-pop order, routing and all-or-nothing ready, round-robin fairness |
| `tb_ecm_backstage`, `tb_ecm_ca_worker` | memory contents for every (EH, level), cascades, back-pressure, drops off the last level |
| `tb_ecm_mt_frontstage` | steering order, dual dequeue, spill tagging, stall when the output is blocked |
| `tb_ecm_fp_top`, `tb_ecm_ca_top`, `tb_ecm_hybrid_top` | whole updaters at reduced size: every level of every EH against the reference, drops, expiry, stalls |
| `tb_ecm_mt_top` | multi-tuple updater at full size (see below) |
| `tb_ecm_top` | all four updaters at full size at once |

`tb_ecm_mt_top` and `tb_ecm_top` run at the default parameters. Every accepted
tuple is hashed by the testbench, which predicts the order of requests each
FrontStage must serve. It follows each FrontStage's main and escape pipelines
into a 20-level reference EH, and at the end compares every level of every EH
(on chip and in the memory model) bucket by bucket. The stimulus has three
phases:

1. a short window, so buckets expire;
2. the 2,000,000-unit window with spread keys, where the rate is measured;
3. a flood of one key.

Each mechanism must occur at least once:

- input stall and collision;
- escape assignment and dual dequeue;
- BackStage cascade and back-pressure;
- expiry;
- cost-aware worker stalls and cascades, hybrid BackStage cascades (the
  hybrid input stall is forced in `tb_ecm_hybrid_top`, at a smaller size).

No merge may leave level 20.

To run a testbench with Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
        rtl/ecm_pkg.sv tb/eh_ref_pkg.sv tb/ecm_dram_model.sv tb/tb_ecm_top.sv \
        --top-module tb_ecm_top -Mdir obj_tb_ecm_top -o sim
    ./obj_tb_ecm_top/sim

Replace the testbench name for the others. The remaining RTL files are found
through `-Irtl`. The full-size `tb_ecm_top` takes several minutes; the block
testbenches take seconds.

## 8. Files

- `rtl/ecm_pkg.sv`: sizes, record and message types, the expiry test.
- `rtl/ecm_level_update.sv`: the per-level EH algorithm.
- `rtl/ecm_hash.sv`, `rtl/ecm_bucket_level.sv`, `rtl/ecm_frontstage.sv`: hashing and
  pipelined levels.
- `rtl/ecm_queue.sv`, `rtl/ecm_icn.sv`, `rtl/ecm_hh_detect.sv`, `rtl/ecm_extra_eh.sv`,
  `rtl/ecm_mt_frontstage.sv`, `rtl/ecm_spill_arb.sv`: multi-tuple front end.
- `rtl/ecm_backstage.sv`, `rtl/ecm_level_ram.sv`, `rtl/ecm_ca_worker.sv`: serial
  engines and their memories.
- `rtl/ecm_fp_top.sv`, `rtl/ecm_ca_top.sv`, `rtl/ecm_hybrid_top.sv`,
  `rtl/ecm_mt_top.sv`, `rtl/ecm_top.sv`: the updaters and the top.
- `tb/`: testbenches, the reference EH model and the memory model.

To change the sketch size, edit the constants in `ecm_pkg` or override `NW`,
`ND`, `NK`, `NL` on the tops. BPL and L must be recomputed from eps and the
window as in section 1.
