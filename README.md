# Animating dead cores: hint-driven coupling of a defective core to a small core

A manufacturing defect in a large out-of-order core normally means the core is
switched off. Yet for most defects, a faulty core that starts from a correct
architectural state follows roughly the right path for a good while: it
fetches mostly the right instructions, touches mostly the right cache blocks,
and resolves most branches the right way. It cannot be trusted with results,
but it can look ahead.

This design uses that. In each cluster of four 6-wide cores, a defective core
(the **undead core**) is paired with a small 2-wide out-of-order core (the
**animator core**). Both run the same program. The undead core is faster, so
it runs ahead. As it commits instructions, it sends **hints** to the animator:

- I-cache blocks it fetched,
- D-cache blocks it loaded or stored,
- branch outcomes it resolved.

The animator uses them to prefetch into its caches and to train a second
branch predictor. Only the animator's results count. The undead core never
writes memory. When its behaviour no longer matches the animator's, the
faulty hints are switched off and its state is reset from the animator.

The SystemVerilog here covers all the logic that couples the two cores:
collecting hints, carrying them across, applying them in time, judging
whether they still help, and resynchronizing. It also covers the replication
into a 16-core chip. The cores, their caches and the shared L2 are not
included; their connections are ports.

## Timing by instruction count, not by clock

The central difficulty is *when* to apply a hint. A prefetch that arrives too
early is evicted before use. One that arrives too late is useless. The two
cores run at different and changing speeds, so clock time says nothing about
this.

Every hint therefore carries an **age tag**: the undead core's count of
committed instructions when it produced the hint. The animator keeps its own
committed count. A hint of type *t* is applied once

    age <= animator_count + window[t]

The windows are 16 instructions for D-cache hints, 4 for I-cache hints and 4
for branch hints (`DWIN`, `IWIN`, `BPWIN`). A D-cache prefetch is thus issued
about 16 instructions before the animator needs the block. Ages are 32 bits,
compared modulo 2^32 (`nm_pkg::age_le`). The two cores must never be 2^31
instructions apart, and the design keeps them far closer than that.

If the undead core gets too far ahead, the path fills up: the queue, then the
per-type buffers. The gathering unit then stalls the undead core's commit. The
run-ahead distance is bounded by storage, not by a separate throttle.

## Data path

```
undead core commit (6/cycle)
  -> hint_gathering_unit        I, D and branch hints per committed instruction
       hint_filter_cam x2       drop D/I blocks sent in the last 2 hints
       cache_fingerprint_unit   per-interval access histograms, sent in-band
  -> nm_comm_queue              one queue, 32 packets, at least 15 cycles in flight
  -> hint_distribution_unit     per-type buffers, release on age window
       dcache_hint_arbiter      D prefetch only on a D-cache port the animator leaves free
       I prefetch port          (added port on the animator I-cache)
       nm_branch_predictor      NM table trained by branch hints, chooser vs. original
  -> hint_disabling_unit        compares histograms and predictor accuracy
  -> resync_controller          squash undead core, copy 64 registers + PC
undead_mem_filter               undead L1 <-> L2: drop write-backs, zero-fill L2 misses
```

**Packets.** Several hints share one queue entry under a single age tag, so
the queue carries a full commit group at a time. A packet holds four slots
(`NSLOT`). Each slot has a 3-bit type (D, I, branch, D fingerprint, I
fingerprint) and a 32-bit payload. Cache payloads are block addresses, i.e.
byte address bits 37:6 for 64-byte blocks. A branch payload is the low PC
bits plus the outcome. The unit needs as many cycles as packets to empty a
commit group; meanwhile the undead core waits.

**Filtering.** Consecutive instructions often hit the same block. Two
2-entry CAMs, one for D and one for I, remember the last blocks sent and drop
repeats. Repeats within a single commit group are also caught: the group is
checked in program order.

**Queue.** The queue (`nm_comm_queue`) timestamps each entry on entry. It
releases an entry only after `QDELAY` = 15 cycles, which models the wire delay
between the two cores. An assertion guards this rule.

**Distribution.** The animator side pops a packet once its age is within the
largest window and every slot fits into the buffer of its type. Each buffer
(`hint_type_buffer`, 8 entries) then releases on its own window. D prefetches
take the lowest-numbered D-cache port that the animator does not use this
cycle. They never take a port away from the animator's own accesses.

**Branch hints.** The animator has its original predictor and a second,
**NM** table. Only branch hints from the undead core train the NM table. A
chooser of 2-bit counters picks between the two tables per branch. The NM
table is ignored while branch hints are disabled.

## Deciding that hints have stopped helping

A defect may make the undead core wander off the program path. Its hints then
become harmful: useless prefetches pollute the cache, and bad predictions
hurt. Two mechanisms detect this.

**Cache fingerprints.** Each core keeps two 32-entry counter tables, for D
and I accesses. Each table is indexed by the low bits of the block address.
Both cores fill their tables over the same 1024-instruction interval, so the
intervals line up by instruction count again. The undead core's counters V
travel through the queue as fingerprint packets: 16 packets per interval,
four counters each. When both histograms for an interval are present, the
disabling unit walks the entries, one per cycle, and computes:

    K = sum |S_i - V_i|,   T = sum (S_i + V_i),   similarity = 1 - K/T

The hint type is disabled when the similarity falls below its threshold: 80%
for D (`D_THR`), and 80% for I (`I_THR`, an assumed value). A histogram that
arrives after the animator has already finished its next interval is dropped.
While the fingerprint unit sends its packets, it briefly stalls the undead
core's commit.

**Branch score.** A signed counter changes only on branches where the two
predictors disagree. It goes up by 100 − 70 when only the NM table was right,
and down by 70 when only the original was right. At each interval end, branch
hints are disabled if the counter is below zero. That happens when the NM
table won fewer than 70% of the disagreements (`BP_THR`). The counter then
restarts.

**Back-off.** A disabled type stays off for `BACKOFF` = 4096 animator
instructions, then turns back on. The undead core may have recovered by then,
for example after a resynchronization.

**Resynchronization.** The first time a type is disabled (`MIN_DISABLED` = 1),
the resynchronization controller takes these steps:

1. It holds both cores.
2. It squashes the undead core's pipeline. The core must then clear its rename
   state and D-cache.
3. It copies the animator's 64 architectural registers, one per cycle, and
   then the PC.
4. It empties every hint path: pending hints, CAMs, queue, type buffers and
   partial fingerprints.
5. It loads the undead core's instruction count with the animator's count.

The whole sequence takes `NREG` + 3 = 67 cycles. Back-off periods continue
across it.

## Keeping a faulty core harmless

`undead_mem_filter` sits between the undead core's L1 and the shared L2:

- Dirty write-backs are dropped, so memory only ever holds the animator's
  results.
- Fill requests still go to the L2. This warms the shared L2 for the
  animator, which is a large part of the benefit.
- On an L2 miss, the undead core gets an all-zero line at once instead of
  waiting for memory. Memory's later reply fills only the L2.

## The chip

`nm_cluster` holds four baseline cores and one animator with its coupling
logic (`nm_coupling`). Test-time configuration inputs choose the animated
core:

- `dead_valid` says whether the cluster has a dead core.
- `dead_sel` says which core it is.
- `anim_ok` says whether the animator and its logic passed test.

Only the selected dead core's commit stream is steered into the coupling
logic, and only that core can be stalled, squashed or written. The three live
cores are untouched. A cluster with no dead core, or with a failed animator,
shows no activity on the coupling logic at all.

`nm_cmp` (the top) places four independent clusters side by side: 16 cores
and four animators, each animator local to its cluster. Every cluster port
appears on the top as an array indexed by cluster.

## Files

| file | role |
|---|---|
| `rtl/nm_pkg.sv` | commit record, hint slot and packet types; block-address and age-compare functions |
| `rtl/hint_filter_cam.sv` | 2-entry FIFO CAM of recently sent blocks |
| `rtl/cache_fingerprint_table.sv` | 32 saturating access counters with snapshot-and-clear |
| `rtl/cache_fingerprint_unit.sv` | undead D/I tables, interval detection, fingerprint packets |
| `rtl/hint_gathering_unit.sv` | hint extraction, filtering, packetizing, undead commit stall |
| `rtl/nm_comm_queue.sv` | inter-core queue with minimum delay |
| `rtl/hint_type_buffer.sv` | small multi-write FIFO, one per hint type |
| `rtl/hint_distribution_unit.sv` | age-window release of hints to their consumers |
| `rtl/dcache_hint_arbiter.sv` | D prefetch onto a free D-cache port |
| `rtl/nm_branch_predictor.sv` | original and NM bimodal tables plus chooser |
| `rtl/hint_disabling_unit.sv` | histogram similarity, branch score, back-off |
| `rtl/resync_controller.sv` | squash + register/PC copy sequencer |
| `rtl/undead_mem_filter.sv` | write-back drop, zero fill on L2 miss |
| `rtl/nm_coupling.sv` | one undead/animator pair: all of the above wired together |
| `rtl/nm_cluster.sv` | four cores plus one animator, dead-core selection |
| `rtl/nm_cmp.sv` | top: four clusters |

Each file begins with a description of its interface and timing.

## Main parameters

| parameter | default | where from |
|---|---|---|
| undead / animator commit width | 6 / 2 | core configurations |
| D / I / branch release window | 16 / 4 / 4 instructions | design choice of the scheme |
| queue delay | 15 cycles | design choice of the scheme |
| D and I filter CAMs | 2 entries each | design choice of the scheme |
| fingerprint table | 32 entries, 1024-instruction interval | design choice of the scheme |
| D / branch similarity thresholds | 80% / 70% | design choice of the scheme |
| I similarity threshold | 80% | assumed (same as D) |
| resynchronization trigger | first disabled type | design choice of the scheme |
| registers copied | 64 + PC | Alpha integer + FP register files |
| NM branch table / chooser | 1024 two-bit counters each | assumed |
| queue depth | 32 packets | assumed |
| slots per packet | 4 | assumed |
| type buffer depth | 8 | assumed |
| back-off period | 4096 instructions | assumed |
| age tag width | 32 bits | assumed |
| cluster / chip | 4 cores per animator, 4 clusters | design choice of the scheme |

## Where this RTL makes its own choices

- **Similarity rule.** The disabling rule is read as "disable when similarity
  is below the threshold", with similarity 1 − K/T. A rule that compares the
  raw distance K against a fixed value would depend on how many accesses an
  interval had.
- **Branch threshold.** The 70% branch threshold is mapped onto one counter
  with asymmetric steps. At 50% it becomes a plain ±1 counter.
- **Distance sums.** The sums are accumulated one entry per cycle, 32 cycles
  per check, rather than with a narrow dedicated ALU.
- **Flow control.** Packet grouping, fingerprint priority over hints, the
  stall rule of the gathering unit, the pop rule of the distribution unit, and
  the depths of the queue and buffers are this design's own.
- **Predictor indexing.** Both branch tables are bimodal, indexed by PC bits
  11:2, and both use the same chooser index. Branch hints carry 31 PC bits.
  The per-branch choice between the two tables is a single-level chooser of
  2-bit counters. This is a simplification of a hierarchical tournament
  selector.
- **Copy time.** Copying state between cores is usually estimated at about
  100 cycles. Here the copy is sized by the register count: 64 registers plus
  the PC, in 67 cycles.
- **Resynchronization scope.** The undead core's rename reset and D-cache
  invalidation are its own business, triggered by `u_squash`. Register values
  pass through a single read port of the animator, one register per cycle.
- **Per-type disabling.** A disabled type is no longer gathered by the undead
  core, and queued hints of that type still drain. The D-cache and I-cache
  thresholds apply to their own histograms.

## Simulating

All testbenches are self-checking. Each prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/nm_pkg.sv tb/tb_nm_cmp.sv --top-module tb_nm_cmp -o sim && obj_dir/sim
```

The package goes first; every other module is found in `rtl/` and `tb/` by
its file name. For a unit test, name `tb/tb_<module>.sv` and its module
instead.

- **Unit testbenches** (`tb_<module>`) drive each block with random and
  directed stimulus against a reference worked out in the testbench. Examples
  are the 15-cycle queue latency, the window release ages, K and T for chosen
  histograms, the back-off length, and the 67-cycle copy.
- **`tb/nm_pair_model.sv`** is a behavioural stand-in for both cores and the
  L2. They share a synthetic program with a regular loop, data stream and
  branch pattern. At a chosen point the undead core gets a "hard fault" that
  sends all its data accesses into one cache set. The model checks two things:
  - every D prefetch names a block the program touches at most 16
    instructions ahead of the animator;
  - every copied register and PC is the animator's.
- **`tb_nm_coupling`** and **`tb_nm_cluster`** use the model to test one pair
  and one cluster.
- **`tb_nm_cmp`** runs the top at its default size for 40,000 cycles. Two
  clusters have animated dead cores that fault at different times. One cluster
  has no dead core, and one has a failed animator. The run requires every
  mechanism to occur at least once:
  - D and I prefetches and NM predictor use;
  - undead stalls and full-queue cycles;
  - hint disables, resynchronizations and completed back-offs;
  - dropped write-backs, zero fills and dropped memory replies.

  It also checks that live cores and unanimated clusters are never disturbed.
  The run takes about half a minute.

## Not included

- The 6-wide baseline/undead core and the 2-wide animator core.
- The L1 caches and the shared 2 MB L2.

The undead core is expected to have exception handling turned off, since
the animator holds the precise state. Its dirty lines are dropped on
replacement. Its squash input must also reset its rename table and invalidate
its D-cache.

Their interfaces to this logic are the ports of `nm_coupling`:

- the commit groups;
- stall, squash and register/PC writes;
- D-cache port use and prefetch;
- the I-cache prefetch port;
- branch prediction and resolution;
- the register read port;
- the undead L1–L2 path.
