# PCS: adaptive capacity sharing for private L2 caches

Threads running together on a chip multiprocessor rarely need the same amount
of L2 cache, and their needs change over time. Private L2 caches are fast and
isolated but leave capacity idle in one core while the next one thrashes; a
shared L2 lets threads trample each other. This design keeps private L2 caches
but sets part of every core's data array aside as a pool that all cores share,
and steers each core's new blocks into that pool with a per-core *evicting
probability*. Cores that would profit from more capacity get a higher
probability and so take more of the pool. The probabilities are set by the
operating system once per time interval from statistics gathered by a small
hardware monitor, VMON.

The RTL is SystemVerilog (IEEE 1800-2017), synthesizable, and parameterised.
By default it is the evaluated configuration: 8 cores, 64-bit addresses,
64-byte lines, 4096 tag entries and 2048 data entries per core, 1024 of
them private, 256-entry VMON buffers, and probability levels
{1/3, 1/2, 3/4} starting at 1/2.

## Decoupled tags and data

Each core's L2 has a tag array and a data array that are not tied together
by position. A tag entry holds `{tag, status, d_ptr, s}`: `d_ptr` addresses a
data entry and `s` says in which region it lies. A data entry holds
`{data, reuse, t_ptr, v}`, and in the shared region also `id`, the core that
owns it. `t_ptr` (set and way) and `id` point back to the owning tag entry, so
the link goes both ways. There are twice as many tag entries as data entries,
which lets busy sets keep more blocks than their share. A tag entry is valid
only while it owns a data entry.

Each core's 2048 data entries are split into a private region **P** (1024
entries, `P_ENTRIES`) and a slice **S**. The eight S slices together form the
shared region **sData** (8192 entries). In the RTL sData is one array
addressed by a 13-bit `d_ptr`; how the slices are laid out physically is left
open.

Data entries are replaced by **reuse replacement**, not by LRU inside a set.
Every data entry has a 2-bit reuse counter: it is cleared when a block
arrives, incremented on every hit, and decremented when the replacement
pointer passes over it. To free an entry, `reuse_replacer` walks the region
circularly, one entry per cycle, starting after its global pointer. It stops
at the first entry that is invalid or has a zero count, and the pointer stays
there. Each region has its own replacer: the eight P regions and sData.

## Access flow

One access engine in `pcs_l2` serves the cores in round-robin order, one
access at a time:

1. **Tag lookup.** Core *i*'s tag set is read and compared with the request.
   The request is accepted in cycle 0 and the compare happens in cycle 1.
2. **Hit.** The data entry at `d_ptr`/`s` is accessed and its reuse count is
   incremented. A read returns the line in cycle 2. A write updates the line
   and marks the tag dirty.
3. **Miss.** VMON counts the access and searches the core's VTag. The new
   block takes the first invalid way of the set, otherwise the LRU way.
   - If that way still owns a data entry, the entry is taken over: its
     block is evicted and the new block replaces it in the same region.
   - If the way is free, the DAE picks the region (P or sData) and that
     region's replacer picks the entry.
4. **Eviction.** If the chosen data entry holds a block, `t_ptr` and `id`
   lead to the owning tag entry. That tag entry may belong to another core
   when the entry is in sData. The tag entry is invalidated, its line address
   goes into the owner's VTag, and the line is written back if dirty.
5. **Fill.** A read miss fetches the line from memory. A write miss carries a
   full line and needs no fetch. The line is written into the data entry, both
   pointers are set, and the core gets its response.

Writes are full-line write-backs from the L1 caches. The response to a write
only acknowledges it.

## Choosing P or sData (DAE)

The Data Access Engine (`dae`) holds the current probability level of each
core. It answers one question on a miss to a free way: does this block go to
sData? Two rules apply:

* **P comes first.** A core's blocks go to P until its P is full (`F_i`,
  the `full` output of the P array). Only then can they go to sData.
* **Ratio placement (default).** Level *k* stands for the probability
  `s/(p+s)`, with `s = LEVEL_S[k]` and `p = LEVEL_P[k]`. The core sends `s`
  blocks to sData, then `p` blocks to P, then repeats. The defaults (1,2),
  (1,1) and (3,1) give 1/3, 1/2 and 3/4. Placements made while P is still
  filling do not advance the counter. Writing a new level restarts the
  pattern at its sData part.
* **Probability generator (`USE_PG = 1`).** Each core has a 16-bit LFSR whose
  value is read as a number in [0,1). When P is full, a block goes to sData
  if that number is below `s/(p+s)`. The LFSR steps once per such placement.
  This is the exact probabilistic scheme; ratio placement approximates it
  with a counter. Levels in steps of 0.1 are set through the same
  parameters, for example `LEVEL_S = '{1..9}` and `LEVEL_P = '{9..1}`.

## VMON and the interval loop

VMON estimates how much each core would gain from more capacity. Each core
has a VTag buffer (`vtag_buffer`, 256 entries by default). It is a FIFO of the
line addresses of the core's most recently evicted blocks, searched fully
associatively. For each core VMON counts `Access_i` (all L2 accesses) and
`VTagHits_i` (misses whose line is found in VTag_i). A miss that hits in VTag
would have been a hit with a little more capacity. The matching VTag entry is
dropped, because the block is coming back into the cache.

Intervals are marked from outside the cache (10 million instructions in the
evaluated setup). At the end of an interval the system pulses `interval_end`.
VMON then copies both counts to `vtag_hits`/`accesses` and starts counting
again from zero. Software then runs the PCS algorithm:

```
MG_i = VTagHits_i / Access_i          AMG = mean of MG_i
if MG_i > AMG * (1 + Inc_Th) and level_i < top:     level_i += 1
if MG_i < AMG * (1 - Dec_Th) and level_i > bottom:  level_i -= 1
```

Both thresholds are 50 % by default. Software writes the changed levels
through `cfg_we/cfg_core/cfg_level`. The algorithm belongs to the operating
system and is not RTL. The testbenches contain a model of it.

## Modules

| file | role |
|---|---|
| `pcs_pkg.sv` | default sizes, level table, `region_e`, `l2_events_t` |
| `pcs_l2.sv` | top: all arrays, the access engine, VMON, DAE, memory port |
| `tag_array.sv` | one core's tags: 1024 sets x 4 ways, compare, LRU, free-way choice |
| `data_array.sv` | one region (P or sData): data, reuse, t_ptr, v, id; `full` flag |
| `reuse_replacer.sv` | global reuse replacement search for one region |
| `vtag_buffer.sv` | one core's VTag |
| `vmon.sv` | VTags plus VTagHits/Access counters and interval hand-over |
| `dae.sv` | per-core levels and region select (ratio or generator) |
| `mem_interface.sv` | line fills and write-backs with a valid/ready request and a response |
| `rr_arbiter.sv` | round-robin choice among the cores' requests |

## Interface and timing of `pcs_l2`

* **Cores.** Each core has `req_valid/req_ready`, `req_we`, `req_addr`
  (byte address, 64 bits) and `req_wdata` (512 bits). A request is taken in a
  cycle where both `req_valid` and `req_ready` are high. `resp_valid[i]`
  pulses once per request, and for a read `resp_rdata` carries the line in
  that same cycle. A read hit responds 2 cycles after acceptance. A miss takes
  longer: the replacement search (1 cycle per entry visited), about 3 cycles
  of bookkeeping, an optional write-back, and the memory latency.
* **Memory.** The port is line-addressed: `mem_req_valid/ready`, `mem_req_we`,
  `mem_req_line`, `mem_req_wdata`, then `mem_resp_valid/data` for reads. One
  request is outstanding at a time. A write-back completes when memory
  accepts it.
* **Operating system.** `cfg_*` writes a core's level, `level[]` reads the
  levels back, and `interval_end`, `vtag_hits[]` and `accesses[]` carry the
  VMON statistics.
* **Events.** `events` pulses one bit per mechanism: tag hit, miss, VTag hit,
  LRU-way takeover, placement into P, placement into sData, eviction, eviction
  of another core's block, write-back, reuse decrement.
* **Reset.** Reset is asynchronous and active low. It clears all valid bits,
  the LRU order, the replacement pointers and the counters, and sets every
  level to `DEFAULT_LEVEL`. Data, tag payloads and reuse counters are not
  reset: a reuse counter is cleared whenever its entry is filled and is only
  read while the entry is valid.

## What is assumed, and what is left out

Several choices here are this design's own:

* 4-way tag sets. The published configuration gives 4096 tag entries per
  core but no associativity.
* True LRU among tag ways.
* 2-bit reuse counters.
* FIFO VTags that store full line addresses.
* 32-bit VMON counters.
* The level encoding.
* A single access engine shared by all cores, and the cycle timing.
* The memory handshake.
* Full-line writes from L1.

Departures from the evaluated system:

* **No coherence.** `status` is only valid and dirty. The snooping MESI
  protocol and copying on remote hits are not modelled. Cores must not write
  lines that other cores cache, and the testbenches give each core its own
  address range.
* **Latency.** The evaluation assumes 12-cycle hits (18 for remote hits).
  This RTL answers a read hit in 2 cycles and does not pad the latency.
* **Serialised accesses.** One access is handled at a time, across all cores.
* **Outside this RTL.** The cores, the L1 caches, main memory and the
  operating system's scheduler and PCS algorithm.

## Sizes against the evaluated settings

Every setting studied in the evaluation is a parameter:

| setting | parameter |
|---|---|
| private region of 512, 1024 or 1536 entries | `P_ENTRIES`; sData is `8*(2048-P_ENTRIES)` |
| VMON of 32 to 256 entries | `VMON_ENTRIES` |
| probability sets drawn from {1/3, 2/5, 1/2, 3/5, 2/3, 3/4} | `LEVEL_S/LEVEL_P`, e.g. 2/5 = (2,3) |
| intervals of 1 to 20 million instructions | the spacing of `interval_end`; 32-bit counters hold 20M accesses |
| thresholds | software |

The storage at the defaults comes to about 1336 KB (1 KB = 1024 bytes):

| part | bits per entry | size |
|---|---|---|
| tag entries, 8 x 4096 | 64, plus 2 bits of LRU rank | 264 KB |
| P entries, 8 x 1024 | 527 | 527 KB |
| sData entries, 8192 | 530 | 530 KB |
| VTags, 8 x 256 | 58 | 14.5 KB |

With 64-entry VTags the total is about 1325 KB. The published estimate for
this organisation, with 64-entry VTags, is 1324 KB.

## Verification

Each module has a self-checking testbench in `tb/` that compares against an
independent model and prints `TB_RESULT checks=N failures=M`:

* `tag_array_tb`: hit, way, victim and LRU order against a model.
* `data_array_tb`: reuse counter rules and the `full` flag.
* `reuse_replacer_tb`: victim, counters after a search, and search length in
  cycles.
* `vtag_buffer_tb`: FIFO and drop-on-hit.
* `vmon_tb`: per-interval counts.
* `dae_tb`: exact ratio patterns and clamping. It also checks the generator
  mode against an LFSR model and its long-run shared fraction.
* `mem_interface_tb`: a random-latency memory.

Four testbenches run the whole cache:

* `pcs_l2_tb` uses 8 cores with 64-entry tag arrays, 32 data entries per core
  (16 private), 8-entry VTags and 8-byte lines. Small and large working sets
  make the operating-system model promote some cores and demote others. Every
  read is checked against a reference memory, and the 2-cycle hit latency is
  checked. Each mechanism listed under *Events* must occur, as must at least
  one promotion and one demotion.
* `pcs_l2_pg_tb` is the same test with the probability generators and
  levels 0.1 to 0.9.
* `pcs_l2_full_tb` runs the default sizes with a 250-cycle memory. Streaming
  cores overflow their 1024-entry P and spill into sData. It finishes in
  about 10 s.
* `pcs_l2_sweep_tb` runs the parameter studies at 1/64 of the default array
  sizes, one `pcs_l2_env` harness per configuration. It covers private
  regions of 8 and 24 out of 32 entries (512 and 1536 out of 2048 at full
  size) and a 2-entry VTag. It also covers the level sets {2/5, 1/2, 3/5}
  and {1/3, 1/2, 2/3, 3/4}. Each configuration checks data, latency and the
  main mechanisms.

To run one with Verilator:

```
verilator --binary --timing --assert -Irtl rtl/*.sv tb/pcs_l2_tb.sv \
          --top-module pcs_l2_tb && ./obj_dir/Vpcs_l2_tb
```

Because every module is parameterised, a size can be changed on the
`pcs_l2` instance without touching the modules.
