# Adaptive L1 cache that reshapes itself under a side-channel attack

A prime+probe attacker relies on knowing the cache's geometry. They build
*eviction sets*: groups of addresses that all land in one cache set, as many as
the set has ways. If the cache changes its number of ways, sets or line width
while the attack runs, those eviction sets stop matching the hardware. The
attacker's measurements then turn to noise.

This RTL is an L1 data cache that can change its geometry at run time, plus the
logic that decides when to do it and what to change to. Three ideas carry the
design:

1. **The storage is a pool of identical memory blocks, not a fixed tag array
   plus a fixed data array.** Each block is one 32-bit word wide and `DEPTH`
   lines deep. A small registry says whether each block currently holds tags or
   one word column of data, and for which way and set range. Reconfiguring means
   rewriting that registry. The blocks themselves never change.
2. **Coherence keeps working while caches disagree on line width.** Every bus
   command carries the requester's line width. A snooper whose own lines are
   narrower checks, and if needed writes back or invalidates, every local line
   the request covers.
3. **The cache watches itself.** It has performance counters, a miss classifier
   and utilisation tables, like a self-tuning cache. It also has an *eviction
   table* that flags the prime+probe pattern: many sets each losing many lines
   in quick succession. Tuning logic then picks a new geometry. When an attack
   is flagged it favours changing associativity. Otherwise it looks at hit rate
   and cycles per request.

The default build is a 16 KB cache: 20 blocks of 256 words. It comes out of
reset as 4-way, 256 sets, 16-byte lines, which is exactly 4 tag blocks plus 16
data blocks. From there it can take any of 26 geometries.

## Configurations

A geometry is a `cfg_t`, defined in `cache_pkg`. All three fields are log2
values:

| field      | meaning                                                    |
|------------|------------------------------------------------------------|
| `way_bits` | ways = 1 << way_bits                                       |
| `grp_bits` | groups = 1 << grp_bits; sets = DEPTH × groups              |
| `off_bits` | words per line = 1 << off_bits (also sent on the bus)      |

A *group* is a `DEPTH`-set slice of the cache. One block covers one group of
one way. More sets therefore means more groups, not deeper blocks. The smallest
set count is `DEPTH`.

A geometry fits (`cache_pkg::cfg_fits`) when all of these hold:

- ways ≤ `MAX_WAYS`;
- ways × groups ≤ `MAX_TAG_BLOCKS`;
- ways × groups × (1 + words) ≤ `N_BLOCKS`.

At the defaults (20, 8, 8, 4 words max) this gives 26 geometries. Examples:
4-way/256/4 words (the reset geometry), 2-way/512/4 words, 8-way/256/1 word and
1-way/2048/1 word.

An address splits like this, from the low end up:

| bits                  | field            |
|-----------------------|------------------|
| `[1:0]`               | byte in word     |
| next `off_bits`       | word offset      |
| next `LOG_L+grp_bits` | set index        |
| the rest              | tag              |

The stored tag is `TAG_W = 30 - LOG_L` bits wide, enough for the geometry with
the fewest index and offset bits. `address_splitter` splits addresses and
`address_builder` rebuilds them for write-backs. Both are purely combinational.

## Memory blocks and the registries

`mem_block` is a true dual-port RAM, one word wide. Port A belongs to the
controller and port B to the snooper. A read returns the newly written word
(write-first). Each block's tag words have this layout:

- `[31:30]` MESI state;
- `[TAG_W-1:0]` tag.

There is no separate valid or dirty bit: I means invalid and M means dirty.

`block_registry` turns a `cfg_t` into three views of the same allocation. With
T = ways × groups:

- **Tag blocks** are blocks `0 .. T-1`. Block `g*ways + w` holds the tags of way
  `w`, group `g`. This 2D table (`tag_reg[way][group]`) steers the tag read
  path.
- **Data blocks** follow. Word `k` of way `w`, group `g` is block
  `T + (g*ways + w)*words + k`. This 3D table (`data_reg[way][group][word]`)
  steers the data read path.
- **Per-block entries** (`blk_is_tag`, `blk_used`, `blk_way`, `blk_grp`,
  `blk_word`) sit next to each block. On a write, each block compares its own
  entry with the way, group and word being written and raises its own write
  enable. Writes therefore need no decoder from (way, group, word) to block
  number, and no wide write-data multiplexer.

Putting tags first is what keeps the tag path small. Tags can only ever sit in
blocks `0 .. MAX_TAG_BLOCKS-1`, so only those blocks need a tag comparator. The
registry reloads one cycle after `load`. That happens at reset and at the apply
step of a reconfiguration. Blocks not used by the current geometry are marked
`blk_used = 0` and are never written. They are natural candidates for clock
gating, but this RTL does not gate them.

## Lookup: comparators first, then narrow multiplexers

A fixed cache routes each way's tag array to its own comparator. Here any of
the first `MAX_TAG_BLOCKS` blocks may be way 3's tag store. Routing 32-bit tag
words to per-way comparators would need wide multiplexer trees. `cache_memory`
turns this around:

1. All blocks read line `set[LOG_L-1:0]` on both ports every cycle.
2. Each tag-capable block compares its own word with the request's tag. A
   match needs the tag equal and the state not I.
3. For each way, a **1-bit** `MAX_TAG_BLOCKS`:1 multiplexer picks the match
   bit of that way's tag block in the addressed group. `tag_reg` steers it. The
   group is the set index bits above `LOG_L`.
4. The hit way selects the data word through `data_reg`.

The request is registered, so the result arrives one cycle after the address.
This gives the 1-cycle pipelined hit. Port A also returns, for the addressed
set:

- each way's state and tag (for victim write-back);
- the whole line of a chosen way (`a_line`);
- the LRU victim.

Port B gives the snooper the same lookup plus a state-rewrite port.

`replacement_controller` implements true LRU. Each set stores one age rank per
way. The storage is sized for `MAX_WAYS` ways and the largest set count, so any
geometry fits. The victim is the first invalid way if there is one; otherwise
it is the oldest of the active ways. A reset of the ranks is done by the
controller's clear walk, one block line (all groups) per cycle.

## Cache controller and the reconfiguration sequence

`cache_controller` is a blocking, write-back, write-allocate MESI controller.

**Normal operation:**

- **Hit.** A request is accepted in `IDLE` and checked one cycle later. A read
  hit answers at once. So does a write hit on an E or M line, which makes the
  line M.
- **Write hit on an S line.** The controller first sends `BUS_UPGR`, which
  makes the other caches drop their copies.
- **Miss.** The controller takes the LRU victim and writes it back (`BUS_WB`)
  if it is M. It then fetches the line with `BUS_RD` (or `BUS_RDX` for a write)
  and installs it:
  - E when no other cache answered *shared*;
  - S when another cache did;
  - M after a write.

  The request is then replayed, and now hits.

**Reconfiguration** starts when `rc_req` arrives with a target geometry:

1. **Take the bus (`RC_ACQ`).** The controller issues a dummy read of address
   0 with the bus interface's `lock` raised. When the read completes the
   interface keeps requesting, so the arbiter never hands the bus to another
   cache. For the whole sequence no other cache can issue a command. In
   particular, none can snoop this cache while its lines are half-moved.
2. **Drain (`RC_READ`, `RC_WAY`, `RC_WB`).** Every set of the *old* geometry is
   read. Every way in state M is written back to the level below over the held
   bus. Clean lines are simply dropped.
3. **Apply (`RC_APPLY`).** The new `cfg` is registered and `cfg_load` reloads
   the block registry.
4. **Clear (`INIT`).** All blocks and the LRU ranks are zeroed, one block line
   per cycle. A block that held data may now hold tags, so every line must
   start invalid.
5. **Release (`RC_REL`).** `lock` drops, `rc_done` pulses, and the counters
   and monitors restart for the new geometry.

The same `INIT` walk runs after reset. The cost of a reconfiguration is:

- the dummy read;
- `ways + 2` cycles for each set of the old geometry;
- the bus time of each dirty line;
- `DEPTH` cycles for the clear.

From the reset geometry, with the random traffic of the full-size testbench,
this comes to 3851 cycles. `stats.rc_cycles` reports the figure.

## Shared bus and the bus interface

`shared_bus` connects `NC` caches to one port towards the level below (L2). It
is one 32-bit word wide. Arbitration is round-robin. A cache keeps ownership
for as long as it holds `m_req`. A transaction has four phases:

| phase | what happens |
|-------|--------------|
| command | The owner pulses `m_cmd_valid` with op, line address and `off_bits`. `off_bits` is the owner's line width, 1 << off_bits words. |
| `SNOOP` | The command is broadcast to every other cache's snooper. |
| `WAIT` | The bus waits until no snooper is `busy`. A snooper holding M data writes it to the level below through its *flush channel* (`fl_*`). The *shared* answers are OR-ed together. |
| `XFER` | The command goes to the L2. Read words stream back to the owner; write-back words stream from the owner, each with its own address. `l2_done` ends the transaction, and the owner sees `m_done` and `m_shared`. |

Because the snoop finishes before the L2 is asked, a read never returns stale
data from the L2: any M copy has already been flushed.

`bus_interface` sits between the controller and the bus, and moves
1 << off_bits words per line:

- it collects read words into a line buffer;
- it sends a victim line word by word;
- its `lock` input keeps the bus between transfers;
- it reports cycles waiting for the grant and for read data.

## Snooping across different line widths

Each cache may run a different geometry, so a snooped command can cover more
or less than one local line. `snooper` compares the request's `off_bits` (ro)
with its own `off_bits` (lo):

- **ro > lo:** the request covers `1 << (ro - lo)` local lines. The snooper
  looks up each one through port B.
- **ro ≤ lo:** the request falls inside one local line, and that whole line is
  handled.

For each local line found:

| command          | line in M                          | line in E | line in S |
|------------------|------------------------------------|-----------|-----------|
| `BUS_RD`         | write back, then S; answer shared  | → S, shared | shared  |
| `BUS_RDX`/`UPGR` | write back, then I                 | → I       | → I       |

A write-back sends every word of the local line with its own address. A cache
with 4-word lines that snoops a 16-word read may therefore flush up to four
lines in one bus transaction. The bus stays in `WAIT` until the snooper drops
`busy`, so the snooper keeps the bus across all of its write-backs.
Invalidations are reported to the utilisation tables, and each invalidation or
write-back counts as one coherence operation.

## Monitors

All of these sit inside `reconfig_l1_cache`. Like the eviction table below,
they are cleared at the end of each reconfiguration, so they describe the
current geometry only.

- **`perf_counters`** counts, in 32 bits each:
  - answered requests and hits;
  - cycles;
  - snooper coherence operations;
  - cycles waiting for the bus, for memory, and for a write to a shared line;
  - dirty write-backs;
  - cycles spent in misses;
  - the length of the last reconfiguration.
- **`miss_class_table`** keeps, per set, the low `PTAG_W` (8) bits of the tag
  last evicted from that set. On a miss:
  - if the missing tag matches, the line would still be present with more ways,
    so the miss is a conflict miss;
  - otherwise it is a capacity miss, which includes compulsory misses.
- **`utilization_tables`** keeps two tables and a scanner:
  - a per-set count of valid lines, `log2(MAX_WAYS)+1` bits;
  - a per-way count of valid lines, `log2(MAX_SETS)+1` bits;
  - a scanner that sweeps the sets of the current geometry, one per cycle, and
    publishes how many are empty.

  Installs increment both tables; evictions and snoop invalidations decrement
  both.

## Attack detection: the eviction table

`eviction_table` holds `N_ENT` (8) entries. Each entry has a set number, an
eviction count and a time stamp. It remembers the sets that most recently lost
a line. On each eviction from set *x*:

1. The entries are read one per cycle, like a small RAM. The search takes at
   most `N_ENT` cycles, which is shorter than the miss that caused the
   eviction.
2. If *x* is found, its count goes up and its stamp becomes the newest.
3. If not, *x* replaces the entry with the oldest stamp, with count 1.

A set whose count reaches `W_THR` (8) is *suspicious*. When `K_THR` (4)
entries are suspicious at once, `attack` rises and stays high until the cache
has reconfigured. The end of the reconfiguration then empties the table. Requiring several sets is deliberate: one hot set can be an
ordinary program, but priming many sets is what prime+probe does.

One eviction that arrives during a search is buffered. Further ones are
dropped and counted, which only makes detection slower.

## Tuning: picking the next geometry

`tuning_logic` raises `rc_req` with a target `cfg_t` in two situations. Every
candidate is a pair of steps (×2 or /2) on two of ways, sets and line width.
That keeps the number of blocks in use the same. The first candidate that
`cfg_fits` accepts is taken.

- **Attack.** Associativity changes come first, since they break eviction sets
  outright. Shrinking the line comes next, then the set count. Growing the line
  is never chosen for its own sake. The list, in order:
  1. ways ×2 & line /2
  2. ways ×2 & sets /2
  3. ways /2 & sets ×2
  4. ways /2 & line ×2
  5. line /2 & sets ×2
  6. sets /2 & line ×2

  From the reset geometry (4-way, 256 sets, 4 words) the first two do not fit:
  8 tag blocks plus 16 data blocks is more than 20, and sets cannot go below
  256. The cache therefore goes to 2-way, 512 sets, 4 words.
- **Performance** (`perf_en`). Every `CHECK_N` (4096) answered requests, the
  hit rate since the last reconfiguration is compared with `HIT_PCT` (80 %),
  and the cycles per request with `CPR_MAX` (4). If either is worse, the order
  depends on the monitors:
  - more than half the sets empty → ways ×2 & sets /2;
  - conflict misses dominating → more ways;
  - capacity misses dominating → longer lines.

  The attack list is the fall-back.

`ext_rc_req`/`ext_rc_cfg` let software force a geometry, for example between
two programs. An internal request wins if both arrive together.

## Top level

`adaptive_cache_system` instantiates `NC` (2) `reconfig_l1_cache`s on one
`shared_bus`. The level below is not part of the design. Its command,
write-word and read-word signals are ports (`l2_*`). The testbenches connect a
behavioural memory there (`tb/l2_model.sv`). Its `LAT` parameter sets the read
latency. It returns 1 << off_bits words per read.

| parameter        | default | meaning                                          |
|------------------|---------|--------------------------------------------------|
| `NC`             | 2       | L1 caches on the bus                             |
| `N_BLOCKS`       | 20      | memory blocks per cache                          |
| `DEPTH`          | 256     | lines per block (= smallest set count)           |
| `MAX_TAG_BLOCKS` | 8       | blocks that can hold tags (bounds ways × groups) |
| `MAX_WAYS`       | 8       | largest associativity (LRU storage)              |
| `MAX_OFF`        | 4       | largest line: 16 words                           |
| `RESET_CFG`      | 4-8-2   | reset geometry: ways, index bits, offset bits    |
| `CHECK_N`, `HIT_PCT`, `CPR_MAX` | 4096, 80, 4 | performance check        |
| `N_ENT`, `W_THR`, `K_THR` | 8, 8, 4 | eviction table                          |

Processor accesses are whole 32-bit words. `cpu_ready` means a request can be
taken. `cpu_resp` and `cpu_rdata` come one cycle later on a hit.

## Where this RTL departs from the published design, and what it assumes

- **Smallest geometries are not reachable at the default size.** The
  published work compared 4 KB caches with 32 sets: 2-way/64-byte lines,
  8-way/16-byte and 4-way/32-byte. It also ran attacks on 4-way caches with 64
  and 128 sets. With 256-line blocks the set count starts at 256, so none of
  these fit. Setting `DEPTH=32` and `N_BLOCKS=40` reaches the 4 KB shapes,
  as one of the testbenches does.
  The 16 KB baseline and the 256-set attack experiments (4-way, 2-way and
  direct-mapped with 16-byte lines) do fit.
- **Size limits.** The published parameter sweep went up to 16 ways and
  64-byte lines. The defaults here stop at 8 ways (`MAX_WAYS`) and 16 words
  (`MAX_OFF=4`). Both are parameters.
- **The 40-block variant** of the published synthesis study is
  `N_BLOCKS=40`. It was not simulated.
- **Reconfiguration clears the whole array** after the write-backs, rather than
  moving lines. This matches the published behaviour: the cache is empty
  afterwards. It takes longer than the published 839-cycle figure, because the
  published figure was for 32-set caches.
- **These numbers are this design's own choices:**
  - the bus protocol (phases, snoop handshake, flush channel);
  - the MESI encoding in the tag word;
  - the 8-bit partial tag;
  - the LRU rank encoding;
  - every threshold (`CHECK_N`, `HIT_PCT`, `CPR_MAX`, `N_ENT`, `W_THR`,
    `K_THR`);
  - the performance-driven candidate order.

  The published work leaves these open.
- **Snooper write-backs** do not become bus transactions of their own. They
  run inside the requester's transaction, through the flush channel, while
  the bus waits. The effect is the same as the snooper holding the bus across
  its write-backs: nothing else can use the bus in between.
- **A request narrower than a local line** acts on the whole local line. There
  is no per-word coherence state. For example, a 1-word read-exclusive
  invalidates a cached 16-word line.
- **No clock or power gating** of unused blocks. `blk_used` marks them.
- **Not included:** the L2 cache, the processor cores and main memory. Only a
  behavioural stand-in for the level below exists, for simulation.
- **Detection scope.** Only prime+probe-style eviction patterns are detected.
  Flush-based attacks are not.

## Simulating

Each block has a self-checking testbench `tb/tb_<module>.sv`. It prints
`TB_RESULT checks=N failures=M` and stops itself; a watchdog ends a hung run.
To build and run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/cache_pkg.sv \
    tb/tb_adaptive_cache_system.sv --top-module tb_adaptive_cache_system -Mdir obj
./obj/Vtb_adaptive_cache_system
```

Substitute any other testbench name. `-Irtl -Itb` lets Verilator find the
modules by file name. Run the commands from the repository root, where the paths
above start.

`tb_adaptive_cache_system` runs the top at its default parameters, in about
5 s. Two caches run random traffic from overlapping address pools. A reference
memory checks every read. Along the way the testbench:

- forces an external reconfiguration of cache 0;
- primes many sets of cache 1 until the eviction table fires and cache 1 moves
  to 2-way/512 sets;
- lets a poor hit rate trigger a performance reconfiguration.

It counts each mechanism and fails if any never happened:

- one-cycle hits;
- dirty write-backs and L2 write-back transactions;
- snooper coherence operations;
- shared-line upgrades and waits for shared writes;
- bus contention and grant waits;
- conflict and capacity misses;
- snoops across line widths, including one request covering several lines;
- external, attack-triggered and performance reconfigurations.

Other notable testbenches:

- `tb_reconfig_l1_cache` takes one cache through all 26 geometries with data
  checks. It verifies that the bus is never released between the dummy read
  and the end of reconfiguration.
- `tb_prime_probe_workload` replays the attack experiment on 4-way, 2-way and
  direct-mapped caches with 256 sets and 16-byte lines. An attacker primes and
  probes 32 sets while a victim touches 8 secret ones, for 10 rounds each:
  - every round before detection leaks all 32 sets;
  - the eviction table fires after 1 to 3 rounds;
  - the cache moves to 2-9-2, 4-8-1 and 2-8-1 respectively;
  - the attacker, still using the old eviction sets, is then right on about
    29 %, 76 % and 72 % of the sets. Guessing "not touched" for every set
    would already score 75 %.
- `tb_small_cache_workload` rebuilds the cache from 40 blocks of 32 words,
  overriding `DEPTH` and `N_BLOCKS`. That reaches the published 4 KB shapes
  2-5-4, 8-5-2 and 4-5-3, named as ways, index bits and offset bits. It runs
  two synthetic programs in each shape, and each prefers a different one:
  - a streaming read hits 960, 768 and 896 times out of 1024;
  - a conflict-heavy loop hits 0, 1216 and 0 times out of 1280.

  The two reconfigurations took 272 and 1136 cycles. Attack detection is off
  in this testbench, because the conflict loop evicts like a priming attacker.
- `tb_block_registry` checks the allocation rule for every geometry.
- `tb_cache_memory` checks lookups in six geometries against a software model.
- `tb_snooper` checks width-mismatched snooping against a real `cache_memory`.
