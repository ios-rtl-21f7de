# Invalidation on Squash (IOS): a cache subsystem that forgets transient loads

Meltdown- and Spectre-style attacks work in two steps. A *transient* load,
one that runs out of order or down a mispredicted path and will later be
squashed, reads a secret and uses it as an index into a probe array. The
pipeline throws the load's results away when it squashes it, but the cache
line it fetched stays in the L1, L2 and LLC. The attacker then times a
reload of every probe line (Flush+Reload); the one line that answers
quickly gives the secret away.

IOS closes that channel with very little hardware. **Whenever a load that
already sent its access to the cache is squashed, the cache hierarchy is
told to forget that line.** The invalidation carries only a line address
and gets no reply. It goes to the L1 data cache, and each level passes it on
to the next one down, so it reaches the bottom of the hierarchy. The rule is
blunt on purpose. Nothing checks whether the line was really brought in by
the transient load; it is simply removed. No per-instruction or per-line
bookkeeping is needed beyond one extra line state.

This repository holds synthesizable SystemVerilog for that subsystem: the
squash unit next to the core and a cache level that implements IOS. The top
chains them into L1 data cache, L2 cache and an optional LLC. The
out-of-order core and memory are not part of the RTL. They connect through
ports, and the testbenches model them.

## The two cases a cache level has to handle

An invalidation looks up its set exactly like a load does. What it finds
decides what happens:

1. **The line is there (invalidation hit).** The secret arrived before the
   squash. The line is invalidated.
2. **The line is not there, but this level has a miss to it in flight.**
   The squash came before the data did. There is nothing to remove yet, and
   when the fill comes back it would install the secret after all. So the
   invalidation writes a *fake line* into the set. It has the tag of the
   awaited line and the state `LOCKED`. When the fill arrives, the cache
   looks for a locked line with the fill's tag before it picks a victim way.
   If it finds one, it **skips copying the data** and sets the fake line
   back to `INVALID`. The fill is still passed up to the level above,
   because that level holds its own miss entry and is waiting for the line.
   That level got the same invalidation, so it skipped its own copy too.
3. **Neither.** The line is not there and nothing is in flight, so there is
   nothing to do at this level.

In every case the invalidation is then passed to the level below. A line
state is therefore one of `INVALID`, `VALID` or `LOCKED` (`line_state_e` in
`ios_pkg`), and a locked line only ever lives between an invalidation and
the fill it waits for.

Here is a squash that catches a miss in flight in a three-level hierarchy:

```
core      load X ──► L1 miss ──► L2 miss ──► LLC miss ──► memory (slow)
squash    X squashed: squash unit ──inv X──► L1: X in flight → LOCKED fake line
                                     ──inv X──► L2: X in flight → LOCKED fake line
                                     ──inv X──► LLC: X in flight → LOCKED fake line
fill      memory ──X──► LLC: finds LOCKED X → no copy, release, pass up
                  ──X──► L2: same        ──X──► L1: same ──X──► core (discards it)
reload    any later load of X misses at every level and goes to memory
```

Two ordering rules keep this correct when traffic overlaps:

* A level accepts an invalidation only while it has no miss request waiting
  to be taken by the level below. A miss that a level sent before an
  invalidation therefore reaches the level below first. The lower level then
  has the miss entry in flight when the invalidation arrives, and locks a
  fake line instead of ignoring it.
* A load to a line that is already in flight at a level waits until that
  line's fill. A load that is not squashed and repeats the access after a
  skipped fill then misses and installs the line normally.

## Blocks

| File | What it is |
|---|---|
| `rtl/ios_pkg.sv` | Address and line widths, line state enum, event struct |
| `rtl/ios_squash_unit.sv` | Turns the core's squash report into invalidations for the L1 |
| `rtl/ios_cache.sv` | One IOS cache level (L1D, L2 or LLC, set by parameters) |
| `rtl/ios_top.sv` | Squash unit + L1D + L2 (+ LLC), ports to core and memory |

### Squash unit (`ios_squash_unit`)

Each time the core squashes, it reports three things: the load-queue
entries being squashed (`squash_mask_i`), the entries whose access already
reached the L1 (`lq_issued_i`) and each entry's line address (`lq_addr_i`).
Only entries that are both squashed and issued are invalidated. A load that
never reached the cache cannot have installed anything. The unit copies
those addresses into a pending list, one slot per load-queue entry, so the
core can reuse the entries at once. It then offers one invalidation per
cycle to the L1, lowest entry first. An offer that is not taken stays on the
port unchanged. If a squash names an entry whose previous invalidation is
still pending, `squash_ready_o` is low until that entry has drained.

### Cache level (`ios_cache`)

* Read-only, set-associative, non-blocking, 64-byte lines moved whole, line
  addresses throughout (`line_addr_t`, 26 bits of a 32-bit address).
* `N_MSHR` miss entries. `N_MSHR` must be smaller than `WAYS`, so a set
  always keeps an unlocked way for a fill.
* Victim: first invalid way, else a per-set round-robin way. A locked way is
  never chosen.
* One operation per cycle, in priority order: fill from below (always
  accepted, no ready), then invalidation from above, then request from above.
* Timing: a hit is answered on `resp_*` one cycle after `req_ready_o`. A fill
  is passed up one cycle after it arrives. A miss request goes out on
  `mreq_*` the cycle after acceptance. An invalidation goes out on
  `inv_*_o` the cycle after acceptance.
* Handshakes are valid/ready. Valid and address must hold until ready, and
  assertions in the module check this. `resp_*` and `mresp_*` have no ready.
* `ev_o` gives one-cycle strobes: hit, miss, stalled request, invalidation
  hit, fake line locked, invalidation with nothing to do, fill copied, fill
  skipped.

### Top (`ios_top`)

| Parameter | Default | Origin |
|---|---|---|
| `LQ_ENTRIES` | 32 | evaluated machine (32 LSQ entries) |
| `L1_SIZE`, `L1_WAYS` | 32 KB, 8 | evaluated machine |
| `L2_SIZE`, `L2_WAYS` | 2 MB, 16 | evaluated machine |
| `LINE_BYTES` (package) | 64 | evaluated machine |
| `L1_MSHR`, `L2_MSHR` | 4, 8 | design choice |
| `LLC_EN` | 0 | the evaluated machine has no LLC |
| `LLC_SIZE`, `LLC_WAYS`, `LLC_MSHR` | 8 MB, 16, 8 | design choice, used only with `LLC_EN=1` |
| `ADDR_W` (package) | 32 | design choice |

Ports: the core-side load port `ld_*`, the squash report `squash_*` and
`lq_*`, the memory port `mem_*` below the last level, and status outputs
(`ios_busy_o`, `inv_count_o`, `ev_l1_o`, `ev_l2_o`, `ev_llc_o`). The bottom
level accepts the invalidation it would pass down and drops it. Memory gets
no invalidations.

## Where this RTL makes its own choices

The IOS method fixes the behaviour described above. Everything else is a
choice made for this implementation and can be changed:

* **No stores.** The caches serve loads only, so nothing is dirty and an
  eviction needs no write-back. A real L1D would add stores, write-back and
  coherence around the same IOS logic.
* **The fake line is inserted only when a miss is in flight.** If nothing is
  coming, no fill would ever release a fake line.
* **The squash unit keeps a copy of pending addresses** (32 × 26 bits). This
  lets the load queue free squashed entries at once. IOS is meant to need no
  extra storage. A core that keeps squashed entries until the unit is idle
  can drop the copy.
* **One request per line in flight.** A second load to the same line waits
  for the fill; misses are not merged.
* **Array reads are combinational** and all line states clear in one cycle
  at reset. Large instances (the 2 MB L2) would be SRAM macros with a reset
  sweep in silicon.
* The miss-entry counts, the replacement policy, the one-cycle hit latency
  and the operation priority are not taken from any measurement.

## Verification

Each testbench checks itself and ends by printing
`TB_RESULT checks=N failures=M`.

| Testbench | What it does |
|---|---|
| `tb/tb_ios_cache.sv` | 1 KB 4-way level on a memory model. Directed: miss/fill/hit, one-cycle hit latency, invalidation hit, fake line locked and released, fill skipped but passed up, absent-line invalidation, round-robin replacement, stall on an in-flight line. Random: mixed loads and invalidations, data of every answer, every load answered, invalidations passed down in order, an invalidated line misses next time. |
| `tb/tb_ios_squash_unit.sv` | 8-entry queue. Random squash reports against a reference of owed invalidations, offers held until taken, one per cycle drain rate, squash back-pressure on conflicts, counter. |
| `tb/tb_ios_top.sv` | Whole subsystem at small sizes with an LLC (16-line probe array). A reference round squashes the transient load without an invalidation and checks that the reload then reveals exactly the secret line. The IOS rounds follow: the secret already filled, then the secret still in flight. Each checks that level's invalidation hit, lock and skip, and that the reload finds no probe line in any cache. Then back-to-back squashes force back-pressure, and random loads and squashes run. The bench fails if a mechanism never happened. |
| `tb/tb_ios_top_full.sv` | The same rounds with `ios_top` at its defaults (32 KB L1, 2 MB L2, no LLC). The probe array is the classic one: 256 lines, 4 KB apart. |

`tb/ios_top_harness.sv` holds the scenario the two top-level benches share.
`tb/mem_model.sv` is a behavioural memory: fixed latency, in-order returns,
optional back-pressure and a hold input that keeps misses in flight.
`tb/tb_ios_pkg.sv` defines the line contents as a function of the address,
so each answer can be checked without a copy of memory.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/ios_pkg.sv tb/tb_ios_pkg.sv rtl/ios_cache.sv rtl/ios_squash_unit.sv \
  rtl/ios_top.sv tb/mem_model.sv tb/ios_top_harness.sv tb/tb_ios_top.sv \
  --top-module tb_ios_top -o sim
./obj_dir/sim
```

For `tb_ios_top_full`, swap the last file and `--top-module`. The cache
bench needs `ios_pkg.sv`, `tb_ios_pkg.sv`, `ios_cache.sv`, `mem_model.sv`
and `tb_ios_cache.sv`. The squash-unit bench needs only `ios_pkg.sv`,
`ios_squash_unit.sv` and `tb_ios_squash_unit.sv`. Every bench runs in well
under a second, the full-size one included.

## What is not here

* The out-of-order core (fetch to retirement), its squash logic and the L1
  instruction cache. The squash report is a port, and the testbenches drive
  it.
* Memory. It is a port, and a behavioural model stands in for it in the
  testbenches.
* Performance. IOS costs some speed because lines that squashed loads
  fetched are thrown away, and loads that follow must fetch them again. The
  loss reported for a 17-benchmark SPEC CPU2006 run on a simulated single
  out-of-order core is about 8 % on average, up to about 25 % for the worst
  benchmarks. Reproducing that needs the whole core and is outside this RTL.
