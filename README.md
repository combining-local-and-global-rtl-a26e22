# GHB-LDB: an L1 data prefetcher that combines local and global address history

This is synthesizable SystemVerilog for a hardware data prefetcher that sits
next to an L1 data cache. It sees every load/store address together with the
PC of the instruction that made it, and predicts which cache lines will be
needed next. It combines two views of the address stream:

* **local history** — the sequence of addresses made by one instruction (PC),
  turned into a sequence of *deltas* (differences between consecutive
  addresses of that PC);
* **global history** — the order in which all instructions' addresses occurred.

From these it catches access patterns that a plain stride prefetcher misses:

| pattern | what it looks like | how it is caught |
|---|---|---|
| stride | deltas d d d d | delta correlation |
| delta correlation | deltas a b c d a b c d | the last two deltas occurred before; replay what followed |
| single delta match | a x c d … a | only the last delta occurred before; replay what followed |
| most common stride | D X D Y D Z D (a stride interrupted by jumps) | remember the last delta that matched ("last matched stride") and prefetch with it when nothing matches |
| scalar stride | address multiplied or divided by a constant (32D 16D 8D …) | three deltas that each grow or shrink by the same factor 2, 4 or 8 |
| global stride | instruction B always accesses d bytes after instruction A | A's past addresses and the addresses written right after them differ by the same d |

The sizes are those of the highest-performance configuration of the design,
about 3.7 kB of state: a 256-entry index table, a 192-entry global history
buffer, 16 local delta buffers and a 256-entry prefetch MSHR.

## Where a PC's history lives

Every trigger is looked up by PC in the **index table** (`index_table`,
256 entries, 8 ways, 32 sets indexed by PC[4:0]). Its 8-bit index field has two
meanings:

* `index < 192`: the PC's history is a linked list in the **global history
  buffer** (`ghb`). The GHB is a circular FIFO of 192 trigger addresses in
  global order; each entry links to the previous entry of the same PC, and the
  index table points at the newest one. Reading the history means walking the
  list, one entry per clock.
* `192 <= index < 208`: the PC owns **local delta buffer** `index - 192`
  (`ldb_table`, 16 LDBs). An LDB holds the PC, its last address, its last 7
  deltas, its last matched stride and a confidence bit. Reading the history
  takes no walk at all.

A few hot instructions would otherwise fill the whole GHB and need long walks.
So a PC whose GHB list already yields 8 addresses (7 deltas, a full LDB) is
*promoted*: it takes over the least recently used LDB, and the index table
then points at the LDB. Later triggers of that PC no longer go into the GHB.
If that LDB is later given to another PC, the LDB's stored PC no longer matches
and the old PC starts again as if it were new.

The GHB overwrites its oldest entry, so links can go stale. A link is followed
only when it leads to an *older* entry that is still inside the buffer.

## The prefetch function

`prefetch_function` is combinational. It takes the deltas (newest first),
the trigger address, the last matched stride, the global-stride result and the
confidence bit. It tries these rules in order:

1. **Delta correlation.** Find the most recent earlier position `j` where the
   pair (newest delta, previous delta) occurred. The `j` deltas after it form a
   period, and it is replayed: history `a b c d a b` gives `c d a b`.
2. **Single delta match.** The same with only the newest delta.
3. **Scalar stride.** Each of the last three deltas is 2, 4 or 8 times the
   one before (or that fraction of it). The next deltas keep scaling by the
   same factor. When shrinking, the prediction stops at the first division
   that is not exact.
4. **Global stride.** One prefetch at the current address plus the global delta.
5. **Fallback.** The current address plus the last matched stride (if there is
   one), and the next cache line.

Rules 1–3 give up to 4 candidates (the prefetch degree). Candidate `k` is the
trigger address plus the first `k+1` predicted deltas. When rule 1 or 2
matches, the newest delta becomes the PC's last matched stride.

The global stride is found by `global_stride_detect`. The first two entries
met on the PC's GHB list are each subtracted from their *global successor*,
the entry written right after them. If the two differences are equal and not
zero, another instruction is following this one at that distance.

## Removing redundant prefetches

Two mechanisms keep the prefetcher from asking for the same line again and
again.

* **Confidence bit (local).** A stride stream that hits on prefetched lines
  would ask for almost the same 4 lines at every trigger. When rules 1–3
  produce the full degree, the LDB's confidence bit is set. A later trigger
  that is a *hit on a prefetched line*, with the bit set, emits only the
  furthest candidate. Misses always emit the full degree.
* **Prefetch MSHR (global).** `pf_mshr_filter` records the line of every
  prefetch that leaves (256 entries, 8 ways, 21-bit tags, LRU). A candidate
  whose line is recorded is dropped. This also catches other instructions that
  touch lines already prefetched for another PC. Like any MSHR, an entry
  stands for a request in flight: the `fill_*` input frees it when the line
  arrives, so the line can be prefetched again once it has left the cache.
  With `fill_valid` tied low, entries leave only when their set needs room.

## Interface and timing of the top, `ghb_ldb_prefetcher`

| port | dir | meaning |
|---|---|---|
| `acc_valid`, `acc_ready` | in, out | one access per handshake; ready only when idle |
| `acc_pc`, `acc_addr` | in | PC and data address (32 bits) |
| `acc_miss`, `acc_pref_hit` | in | demand miss / hit on a line with its prefetch bit set |
| `pf_valid`, `pf_ready`, `pf_addr` | out, in, out | prefetch requests, valid/ready; the address holds while waiting |
| `fill_valid`, `fill_addr` | in | a prefetched line has arrived; frees its prefetch-MSHR entry |
| `events` | out | `pf_events_t` pulses: trigger, index-table miss and eviction, LDB hit, GHB walk, promotion, trim, MSHR drop, issue, rule used |

Only misses and prefetched hits are triggers; other accesses are accepted and
ignored. One trigger is handled at a time:

| state | cycles | work |
|---|---|---|
| LOOKUP | 1 | index table; an LDB path reads the LDB and forms the new delta |
| WALK | k (1..7) | GHB path only: one list entry per cycle |
| GHBUPD | 1 | GHB path / new PC: push on the GHB, update the index table, promote |
| PF | 1 | prefetch function; LDB written back (deltas, last matched stride, confidence) |
| ISSUE | 1 per candidate | MSHR check; drop, or offer on `pf_*` and record |

The first candidate appears 2 cycles after the accepting clock edge on the LDB
path, 3 + k cycles on the GHB path and 3 cycles for a new PC.

## Sizes and parameters

Shared sizes are in `pf_pkg`. The top's parameters (`GHB_ENTRIES`, `LDBS`,
`IT_SIZE`, `IT_ASSOC`, `MSHR_SIZE`, `MSHR_ASSOC`, `DEGREE`) default to the
configuration above. `GHB_ENTRIES + LDBS` must stay below 255 because both
share the 8-bit index field. The state built is:

| structure | bits |
|---|---|
| index table | 256 × (27 tag + 8 index + 3 LRU + 1 valid) = 9984 |
| GHB | 192 × (32 address + 8 link) = 7680 |
| LDBs | 16 × (7×32 deltas + 3×32 + 1 conf + 4 LRU) = 5200 |
| prefetch MSHR | 256 × (21 tag + 3 LRU + 1 valid) = 6400 |

This is about 30 kbit in all, close to the 29972-bit budget of the
configuration. The valid bits are the only additions.

## What is this implementation's own reading

The organisation, the table sizes, the rules and the two filters come from
the design. The following were not specified and were chosen here:

* prefetch degree 4 and history depth 7 deltas for both paths;
* 64-byte lines (implied by a 21-bit MSHR tag for 32-bit addresses and 32 sets);
* when a PC is promoted to an LDB, and that promoted PCs leave the GHB;
* how the replayed deltas repeat, the rule order, and putting the global
  stride after the local rules;
* scalar strides detected for factors 2, 4 and 8 only (shifts, no multiplier or divider);
* LRU replacement everywhere; the fill input that frees prefetch-MSHR
  entries, and overwriting the oldest entry of a full set instead of stalling;
* triggers are misses and prefetched hits; unknown PCs get a next-line prefetch;
* the whole sequencing and its cycle counts.

Not included: the two lower-cost configurations of the same design, which
replace the prefetch MSHR with a periodically reset Bloom filter, and a set of
statistics counters whose purpose is not specified (the `events` port gives
the raw pulses instead).

Known limitation: an index-table pointer into the GHB is not checked for
staleness. A PC unseen for more than 192 triggers may read an unrelated
address as its newest history entry. This costs accuracy, not correctness.

## Files

| file | content |
|---|---|
| `rtl/pf_pkg.sv` | sizes, types, LDB entry, event struct |
| `rtl/ghb_ldb_prefetcher.sv` | top: sequencer and wiring |
| `rtl/index_table.sv` | PC → GHB pointer / LDB number |
| `rtl/ghb.sv` | global history buffer with per-PC links |
| `rtl/ldb_table.sv` | 16 local delta buffers |
| `rtl/prefetch_function.sv` | rules → candidate addresses |
| `rtl/global_stride_detect.sv` | global-delta comparison |
| `rtl/pf_mshr_filter.sv` | redundant-prefetch filter |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_kernels.sv` | miss reduction on three loop kernels |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops by itself.
For example, the end-to-end test at full size:

```
verilator --binary --timing --assert -Irtl rtl/pf_pkg.sv \
    tb/tb_ghb_ldb_prefetcher.sv --top tb_ghb_ldb_prefetcher
./obj_dir/Vtb_ghb_ldb_prefetcher
```

The package goes first; `-Irtl` lets verilator find each module in the file
of the same name. The end-to-end test drives a stride stream through all
three paths and checks each path's latency, the one-new-line steady state and
the confidence trim. It also drives the `a b c d` pattern, a stride interrupted
by jumps, halving distances, two PCs a constant distance apart, index-table
and LDB replacement, ignored hits and random `pf_ready` back-pressure. It
counts every mechanism and fails if any never occurred. The unit testbenches
compare each table against a reference model under random traffic.

`tb/tb_kernels.sv` measures what the prefetcher is for. It turns three loops
into access streams, one PC per load/store: array streaming, a sparse-matrix
update with data-dependent indices, and a heap walk whose index doubles. It
feeds them to the prefetcher and to a 32 KiB direct-mapped L1 model with
prefetch bits. Prefetched lines enter the model at once, and their fills are
reported back. A second model sees only the demand stream. With the default
sizes, the prefetcher removes almost all misses of the streaming loop (750 to
3) and about half of those of the heap walk (about 5200 to 2700). It removes
only a few percent on the sparse loop, whose indices are random. The test
fails if the streaming loop loses less than half its misses, if the heap walk
loses less than a quarter, or if the sparse loop gets no fewer misses.
Prefetch lateness is not modelled, and no real program traces are included.
