# Hybrid pseudo-random SRAM for a GPU cache bank

A pseudo-random SRAM (PR-SRAM) cuts the dynamic energy of reads by splitting
its cell array into **zones** and spreading every read over several clock
cycles (the *pipeline factor*, 4 here). Reads to different zones overlap, so
the memory still accepts one access per cycle. The price is a scheduling rule:
a read to a zone that already has a read in flight must wait until that zone
clears, and everything queued behind it waits too. Those lost cycles are
**penalty cycles**, and the **penalty rate** is the number of penalty cycles
per 100 accesses.

GPU cache traffic often re-reads a line that is still being read. The
**hybrid** design targets those conflicts. When a stalled read asks for the
very line that is in flight, the returning data answers it, and the line is
also copied into a small fully associative **conventional SRAM**. From then on
that SRAM answers reads of the line in one cycle, with no zone rules. Conflicts
between different lines simply stall.

This repository holds synthesizable SystemVerilog for that hybrid memory. It is
sized as the data array of one L2 cache bank of a GV100-class GPU: 768 lines of
128 B, 24-way set associative, 32 zones aligned with the 32 sets, a 4-cycle
read pipeline, and a 2 kB (16-line) conventional SRAM with LRU replacement.

## Block structure

```
hybrid_sram                      top: access control, response ports
├── zone_conflict_detector       in-flight reads, conflict / stall / hazard
│   └── zone_map (x2)            location -> zone
├── pr_sram_array                PR-SRAM functional model (array + read pipeline)
│   └── zone_map (x PIPE)        used only by the protocol assertions
├── conv_sram                    fully associative conventional SRAM
│   └── repl_lru | repl_lfu | repl_random   replacement policy (parameter REPL)
└── perf_counters                event counters
hybrid_sram_pkg                  zoning and policy enums
```

## Zones and the conflict rule

A line location is numbered `set * WAYS + way`, so each set's lines are
adjacent. `zone_map` turns a location into a zone in one of three ways
(parameter `ZONING`):

| method | zone of location `a` | used for |
|---|---|---|
| `ZONE_SET_DEFINED` | `a / WAYS` (one zone per set) | default; L2 bank, 32 zones |
| `ZONE_CONTIGUOUS`  | `a / (WORDS/ZONES)` | blocks of adjacent lines |
| `ZONE_STRIDED`     | `a % ZONES` | non-contiguous zoning, best for the 4-set L1 |

A read issued in cycle *t* holds its zone during cycles *t … t+PIPE-1*, and
its data appears in cycle *t+PIPE*. `zone_conflict_detector` keeps one slot per
pipeline cycle, holding either the read issued in that cycle or a bubble. Slot *k*
holds the read issued *k+1* cycles ago, and *PIPE-1* slots cover every read that
still blocks a zone. For the current request the detector reports:

* `conflict`: the request's zone is busy;
* `stall_cycles`: `PIPE-1-k`, the number of cycles until the zone is free;
* `same_addr`: the busy zone is busy with this very line;
* `war_hit`: a read of this line is in flight.

Example with PIPE = 4: four reads to four different zones in cycles 0–3 all
go through at once. A fifth read, in cycle 4, to the zone of the read from
cycle 1 waits one cycle and enters in cycle 5. The top-level testbench checks
exactly this sequence.

## What the top does with each request

`hybrid_sram` accepts one request per cycle through a valid/ready handshake.
A request must stay stable while `req_ready` is low, and an assertion checks
this.

| request | condition | result |
|---|---|---|
| read | `hybrid_en` and line in conventional SRAM | accepted; `cv_rsp_*` next cycle; LRU/LFU state updated |
| read | it was held back by a conflict with the *same* line, and that read returns now | accepted; answered on `cv_rsp_*` next cycle from the returning data, which is also installed in the conventional SRAM (**migration**); no second PR-SRAM read |
| read | zone busy otherwise | `req_ready` low (**penalty cycle**) |
| read | zone free | accepted; PR-SRAM read, `pr_rsp_*` after PIPE cycles |
| write | a read of the same line in flight | `req_ready` low (**write-after-read stall**) |
| write | otherwise | accepted; 1-cycle write to the PR-SRAM, and to the conventional copy if there is one |

A migrating re-read waits as long as a normal conflict would. What it saves is
the second PR-SRAM read, and every later read of that line becomes a one-cycle
hit. With `hybrid_en = 0` the conventional SRAM is neither looked up nor
filled, so the memory behaves as a pure PR-SRAM. Writes still keep any copies
current, so the mode can be switched at any time.

Responses carry the request's tag (`req_id`), because a one-cycle hit can
overtake PR-SRAM reads that were issued earlier. The two response ports can be
valid in the same cycle: during a migration, the original read answers on
`pr_rsp_*` and the re-read answers on `cv_rsp_*` one cycle later.

### Why the PR-SRAM model senses late

`pr_sram_array` reads the cells in the **last** pipeline cycle, not the first.
A one-cycle write to a line whose read is still in flight would therefore
change what that read returns, as it would in the real macro. The top prevents
this with the write-after-read check, and the array's testbench shows where
the sensing point lies.

## Conventional SRAM and replacement

`conv_sram` compares the request location with all `LINES` tags in the same
cycle. On an install it uses a free entry first (the lowest-numbered one);
otherwise it replaces the victim chosen by `REPL`:

* `REPL_LRU` (default): a recency list kept as a shift register. A touched
  entry moves to the front, and the tail is the least recently used entry.
* `REPL_LFU`: one saturating 8-bit use counter per entry, set to 1 on fill.
  The smallest count is the victim, with ties going to the lowest entry number.
* `REPL_RANDOM`: a 16-bit maximal-length LFSR (taps 16, 14, 13, 11; seed
  `16'hACE1`) stepping every cycle, with victim = LFSR mod LINES.

## Counters

`perf_counters` provides saturating 32-bit counts of accesses, reads, penalty
cycles, conflict events (reads that stalled at least once), conventional hits,
migrations, write-after-read stall cycles and PR-SRAM reads. The penalty rate
is `100 * cnt_penalty / cnt_access`. To estimate dynamic energy, weight
`cnt_pr_read` and the conventional-SRAM traffic by the per-access energies of
the two memories. This RTL has no energy model.

## Parameters of `hybrid_sram`

| parameter | default | meaning |
|---|---|---|
| `WORDS` | 768 | lines in the bank |
| `LINE_BITS` | 1024 | line width (128 B) |
| `WAYS` | 24 | associativity (sets = WORDS / WAYS) |
| `ZONES` | 32 | zones |
| `ZONING` | `ZONE_SET_DEFINED` | zoning method |
| `PIPE` | 4 | read pipeline depth (≥ 2) |
| `CONV_LINES` | 16 | conventional SRAM lines (2 kB) |
| `REPL` | `REPL_LRU` | replacement policy |
| `ID_W` | 8 | request tag width |
| `CNT_W` | 32 | counter width |

For the L1 data cache configuration (1024 lines, 4 sets of 256 ways, 32 zones
striped over a stride of 32) use `WORDS=1024, WAYS=256, ZONES=32,
ZONING=ZONE_STRIDED`.

## How far to trust it, and where it departs

Taken from the design as described:

* zones, the PIPE-cycle read, and the rule that stalls every access until the zone clears;
* migration of same-line conflicts only;
* one-cycle service from the conventional SRAM;
* the write-after-read check;
* the three zoning methods and the three replacement policies;
* the option to run as a pure PR-SRAM;
* the sizes given above.

This implementation's own choices:

* the request/response handshake, the tags and the two response ports;
* write-through of writes into the conventional copy, and posted writes with no response;
* writes that do not occupy a zone;
* a migrating re-read waits until the earlier read returns, exactly like any other conflict, rather than being answered sooner;
* free-entry-first filling;
* counter widths, saturation and tie-breaks;
* the LFSR as the random source (the design names analogue entropy sources);
* the location numbering `set * WAYS + way`;
* a synchronous active-low reset that clears control state but not memory contents.

Not covered:

* the transistor-level PR-SRAM, its sense amplifiers and any energy figures:
  `pr_sram_array` is a functional and timing model;
* the cache's tag lookup, line refill from DRAM and the address hash that
  picks the L2 bank and set: the hybrid SRAM only sees line locations.

The original description of the hybrid design quotes the conventional SRAM size both as "2 Kb" and as
"2 kB". This RTL uses 2 kB (16 lines of 128 B); larger sizes need only a
different `CONV_LINES`.

How the memory would behave with real GPU traffic was judged from access traces
that are not part of this repository. The testbenches use synthetic streams.
Those streams show that the mechanisms work and that the three zoning methods
rank as expected, but they do not reproduce measured penalty rates.

## Simulation

Each testbench is self-checking and prints `TB_RESULT checks=N failures=M`.
All need Verilator 5 with timing support:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl +libext+.sv \
  --top-module tb_hybrid_sram rtl/hybrid_sram_pkg.sv tb/tb_hybrid_sram.sv
./obj_dir/Vtb_hybrid_sram
```

| testbench | what it covers |
|---|---|
| `tb_hybrid_sram` | whole design at default size. A cycle-level reference model predicts `req_ready`, the answering port, latency, tag and data of every read, and the final counters. It covers the 1-cycle conflict example, migration, write-after-read stalls, the pure PR-SRAM mode, LRU evictions and 20 000 random requests. |
| `tb_hybrid_example` | toy memory (8 lines, 4 zones of 2, 4-line conventional SRAM) with 2- and 4-cycle pipelines; exact waits, ports and data for a different-line conflict, a migrating re-read, a one-cycle hit, and a hit whose zone is busy |
| `tb_l1_zoning` | L1 configuration under the three zoning methods, with data checks and the expected penalty ranking |
| `tb_access_rate` | default size, hybrid against pure PR-SRAM mode under bursty synthetic traffic at five average access rates typical of GPU L2 banks (0.027 to 0.099 accesses per cycle); checks data, that every read is answered, and that the hybrid mode loses fewer cycles |
| `tb_pr_sram_array` | 4-cycle latency, data, tag, zone-rule traffic, sensing point |
| `tb_zone_conflict_detector` | conflict, stall count, same-line and hazard flags against a reference |
| `tb_zone_map` | all locations under the L2 and L1 zonings |
| `tb_conv_sram` | LRU, LFU and random instances against reference contents |
| `tb_repl_lru`, `tb_repl_lfu`, `tb_repl_random` | victim selection |
| `tb_perf_counters` | counting and saturation |

The full-size `tb_hybrid_sram` runs in well under a minute.
