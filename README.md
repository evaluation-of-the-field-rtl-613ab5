# Adaptive L1 data cache: Field-Programmable Cache Array with on-line phase matching

Programs change behaviour as they run. In one phase the data working set is
small and a tiny, fast, direct-mapped cache serves it best. In another, a
large, highly associative cache with long lines pays off. A cache fixed at
design time is a compromise across all phases and all programs.

This design makes the L1 data cache's organisation a run-time variable.
It has two halves:

- **The Field-Programmable Cache Array (FPCA)** is a 32 KB cache built
  from small identical memories. A 14-bit configuration word, loaded
  serially, turns it into one of many caches: it sets the capacity
  (8 to 32 KB powered on), the associativity (1 to 8 ways), the line size
  (8 to 64 bytes), the number of sets (128 to 4096) and the hit latency
  (1 to 4 cycles).
- **The Cache Matching Algorithm (CMA) hardware** watches the retired
  instruction stream. It classifies every interval of 100,000
  instructions into a program phase, using a 3-component "basic block
  vector". When three intervals in a row ask for a configuration other
  than the active one, it stalls the core, has the cache write back its
  dirty data, loads the new configuration and tells the clock generator
  the new operating frequency.

Which configuration suits which phase is decided off-line by software,
during a learning run of the program. Software fills three small tables
that the hardware then uses for look-ups. The RTL covers everything on
the chip side: the cache array and its controller, the sensors and
counters, the coprocessor, its tables and the configuration loader. The
processor core, the L2 cache, the clock generator and the learning
software stay outside; their signals are ports of the top module.

## The cache array

### Building blocks

The array holds 4 **Configurable Cache Blocks (CCBs)** of 8 **T-D
memories** each. A T-D is a complete little cache memory. It has 128 rows,
and each row holds:

- a 20-bit tag, plus valid and dirty bits (the "T" part);
- 8 data bytes (the "D" part).

One T-D is therefore 1 KB of data, a CCB is 8 KB, and the array is 32 KB.
Each CCB has a power-on bit (Vcc). A CCB that is off is neither read nor
written and reads as all zeros, so its rows look invalid. Its contents are
treated as lost.

All 32 T-Ds always read the same row. Three units around the array turn
that raw row into a cache:

- `fpca_sl` (selection logic): from the address and the configuration,
  picks the row, the *stack* and the *column* (see below).
- `fpca_rc` (reconfigurable comparator): per way, takes the tag read
  from the right T-D and compares it with the address. Tag bits that are
  index bits in the current configuration are masked out.
- `fpca_oe` (output selection): takes the data word of the hitting way
  and column, then the addressed bytes.

### How a configuration is laid onto the T-Ds

This mapping is the core of the design and the least obvious part.

Every set takes exactly one row of the T-Ds that hold it. That is why a
cache needs at least 128 sets. The three dimensions of a configuration
map as follows:

- **Line size L (8, 16, 32, 64 B).** A line is L/8 words wide. Its words
  sit in L/8 T-Ds side by side, all at the same row. These are the
  *columns* 0..L/8−1.
- **Associativity W (1, 2, 4, 8).** The W ways are W such column groups
  next to each other.
- **Sets S = 128 · 2^k.** With more than 128 sets, 2^k copies of the whole
  (way × column) group are stacked. The set-index bits above the lowest
  seven pick the *stack*.

For a T-D, `u = ((stack · W) + way) · (L/8) + col`. The configuration
uses `W · (L/8) · (S/128)` T-Ds, i.e. `capacity / 1 KB` of them, and they
must lie in powered CCBs. Powered CCBs are always the lowest-numbered
ones, so that T-Ds 0..u−1 are available.

Address layout (30-bit byte addresses, line `L = 8 << line_sel`,
`S = 128 << sets_sel`):

| bits | role |
|------|------|
| `[2:0]` | byte within the 8-byte word (always) |
| `[3 +: line_sel]` | column: word within the line |
| `[3+line_sel +: 7]` | row, shared by all T-Ds |
| `[10+line_sel +: sets_sel]` | stack |
| above | tag |

The stored tag is always `addr[29:10]`, the widest tag any configuration
needs (1 KB ways). In a configuration with longer lines or more sets, the
low `line_sel + sets_sel` bits of that field are index bits. They are
still stored, but the comparator ignores them. This way one fixed 20-bit
tag array serves every organisation. Writing a dirty row back rebuilds
its address from the stored tag with the row and column put back in:
`{tag, 10'b0} | row << (3+line_sel) | col << 3`.

Examples:

| configuration | T-Ds | CCBs needed |
|---------------|------|-------------|
| 32 KB, 8-way, 32 B, 128 sets | 8 ways × 4 columns = 32 | 4 |
| 4 KB, 1-way, 8 B, 512 sets | 1 × 1 × 4 stacks = 4 | 1 |
| 32 KB, 1-way, 8 B, 4096 sets | 32 stacks | 4 |
| 16 KB, 2-way, 64 B, 128 sets | 2 × 8 = 16 | 2 |

### The configuration word

The 14 bits are 4 Vcc bits plus 10 shared bits (`fpca_cfg_t` in
`fpca_pkg`, MSB first):

| field | bits | meaning |
|-------|------|---------|
| `vcc` | 4 | power-on bit per CCB |
| `en` | 1 | cache enabled; when 0 every access goes uncached to L2 |
| `hit_lat` | 2 | load-use latency n = hit_lat + 1 cycles |
| `sets_sel` | 3 | sets = 128 << sets_sel |
| `ways_sel` | 2 | ways = 1 << ways_sel |
| `line_sel` | 2 | line = 8 << line_sel bytes |

The original design splits its 10 shared bits as 4 for the selection
logic, 4 for the output selection and 2 for the comparator. It does not
give their meaning. The split above is this design's own. All three units
decode the same fields. `cfg_legal()` in the package tells whether a word
describes a cache that fits in its powered CCBs; an assertion in
`fpca_cache` checks every loaded word.

### The controller (`fpca_cache`)

The controller is blocking: one access at a time.

- **Hit.** A request is taken when `req_ready` is high. All T-Ds are read
  at that edge, and the response arrives n cycles after it. With n = 1
  that is the next cycle; larger n simply waits. The latency models a
  slower array at a higher clock, so the core's scheduler is told n
  through `hit_lat`.
- **Miss.** If any word of the victim line is dirty, the line is first
  written back word by word. The line is then refilled word by word from
  L2, the row is read again, and the access is answered like a hit with
  `resp.hit = 0`. Stores allocate on a miss and mark the row dirty.
- **Replacement.** An invalid way is used first, otherwise a global
  round-robin pointer picks the way.
- **Reconfiguration.** `reconf_req` is taken only between accesses. The
  controller then scans all 128 rows under the *old* configuration and
  writes back every dirty word. It raises `flush_done` and holds. The new
  14 bits are shifted into a shadow register (`cfg_sen`/`cfg_sdata`) and
  made active by `cfg_apply`. Finally every row is invalidated in 128
  cycles and `reconf_done` pulses. The old contents are discarded, as the
  original design specifies, and CCBs that were just powered on start
  clean. The same invalidation runs after reset with `RESET_CFG`
  (32 KB, 8-way, 32 B, n = 3).
- **L2 port.** One 64-bit word per request. `l2_req` and its fields stay
  stable until `l2_ack`, which is checked by an assertion.

## The Cache Matching Algorithm in hardware

### Sensing an interval (`interval_monitor`, `bb_sensor`)

The core reports how many instructions retire each cycle (`retire_cnt`).
It also reports each completed basic block with its size (`bb_valid`,
`bb_size`). An interval ends in the cycle in which the retired count
reaches 100,000; the excess carries over into the next interval.

Three BB sensors are 17-bit counters. Each adds the size of every block
whose size lies in its range `[lo, hi]`; the six 12-bit limits are set by
software. The 3 most significant bits of each counter (units of 16,384
instructions) are one component of the 3-D basic block vector (BBV). So a
phase is characterised by how its instructions split among short,
medium and long basic blocks.

Alongside, a 17-bit counter counts the interval's cycles, and two 16-bit
counters count cache hits and misses. These statistics are for the
learning software (`ivl_stats`). In the cycle after an interval ends,
`ivl_end` pulses and `ivl_stats` holds the finished interval.

### Recognition (`cma_coprocessor`, `rst_table`, `pattern_table`)

1. The 9-bit BBV addresses the **Representation Space Table**
   (512 × 4 bits), giving the phase ("SimPoint class").
2. The class addresses the **Pattern Table** (16 × 4 bits), giving the
   Cache ID of the configuration best for that phase.
3. The ID enters the actuation unit's history.

The whole chain takes 4 cycles after `ivl_end`, out of an interval of
about 12,500 cycles at 8 instructions per cycle. It runs beside normal
execution and costs nothing. `phase_spc` and `phase_cid` show the result.

Loading a different Pattern Table retargets the same hardware to a
different goal (speed, energy or energy × time).

### Actuation (`actuation_unit`, `config_table`, `cfg_loader`)

The actuation unit keeps the Cache IDs of the last three intervals and
the ID of the active configuration. It fires when all three agree and
differ from the active one. After reset the active ID is unknown, so the
first stable phase always fires. Requiring three equal intervals filters
out one-off intervals that would otherwise make the cache thrash between
configurations.

When it fires:

1. `cpu_stall` rises. The top module stops counting retired instructions
   and blocks while it is high.
2. The **Configuration Table** (16 × 25 bits = 50 bytes) is read. Each
   entry holds the 14 configuration bits, a 6-bit frequency code (units of
   100 MHz) and a 5-bit L2 miss latency in core cycles.
3. `reconf_req` makes the cache flush.
4. The loader sends the 14 bits MSB first, one per configuration-clock
   tick. The 100 MHz configuration clock is an enable every `CFG_DIV`
   core cycles; 42 at 4.2 GHz gives the 0.14 µs of the original design.
5. `cfg_apply` activates them. When the cache reports `reconf_done`, the
   new ID, `freq_code` and `miss_lat` become current, the history is
   cleared and the stall ends.

The stall therefore lasts the flush (it depends on how much is dirty),
plus 14 · `CFG_DIV` + 1 cycles of loading, plus 128 cycles of
invalidation, plus a few cycles of handshake.

## Top module and interface

`fpca_adaptive_dcache` connects the cache, the monitor and the
coprocessor. Parameters:

- `INTERVAL` = 100000
- `CFG_DIV` = 42
- `RESET_CFG` = 32 KB, 8-way, 32 B lines, n = 3

Ports by group:

- **Core memory port:** `cpu_req` (`cpu_req_t`: valid, we, 30-bit
  address, log2 size, right-aligned store data), `cpu_req_ready`, and
  `cpu_resp` (valid, hit, right-aligned and zero-extended load data).
  Accesses are naturally aligned.
- **Core retirement:** `retire_cnt`, `bb_valid`, `bb_size`.
- **Core control:** `cpu_stall`, `hit_lat` (n in cycles), `miss_lat`.
- **Software set-up:** `sw_wr` (`sw_wr_t`). The target selects the
  Representation Space Table (address = BBV), the Pattern Table
  (address = class), the Configuration Table (address = ID) or a limit
  register (address 0..5 = lo0, hi0, lo1, hi1, lo2, hi2).
- **L2:** `l2_req`, `l2_we`, `l2_addr`, `l2_wdata`, `l2_be`, `l2_ack`,
  `l2_rdata`.
- **Clock generator:** `freq_code`.
- **Status:** `cfg`, `cur_id`/`cur_valid`, `ivl_end`, `ivl_stats`,
  `phase_spc`/`phase_cid`, `reconfig_cnt`.

All logic is on one clock with an asynchronous active-low reset. The
three tables have no reset: software must load them before the program
runs. Verilator notes that `rst_n` is used both asynchronously and inside
assertion `disable iff` clauses; this is intended.

## Where this RTL departs from the original design, or fills gaps

- **One port, blocking.** The original simulations assume two read/write
  ports. Here there is a single port and one access at a time.
- **At least 128 sets.** The original states this rule. Some
  configurations in its own results nevertheless have fewer sets, for
  example 8 KB 8-way 32 B lines, which has 32 sets. This RTL follows the
  stated rule, so those configurations cannot be loaded. A configuration
  needs ways × line ≤ capacity / 128.
- **1-way caches.** The original lists only 2-, 4- and 8-way
  associativity for the array, yet uses direct-mapped configurations in
  its results. This RTL supports 1-way.
- **Own choices.** The encoding of the 10 shared configuration bits, the
  placement of lines onto T-Ds, the replacement policy, write-allocate,
  the address width, the word-wide L2 handshake and the reset
  configuration are this design's own.
- **Configuration Table entry.** The original says the entry carries the
  configuration bits "including" frequency and latencies. Here the hit
  latency sits in the 14 bits, and the frequency and miss latency are 11
  extra bits. That gives 25 bits and the stated 50 bytes for 16 entries.
- **BB sensors count instructions.** The original describes the sensors
  both as counting block occurrences and as counting instructions in
  blocks of a size range. The RTL counts instructions, which also fits
  the stated 17-bit width for 100,000-instruction intervals.
- **History.** The three-entry ID history is cleared after each
  actuation, since recognition restarts afterwards.
- **Outside the RTL.** Power gating is modelled only logically: an
  off CCB is not accessed and its outputs are zero. The operating
  frequency is an output code; there is no clock generator. Learning
  (feature extraction, clustering, choosing a configuration per phase)
  is software.

## Simulating

Every testbench is self-checking and ends by printing
`TB_RESULT checks=N failures=M`. With plain Verilator 5, from the
directory that holds `rtl/` and `tb/`:

```sh
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
  --top-module tb_fpca_adaptive_dcache -Mdir obj rtl/fpca_pkg.sv tb/tb_fpca_adaptive_dcache.sv
./obj/Vtb_fpca_adaptive_dcache
```

Replace the testbench name to run another one. The package must be named
first; `-y` lets Verilator find every other module by its file name.

| testbench | what it checks |
|-----------|----------------|
| `tb_fpca_adaptive_dcache` | Whole design at full size and default parameters, with a core stand-in and an L2 model (`l2_model`). Four program phases of five 100,000-instruction intervals each, with their own block sizes and memory behaviour: a 16 KB working set, streaming stores, and random accesses run uncached. It checks every load, the hit latency, the phase ID of each interval, that actuation comes exactly after three equal IDs, the configuration, frequency and latency after each actuation, and the L2 contents after each flush. It counts hits, misses, eviction and flush write-backs, actuations, stall cycles, hit latencies seen and uncached accesses, and fails if any is zero. About 400,000 cycles; under a second. |
| `tb_fpca_cache` | Seven configurations (including 1-way, 4096 sets, 3 CCBs on, and disabled) against a reference memory: data, hit latency, the 129-cycle invalidation, write-back of dirty data at every reconfiguration, all-hit capacity passes, over-capacity passes. |
| `tb_fpca_adaptive_dcache_metrics` | The same program run three times at full size, each time with only the Pattern Table rewritten for a different goal (speed, energy, energy × time). Seven organisations from the original evaluation's selections sit in the Configuration Table, including n = 1 caches at 1.2 GHz. It checks the same things as above, and that every goal reaches its configurations. About 1.1 million cycles; about 2 seconds. |
| `tb_fpca_cache_table4` | The same checks for each of the 25 organisations that the original evaluation selected for real programs and that satisfy the 128-set rule, each at its own hit latency (1 to 3 cycles). |
| `tb_ccb`, `tb_td_bank` | Storage, byte enables, power gating. |
| `tb_fpca_sl`, `tb_fpca_rc`, `tb_fpca_oe` | The index/tag/output decoding against independent models over random configurations. |
| `tb_bb_sensor`, `tb_interval_monitor` | Range counting, saturation, interval boundaries with carry, statistics. |
| `tb_rst_table`, `tb_pattern_table`, `tb_config_table` | Write and synchronous read. |
| `tb_actuation_unit`, `tb_cfg_loader`, `tb_cma_coprocessor` | Firing rule, serial timing (14 · DIV + 1 cycles), the full recognition and actuation sequence against an FPCA stand-in. |

Every testbench has a watchdog. The simulator is two-state, so
everything a testbench reads is reset or initialised.

## Changing the design

- **Interval length and configuration clock.** Set `INTERVAL` and
  `CFG_DIV` on the top module; `CFG_DIV` = core frequency / 100 MHz.
  Short intervals make quick experiments possible. BBV components are
  the top 3 bits of 17-bit counters, though, so intervals far below
  100,000 instructions give all-zero BBVs.
- **Reset organisation.** Set `RESET_CFG` with
  `make_cfg(n_ccb, log2 ways, log2(line/8), log2(sets/128), n)`.
- **Array size.** Sizes and table widths are `localparam`s in
  `fpca_pkg`. The address layout assumes 128-row T-Ds, 8-byte rows and
  20-bit tags; changing `N_CCB` also changes the width of the Vcc field,
  and so the configuration word.
- **Table contents.** Write them through `sw_wr`. The end-to-end
  testbench shows a complete set-up: BB ranges [1,4], [5,8] and [9,15];
  class = 1 + the index of the largest BBV component; one Configuration
  Table entry per phase.
