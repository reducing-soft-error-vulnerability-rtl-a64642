# Decaying L1 data cache: invalidate idle lines to cut soft-error exposure

A bit in an L1 data cache line only matters while the line still has a future hit. In a
write-through cache the L2 always holds a good copy, so a line that will not be used again
soon is carrying risk for nothing: a particle strike on it can only hurt, and a multi-bit
upset may slip past the byte parity that L1 caches can afford. The idea implemented here is
simple: **if a line has not been touched for `inv_threshold` cycles, invalidate it.** Its
data stops being exposed; if the program comes back to it, the cost is one extra miss to
L2. Two policies keep that cost bounded:

* **LocalInvalidation** – a fixed `inv_threshold` (1000 cycles in the recommended setting),
  and a short history per set that refuses an invalidation when the set has already
  invalidated on 10% of its recent accesses;
* **GlobalInvalidation** – no per-set limit; instead the whole cache counts extra misses
  over 10 000-cycle intervals and doubles `inv_threshold` when there were more than 256,
  halves it when there were fewer than 128.

The published evaluation of this scheme (trace-driven, on a Core-like out-of-order
processor) reports roughly an 80% drop in cache vulnerability for a 3.7–3.9% average
slowdown, with the global policy showing less variation between programs. Those numbers
come from that study, not from this RTL.

## Block map

```
                 cfg_mode / cfg_inv_threshold / cfg_hist_limit
                                   |
   CPU req/resp  +-----------------v------------------+  L2 line read / word write
  <------------->|              l1d_cache             |<------------------------->
                 |  tags, valid, decayed flag, PLRU   |
                 |  data + byte parity arrays         |
                 +--+---------+------------+---------++
          touch/idx |  expired| lookup_set |hist_allow| ev_extra_miss
                    v         |            v          v
        +-------------------+ |   +-----------------+ +-----------------+
        |line_decay_counters|-+   | set_inv_history | | global_inv_ctrl |
        | 512 x 3-bit       |     | 64 x 10-bit     | | interval, count,|
        +---------^---------+     +-----------------+ | x2 / /2 shifter |
                  | tick                               +--------+--------+
        +---------+---------+   inv_threshold (local: cfg,       |
        |  decay_tick_gen   |<-- global: controller output) <----+
        +-------------------+
   (cfg_scan_bit = 1 swaps line_decay_counters for decay_scan_bit, stepped by a second
    decay_tick_gen with SHIFT = 9)
```

| File | Role |
|---|---|
| `rtl/decay_pkg.sv` | shared widths, `inv_mode_e`, `cpu_req_t` |
| `rtl/decay_l1d_top.sv` | top: wires the cache to the decay logic, selects the threshold |
| `rtl/l1d_cache.sv` | 32 KB, 8-way, 64 B lines, write-through, byte parity, lookup-time invalidation |
| `rtl/byte_parity.sv` | even parity bit per byte (generate and check) |
| `rtl/line_decay_counters.sv` | one 3-bit idle counter per line |
| `rtl/decay_tick_gen.sv` | tick every `inv_threshold >> SHIFT` cycles (SHIFT = 3 for the counters) |
| `rtl/decay_scan_bit.sv` | alternative idle tracker: one bit per line, scanned round-robin |
| `rtl/set_inv_history.sv` | 10-bit invalidation history per set (LocalInvalidation) |
| `rtl/global_inv_ctrl.sv` | adaptive threshold (GlobalInvalidation) |

## How a line decays

Each of the 512 lines has a 3-bit counter. It is cleared whenever the line is filled, read
or written – the moments its parity is generated or checked, so "touched" means "its
contents were just verified or rewritten". A shared prescaler ticks every
`inv_threshold >> 3` cycles and every counter that is not all ones advances. A counter at
`3'b111` marks the line **expired**.

Because the ticks run free rather than being aligned to each line's last touch, a line
expires between 6/8 and 7/8 of `inv_threshold` after its last use (750–875 cycles for a
threshold of 1000). The end-to-end test pins this down: a line idle for 700 cycles still
hits, one idle for 1100 cycles has gone. The division by 8 truncates (a threshold of 50
gives 6-cycle ticks).

### The one-bit alternative

Setting `cfg_scan_bit` replaces the counters with `decay_scan_bit`: one bit per line and a
pointer that visits one line every `inv_threshold >> 9` cycles, so that it sweeps all 512
lines in about `inv_threshold` cycles (512 cycles for a threshold of 1000, since the shift
truncates). A visit sets a line's bit. If the bit is already set, the line has not been
touched since the previous visit, and it is marked expired. A touch clears both.
A line therefore expires between one and two sweeps after its last use. That is a coarser
window than the counters give. The state is two bits per line instead of three: the scan
bit, plus a sticky expired mark that holds the result until the set is next looked up.
The tracker not in use is held cleared, so switching starts from a clean state.

## Invalidating at lookup time, and what counts as an extra miss

Clearing valid bits the moment counters saturate would need a second port into the valid
array and, for LocalInvalidation, a history update outside any access. This design does
the invalidation when a request next looks up the set instead. That is safe only because
the cache is write-through: an expired line holds nothing L2 lacks. And it gives exactly the
same hit/miss behaviour as eager invalidation, because the expired lines of a set are
removed before that set's hit check:

1. The lookup cycle takes the valid, expired lines of the addressed set.
2. **INV_GLOBAL** invalidates all of them. **INV_LOCAL** invalidates only the lowest-numbered
   one, and only if `set_inv_history` allows it. Otherwise it reports `ev_inv_refused` and
   the line stays valid. **INV_OFF** invalidates nothing and holds all counters at zero.
3. The hit check uses the valid bits as they are after step 2. So a request to a line that
   has just expired misses, as it would have if the line had been dropped on time.
4. Each lookup shifts one bit into the set's history: 1 if it invalidated a line, 0 if not.

An invalidated line keeps its tag, and a per-line *decayed* flag is set. A **load** that
misses while a decayed way of the set still holds its tag is an **extra miss**: the miss
exists only because of decay. `ev_extra_miss` pulses and the global controller counts it.
The refill then goes back into that same way, which clears the flag.

Stores are not counted as extra misses. With write-through and no allocate-on-write, a
store goes to L2 whether or not the line is present.

Victim choice on a refill, in order:
1. the decayed way that holds the missing line's tag;
2. an empty way;
3. another decayed way (its kept tag is lost, so a later return of that line is not
   counted as extra);
4. the tree pseudo-LRU choice.

The extra-miss count is therefore a slight undercount when sets are crowded.

## LocalInvalidation history

Each set has a 10-bit shift register. Before a set may invalidate, the number of ones in
its history is compared with `cfg_hist_limit`. With a limit of 1 (the recommended
setting), a set that invalidated on any of its last ten lookups refuses: at most 10% of a
set's accesses can invalidate. A limit of 11 or more never refuses. That is the "no limit"
variant of the threshold sweep.

## GlobalInvalidation controller

`global_inv_ctrl` counts extra misses over `INTERVAL` (10 000) cycles. At the last cycle of
an interval it compares the count with `MAX_TH` (256) and `MIN_TH` (128):

* more than 256: `inv_threshold` doubles;
* fewer than 128: it halves;
* otherwise it is kept.

Both comparisons are strict. The doubling and halving are one-bit shifts. The threshold
is kept between 8 and 512 000 cycles. While the cache is in another mode the controller
holds the threshold at `cfg_inv_threshold`, so each switch into INV_GLOBAL starts from
that value (1000 in the evaluated setting). An extra miss in the decision cycle counts
toward the next interval.

## The cache itself

* **Organisation:** 32 KB, 8 ways, 64-byte lines, so 64 sets and 512 lines. Addresses are
  32-bit byte addresses; an access is one aligned 64-bit word with byte enables.
* **Storage:** data (512 × 512 bits) and parity (512 × 64 bits) are plain arrays. Tags,
  valid bits, decayed flags and pseudo-LRU bits are registers.
* **Protocol:** one request at a time, on a `req_valid`/`req_ready` handshake; ready is
  high only while idle.
* **Load hit:** IDLE → TAG → DATA → RESP. `resp_valid` rises in the third cycle after the
  accepting edge (the 3-cycle L1 hit of the evaluated machine).
* **Load miss:** one line read to L2 (`l2_req_valid`/`l2_req_ready`). Then `l2_resp_valid`
  with the 512-bit line, the fill, and the response one cycle later.
* **Stores:** write-through with no allocation on a miss. A hit updates the line bytes and
  their parity bits. Every store is then sent to L2 as a byte-masked word write.
  `resp_valid` (with `resp_is_store`) acknowledges it once L2 has accepted it.
* **Parity:** even parity on every byte. A load whose word fails the check drops the line
  (no decayed flag), refetches it from L2 and answers with the clean data.
  `ev_parity_err` pulses.
* **Strike injection:** `inj_valid` with `inj_set`/`inj_way`/`inj_bit` flips one stored
  data bit while the cache is idle. It is a test hook, not part of a real cache.

Top-level observation outputs, each a one-cycle pulse:

| Output | Event |
|---|---|
| `ev_hit` | lookup hit |
| `ev_miss` | lookup miss |
| `ev_extra_miss` | load miss to a decayed line |
| `ev_decay_inv` | this lookup invalidated one or more lines |
| `ev_inv_refused` | the set history refused an invalidation |
| `ev_parity_err` | parity error on a load |
| `ev_decay_tick` | the decay counters advanced |
| `ev_interval_end` | a global interval ended |
| `ev_th_grow` | the threshold doubled |
| `ev_th_shrink` | the threshold halved |

`cur_inv_threshold` and `glob_extra_misses` show the controller state.

## What follows the original scheme and what is this design's own

Taken from the scheme:
* the 32 KB, 8-way, 3-cycle, write-through, byte-parity L1;
* the 3-bit per-line counters, cleared on fill, read or write and advanced every
  `inv_threshold/8`;
* the 10-bit per-set history with a 10% limit;
* extra misses found from kept tags;
* the 10 000-cycle interval with 256/128 bounds, starting at 1000 and doubled or halved by
  shifting.

Choices made here:
* 64-byte lines, 64-bit words and 32-bit addresses;
* even parity;
* a blocking cache with a single request port (the evaluated cache had one read and one
  write port and was pipelined);
* write-no-allocate;
* pseudo-LRU replacement and the refill priority above;
* invalidation at the next lookup of the set, at most one line per lookup under
  LocalInvalidation;
* loads only in the extra-miss count;
* the threshold floor and ceiling, and reloading the start value on a mode switch;
* run-time mode, threshold, limit and tracker-select inputs;
* the strike port and the event outputs.

Two places in the description of the global policy were read one way on purpose:
* **What the controller shifts.** One passage has the bounds being multiplied and divided
  by two; the worked configuration doubles and halves `inv_threshold`. This design shifts
  the threshold and keeps 256/128 fixed.
* **What it counts.** One sentence says the controller checks invalidated lines; elsewhere
  it is extra misses. This design counts extra misses.

The one-bit round-robin scan is described only as an option. Its scan rate and the sticky
expired mark are choices made here.

## Simulating

Every testbench is self-checking and ends with `TB_RESULT checks=N failures=M`. With
Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/decay_pkg.sv tb/tb_decay_l1d_top.sv --top-module tb_decay_l1d_top
./obj_dir/Vtb_decay_l1d_top
```

Replace the testbench name for any of the others.

| Testbench | What it shows |
|---|---|
| `tb_decay_l1d_top` | Full size, default parameters, about 55 000 cycles. LocalInvalidation timing: a line idle 700 cycles still hits, 1100 cycles has gone. A hot line is never dropped. Refusals by the history. A strike caught by parity. GlobalInvalidation doubling under a streaming load and halving under a tight loop. The one-bit scan tracker (idle 400 cycles hits, 1100 cycles has gone). INV_OFF. Every load's data and every hit's 3-cycle latency are checked, and each mechanism must have happened. |
| `tb_threshold_sweep` | The same synthetic stream (hot, warm and cold lines) under invalidation off, thresholds 50…3500 with and without the 10% limit, and the global policy. It prints extra misses, invalidations, slowdown and vulnerability reduction. It checks that extra misses fall as the threshold grows, that the limit never adds extra misses, that shorter thresholds remove more vulnerability, and that the data stays correct. |
| `tb_l1d_cache` | The cache alone with the decay inputs driven directly: hit latency, write-through, no allocation on a store miss, pseudo-LRU eviction, global and local invalidation, refusal, extra misses kept across a store, parity refetch. A final phase randomises the decay inputs every cycle, standing in for upsets in the decay logic, and checks that data stays correct: such upsets only cause early or late invalidations. |
| `tb_line_decay_counters`, `tb_decay_scan_bit`, `tb_decay_tick_gen`, `tb_set_inv_history`, `tb_global_inv_ctrl`, `tb_byte_parity` | Each unit against an independent model. The global controller test uses a 200-cycle interval and 20/10 bounds to stay short. |

`tb/l2_model.sv` is a behavioural L2: a sparse word memory whose unwritten words are a fixed
function of the address, with a 12-cycle line-read latency.

On the synthetic stream, the cache behaves as follows. Slowdown is in cycles relative to
no invalidation. Vulnerability is counted in line-cycles: a line is exposed from the load
miss that brings it in until its last load before it leaves. The testbench measures this
from the access stream itself.

| Configuration | Slowdown | Extra misses | Vulnerability reduction |
|---|---|---|---|
| No limit, threshold 50 | 156% | 3473 | 98.5% |
| No limit, threshold 1000 | 84% | 1871 | 84.9% |
| No limit, threshold 3500 | 26% | 576 | 56.9% |
| 10% limit, threshold 50 | 18% | 387 | −5.4% |
| 10% limit, threshold 1000 | 13% | 292 | 16.6% |
| 10% limit, threshold 3500 | 9% | 194 | 22.3% |
| Global, starting at 1000 | 53% | 1182 | 71.6% (ends at threshold 4000) |

The stream is made to stress the mechanism: it is dominated by lines that come back after
a few thousand cycles. The cache is blocking, so every miss costs its full latency. These
percentages therefore say nothing about real programs. What they show is the trend: longer
thresholds and the per-set limit both trade exposure for fewer extra misses. The negative
entry is real: with a short threshold the limit refuses most invalidations, yet the extra
misses it still allows stretch the run. The gaps between loads grow in cycles, so the lines
that stay are exposed for longer.

## Not included

* The L2 and the processor core are outside this design. The testbenches drive the request
  port directly and use the L2 model.
* No vulnerability accounting (occupied bits × time) is built in hardware. It is an
  evaluation metric, not part of the cache. The sweep testbench measures it in simulation
  instead.
* The separate read and write ports and pipelined hits of the evaluated L1 are not
  modelled.
