# Adaptive miss-pattern prefetcher

A small data prefetcher for embedded processors running multimedia code
such as an MPEG4 video decoder. These programs miss in the data cache in a
very regular way. Most consecutive misses are a fixed number of bytes apart
(the *inter-miss stride*) and a fixed number of clock cycles apart (the
*inter-miss interval*). Often they alternate between two such steps, for
example when the decoder switches back and forth between a buffer on the
heap and one in the data segment.

The prefetcher watches only the cache's miss stream. Once the recent misses
form a repeating pattern, it predicts where and when the next misses will
come. It then requests each predicted block one main-memory latency before
it is needed. No program hints and no large prediction tables are needed.
The whole unit holds four stride/interval pairs and the state of one
running prefetch sequence.

The method (two units, a *miss pattern detector* and a *block loader*, and
the rules below) follows a published description of adaptive prefetching
for MPEG4 on StrongARM SA-1110 and XScale-class processors. That
description gives what the units do, not how they are built. Register
structure, widths, timing and the request handshake are this design's own,
and are marked as such below.

## Miss pairs and miss patterns

Every miss after the first one forms a pair `<S, T>`:

- `S` is the miss address minus the previous miss address, taken modulo
  2^32, so negative strides work.
- `T` is the number of cycles since the previous miss.

Take four consecutive pairs `<X,Tx> <Y,Ty> <Z,Tz> <W,Tw>`, with W the
newest. They form:

- an **alternate pattern** when `X = Z`, `Tx = Tz`, `Y = W` and `Ty = Tw`
  (steps A, B, A, B);
- a **constant pattern** when in addition `X = Y` and `Tx = Ty`, so all
  four pairs are equal.

Strides and intervals must match exactly. A constant pattern is treated as
a special case of the alternate one, so both kinds need five misses (four
pairs) before they are recognised. This is a design choice: the source
defines both kinds but gives only the four-pair test.

## miss_pattern_detector

`rtl/miss_pattern_detector.sv` keeps the following state:

- the last miss address;
- a cycle counter that restarts at 1 after each miss and saturates at
  65535;
- the three previous pairs X, Y, Z.

In a miss cycle it works out W from the miss address and the counter. It
then compares X with Z and Y with W, all combinationally. The result goes
out in the same cycle as a `pattern_t` record with these fields:

- `valid`;
- `kind` (`PAT_CONSTANT` or `PAT_ALTERNATE`);
- `base`, the miss address;
- the next two expected steps, `step[0] = Z` and `step[1] = W`.

After W the sequence continues with a step equal to Z, then W, then Z
again, and so on.

Some pairs have no usable interval and never match anything. This covers:

- a pair whose counter saturated (more than 65534 cycles between misses);
- the pair of the first miss after reset, which has no previous miss.

This keeps two long pauses from passing for a pattern.

Only demand misses enter the history. Prefetches do not.

## block_loader: when and where to prefetch

This is the part that needs the most care.

Suppose a pattern is found at a miss to address `A` in cycle `t0`, with
steps `(S0,T0)` and `(S1,T1)`. The loader predicts misses at:

| predicted miss | address          | due in cycle          |
|----------------|------------------|-----------------------|
| 1              | A + S0           | t0 + T0               |
| 2              | A + S0 + S1      | t0 + T0 + T1          |
| 3              | A + 2·S0 + S1    | t0 + 2·T0 + T1        |
| …              | alternating      | alternating           |

Each prefetch is requested `MEM_LATENCY` cycles before its predicted miss
is due, so the block arrives just when it is needed. This puts the first
request at **C = T0 − MEM_LATENCY cycles after the miss**, which is the
rule of the original method. When the interval is no longer than the
latency, C would be zero or negative. The request then goes out in the
first cycle after the miss.

The schedule is kept by one signed down-counter, `rem`: the number of
cycles left until the predicted miss currently being prefetched is due.

- It is loaded with `T0 − 1` at the miss, and falls by one every cycle.
- `pf_valid` is high while `rem ≤ MEM_LATENCY`.
- When a request is accepted, the address register moves on by the stride
  and the counter moves on by the next step's interval.

Because `rem` counts toward absolute due times, delays do not pile up. A
request that waited for a busy port, or that was issued early because the
latency is longer than the interval, does not shift the later ones. When
several predicted misses fall inside one latency window, their requests go
out back to back. The counter goes negative once a due time has passed
while its request is still waiting.

Example with the defaults (latency 18): a stream missing every 20 cycles
on consecutive 16-byte lines. After the fifth miss the loader requests
line +16 two cycles later, line +32 twenty cycles after that, and so on.
Each block is requested 18 cycles before the load that needs it.

The sequence has no length limit. It runs until the next demand miss. That
miss withdraws any pending request and ends the sequence. If the miss also
completes a pattern, a new sequence starts from it in the same cycle. In a
well-predicted stream the prefetches remove the misses themselves, so the
sequence keeps running until the program leaves the pattern.

## Interfaces and timing

Top module `adaptive_prefetcher` (all signals synchronous to `clk`; reset
`rst_n` is asynchronous and active low):

| port           | dir | width | meaning |
|----------------|-----|-------|---------|
| `miss_valid`   | in  | 1     | a data-cache miss in this cycle (at most one per cycle) |
| `miss_addr`    | in  | 32    | its address (normally line aligned) |
| `pf_valid`     | out | 1     | prefetch request |
| `pf_addr`      | out | 32    | address of the block to fetch |
| `pf_ready`     | in  | 1     | the refill path takes the request this cycle |
| `pattern_kind` | out | 2     | 0 none, 1 constant, 2 alternate: pattern found at this miss |
| `pf_active`    | out | 1     | a prefetch sequence is running |

The request handshake is valid/ready:

- A request is accepted when `pf_valid && pf_ready`.
- A waiting request keeps its address.
- The only exception is a demand miss. `pf_valid` is forced low in a miss
  cycle: a combinational path from `miss_valid` to `pf_valid`. The request
  is then dropped or replaced.

An assertion in `block_loader` checks this rule. The earliest request comes
in the cycle after the miss that completes a pattern.

The prefetcher only produces requests. The cache is expected to do the
rest:

- fetch the block and place it;
- ignore a request for a block it already holds or is already fetching.

Where the block goes (into the cache or a separate buffer) is left to the
cache.

## Parameters and sizes

| name | where | default | note |
|------|-------|---------|------|
| `MEM_LATENCY` | `adaptive_prefetcher`, `block_loader` | 18 (`apf_pkg::MEM_LATENCY_DEFAULT`) | main-memory latency in cycles. The method depends on it but gives no value. 18 is the default first-chunk latency of the SimpleScalar simulator. Set it to the real latency of the system. Must be below 65536. |
| `ADDR_W` | `apf_pkg` | 32 | address and stride width |
| `INTERVAL_W` | `apf_pkg` | 16 | interval counter width |

The widths cover the miss behaviour measured for an MPEG4 decoder on an
SA-1110-like system with an 8 KB data cache:

- strides up to +1 878 353 200 and −1 878 353 184 bytes;
- intervals of 8 to 2 689 cycles.

After coarse synthesis the top has about 86 word-level cells and 345
flip-flops, and no memories.

## Files

- `rtl/apf_pkg.sv`: widths, the pair and pattern structs, the pattern-kind
  enum, the latency default.
- `rtl/miss_pattern_detector.sv`, `rtl/block_loader.sv`: the two units.
- `rtl/adaptive_prefetcher.sv`: the top, which connects the two.
- `tb/tb_miss_pattern_detector.sv`: 3000 misses in random, constant and
  alternate segments, with strides and intervals from the decoder
  measurements, plus one saturating gap. A reference model built from its
  own list of miss times and addresses checks every pair and every pattern
  output.
- `tb/tb_block_loader.sv`: random pattern records and misses, with a
  refill port that is busy one cycle in five. It compares `pf_valid` and
  `pf_addr` in every cycle with a schedule computed from absolute due
  times. It checks that the first request comes exactly C cycles after the
  miss, and counts the following cases: sequences ended and restarted by
  misses, waits for the port, requests issued at once.
- `tb/tb_adaptive_prefetcher.sv`: end-to-end at default parameters. A
  trace generator stands in for the processor. It drives two behavioural
  2 KB direct-mapped caches with 16-byte lines: one receives prefetches
  that fill after `MEM_LATENCY` cycles, the other is a baseline without
  prefetching. The trace cycles through constant streams, alternate streams
  (+1878353200 / −1878353184 bytes, 8 / 71 cycles, and 16 / 816 bytes,
  15 / 17 cycles), random loads and a hot loop. In every pattern segment
  the prefetching cache must miss exactly five times, against one miss per
  load for the baseline. Each mechanism must occur at least once. On this
  trace the misses drop by about 80 %.

Simulation with Verilator 5:

```
verilator --binary --timing --assert rtl/apf_pkg.sv rtl/miss_pattern_detector.sv \
  rtl/block_loader.sv rtl/adaptive_prefetcher.sv tb/tb_adaptive_prefetcher.sv \
  --top-module tb_adaptive_prefetcher
./obj_dir/Vtb_adaptive_prefetcher
```

Use the same command for the other two testbenches, with their own files
and top names. Each prints `TB_RESULT checks=N failures=M` and finishes in
well under a second. Each has a watchdog that fails the run if it hangs.

## How far to trust it, and what is not here

- The decision rule, the timing rule C = interval − latency, the address
  rule (last miss + stride) and "prefetch until the next miss" come from
  the original method. The following are this design's choices:
  - the four-pair window for constant patterns;
  - exact matching;
  - the rule that a saturated interval is invalid;
  - requesting the later prefetches of a sequence at due time minus
    latency;
  - the valid/ready port with withdrawal on a miss;
  - all widths and the latency default.
- The processor, its data cache and main memory are not part of this RTL.
  In the tests they exist only as behavioural models inside the end-to-end
  testbench. They do not model cache-side effects: refill bandwidth, bus
  contention, or eviction of useful lines by prefetches.
- The performance and energy figures reported for the method come from
  full-system simulation of an MPEG4 decoder on 2 KB–32 KB caches (about
  35 % to over 50 % fewer misses, up to 5.5 % more instructions per cycle).
  They have not been reproduced here. The end-to-end test uses a synthetic
  trace built from the measured stride and interval values, not the
  decoder itself.
