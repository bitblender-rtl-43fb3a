# Multi-stream Bloom filter query accelerator (BitBlender architecture)

A Bloom filter answers "is this key in the set?" with a bit-vector and H hash
functions. An answer of 0 means the key is certainly absent; 1 means it is
probably present. To insert a key, set the H bits its hashes point to. To
query a key, read those H bits and AND them together.

A single pipelined engine answers two queries per cycle, because a dual-port
RAM has two ports. A 100 Gb/s link delivers several times that. Giving every
input stream its own copy of the bit-vector does not scale: a bit-vector for
a low false-positive rate is over a hundred megabits, and the chip holds only
one or two copies. This design follows the BitBlender architecture (Liu, Lu
and Fang). **S streams share one bit-vector.** The bit-vector is split into
partitions, and the partitions are scheduled dynamically:

* lookups that target different partitions proceed in the same cycle;
* lookups that collide on one partition are serialised;
* results that come back out of order are put back into each stream's order;
* a ratelimit keeps any stream from running so far ahead of another that the
  pipeline could deadlock.

The default configuration is the one evaluated as the main design point:

| parameter | default | meaning |
|---|---|---|
| `S` | 6 | input streams, each delivering one query **pair** per cycle |
| `H` | 9 | hash functions = bit-vector sections |
| `P` | 8 | partitions per section |
| `D` | 16 | ratelimit distance, and depth of each unshuffle queue |
| `IDX_W` | 24 | log2 of the section length (16 Mbit per section, 144 Mbit in total) |
| `WORD_W` | 64 | RAM word width (own choice) |
| `FIFO_DEPTH` | 4 | depth of every inter-module FIFO (own choice) |
| `SEQ_W` | 10 | width of the per-stream sequence number (own choice) |

## Datapath

```
 stream s, query pair ──► compute_hash (lane 0) ─┐           ┌─► aggregate (lane 0) ─┐
                    └───► compute_hash (lane 1) ─┤  H index  │   (AND of H bits)     ├─► result pair
                                                 ▼  per key  │                       │
      ┌─────────────────── hash_section h (one of H) ────────┴────────────────┐      │
      │ lane 0: S FIFOs ─► arbiter ─► P FIFOs ─► query_bv port A ─► P FIFOs    │      │
      │         ─► unshuffle ─► S FIFOs ──────────────────────────────────────┼──────┘
      │ lane 1: same, through query_bv port B (the P RAMs are shared)         │
      └───────────────────────────────────────────────────────────────────────┘
```

* **compute_hash** computes the 32-bit MurmurHash3 (x86_32, one 4-byte
  block) of the key with seeds 0 … H-1. It keeps the low `IDX_W` bits of each
  hash as the index into section 0 … H-1. It is a 5-stage pipeline. The
  key-mixing stages are shared by all seeds.
* Each **hash_section** owns `2**IDX_W` bits. These are split into `P`
  partitions by the top `log2(P)` index bits, one `query_bv` RAM per
  partition. Each stream delivers a query pair per cycle, so a section has
  two lanes. Lane 0 carries the first query of every pair and lane 1 the
  second. Each lane has its own arbiter and unshuffle, and the two lanes use
  the two ports of the same partition RAMs.
* **aggregate** waits until all H sections have returned the bit of a query
  and outputs their AND. The two lanes of a stream are joined again at the
  output, so the results come out as pairs in query order.

Every module accepts one item per cycle. Modules are joined by valid/ready
FIFOs (`stream_fifo`), so a stall anywhere turns into backpressure rather
than lost data.

## The arbiter: sharing partitions between streams

Each cycle, the arbiter of one lane of one section does the following:

1. **Offer.** Every stream has one buffer register (`idx_buf`). If it is
   empty, the stream's next index is read from its input FIFO and offered in
   the same cycle. If an index is waiting in the buffer, that index is
   offered, and the stream reads nothing new.
2. **Ratelimit.** The arbiter counts the indices each stream has sent. A
   stream may be offered only while its count minus the smallest count
   (the slowest stream's) is at most `D`.
3. **Choose.** For each partition, a priority encoder picks one of the
   offered indices that fall into it. The search starts at the slowest
   stream, then goes up in stream ID and wraps around. Streams that fall
   behind therefore win conflicts.
4. **Send.** The chosen index goes to the partition's request FIFO with its
   stream ID and sequence number (the stream's count). This happens only if
   that FIFO has room. A sent index frees its buffer. An index that lost,
   found the FIFO full, or was ratelimited stays in the buffer for the next
   cycle.

There are three reasons an index is held. The `ev_conflict`, `ev_full` and
`ev_ratelimit` outputs flag them every cycle.

## The unshuffle: restoring stream order

A partition serves streams in arbitration order. The items of stream 1 can
overtake those of stream 0, and one stream's items are spread over several
partitions. The unshuffle holds a `P × S × D` value buffer: for every
(partition, stream) pair, a queue of up to D results. Each cycle:

* every partition's next result goes into the queue of its stream, if that
  queue has room;
* every stream looks at the heads of its P queues for the sequence number it
  expects next. At most one head matches, because a stream's items reach any
  one partition in order. The matching head is sent to that stream's output
  FIFO.

A partition input stalls only when the target queue is full.

## Why the ratelimit prevents deadlock

Without the ratelimit, stream 1 can run far ahead of stream 0 in section 0,
while stream 0 runs ahead of stream 1 in section 1. Then the following
happens:

* The aggregate of stream 0 waits for section 0's result of its oldest
  query.
* That result sits in a partition FIFO behind younger items of stream 1.
* The unshuffle cannot take those items, because its buffer for stream 1 is
  full.
* The buffer is full because the aggregate of stream 1 is waiting for
  section 1, where the same thing happens with the streams swapped.

This is a cycle of waits, so neither stream moves. The ratelimit bounds how
far any stream runs ahead, at issue time, to D items. A per-(partition,
stream) buffer of D entries then lets the unshuffle absorb the items of a
faster stream that block its input FIFO. The testbenches drive random
traffic with throttled streams and stalled outputs, and never hang.

## Building the filter: clear and insert

Clearing and inserting are needed to use the accelerator, but how the
bit-vector is loaded is this design's own choice:

* `clr_start` makes every partition sweep its RAM to zero through port A, one
  word per cycle, all partitions in parallel. This takes
  `2**IDX_W / P / WORD_W` cycles (32,768 at defaults). `busy` is high during
  the sweep, and no query or insert is accepted.
* `ins_valid/ins_key` hashes a key with its own `compute_hash` and sets its H
  bits, one key per cycle. A bit set uses port A of the partition for one
  cycle. `ins_idle` goes high once every accepted key has been written.

Finish inserting (wait for `ins_idle`) before querying. A query that reads a
bit while an insert to it is still in flight may see the old value.

## Interface and timing of `bitblender_top`

| port | dir | meaning |
|---|---|---|
| `q_valid[S]`, `q_ready[S]`, `q_key[S][2]` | in/out/in | one query pair per stream; accepted when both lanes have room |
| `r_valid[S]`, `r_ready[S]`, `r_hit[S][2]` | out/in/out | result pair, in query order |
| `ins_valid`, `ins_ready`, `ins_key`, `ins_idle` | | insert one key per cycle |
| `clr_start`, `busy` | in/out | clear the whole bit-vector |
| `ev_conflict`, `ev_full`, `ev_ratelimit` | out | per-cycle arbiter stall causes |

* The clock is `clk`. `rst_n` is a synchronous, active-low reset of the
  control state; the RAM contents are not reset.
* A transfer happens on any valid/ready pair when both are high.
* The minimum latency of a query is 12 cycles: 5 in the hash, 6 in the
  section (three FIFOs, the RAM register, the unshuffle), and 1 in the
  aggregate.
* **Every stream must carry the same number of queries.** The ratelimit
  compares every stream with the slowest one. A stream that stops sending
  stops all the others after D more items, until it resumes.

## Performance

The sweep testbench measures the sustained rate with random 32-bit keys,
every stream at full rate and outputs always ready. It uses one section of
16 kbit, because the rate per cycle hardly depends on H or on the section
size. At the full default size, `tb_bitblender_full` measures 8.0 queries
per cycle.

Queries per cycle, measured:

| swept parameter | values and measured queries per cycle | ideal |
|---|---|---|
| S (P=8, D=16) | S=1: 1.96; S=2: 3.68; S=3: 5.07; S=4: 6.27; S=5: 7.23; S=6: 8.12 | 2·S |
| P (S=6, D=16) | P=2: 3.60; P=4: 5.83; P=8: 8.12 | 12 |
| D (S=6, P=8) | D=2: 7.83; D=8: 7.99; D=16: 8.12 | 12 |

Where this RTL agrees with the published results:

* Throughput grows steadily with S.
* Throughput grows with P. The ratios are close to the published ones: at
  P=2 and P=4 it is 44% and 72% of the P=8 rate, against about 47% and 78%
  published.

Where it differs:

* **Lower peak rate.** The published design reports close to 2·S per cycle
  at D = 16, with about 0.2% stall cycles; this RTL reaches about two thirds
  of that. Each stream has a single `idx_buf` entry, so the stream loses a
  cycle whenever its index collides with another on a partition. With 6
  streams drawing random partitions out of 8, only about 4.4 distinct
  partitions are hit per cycle.
* **Weak dependence on D.** The published rate falls steeply at small D,
  to about 22% of the ideal at D = 2. Here the ratelimit only acts when the
  streams' rates really differ, such as a throttled stream, so D hardly
  matters.

Reaching the published figures would need more index look-ahead per stream,
or a different measure of a stream's position for the ratelimit. The
published description does not give either.

## What follows the published design and what does not

Follows it:

* the overall structure: 2·S hash units, H sections, arbiter/unshuffle pairs
  per section, dual-port partition RAMs, aggregates, FIFOs between modules;
* the arbiter's per-stream buffer, per-partition priority encoder,
  slowest-stream-first priority, and ratelimit on the distance to the
  slowest stream;
* the unshuffle's `P × S × D` buffer and release-on-output;
* MurmurHash3 as the hash;
* the default sizes.

Own choices:

* partitions are selected by the top index bits;
* the seeds 0 … H-1, and index = low bits of the hash;
* stream position = count of sent indices; a stream may send while its
  distance is ≤ D;
* a sequence number on every item, to let the unshuffle find the next one;
* the FIFO depth, RAM word width, read latency and pipeline cuts;
* the query-pair join at input and output;
* the clear and insert paths, and the reset scheme.

Not part of this RTL:

* the tool flow that picks S, H, P and D and estimates performance (here
  they are plain parameters);
* the memory channel or network port that feeds the streams (the top
  exposes valid/ready ports instead).

## Files

| file | content |
|---|---|
| `rtl/bitblender_pkg.sv` | MurmurHash3 constants, rotate function |
| `rtl/stream_fifo.sv` | valid/ready FIFO |
| `rtl/compute_hash.sv` | H-seed MurmurHash3 pipeline |
| `rtl/arbiter.sv` | stream-to-partition arbiter with ratelimit |
| `rtl/query_bv.sv` | dual-port bit-vector partition, clear and bit set |
| `rtl/unshuffle.sv` | partition-to-stream reorder buffer |
| `rtl/aggregate.sv` | AND of H lookups |
| `rtl/hash_section.sv` | one section: two lanes, P partitions |
| `rtl/bitblender_top.sv` | the accelerator |
| `tb/tb_ref_pkg.sv` | reference MurmurHash3 for the testbenches |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_bitblender_full.sv` | the top at default sizes: clear 144 Mbit, insert, 36,000 + 18,000 queries |
| `tb/tb_bitblender_sweep.sv`, `tb/tb_sweep_point.sv` | rate sweeps over S, P and D, answers checked |

## Simulating

Every testbench is self-checking. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. For example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_bitblender_top \
  rtl/bitblender_pkg.sv tb/tb_ref_pkg.sv rtl/stream_fifo.sv rtl/compute_hash.sv \
  rtl/arbiter.sv rtl/query_bv.sv rtl/unshuffle.sv rtl/aggregate.sv \
  rtl/hash_section.sv rtl/bitblender_top.sv tb/tb_bitblender_top.sv
./obj_dir/Vtb_bitblender_top
```

* `tb_bitblender_top` runs the whole design at reduced sizes (S=3, H=3, P=4,
  D=4, 4 kbit sections). It checks every answer against a model, checks
  that inserted keys are always found, and requires that each mechanism
  occurs at least once: clear, insert, partition conflict, full FIFO,
  ratelimit pause, out-of-order arrival at an unshuffle, input
  backpressure and output backpressure.
* `tb_bitblender_full` uses the default sizes and runs in about half a
  minute, build included.

Module-level testbenches compare against independent models:

* the arbiter's choice is predicted cycle by cycle from its rules;
* the unshuffle gets ratelimited out-of-order traffic.

The simulator used has two-state logic, so every state that is read is reset
or written first.
