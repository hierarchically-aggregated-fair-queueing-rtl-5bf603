# HAFQ: fair bandwidth per flow when many flows share few queues

A fast router cannot keep one queue per flow. Thousands of flows end up
hashed into a few dozen queues. If every queue then gets the same share of
the link, a flow that shares its queue with many others gets less than a flow
that has a queue to itself. Within one queue, a fast flow also crowds out the
slow ones. Hierarchically Aggregated Fair Queueing (HAFQ) fixes both problems
without keeping any per-flow state:

* Each queue has a **zombie list**. This is a small table of recently seen
  flows, each with a packet counter. From how the table behaves, the queue
  estimates **how many flows it is carrying**.
* The output scheduler is deficit round robin (DRR). Each queue's **quantum is
  set in proportion to that estimate**, so every flow gets about the same
  share of the link, whichever queue it was hashed into.
* The same counters show which flows arrive faster than the others in their
  queue. When the queue gets long, their packets are **dropped first**.

This repository is a synthesizable SystemVerilog implementation of that
traffic manager. It works on packet descriptors. Packet bodies are assumed to
be held in an external packet memory that a descriptor's handle points into.

## How a packet travels

```
 in_desc ──► crc16_hash ──► [stage-1 reg] ──► zombie_list ──► flow_estimator ──► bandwidth_allocator
                                                   │                                     │ quantum
                                                   ▼                                     ▼
                                       preferential_dropper ──► packet_buffer ◄──── drr_scheduler ──► [out reg] ──► out_desc
```

* **Stage 1.** The flow ID (32 bits) goes through a CRC-16. The CRC modulo
  the number of queues picks the queue. The flow ID XOR-folded to 12 bits is
  the flow key that the zombie list stores. The descriptor is then registered.
* **Stage 2.** This is a single cycle that reads and writes the state of that
  queue:
  * search and update the zombie list;
  * update the queue's estimate and, from it, the queue's quantum;
  * decide whether to admit or drop the packet;
  * enqueue the packet into the shared buffer.

  Everything is written at the same clock edge, so the next packet always
  sees up-to-date state, even when it belongs to the same queue. There is no
  hazard logic.
* **Output.** The DRR scheduler takes one action per cycle: add a quantum,
  send one packet, or move to the next backlogged queue. Sent packets go into
  a registered valid/ready output.

The input takes one descriptor every cycle and never pushes back. A packet
that cannot be kept is dropped, and the drop and its reason are reported on
`ing_drop`.

## The zombie list

Every queue has a zombie list of `M` entries. Each entry holds a flow key and
a packet counter. When a packet arrives, its queue's list is searched in
parallel:

| case | condition | effect |
|---|---|---|
| Hit | an entry holds the packet's key | that counter + 1 (saturates at 1023) |
| Swap | no match, with probability q | a random row is overwritten: new key, counter 1 |
| No-swap | no match, otherwise | nothing |

`q` is `Q_PROB/65536`. The default is 655, which gives q ≈ 0.01. The swap
decision compares 16 random bits with `Q_PROB`, and the row comes from 16
other random bits taken modulo `M`. Both come from a xorshift32 generator.

A counter of 0 marks an empty entry, which is the state after reset. When all
the flows of a queue fit in its list, every packet hits and the counters
would grow forever. The published scheme handles this with a mechanism it
does not describe. Here the counters simply saturate.

## Counting flows from evicted counters

This is the subtle part of the design.

Suppose flow *i* makes up a fraction Rᵢ of its queue's arrivals. How far its
counter climbs before the entry is swapped out depends on Rᵢ. Let p be the
probability that a packet hits the list. The expected final counter value is
then

    E = Rᵢ / ((1 − p)·q/M) + 1,   so the rate estimate is   Rᵢ ≈ (1 − p)·(q/M)·(E − 1).

The estimator therefore watches the counter that each Swap evicts, which is a
sample of E. It also needs p, and it measures that directly from the stream of
hits and misses. The number of flows is 1/R_avg, where R_avg is the average
share of a flow.

A plain average of the samples would be biased. Fast flows enter and leave
the list more often, so they supply more samples. Each sample is therefore
weighted by E/R. This gives the update

    R_avg ← (1 − c)·R_avg' + β·E,     c = β·E / Rᵢ = α/(1 − p) · E/(E − 1),    α = β·M/q.

**What the hardware keeps.** The queue's estimation word holds
`A = R_avg · M/q`, so the division by q/M drops out:

    A ← (1 − c)·A' + α·E,    N = (M/q) / A.

* α is `2^-ALPHA_SHIFT`. The default is 1/16.
* c is computed as `E·2^(24−ALPHA_SHIFT) / ((1−p)·256·(E−1))`, in 16
  fraction bits, and capped at 1.
* N is `M·2^18 / (Q_PROB·A)`, rounded and limited to 1..4095. It uses a
  combinational divider, as does c.
* (1 − p) is an exponential average, weight `2^-MISS_SHIFT`, of the miss
  indicator. It is stored in units of 1/256.
* A is stored as an unsigned 10.2 number.
* Both averages live in narrow fields: 8 and 12 bits. Many updates are
  smaller than one LSB and would be lost to truncation. They are therefore
  rounded stochastically: random bits are added below the LSB before the
  value is cut back, which keeps the average unbiased.
* An evicted counter of 0 (an empty entry) or 1 says nothing about rate:
  Rᵢ = 0, which would get an infinite weight. Such a sample changes nothing.
* After reset, every queue reads N = 1. A queue whose flows all fit in its
  zombie list never swaps, so its estimate stays where it was.

**Measured accuracy.** These figures are from `tb_hafq_estimation`: one queue
at the default size, flows doubling every 25,000 packets.

| active flows | 8 | 16 | 32 | 64 |
|---|---|---|---|---|
| estimate, equal rates | 7 | 17 | 33 | 59 |
| estimate, half the flows 3× faster | 8 | 16 | 22 | 59 |

With no more flows than the list has entries, nearly every packet hits and
the estimate hardly moves from its reset value of 1. The run reads 1, 1 and 3
for 1, 2 and 4 equal flows. Individual estimates scatter by roughly ±30%
because the samples of E are noisy. `tb_hafq_top` saw 43 for 32 flows in the
middle of a busy run.

## Dropping the fast flows first

A packet is dropped preferentially when all of these hold:

* it is a Hit;
* its flow's counter is above the list's average counter
  (`count·M > total`, so no division is needed);
* its queue holds more than `QUEUE_CAP/2` packets.

Missed packets have no counter of their own, so they are never dropped this
way. On top of this, a packet is tail-dropped when its queue holds
`QUEUE_CAP` packets or the shared pool is full. The four outcomes are
reported as `DROP_NONE`, `DROP_PREF`, `DROP_QFULL` and `DROP_POOL`.

## Bandwidth allocation and DRR

On every packet, the estimate N of its queue is written into the allocator,
together with the quantum `min(N·QPF, 4095)`. The quantum is counted in
64-byte units, and `QPF = 8` gives 512 bytes per flow.

The DRR scheduler visits the backlogged queues in index order:

1. On arriving at a queue, it adds the queue's quantum (in bytes) to that
   queue's deficit.
2. It sends head packets while their length fits in the deficit.
3. When the head packet no longer fits, it moves on. The deficit left over
   stays with the queue.
4. A queue found empty has its deficit cleared.

Over time, each backlogged queue therefore receives bytes in proportion to
its quantum, which means in proportion to its estimated flow count.

## Per-queue state

The three 32-bit records follow the memory map that the scheme was designed
around. The field scalings are choices made in this design.

| record | bits | fields |
|---|---|---|
| zombie entry (M per queue) | 31:22 / 21:12 / 11:0 | pointer (kept, unused) / packet counter / flow key |
| estimation word (1 per queue) | 31:20 / 19:8 / 7:0 | total of counters / average rate A (10.2) / miss probability (1/256) |
| scheduling word (1 per queue) | 31:24 / 23:12 / 11:0 | queue length / number of flows / quantum (64 B units) |

The queue lengths physically live in `packet_buffer`. The monitor port
assembles the scheduling word from the buffer and the allocator.

The shared buffer holds `BUF_PKTS` descriptors, organised as one linked-list
FIFO per queue:

* each queue has a head, a tail and a length;
* a next-pointer memory chains the slots;
* a FIFO of returned slots and a counter of never-used slots supply free
  slots, so no memory needs clearing at reset.

It can take one enqueue and one dequeue in the same cycle, including on the
same queue.

## Parameters of `hafq_top`

| parameter | default | meaning |
|---|---|---|
| `NQ` | 64 | number of queues |
| `M` | 4 | zombie-list entries per queue (≥ 2) |
| `Q_PROB` | 655 | swap probability q × 65536 (0.01) |
| `ALPHA_SHIFT` | 4 | α = 2^-4, the smoothing weight of the rate average |
| `MISS_SHIFT` | 4 | weight 2^-4 of the miss-probability average |
| `QPF` | 8 | quantum per estimated flow, in 64-byte units |
| `BUF_PKTS` | 4096 | shared descriptor pool (power of two) |
| `QUEUE_CAP` | 255 | queue length limit (≤ 255, the 8-bit length field) |

Other configurations of the scheme:

* 16 queues with 2 entries: `NQ=16, M=2`.
* An on-chip core-router table with 1K queues and 6 entries: `NQ=1024, M=6`.
  Its HAFQ state is 32·Q·(2+M) bits = 32 KB.

## Interface of `hafq_top`

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `in_valid`, `in_desc` | in | one descriptor per cycle: `{flow_id[32], len[16], handle[16]}` |
| `out_valid`, `out_ready`, `out_desc` | out/in/out | scheduled descriptors; the descriptor is held while `out_ready` is low |
| `ing_valid`, `ing_queue`, `ing_event`, `ing_drop`, `ing_avg_upd` | out | report on the packet in stage 2: its queue, Hit/Swap/No-swap, drop reason, whether it updated the rate average |
| `drr_rotate` | out | DRR left a backlogged queue for lack of deficit |
| `occupancy` | out | descriptors in the shared buffer |
| `mon_queue` → `mon_est`, `mon_sched` | in → out | estimation and scheduling words of one queue |

**Latency.** A descriptor presented in cycle t is reported on `ing_*` in
cycle t+1 and is in the buffer from cycle t+2. When the DRR scheduler is
already serving that queue with enough deficit, the packet can appear on
`out_valid` in the cycle after it is dequeued.

## Where this design departs from the published scheme

* **Platform.** The scheme was evaluated in software on a network processor.
  The pipeline, the one-packet-per-cycle timing and the descriptor format
  belong to this design.
* **Unspecified details.** The published scheme does not give the CRC
  polynomial (CRC-16/CCITT is used here), the flow-key derivation, how p is
  measured, the values of β and α, the bit scalings, or the buffer size.
  Every one of these was chosen here.
* **Counter overflow.** The separate mechanism the scheme uses against
  counter overflow is not published. Counters saturate instead.
* **Meaning of "capacity".** "Half of the buffer capacity" in the drop rule
  is read here as half of the per-queue limit `QUEUE_CAP`.
* **Variable-length packets.** The estimator counts packets, as the scheme
  assumes with fixed-length packets. Variable lengths only matter to DRR,
  which counts bytes.
* **Pointer field.** The pointer field of a zombie entry is carried but not
  used; its purpose is not described.
* **Estimation bias.** The weighted average tends to overestimate when the
  samples of E are noisy, because small E values receive large weights. The
  accuracy table above shows what to expect.

## Verification

Every testbench checks itself and ends with a line
`TB_RESULT checks=N failures=M`:

| testbench | what it establishes |
|---|---|
| `tb_crc16_hash` | standard CRC-16/CCITT check value 0x29B1; byte-wise reference CRC, queue index and key for 2000 IDs |
| `tb_lfsr_rng` | exact xorshift32 sequence; swap frequency ≈ q; balanced rows |
| `tb_zombie_list` | Hit/Swap/No-swap, rows, counters, evictions and totals against a model; saturation at 1023; queues kept apart |
| `tb_flow_estimator` | stored words and N against an integer model; steady-state N against the closed form (p = 0 and p = ½) |
| `tb_preferential_dropper` | drop rule at its boundaries and at random against a real-valued statement of the rule |
| `tb_bandwidth_allocator` | quantum = N·QPF with saturation, on both read ports |
| `tb_packet_buffer` | linked-list queues against FIFO models, including a full pool and same-queue enqueue+dequeue |
| `tb_drr_scheduler` | DRR bound per turn, byte shares 1:2:3:4, no sending while blocked, one packet per cycle |
| `tb_hafq_top` | full size, end to end: every drop reason against modelled queue lengths, monitor port, every output descriptor intact, delivered once and in order within its flow, fair DRR share, fairness index > 0.8, every mechanism exercised |
| `tb_hafq_estimation` | the flow-count experiment above |
| `tb_hafq_fairness` | 16–1024 flows over 64 queues with the link overloaded twice; fairness index ≥ 0.75/0.8 (equal rates) and ≥ 0.65 (half the flows 3× faster) |
| `tb_hafq_memory` | small configurations (below): estimates within 30 % of the flows actually hashed to each queue, fairness floors, and a fairer result than an equal share per queue |

Measured fairness indices (`tb_hafq_fairness`):

| flows | 16 | 64 | 256 | 1024 |
|---|---|---|---|---|
| equal rates | 0.94 | 0.88 | 0.92 | 0.95 |
| half 3× faster | 0.94 | 0.85 | 0.77 | 0.77 |

The dip at 64 flows comes from random hashing: some queues hold several flows
while others are empty.

`tb_hafq_memory` runs configurations where all HAFQ state fits in 128 to 384
bytes. It uses 96 flows unless a count is given, and the table shows the
fairness index first for equal rates, then with half the flows 3× faster.
"Equal share" is the index that plain per-queue DRR would reach with the same
hashing.

| queues × entries | state | equal rates | half 3× faster | equal share |
|---|---|---|---|---|
| 16 × 2, 16 / 48 / 96 flows | 256 B | 0.90 / 0.95 / 0.98 | – / – / 0.86 | 0.85 / 0.72 / 0.73 |
| 8 × 2 | 128 B | 0.99 | 0.83 | 0.84 |
| 24 × 2 | 384 B | 0.92 | 0.83 | 0.71 |
| 8 × 4 | 192 B | 0.95 | 0.78 | 0.84 |
| 8 × 6 | 256 B | 0.95 | 0.82 | 0.84 |
| 8 × 10 | 384 B | 0.85 | 0.83 | 0.84 |

The mean flow estimate per queue stays within about ±25 % in all of these
configurations.

These senders are open-loop, so flows of equal rate already share a FIFO
evenly. Adding memory therefore does not make the result fairer, as it would
with TCP senders. Long lists even hurt: with 10 entries for 12 flows per
queue, the two flows left outside the list are never dropped preferentially.
Keep M well below the expected number of flows per queue.

What the tests do **not** cover:

* TCP's reaction to drops: all traffic sources are open-loop.
* Timing closure: the combinational dividers in stage 2 are the long path.

## Simulating

Every testbench runs with plain Verilator 5, for example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_hafq_top \
    -y rtl -y tb +libext+.sv -Irtl rtl/hafq_pkg.sv tb/tb_hafq_top.sv
./obj_dir/Vtb_hafq_top
```

Replace `tb_hafq_top` with any other testbench name. Each one finishes within
a minute. Lint a module with
`verilator --lint-only -Wall -Irtl rtl/hafq_pkg.sv rtl/<module>.sv`.

## Files

`rtl/hafq_pkg.sv` holds the widths, records and enums. There is one module
per file in `rtl/`: `crc16_hash`, `lfsr_rng`, `zombie_list`, `flow_estimator`,
`preferential_dropper`, `bandwidth_allocator`, `packet_buffer`,
`drr_scheduler` and the top, `hafq_top`. The testbenches are in `tb/`.
