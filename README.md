# CAMP: a circular-pipeline IPv4 longest-prefix-match engine

An IPv4 router has to find, for every packet, the longest routing prefix that matches the
destination address. Tries do this well, but a trie walk needs one memory access per level. The
usual way to get one lookup per cycle is to pipeline the trie, one memory per level. That
leaves the memories badly unbalanced, because the middle levels of a real routing trie are far
larger than the top and bottom ones.

CAMP (Circular, Adaptive and Monotonic Pipeline, from the paper *CAMP: Fast and Efficient IP
Lookup Architecture* by Kumar, Becchi, Crowley and Turner) closes the pipeline into a **ring**.
The trie is cut into many small sub-tries. Each sub-trie may start at **any** stage of the ring
and occupies the stages after it, wrapping around as needed. Spreading the sub-tries' starting
points around the ring fills every stage memory almost equally. The number of stages also no
longer has to equal the number of trie levels. The price is that lookups enter the ring at
different points and can collide. Small per-stage request queues, plus early exit from the ring,
handle this.

This repository is synthesizable SystemVerilog for such an engine, with uni-bit sub-tries.
Its testbenches check it against a reference longest-prefix match.

## Data flow

```
 in_daddr ─► direct table ─► dispatcher ─┬─► queue 0 ─► stage 0 ─► stage 1 ─► … ─► stage 24 ─┐
 (1/cycle)   (first 8 bits)              ├─► queue 1 ──────────────┘                          │
                                         │   …                        ▲     (ring closes) ◄───┘
                                         │                            │ results from every stage
                                         └──────── table-only answers / discards ─► reorder buffer ─► out_res
```

1. **Direct table** (`direct_table`). The first `INIT_STRIDE` = 8 address bits index a
   256-entry table. An entry holds two things. The first is a pointer (stage, address) to the
   root node of the sub-trie that resolves the remaining 24 bits. The second is the longest
   prefix of at most 8 bits that covers the entry. Prefixes shorter than 8 bits are expanded into
   every entry they cover. If an entry has no sub-trie, its prefix is the final answer.
2. **Dispatcher** (in `camp_top`). It accepts one address per cycle on each lane and gives it a tag (its slot
   in the reorder buffer). It then either answers at once from the table entry, or pushes the
   lookup into the request queue of the stage that holds the sub-trie root. If that queue is
   full, the lookup is **discarded**. It still gets an answer, with status `RES_DROPPED`, so the
   output stream stays complete and in order.
3. **Request queues** (`req_queue`, 32 entries each, one per stage). A lookup waits in its queue
   until an empty slot (a *bubble*) arrives at its stage along the ring. The queue head then takes
   that slot. Without the queues, a lookup blocked at one stage would hold up every lookup behind
   it. With them, only lookups for the same stage wait.
4. **Ring of stages** (`camp_stage`, 25 of them). Each stage owns a memory of trie nodes and
   handles one ring slot per cycle:
   * a lookup that needs a node in this stage reads it, takes the node's prefix as its best match
     if the node has one, and follows the child pointer selected by the next address bit;
   * a lookup that needs a node in some other stage passes through untouched (a **no-op**);
   * a lookup whose node has no child for the next bit (or that has used all 32 bits)
     **retires** here. Its best match, or "no match", goes to the reorder buffer, and its slot
     becomes a bubble that a queue further along the ring can use.
5. **Reorder buffer** (`reorder_buffer`, 256 lookups). Lookups finish out of order, up to one per
   stage per cycle, and each writes its result into its tag's slot. Results leave in arrival
   order, one per cycle on each lane.

Two lookups for the same prefix always enter from the same queue and follow the same path. So
packets of one flow are never reordered, even without the reorder buffer. The buffer restores
order across flows.

## Mapping rules the tables must follow

The hardware does not balance anything itself. A control-plane program decides where each node
lives and writes the tables. The engine is correct for any mapping that obeys these rules:

* **Monotonic:** a child node is placed at least one stage after its parent, counting around the
  ring. Any gap is allowed; the lookup passes the stages in between as no-ops.
* **Less than one circle:** every path, from a sub-trie root to its deepest node, ends before it
  comes back to the root's stage. Then a lookup uses each stage at most once, and one ring slot
  per stage per cycle is always enough.
* A child pointer never points back into its parent's own stage. An assertion in `camp_stage`
  checks this.

With 25 stages and an 8-bit initial stride, a sub-trie path has at most 25 nodes (bits 8 to 31,
plus the node at depth 32). So the chain from root to a /32 route uses every stage exactly once.
Paths that end at /24 (most of a real table) leave 8 stages of slack, which the mapping can use
to skip stages and even out the memories.

The balancing heuristic itself, which assigns root stages and gaps so that all stages fill
equally, is not part of this RTL. The testbenches use random root stages and random one-stage
gaps, within the rules above.

### Record formats (`rtl/camp_pkg.sv`)

| record | fields (MSB first) | bits |
|---|---|---|
| `node_ptr_t` | valid, xfer, stage[4:0], addr[14:0] | 22 |
| `trie_node_t` | pfx_valid, pfx_nh[7:0], child[1], child[0] | 53 |
| `dt_entry_t` | root (node_ptr_t), pfx_valid, pfx_nh[7:0] | 31 |
| `lookup_req_t` | valid, tag[7:0], daddr[31:0], depth[5:0], stage, addr, best_valid, best_nh[7:0], xfer | 77 |
| `lookup_res_t` | tag[7:0], status (match / no match / dropped), nh[7:0] | 18 |

`child[b]` is followed when the next address bit is `b`. There is no leaf pushing. An interior
node can carry a prefix, and the lookup remembers the longest one seen so far. `depth` is the
number of address bits already consumed, so a sub-trie root is evaluated with `depth = 8`.

## Timing

* Acceptance to queue: 2 cycles (synchronous table read, then the push).
* Each stage takes one cycle. The ring has exactly one register per stage, and every stage
  memory has a synchronous read.
* Latency of a lookup that meets no contention: `4 + k` cycles from `in_valid && in_ready` to
  `out_valid`, where `k` is how many stages after the root stage its last node sits. The last
  node of a /24 route with no gaps has `k = 16`. A lookup answered by the direct table alone
  takes 2 cycles. `tb_camp_top` checks both figures exactly.
* Throughput: `LANES` new addresses per cycle at the input (default 1). Lookups that leave the
  ring early free slots for others, so the queues can put more than one lookup per cycle into
  the ring. With one lane this happens only after a backlog has built up. With several lanes it
  can be sustained (see below).

## Entering the ring: how much is lost to collisions

The rate at which lookups enter the ring (LPC, lookups per cycle) is measured in `tb_camp_lpc`.
The test is the worst case for this design: 24 stages, every lookup circles the whole ring, and
one lookup is offered every cycle. The measured values, with entry-stage patterns drawn at
random:

| entry pattern | queue 1 | queue 8 | queue 16 | queue 32 |
|---|---|---|---|---|
| uniformly random | 0.81 | 0.93 | 0.94 | 0.94 |
| bursts of 2 at one stage | 0.49 | 0.91 | 0.93 | 0.93 |
| bursts of 8 | 0.44 | 0.85 | 0.91 | 0.92 |
| bursts of 24 | 0.50 | 0.73 | 0.80 | 0.92 |
| bursts of 40 | 0.50 | 0.73 | 0.79 | 0.88 |
| bursts of 64 | 0.50 | 0.81 | 0.83 | 0.85 |
| bursts of 96 | 0.50 | 0.88 | 0.88 | 0.87 |
| weighted (a third of the stages get most traffic) | 0.77 | 0.93 | 0.94 | 0.94 |

With 32-entry queues, the ring takes at least 0.85 lookups per cycle for every pattern. This
agrees with the published result (at least 0.8 for every pattern at queue size 32). The rest of
the offered lookups were discarded at full queues. When the reorder window is full, the input
is held instead.

On a table of about 92,000 prefixes and realistic routes (`tb_camp_full`, all defaults),
lookups arriving at 0.8 per cycle are never discarded. The mean time from acceptance to answer
is about 28 cycles. With lookups arriving every cycle, about 0.94 per cycle enter the ring.

### More than one lookup per cycle

When sub-trie paths are much shorter than the ring, each lookup holds only part of the ring
and several lookups can enter it in the same cycle. To use that, set `LANES` above 1. The
input then takes `LANES` addresses per cycle, and the output releases up to `LANES` results per
cycle. The cost of each extra lane:

* one more copy of the direct table (all copies are written together);
* one more write port on every request queue;
* one more write port and one more output port on the reorder buffer.

Lanes bound for the same queue in one cycle are written into it together, lowest lane first.
A lane that finds no room left is discarded like any other lookup. `tb_camp_lanes` runs four
lanes on a 32-stage ring with routes of /12 to /20, so each path has at most 13 nodes. There,
about 2.5 lookups per cycle enter the ring with no discards.

## Adaptive splitting

If a trie begins with a long, thin section (for example all routes under one /16), the first 8
bits cannot cut it into many small sub-tries. The engine therefore supports a second level of
splitting. A child pointer with `xfer` set marks the root of a **child sub-trie**. A child
sub-trie is mapped on its own, from any stage, and obeys the mapping rules by itself.

A lookup that follows such a pointer is offered for re-entry by the stage it leaves. Each cycle,
a round-robin arbiter in `camp_top` moves one such lookup into the request queue of the child
root's stage. The arbiter skips queues that are full or that the dispatcher is writing in the
same cycle. A lookup that is not chosen stays on the ring and is offered again by the next
stage. If it reaches the child root's stage on the ring first, it simply continues there. The
`redispatch` output pulses for each re-entry. Choosing where to split (for example at nodes
whose sub-trie size reaches a target) is control-plane work.

## Interface of `camp_top`

| parameter | default | meaning |
|---|---|---|
| `NUM_STAGES` | 25 | stages on the ring (at most 32) |
| `INIT_STRIDE` | 8 | address bits resolved by the direct table |
| `QUEUE_DEPTH` | 32 | entries per request queue |
| `ROB_DEPTH` | 256 | lookups in flight (power of two, at most 256) |
| `LANES` | 1 | addresses accepted and results released per cycle |

The package constants are `NODE_AW = 15` (32,768 nodes per stage, 819,200 in all), `NH_W = 8`
(next-hop identifier) and `TAG_W = 8`.

* Lookups: `in_valid[k]` and `in_daddr[k]` for each lane `k`, plus one `in_ready`. Lane `k` is
  accepted when `in_valid[k]` and `in_ready` are both high. Lower lanes count as older.
  `in_ready` is low only while the reorder window has fewer than `LANES` free slots. Results come
  out in arrival order on `out_valid[k]` and `out_res[k]`, with one `out_ready`. `out_valid` is
  always a run of ones starting at lane 0, and every valid lane is taken when `out_ready` is
  high. With `LANES = 1` all of these are plain scalar signals.
* Tables: `dt_wr_en/idx/data` write one direct-table entry. `node_wr_en/stage/addr/data` write one
  node. The writes use separate write ports, so lookups keep running. A read and a write of the
  same word in one cycle return the old word. Tables are not cleared by reset; load every entry
  that can be reached before sending lookups.
* Activity counts for each cycle: `dispatch_cnt` (lookups entering the ring), `retire_cnt`,
  `access_cnt` (stages reading a node), `noop_cnt` (stages passing a lookup through), `drop`
  (one bit per lane), `redispatch`. Ring utilization is `(access_cnt + noop_cnt) / NUM_STAGES`.
* Reset `rst_n` is asynchronous and active low. It empties the queues, the ring and the reorder
  buffer.

## Capacity

For a uni-bit trie, a real backbone table needs about 3.5 to 4 nodes per prefix. This is an
estimate; the synthetic table in `tb_camp_full` has 3.8. At that rate 135,000 prefixes need
about 513,000 nodes, or about 20,500 per stage if the stages are balanced. That fits the 32,768
per stage provided. 150,000 prefixes also fit. 250,000 prefixes (about 950,000 nodes) do not
fit; they need `NODE_AW = 16`. Each stage memory is 32,768 × 53 bits, and all 25 together are
about 42 Mbit.

## Where this differs from the published design

* Only **uni-bit** sub-tries are built (the configuration with an 8-bit initial stride and 25
  stages). The published work also evaluates multi-bit tries with tree-bitmap nodes (strides
  3–5, 5–30 stages, up to a million prefixes), along with their power and area. That node format
  comes from other work and is not implemented here.
* The published work names a 12-bit initial stride as the better trade-off for balance. The
  default here is 8, because the 25-stage figure goes with it. `INIT_STRIDE` can be set to 12 or
  16.
* The published work reaches an LPC of 3 to 5 with multi-bit paths of at most 8 nodes on 32
  stages. Here only uni-bit paths are possible, and they are longer. The closest case that was
  run gives about 2.5 (four lanes, 32 stages, paths of at most 13 nodes). How a wider input is
  organised (`LANES`, copies of the direct table, multi-write queues) is this design's own
  choice.
* The published design expects the ring to run slightly faster than lookups arrive. Here the
  input and the ring share one clock. The same margin is obtained by offering fewer than one
  lookup per clock: `tb_camp_full` offers 0.8 per clock, and no lookup is discarded.
* The following are choices made here, not taken from the published design: discarding on a
  full queue, the per-child pointer format, the synchronous memories with separate write ports,
  the 256-entry reorder window, the widths (8-bit next hop, 15-bit node address), the re-entry
  arbiter, and reset behaviour.
* Table updates are plain memory writes from the control plane. Keeping the stages balanced as
  routes change, and the stage-mapping heuristic, are software and are not here.

## Files and simulation

| file | contents |
|---|---|
| `rtl/camp_pkg.sv` | widths and record types |
| `rtl/direct_table.sv` | direct lookup table |
| `rtl/req_queue.sv` | per-stage request FIFO |
| `rtl/camp_stage.sv` | one ring stage with its node memory |
| `rtl/reorder_buffer.sv` | in-order release of results |
| `rtl/camp_top.sv` | dispatcher, re-entry arbiter, ring, top level |
| `tb/camp_model_pkg.sv` | table generator, stage mapper and reference lookup for the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_camp_full` (all defaults, ~92k prefixes), `tb_camp_lpc` (ring throughput against queue size) and `tb_camp_lanes` (four-lane input on 32 stages) |

Each testbench prints `TB_RESULT checks=N failures=M`, and a watchdog ends it if it hangs. To
run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/camp_pkg.sv tb/camp_model_pkg.sv tb/tb_camp_top.sv --top-module tb_camp_top
./obj_dir/Vtb_camp_top
```

The unit testbenches (`tb_direct_table`, `tb_req_queue`, `tb_camp_stage`, `tb_reorder_buffer`)
need only `rtl/camp_pkg.sv` and their module. The queue test is built with three push lanes and
the reorder-buffer test with two lanes, so that the multi-lane paths are checked there as well. `tb_camp_top` runs the engine end to end with
4-entry queues, so that the discard path is reached. It counts every mechanism and fails if one
never occurs: bubble waits, no-ops, wraparound, discards, table-only answers, out-of-order
completion, several ring entries in one cycle, input back-pressure, re-entry, and table writes
while lookups are running. In the last case a new route is added, nodes first and the direct-table
pointer last, and is then looked up. Every testbench runs in seconds.
