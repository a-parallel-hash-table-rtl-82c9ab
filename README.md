# Multi Hash Table stream aggregation accelerator

A sliding-window stream aggregator must update a hash table with one key per input tuple. It must do so at several tuples per clock, whatever the key distribution. A banked SRAM hash table gives N ports only when the N keys of a cycle fall into different banks. Skewed streams break that assumption: a hot key, or a set of keys that hash to the same bank, serialises the table.

This design keeps the table banked, with no replicated contents, and removes bank conflicts in two ways:

* **Address-mapping switching.** The 15-bit hash address is split into three disjoint 5-bit fields. Any one of them can select one of the 32 banks. When a bank queue overloads, the design switches to the mapping whose bank-select bits look most random. Keys already stored under an older mapping are found by lookups on a ring between the banks. Their window pointers then move to the new location.
* **A waterfall cache in front of the banks.** It has 10 stages of 8 entries. It merges repeated accesses to the same key into one multi-value request, and it gives cache space to keys whose bank is busy.

Every key's full window of up to 1024 one-byte values lives in an external DRAM. The banks hold metadata and the newest 64 values of each key. When a window is due, a compute module reads it back and returns the average, minimum and maximum.

Default configuration (all parameters in `rtl/mht_pkg.sv` and module parameters):

| | |
|---|---|
| Input | 8 tuples per cycle, each a 24-bit key and an 8-bit value |
| Hash table | 32 banks × 1024 entries = 32K keys, 3 mappings of 5 bank bits |
| Cache | 10 stages × 8 entries |
| DRAM flush granularity | 64 values |
| Window size | 1 to 1024 values; advance (WA) configurable |
| Compute | 4 modules for average/min/max, each reading 64 values per cycle |

## Data path

```
in (8 tuples) -> sort_merge -> waterfall_cache -> serializer -> link (2 regs)
   -> bank_queue[32] -> hash_bank[32] <-> ring_node[32] (ring)
                             |  DRAM writes (round-robin)   \ aggregation requests
                             v                               v
                           DRAM  ----- reads ----->  compute_q1[4] -> results
map_ctrl: loads of all queues -> current mapping, bank priority levels
```

`mht_top` wires these blocks together. DRAM is outside the design. The top has one write port, shared by the banks round-robin, and one read port per compute module. Each read returns 64 values.

### Sort and merge (`sort_merge`)

A 6-layer bitonic network sorts the 8 tuples of a cycle. Tuples with the same key end up adjacent. The network has one register per layer, plus a merge register, so its latency is 7 cycles.

Each group of equal keys becomes one *multi-value tuple*, held in the first lane of its run, and the other lanes are emptied. That lane also gets the hash address. The sort compares keys after a pseudo-random rotation that a 16-bit LFSR changes every cycle. Keys therefore land in varying lanes, which spreads them over the cache's fixed entry positions.

### Waterfall cache (`cache_stage`, `waterfall_cache`)

Stage s holds entries E_0..E_7. The tuple in lane i goes through these checks in order:

1. **Hit.** If any entry of the stage holds the key, the values are appended. If the entry then holds 8 or more values, the 8 oldest leave in lane i.
2. **Replacement.** On a miss, the tuple may take only entry E_i, and only if all of these hold:
   * E_i is empty, or its key maps to a less busy bank than the tuple's key;
   * the tuple has fewer than 8 values;
   * E_i was not hit this cycle.

   The displaced entry leaves in lane i. A tuple that is not cached passes to the next stage in lane i.
3. **Age.** Every entry has a 4-bit counter. It is cleared on an access and counts up otherwise. At 15 the entry is evicted into a free lane.

Bank "busyness" comes from `map_ctrl`: three priority levels from each queue's load (below 4, below 12, 12 or more), registered one cycle ahead of the cache. Each stage is registered, and all stages stop together when the back end is full.

### Serializer and link (`serializer`)

Evictions travel to the banks as packets of 32-bit flits:

* a single value is one flit `{key, value}`;
* k > 1 values are a head flit `{key, k}` followed by ceil(k/4) body flits of four values.

Each flit carries its destination bank and the mapping used. Both are fixed when the head flit leaves. In each cycle, the k-th eviction goes to the lane with the k-th lowest occupancy. Each lane has an 8-packet FIFO. A lane sends one flit per cycle, unless any bank queue is nearly full. In that case every lane stops (`ev_link_stop`), and the 2-stage link drains into the margin kept free in the queues.

### Bank queue (`bank_queue`)

Flits for a bank can arrive on all 8 lanes in the same cycle. The queue therefore has 8 lane FIFOs (16 flits each) plus a FIFO for lookups from the ring. An order FIFO records, for every packet head and every lookup, which FIFO holds it. The bank is served one whole packet at a time, in arrival order. `load` feeds both the priority levels and the mapping switch.

### Hash table bank (`hash_bank`)

Each bank holds 1024 entries in a memory with a 1-cycle read. An entry holds:

* valid, key, and the mapping that placed it;
* a pending flag with one bit per mapping that has answered;
* the key's DRAM window state: tail offset, fill (values in the window, up to WS), values since the last aggregation, and an "aggregated once" flag;
* a 64-value local buffer with its count.

The controller is a sequential state machine:

* **Hit.** Values go into the buffer, one per cycle. A full buffer is flushed to DRAM in a single 64-value write at the tail, and the tail advances.
* **Aggregation.** When the window first holds WS values, and then every WA values, the partial buffer is flushed and an aggregation request `{key, region, tail, WS}` goes out.
* **Miss.** If the entry holds another key, that entry's buffered values are flushed to its own region and a collision is reported on `coll_*`. The new key is inserted and marked pending. One lookup per other mapping goes out on the ring, to the bank and index where that mapping would have placed the key.
* **Lookup from another bank.** If the entry holds the key, it is invalidated, its buffer is flushed, and a POS reply carries tail, fill and count back. Otherwise a NEG reply is sent.
* **POS reply.** The pending entry adopts the old tail. Its fill becomes the old fill plus its own buffered values. If two POS replies arrive, the later one wins, which keeps the window contiguous.

While an entry is pending it neither flushes nor aggregates. If its buffer fills, the bank stalls until the replies arrive (`ev_stall`). POS replies are still taken during the stall.

**The DRAM window.** A key's window is a circular region of 1024 values. The region's base is the key's hash address, whichever mapping placed it. A key therefore moves between banks by handing over pointers only; no data is copied.

### Inter-bank ring (`ring_node`)

The ring has one register per bank, and a message moves one bank per cycle. Passing traffic has priority over injection. Each node keeps a filter of the keys its bank holds: a valid bit and an 8-bit key tag per entry.

* A lookup that fails the filter is answered NEG by the node itself (`ev_filtered`); the bank is not disturbed. A lookup that passes joins the tail of the bank queue.
* A NEG reply sets one bit of a per-entry miss table. The bank reads that bit in parallel with the entry.
* A POS reply bypasses the queue through a small FIFO to the controller.

A lookup that finds the bank queue full keeps circulating.

### Mapping control (`map_ctrl`)

One 8-bit saturating counter is kept per hash-address bit. For each valid address entering the cache, the counter moves up on a 0 bit and down on a 1 bit. A switch is triggered when any queue holds more than 40 requests and at least 64 cycles have passed since the last switch. The new mapping is the alternative whose five bank bits have the smallest summed absolute counter values. The counters are then cleared.

### Compute (`compute_q1`)

A request reads ceil(WS/64) beats, starting at `tail - WS`, at one read per cycle. Each beat is folded into a running sum, minimum and maximum, counting only positions inside the window. A divide cycle then gives the truncated average. The top dispatches each request to the lowest-numbered idle module.

## Where this RTL departs from the original system

* **Temporary DRAM buffer.** The original system gives pending entries a temporary DRAM buffer. Here the bank stalls instead.
* **Victim cache.** The original keeps evicted entries in a victim cache so that late lookups can still find them. Here an evicted entry's values are flushed and its metadata is lost.
* **Entry expiry.** Entries do not expire by timestamp. Every valid entry counts as a collision when it is evicted.
* **Bank read-modify-write.** The bank handles one request at a time instead of a pipelined loop over two ports. A bank therefore absorbs fewer than one value per cycle, and full throughput under uniform load is not reached. The queues, the cache and the mapping switch compensate only partly.
* **Windows while keys move.** If mappings switch often, a key can briefly live in two banks. Its window then keeps the key's own values, but some may be lost or reordered.
* **Sorting network.** The sort uses a bitonic network (24 comparators in 6 layers). An optimal 8-input network needs only 19 comparators in the same depth.
* **Query 2 (median).** It is not implemented.
* **Own choices.** Widths, thresholds, FIFO depths, the hash function and the packet format are this design's own choices. The hash is `key[14:0] * 0x2A5B` XOR `key[23:15] * 0x1F31`, truncated to 15 bits. It is a bijection on keys below 2^15.

## Verification

Every block has a self-checking testbench in `tb/`. Each one ends by printing `TB_RESULT checks=<n> failures=<n>`.

| testbench | what it checks |
|---|---|
| `tb_sort_merge` | random batches against a reference grouping; values, hash address, contiguity, 7-cycle latency under random stalls |
| `tb_cache_stage` | directed hit / overflow / replacement / pass-through / age-out sequence; stall freeze |
| `tb_waterfall_cache` | 3000 random cycles: each value leaves exactly once, per-key order kept, bounded residency, all four eviction kinds occur |
| `tb_serializer` | packets rebuilt from flits; flit count per packet; bank of every flit; one flit per cycle when allowed; lane choice by occupancy |
| `tb_bank_queue` | packets whole and in head-arrival order across 8 lanes plus lookups; `load` exact |
| `tb_ring_node` | filter, NEG generation, miss bits, POS forwarding, stale reply drop, circulation when the queue is full, pass-through priority |
| `tb_map_ctrl` | switch timing, hold time, choice against a reference of the counters, priority levels |
| `tb_hash_bank` | insertion lookups, DRAM contents, aggregation points, POS hand-over, NEG reply, stall and release, collision |
| `tb_compute_q1` | avg/min/max against a reference for random windows, including wrap-around; latency |
| `tb_mht_top` | whole design at default sizes (see below) |

`tb_mht_top` runs the full-size design for 3000 input cycles. It has three phases:

1. hot keys mixed with random keys;
2. keys that all select one bank under mapping 0, plus 10 % random keys;
3. hot keys, colliding keys and random DRAM stalls.

For half of the keys, every value of the key is the same, so their results must equal that value exactly. For the other keys, min ≤ avg ≤ max must hold, with min and max among the values sent. The test also bounds the number of results per key. It fails if any of these mechanisms never occurs: cache hit, overflow, replacement or age eviction, link stop, mapping switch, bank hit, insertion, filtered lookup, positive lookup, flush, collision or aggregation.

`tb/hbm_model.sv` is a behavioural DRAM model (sparse memory, fixed read latency) used by the testbenches.

To simulate a block with Verilator, run from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Wno-fatal --top-module tb_mht_top -y rtl -y tb +libext+.sv \
    rtl/mht_pkg.sv tb/tb_mht_top.sv -o sim && ./obj_dir/sim
```

The full-size end-to-end test takes about a minute to build and under a second to run.
