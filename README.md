# STLAC: a locality-aware LLC and burst-support NoC for a 4x4 tiled manycore

Tiled manycores share a large last-level cache (LLC) that is spread over the
tiles and reached over a mesh network. Two things hurt such a cache: programs
with different locality pollute each other's capacity (a stream with no reuse
evicts blocks that would have been reused), and blocks that live far away cost
many network hops. STLAC (Spatial and Temporal Locality-Aware Cache) attacks
both by co-designing the cache and the network:

* every LLC slice is split, way by way, into a **victim part** that catches
  blocks evicted from the L1 (temporal locality) and a **prefetch part** that
  holds blocks fetched ahead of a miss (spatial locality);
* a **cache partition algorithm (CPA)** compares how well both parts serve the
  core and periodically moves one way from the worse part to the better one;
* prefetched blocks travel as one **burst packet** that the routers give
  priority and carry through a reserved switch connection, so a 4-block
  prefetch costs one request and one continuous reply instead of four
  request/reply pairs. An ageing rule keeps normal traffic from starving.

This repository holds synthesizable SystemVerilog for the whole on-chip part:
16 tiles, each with its LLC slice, partition controller, miss/prefetch engine,
home engine and network interface, on a 4x4 mesh of burst-support routers.
The cores, their private L1 caches, the coherence directory and the DRAM are
outside and are reached through ports.

## System at a glance

| item | value |
|---|---|
| mesh | 4x4, dimension-order (X then Y) routing, 128-bit links |
| LLC slice | 128 KB per tile, 8 ways, 64-byte blocks, 256 sets |
| partition | starts 4 victim / 4 prefetch ways, moves one way per period, at least 1 way per part |
| CPA period / threshold | 1,000,000 cycles / 10 % |
| prefetch length | 4 blocks |
| address | 29-bit byte address (512 MB), 23-bit block address |
| home of a block | tile number = block address bits [9:6] (4 KB pages interleaved over tiles) |
| virtual channels | 2 per port: VC0 requests and write-backs, VC1 replies; 4-flit buffers |

```
 core/L1 port                                   memory port
      |                                              |
 +----v----------------------------------------------v----+
 | stlac_node                                             |
 |  miss/prefetch engine --+      home engine             |
 |          |              |        |                     |
 |    stlac_cache <---- cpa_ctrl    |                     |
 |  (victim | prefetch ways)        |                     |
 |          network interface (VC0 requests, VC1 replies) |
 +-----------------------------+--------------------------+
                               | port 0
                        burst_router  --- N/E/S/W links --- (noc_mesh)
```

## Files

| file | contents |
|---|---|
| `rtl/stlac_pkg.sv` | sizes, flit and header types, message classes, home mapping |
| `rtl/flit_fifo.sv` | small flit FIFO (router input buffers, ejection buffers) |
| `rtl/burst_router.sv` | five-port burst-support router |
| `rtl/noc_mesh.sv` | 4x4 mesh of routers |
| `rtl/stlac_cache.sv` | LLC slice with victim/prefetch ways and the repartition walk |
| `rtl/cpa_ctrl.sv` | miss-rate profilers and the partition decision |
| `rtl/stlac_node.sv` | one tile without its router |
| `rtl/stlac_top.sv` | 16 tiles on the mesh |
| `tb/*_tb.sv` | self-checking testbenches, one per module plus a full-size one |
| `tb/mem_model.sv` | behavioural DRAM (150-cycle latency) used by the testbenches |

## The partitioned slice (`stlac_cache`)

Every way of every set has a role bit. A demand lookup searches all eight ways
regardless of role and reports which part hit. Inserts are directed:

* an L1 eviction (`VICTIM`) goes to the victim part; if the block is already
  present it is updated in place;
* a prefetched block (`PREF`) goes to the prefetch part; if the block is
  already present the prefetch is dropped, because the present copy may be a
  newer, dirty one.

Replacement is true LRU (a 3-bit age per way, 0 = most recent) restricted to
the ways of the part being filled, with invalid ways of that part used first.
A dirty block that is displaced appears on the `evict_*` port and the tile
writes it back to its home; no new request is taken until it has been handed
over.

Moving a way: on `mv_valid` the slice walks all 256 sets, one per cycle, and
in each set flips the role of the least recently used way of the shrinking
part. The block in it stays valid, so nothing is lost or written back. The
walk takes one start cycle plus 256 cycles; requests wait meanwhile (about
0.03 % of a 1M-cycle period). Because every set gives up exactly one way, all
sets always have the same split.

Lookup timing: request accepted on edge *e*, `resp_*` valid after edge *e+1*.

## The partition algorithm (`cpa_ctrl`)

Per period the controller counts lookups `A`, victim-part hits `Hv` and
prefetch-part hits `Hp`. With the miss rate of a part defined as
`MR = 1 - hits/A`:

* `MR_v - MR_p >= 10 %`, i.e. `100*(Hp - Hv) >= 10*A`: the victim part loses
  its LRU way to the prefetch part;
* `MR_p - MR_v >= 10 %`: the prefetch part loses a way to the victim part;
* otherwise the split is kept.

The comparison is multiply-only. Counting restarts every period, the decision
is taken on the last cycle of the period (counting that cycle's events) and
issued as a one-cycle `mv_valid` pulse; `cap_v`/`cap_p` change at the same
time. No part is shrunk below one way. A stream that keeps hitting prefetched
blocks therefore slowly takes ways from the victim part, and a reuse pattern
wins them back.

## Demand misses and burst prefetch (`stlac_node`)

The core-side port is blocking: one read or eviction at a time.

1. A read looks up the slice. On a hit the block returns two cycles after the
   request was taken, tagged with its source (`SRC_VICTIM` or `SRC_PREF`).
2. On a miss the tile sends a one-flit `READ` to the block's home tile and,
   unless a prefetch is still outstanding, a one-flit `PREF` asking for the
   next four blocks. The length is clipped at the end of the 4 KB page, since
   all blocks of a page share one home; a miss on the last block of a page
   prefetches nothing.
3. The home engine reads the blocks from its memory port (pipelined, replies
   in order), collects them, and only then sends the reply, so it leaves the
   tile as one unbroken flit stream:
   * `DATA`: head flit + 4 data flits, a normal packet-switched (PS) packet;
     the block goes straight to the core (`SRC_MEM`), not into the slice;
   * `BURST`: head flit + 16 data flits with the burst bit set; each block is
     written into the prefetch part as soon as its four flits are in.
4. An L1 eviction is written into the victim part. A dirty block displaced by
   an insert is sent to its home as a `WB` packet (head + 4 flits) and
   written to memory.

Requests and write-backs use VC0, replies VC1. Each VC has its own ejection
buffer and credit counter, and the reply side always drains (its only wait is
a free cache port), so a home engine that is busy with a request can never
block the replies another tile waits for. Replies get the injection port
before requests.

Uncontended latency of a miss: network hops (3 cycles per router) + 150
memory cycles + the reply's hops and flits.

## The burst-support router (`burst_router`)

Five ports (0 local, 1 north, 2 east, 3 south, 4 west), two VCs per port,
4-flit buffers per VC and credit flow control. Each input VC has a state
register with the fields *active*, *output port*, *burst*, *age* and a wait
counter.

Pipeline of a head flit:

1. **buffer write / route**: the flit is written into its VC buffer; the
   X-then-Y route is computed from its header;
2. **VC allocation**: the packet takes the same VC on the output (the VC
   is its message class); the output VC must not be held by another packet.
   Competing inputs are served round-robin;
3. **switch allocation and traversal**: each input picks one eligible VC,
   each output picks one input, and the winner moves into the output
   register, which drives the link.

A head flit therefore appears on the output three cycles after it appeared
on the input; body flits skip step 2. A flit is eligible when its VC is
active, it has a downstream credit, and no reservation forbids it.

**Priority.** At both arbitration levels there are two classes: high
(burst flits, and PS flits whose age is 1) and low (PS flits of age 0).
High wins; round-robin decides within a class.

**Switch reservation.** When the head flit of a burst packet wins an output,
that output is reserved for that input VC, and the input port is tied to that
VC, until the tail flit passes. Nothing else can use the output in between,
even if the burst has a bubble, so the 17 flits of a prefetch arrive at the
requester back to back. PS packets are not reserved and may interleave flit by
flit with packets on the other VC.

**Starvation avoidance.** A PS flit at the head of a buffer starts at age 0.
If it waits 16 cycles (`AGE_TH`) without being sent it becomes age 1 and
competes with burst flits as an equal; its age returns to 0 once it is sent.
Reservations are not pre-empted: an aged flit gets its turn when the current
burst ends.

Assertions check that no input buffer overflows and that every output
reservation matches an input reservation.

## Interfaces of the top (`stlac_top`)

All per-tile ports are arrays indexed by tile number `n = 4*y + x`.

* Core side: `core_req_valid/ready`, `core_req_evict` (0 read, 1 L1
  eviction), `core_req_addr` (block address), `core_req_data`,
  `core_req_dirty`; replies on `core_resp_valid` (one-cycle pulse, must be
  taken), `core_resp_addr`, `core_resp_data`, `core_resp_src`.
* Memory side of the home engine: `mem_req_valid/ready`, `mem_req_we`,
  `mem_req_addr`, `mem_req_wdata`; read data on `mem_resp_valid/data`, in
  request order, any latency. Tile `n`'s memory holds the pages with
  `addr[9:6] == n`.
* Statistics: `cap_v`, `cap_p` and event pulses (hits per part, misses,
  prefetch requests, write-backs, partition moves, burst reservations, aged
  flits, allocation stalls).

## Where this RTL departs from, or fills in, the published design

Taken from the design: the victim/prefetch split of the LLC at way
granularity, moving the LRU way of one part, the CPA steps with a 10 %
threshold and a 1M-cycle period, prefetch of the next four blocks as one
burst, burst priority, switch reservation for whole bursts, the two-level
ageing rule, the VC state register, the 3-stage router, 4x4 mesh, 128-bit
links, DOR routing, 128 KB 8-way slices with 64-byte blocks.

Chosen here because the design does not specify them:

* the miss-rate definition per part and the sign convention of the CPA test
  (victim part shrinks when its miss rate is higher);
* two VCs, one per message class, with static VC assignment; 4-flit buffers;
  credit flow control; `AGE_TH` = 16;
* separable round-robin switch allocation;
* the message set, header layout and page-interleaved home tiles; the home
  reads memory itself; at most one prefetch outstanding per tile;
* demand blocks are not kept in the slice (the slice acts as victim cache and
  prefetch buffer only); dirty blocks displaced from the slice are written
  back;
* a block whose way changes part stays valid.

Not modelled: the cores, private L1 caches and the MOESI directory. Without
a directory nothing keeps copies coherent; in particular a prefetch reply
that arrives after the same block was written back from this tile can bring
back stale data. The testbenches keep each core on its own addresses.

## Verification

Every module has a self-checking testbench that prints
`TB_RESULT checks=N failures=M`:

| testbench | what it checks |
|---|---|
| `cpa_ctrl_tb` | each period's decision, direction and capacity against a reference computed from the same counts, including the exact 10 % case and both floors; decisions only at period ends |
| `stlac_cache_tb` | 4,000 random lookups, inserts, fills and walks against a reference model with time-stamp LRU: hit/miss, part, data, every displaced dirty block, walk length |
| `burst_router_tb` | 3-cycle head latency, DOR output, order and completeness of 340 mixed packets, no foreign flit inside a burst, ageing under back-to-back bursts |
| `noc_mesh_tb` | 600 random PS and burst packets between all tiles, burst continuity at ejection, corner-to-corner latency 3 cycles per router |
| `stlac_node_tb` | one tile with its port looped back: miss latency above 150 cycles, prefetched blocks hitting within 2 cycles, victim hits, write-back and re-read, page-end clipping, both partition moves |
| `stlac_top_tb` | 16 cores at once with streams, reuse and forced write-backs across the mesh (shortened CPA period); every returned block compared; counts that each mechanism happened |
| `stlac_top_full_tb` | the top at its default parameters: one round of miss, burst prefetch, prefetch hits, victim hit and write-back per tile |

Run one with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/stlac_pkg.sv \
    tb/stlac_top_tb.sv --top-module stlac_top_tb -o sim
./obj_dir/sim
```

The `-I` paths let Verilator find the other modules by file name. The
testbenches use `$urandom` only and initialise everything they read.

## Changing it

* Slice size, ways, CPA period and threshold, prefetch length and `AGE_TH`
  are parameters of `stlac_top`.
* Mesh size, link width, VC count/depth, block size and the home mapping are
  in `stlac_pkg`. `COORD_W`, `NODE_W`, `PAGE_BLK_BITS` and the header must be
  kept consistent with `MESH_X`/`MESH_Y`; the round-robin helper handles up to
  16 requesters.
* The prefetch reply buffer in the home engine holds `PREF_N` blocks; `LEN_W`
  limits `PREF_N` to 15.
