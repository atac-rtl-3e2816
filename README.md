# ATAC: on-chip network and coherence fabric in SystemVerilog

This is a SystemVerilog model of the communication side of ATAC, a 1024-core tiled processor.
ATAC pairs an electrical mesh inside each cluster of 16 tiles with an optical broadcast
network between the clusters. On top of that network it runs the ACKwise limited-directory
coherence protocol. The RTL covers:

- the networks: ENet, Hub, ONet and BNet;
- the tile network interface;
- the distributed directory;
- the per-cluster memory controllers;
- the assembly of tiles, clusters and the chip.

The processor cores, their caches and the external DRAM are not included. The testbenches
model them.

## Organisation

| File | What it is |
|---|---|
| `rtl/atac_pkg.sv` | Flit, message and coherence-payload types. Core id = cluster (6 bits) + tile (4 bits). |
| `rtl/sync_fifo.sv`, `rtl/rr_arb.sv` | Generic FIFO and round-robin arbiter. |
| `rtl/emesh_router.sv` | ENet router: 5 inputs, 6 outputs (the extra output goes to the Hub), XY routing, 2 cycles per hop (router + link). |
| `rtl/onet.sv` | Behavioural model of the optical ONet. Each Hub owns a wavelength; every flit reaches every Hub 3 cycles later. A one-bit-per-Hub flow-control waveguide is modelled the same way. |
| `rtl/bnet.sv` | One BNet: a C/2 x 1 arbiter over the sender FIFOs it serves, plus a broadcast tree to all 16 tiles. |
| `rtl/hub.sv` | Cluster Hub. It sends from the two Hub-attached routers onto the ONet and keeps one receive FIFO per sending Hub. Even senders are served by BNet 0, odd senders by BNet 1. It drives flow control. |
| `rtl/tile_ni.sv` | Tile network interface. It merges the core, the directory and the memory controller onto the router. It drops BNet flits not addressed to the tile and hands messages to the right agent. |
| `rtl/ackwise_dir.sv` | One slice of the ACKwise_4 directory and its controller. |
| `rtl/mem_ctrl.sv` | Memory controller. It turns memory reads and write-backs into transactions on a memory bus; read data goes straight to the requester. |
| `rtl/atac_tile.sv` | A tile: router, interface, directory slice with its request queue, and (in tile 0) the memory controller. |
| `rtl/atac_cluster.sv` | 4x4 mesh of tiles, the Hub and two BNets. Tiles 5 and 10 are the Hub routers. |
| `rtl/atac_top.sv` | The chip: `NCL` clusters (default 64, so 1024 tiles) joined by the ONet. |

Each file opens with a comment that describes:

- its function, interface and timing;
- which parts follow the original architecture description and which are choices of this design.

## Behaviour in brief

**ENet.** Packets inside a cluster use dimension-order routing (X first, then Y). Each hop
takes 2 cycles. Measured end to end between cores: 1 hop = 4 cycles, 2 hops = 6 cycles,
5 hops = 12 cycles.

**Traffic that leaves a cluster.** A packet for another cluster, and every broadcast, takes
this path:

1. It goes to the Hub router of the sender's half of the mesh.
2. The Hub puts it on the cluster's own ONet wavelength.
3. Every Hub sees it 3 cycles later and keeps it if it is a broadcast or addressed to one of
   its cores.
4. The receiving Hub forwards it over a BNet to all tiles of its cluster. The tile interfaces
   filter it.

A packet to a core in another cluster takes 12 cycles on an idle chip.

**Flow control.** A Hub raises its flow-control bit while any of its sender FIFOs is within
`FC_MARGIN` flits of full. Senders pause while the destination Hub's bit is raised, or any
Hub's bit for a broadcast. The Hub asserts that its receive FIFOs never overflow.

**Directory (ACKwise_k, k = 4).** Each entry holds:

- the MOESI state;
- a global bit G;
- k sharer fields.

While G is clear, the fields list the sharers. Once a fifth sharer arrives, G is set and the
last field counts all sharers. An exclusive request then sends one broadcast invalidation to
the whole chip. Only real sharers answer it, and the directory waits for exactly as many
acknowledgements as the count says.

The directory also handles:

- forwards to a known sharer;
- upgrades, which get a grant with no data;
- recalls when a set is needed for another line;
- nacked forwards that cross an eviction, in which case the line comes from memory;
- evictions that cross a broadcast, which lower the number of acknowledgements awaited.

## Choices where the description is silent or was changed

- **Who acknowledges the home.** The requester acknowledges the home once the line has
  arrived. In the original, the memory controller or the supplying sharer acknowledges. The
  change keeps the home from forwarding or invalidating a line that is still in flight to the
  requester.
- **Upgrades while G is set.** An upgrade request while G is set is served with data, because
  the directory cannot confirm that the requester still holds a copy.
- **Request queue and retry.** Each tile queues directory requests (`REQ_DEPTH` = 16). A
  request that arrives at a full queue is dropped, and the requester is later sent a retry (a
  grant with the nack bit set). Acknowledgements and evictions bypass the queue. The tile
  therefore never blocks the mesh while its directory waits for answers. Without this, the
  full chip deadlocked under load.
- **BNet latency.** The BNet takes 2 cycles from a Hub FIFO to the tiles: an arbiter register
  and a tree register. The original gives one cycle for the tree alone. The BNet advances only
  when every tile has buffer space.
- **Sizes not given in the description.** FIFO depths, the directory cache size
  (`SETS` = 256 entries per tile, direct mapped), the 16-byte line, the address split and the
  message encoding are this design's choices.
- **Memory controller placement.** Tile 0 of each cluster holds the memory controller in place
  of a core, so the full chip has 1008 cores and 64 controllers.

## Not implemented

- **Cores and caches.** Only the network port of each core is brought out. The cache side of
  the protocol exists only as a testbench model.
- **Optical devices.** The laser, ring modulators, photodetectors and waveguides are analog
  parts. `onet.sv` models only their logical function: one wavelength per Hub, broadcast to
  all, fixed latency.
- **External DRAM.** It sits behind each controller's memory bus and is modelled in the
  testbenches. The 5 GB/s per controller that the target system assumes is a property of that
  memory. The controller does not enforce it; it handles one request at a time at whatever rate
  the bus answers.
- **The 64-core ANet configuration.** This configuration has no BNet and a 64-bit ONet. The
  design can be built with fewer clusters (`NCL`), but it keeps the 1024-core structure.

## Verification

Every block has a self-checking testbench in `tb/` that prints a `TB_RESULT` line with its
check and failure counts.

- **Latency checks.** The testbenches check the cycle counts the description gives: 2 cycles
  per ENet hop, 3 cycles across the ONet, the BNet delay and the router pass-through.
- **End-to-end test.** `tb_atac_top` runs three phases:
  1. A latency phase.
  2. A randomised coherence phase. Every core reads, writes and evicts shared lines while the
     testbench checks every protocol reply.
  3. A flow-control phase that fills one cluster's Hub buffers from all other clusters.

  It counts every mechanism and fails if any of them never happened. The mechanisms are: ENet
  hops, ONet unicasts and broadcasts, both BNets, flow-control stalls, memory reads and
  write-backs, forwards, unicast and broadcast invalidations, the global bit, recalls, nacks
  and upgrades.
- **Simulated sizes.**
  - `tb_atac_top` was simulated with 4 clusters (64 tiles, 60 cores).
  - `tb_atac_cluster` was simulated with 2 clusters.
  - The full 64-cluster chip (1024 tiles) was not simulated to completion. **Only the RTL
    was checked at full size.**

## Simulating

Each testbench builds with plain Verilator 5. For example:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps --top-module tb_atac_top -y rtl -y tb +libext+.sv \
  rtl/atac_pkg.sv tb/tb_atac_top.sv
./obj_dir/Vtb_atac_top
```

It prints `TB_RESULT checks=N failures=0` on success. To run another size of the end-to-end
test, add `-GNCL=<clusters>`. The other testbenches build the same way with their own top
module.
