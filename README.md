# On-chip networks for a manycore chip: PROM routing, bandwidth-adaptive links and deadlock-free thread migration

This RTL implements three ideas for mesh on-chip networks. It also implements the network half of a 110-tile chip that moves running threads between cores.

- **PROM routing.** PROM stands for path-based, randomized, oblivious, minimal. A packet takes a random minimal path through the mesh rather than the single path of dimension-order routing. That spreads load over more links. Each router makes the random choice from local information only. Deadlock freedom costs only two virtual-channel sets.
- **BAN links.** BAN stands for bandwidth-adaptive network. Two neighbouring nodes share a bundle of links whose direction can change every cycle. An arbiter splits the links between the two directions in proportion to how much traffic each side has waiting.
- **ENC migration.** ENC stands for Exclusive Native Context. It is a thread-migration protocol that cannot deadlock. Every core keeps one context slot that only its own "native" thread may use. Threads pushed out of a core always go home on their own network, so an arriving thread can always eventually be taken off the network.
- **The EM2 interconnect.** An 11 x 10 array of tiles. Each tile has six separate single-VC mesh networks with dimension-order routing and one cycle per hop. ENC runs on the migration and eviction networks. Each tile has a negative-edge retiming stage on every signal that leaves it, and the chip has a clock-source selector.

In `onchip_top` the three network designs sit side by side with separate ports. They are independent circuits that share nothing but a package of types.

## Flits, coordinates and ports

`rtl/noc_pkg.sv` defines the shared types.

- **Flit.** A flit is a packed struct with these fields:
  - `head` and `tail` bits
  - a 3-bit `vc` field
  - 4-bit destination `dx`, `dy` and source `sx`, `sy`
  - a 32-bit payload
- **Source fields.** Every flit of a packet carries the routing fields, not just the head. In the EM2 migration and eviction networks, the source fields name the thread's native core.
- **Coordinates.** x grows east and y grows north. Node n of a mesh is `y*W + x`.
- **Router ports.** Port 0 is local, then 1 north, 2 east, 3 south, 4 west.
- **EM2 tile links.** These are indexed 0 N, 1 E, 2 S, 3 W.

All networks use credit flow control. A sender holds one credit per free buffer slot of each downstream VC. The receiver returns a credit (valid and VC number) in the cycle it removes a flit.

## The virtual-channel router (`vc_router`)

Both meshes use the same input-buffered router. Each input port has `NVC` first-word-fall-through FIFOs of `DEPTH` flits. The four classic stages all happen in the cycle a flit is at the front of its FIFO:

1. **Route computation.** `prom_route` computes the route for a head flit. The result is latched for the rest of the packet and freed by the tail.
2. **VC allocation.** There is one round-robin arbiter per output. A head that has no output VC yet competes for an output that has a free VC inside the head's allowed VC mask. The winner gets the lowest-numbered free VC.
3. **Switch allocation.** This is separable, input first: a round robin over VCs at each input, then a round robin over inputs at each output. A VC with no credits does not request.
4. **Switch traversal.** This is combinational. The outgoing flit's `vc` field is rewritten to the allocated output VC. The flit is written into the next router's FIFO at the clock edge.

A flit therefore moves one hop per cycle with no contention. A lone packet crossing h hops ejects its head h + 1 cycles after it is injected, and the mesh testbench checks exactly that. A tail flit releases the output VC and the latched route. Assertions check that no flit is sent without a credit and that no FIFO overflows.

## PROM routing (`prom_route`)

At each hop a packet may move in X or in Y towards its destination, as long as the move stays on a minimal path. The router picks X with probability `wx / (wx + wy)`. The weights depend on the remaining distances `x`, `y`, the port the packet arrived on, and a parameter `f`:

| packet is ... | wx | wy |
|---|---|---|
| at its source | x + f | y + f |
| arriving on an X (east/west) port | x + f | y |
| arriving on a Y (north/south) port | x | y + f |

A larger `f` favours going straight and so makes fewer turns.

- **PROM_UNIFORM** uses f = 0.
- **PROM_FIXED** uses the parameter `F`.
- **PROM_V** (variable parametrized PROM, the default) uses f = FMAX·Δx·Δy/N. Here Δx, Δy are the full source-to-destination distances and N is the node count. Long, diagonal packets are thus pushed towards few turns. The hardware multiplies both weights by N so that everything stays integer.
- **PROM_O1TURN** chooses XY or YX at the source with one random bit and then goes straight.
- **RT_DOR_XY / RT_DOR_YX** give the plain dimension-order routes.

**The random draw.** The top 16 bits of a per-router 32-bit LFSR (`prng`) are used, rotated differently for every input VC. The router takes X when `(rnd·total) >> 16 < wx`, so the probabilities are exact to 1/65536. The LFSR is seeded from the router's coordinates at reset.

**VC sets.** Deadlock freedom comes from splitting the VCs into two halves. Eastbound packets use the low half and westbound packets the high half.

- On a horizontal link either half is allowed.
- On a vertical link:
  - A packet that just came from the west must use the low half, and one from the east the high half.
  - A packet that came from north or south keeps the half it arrived in.
  - At the source, the half is set by the destination's side. When source and destination share a column, it is chosen at random.

This is returned as `vc_mask` and obeyed by VC allocation.

`noc_mesh` tiles W x H of these routers. Its defaults are 8 x 8 nodes, 8 VCs, 8-flit buffers, PROMV with FMAX = 1024.

## Bandwidth-adaptive links (`ban_link`, `ban_arbiter`)

Two nodes A and B share `NLINK` bidirectional links. Each node has `NVC` egress VC queues and `NVC` receive VCs.

- **Pressure.** A head flit is *eligible* if the receive VC named in its `vc` field has space at the other node. A node's pressure is its number of eligible heads.
- **The arbiter.** It receives pressures `pa` and `pb` and sets the number of links pointing A→B to the count of thresholds t = 1..NLINK that satisfy `(2t−1)(pa+pb) ≤ 2·NLINK·pa`. That is the pressure ratio rounded to whole links, computed with comparators only. The result is adjusted in three cases:
  - If one side has no pressure, the other side gets every link.
  - If both sides have pressure, each keeps at least one link. For example, 4 links with pressures 8 and 1 split 3/1.
  - If neither side has pressure, the split is kept.

  The result is registered and may change every `PERIOD` cycles (every cycle by default). Link l points A→B when l is below the count.
- **Using the links.** In the next cycle, each node puts its eligible heads on the links it owns, one head per VC, in round-robin order over VCs. The receiving side demultiplexes each link by the flit's `vc` field into the matching receive VC. The bidirectional wires are modelled as a multiplexer per link, selected by its direction bit.

Only this two-node bundle is built, not a full mesh of BAN routers.

## EM2 interconnect and ENC (`em2_chip`, `em2_tile`, `enc_ctrl`)

### Six networks

Each tile has six `vc_router`s with one VC each, DOR-YX routing and 4-flit input buffers. The networks are:

| network | carries |
|---|---|
| 0 | migrating thread contexts |
| 1 | evicted thread contexts (always travelling to their native core) |
| 2, 3 | remote-access request and reply |
| 4, 5 | memory request and reply |

Networks 2–5 have their local ports on the tile boundary (`net_*`, index 0..3). The ENC controller owns the local ports of networks 0 and 1.

Every flit and credit leaving a tile passes through `negedge_retimer`, a flip-flop clocked on the falling edge. Neighbouring tiles sit far apart on the clock tree. If the sending tile's clock edge arrives early, its new data could overtake the receiver's capture: a hold violation, which no frequency change can repair. Holding the data for half a cycle in the falling-edge flop removes that risk. A hop still takes one cycle.

### Context slots

Slot 0 of every tile is the **native** slot and may only hold the tile's own thread. Slots 1..NGUEST (one by default) are **guest** slots. At reset each tile's native thread is in its native slot.

A context is `CTX_FLITS` 32-bit words, sent as a packet of that many flits. The flits carry the thread's native coordinates in their source fields. The core side of each slot consists of these ports:

- `slot_valid`, `slot_nx`, `slot_ny`, `slot_ctx`: the slot's thread and its native coordinates
- `core_wr` / `core_wr_ctx`: the core updates the context
- `core_progress`: the thread has executed an instruction
- `core_mig_req` / `core_mig_dx` / `core_mig_dy`: the thread asks to go to another tile

### Decisions each cycle

Arriving contexts are assembled in one whole-context buffer per network, then handled in this order:

1. **Native return.** If the native slot is free and a native thread has fully arrived (on the eviction network, or the migration network), it is loaded.
2. **Guest arrival.** A complete non-native context from the migration network is handled in one of three ways:
   - **(a)** If a guest slot is free, the context is moved into it.
   - **(b)** If all guest slots are full, one guest that has made progress since it arrived, or wants to leave, is **evicted**. It is copied to the eviction network's outgoing buffer, and the arrival is loaded in the next cycles.
   - If no guest qualifies, the arrival is **blocked** and waits in the network.
3. **Migration.** Otherwise a thread that wants to migrate is copied into the migration network's outgoing buffer, provided that buffer is empty.

**The whole-context rule.** The outgoing buffers each hold exactly one context. A new context is accepted only when the buffer has fully drained into the network. As a result, a half-sent context can never sit in front of an arriving one. Together with the separate eviction network and the reserved native slot, this is what keeps migration deadlock-free.

The controller pulses `evt_load_native`, `evt_load_guest`, `evt_evict`, `evt_migrate` and `evt_blocked` for counting.

### Clock selection

`em2_clock_sel` selects the single-ended external clock (`sel` = 0), the differential external clock (1) or the PLL clock (2, 3). The select is registered on the falling edge of the output, so a change never shortens a high phase of the old clock. The first high phase of the new clock may be short: the block does not synchronise into each source domain.

## Top level (`onchip_top`)

`onchip_top` has no parameters. The EM2 part brings out:

- the clock inputs, select and selected clock
- its own reset
- per-tile context, migration, event and network ports (arrays indexed by tile `y*11 + x`)

The PROM mesh brings out its 64 injection and ejection ports. The BAN bundle brings out both nodes' queue interfaces, the link directions, the A→B link count and the two pressures. PROM and BAN run on `clk` and `rst_n`.

## Parameters

| module | parameter | default | origin |
|---|---|---|---|
| noc_mesh | MESH_W x MESH_H | 8 x 8 | evaluated configuration |
| noc_mesh / vc_router | NVC, DEPTH | 8, 8 | evaluated configuration |
| prom_route | FMAX | 1024 | evaluated configuration |
| prom_route | F (fixed-f mode) | 1 | own choice |
| ban_link | NLINK, NVC | 4, 4 | evaluated configuration ((u,b) = (0,4)) |
| ban_arbiter | PERIOD | 1 | switching every cycle is the default studied |
| em2_chip | TILES_X x TILES_Y | 11 x 10 | the 110-tile chip |
| em2_chip / em2_tile | DEPTH | 4 | own choice |
| em2_chip / enc_ctrl | CTX_FLITS | 4 | the 4-flit context of the migration studies |
| enc_ctrl | NGUEST | 1 | two contexts per core, one native |

## Where this RTL departs from the original design

- **BAN.** Only a two-node link bundle exists. There is no BAN mesh and no output multiplexing of VCs onto links.
- **EM2 tile contents.** The core, the two caches, the migration predictor, the memory-controller logic, the PLL, the differential clock receiver and the pads are not included. Their interfaces to the network appear as ports.
- **EM2 networks.** The mapping of the three traffic types onto six networks is this design's choice. So are Y-first routing, the 4-flit buffers and using separate physical networks (rather than VC sets) for migrating and evicted contexts.
- **VC allocation.** Only the dynamic scheme is built. The exclusive dynamic variant used in some comparisons is not.
- **PROM probabilities.** These are quantised to 1/65536. The random source is an LFSR.
- **O1TURN mode.** It reuses PROM's east/west VC sets. The original O1TURN instead separates XY and YX traffic into different VC sets. O1TURN is only a comparison point here.
- **Coin-toss PROM.** The fair-coin-per-hop variant of PROM is not built. Uniform PROM (f = 0), fixed-f PROM and PROMV are.
- **The router.** It is a single-cycle design: all allocation happens in one cycle. A real implementation at speed would likely pipeline it.

## Simulation

Every testbench in `tb/` is self-checking and prints `TB_RESULT checks=N failures=M`. Build any of them with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/noc_pkg.sv tb/tb_noc_mesh.sv \
          --top-module tb_noc_mesh -Mdir obj_noc
./obj_noc/Vtb_noc_mesh +verilator+rand+reset+2
```

| testbench | what it checks |
|---|---|
| tb_prom_route | DOR exhaustively; minimality; exact X/Y probabilities over all 65536 random values for each mode; O1TURN; VC-set rules |
| tb_noc_mesh | 4x4 PROMV mesh: lone-packet latency of hops + 1 cycles; five traffic patterns delivered whole and in order; path diversity |
| tb_ban_arbiter | split against a reference model for random pressures; every-PERIOD updates |
| tb_ban_link | one-way traffic gets all four links (four flits per cycle); two-way traffic keeps one link per waiting side; every flit delivered in order |
| tb_enc_ctrl | guest load, blocked arrival then eviction, whole-context migration with credits, native return |
| tb_em2_chip | 3x3 chip with behavioural cores: random migration, then every thread in exactly one slot with its load count intact; all network packets delivered; each ENC event seen |
| tb_prng, tb_negedge_retimer, tb_em2_clock_sel | LFSR sequence; falling-edge capture; clock periods after each switch and no shortened high phase |
| tb_onchip_top | the full-size design with no parameter changes: 110-tile migration with remote-access and memory traffic, clock switch, PROM transpose and bit-complement on 8x8, BAN one-way and two-way traffic. Counts each mechanism and fails if one never occurs |

`tb_em2_core_model` is a behavioural stand-in for the two-context core. It stamps a thread number and a load counter into each context. It runs the thread for a random time and then asks to migrate to a random tile. The full-size testbench takes about ten minutes to build with Verilator using eight compile jobs (longer with fewer) and a few seconds to run. The largest design simulated is therefore the full default size.
