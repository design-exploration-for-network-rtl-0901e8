# Codec: sharing one router port among several FPGA tiles

A network on chip for an FPGA does not have to give every logic tile its own router.
A router port can carry one flit per cycle, and a single tile rarely needs that much.
So a small block called a **Codec** sits between a group of tiles and one router port:

- it merges the tiles' outgoing traffic onto the port, one flit per cycle;
- it spreads incoming traffic back to the right tile.

With four tiles per Codec, a network of 4 routers serves 16 tiles, and one of 32 routers serves 128.
Without Codecs the routers would need many more ports, or there would have to be many more routers.
Routers are the expensive part of a network, so concentrating tiles this way saves area.

This repository holds synthesizable SystemVerilog for:

- the Codec and the small router it plugs into;
- a 2D network: a 2x2 mesh with 16 tiles by default;
- a 3D network: stacked tiers of rings or full meshes, 8 tiers x 4 routers x 4 tiles = 128 tiles by default;
- a top module, `codec_noc_top`, that holds both networks side by side.

Each network also has self-checking testbenches and a behavioural traffic model of the tiles.

## Packets and handshakes

Every packet is a single flit (`noc_pkg::flit_t`, 42 bits):

| field      | bits | meaning                                        |
|------------|------|------------------------------------------------|
| `dst_node` | 6    | destination endpoint, i.e. which Codec         |
| `dst_tile` | 4    | tile inside that Codec                         |
| `data`     | 32   | payload                                        |

Field widths:

- 6 bits address up to 64 Codecs.
- 4 bits address up to 16 tiles per Codec, the largest Codec size considered.

How links behave:

- Every link is a `valid`/`ready`/`flit` channel. A flit moves on a clock edge where both `valid` and `ready` are high.
- A sender keeps `valid` and the flit stable until the flit is taken. Assertions check this rule.
- `ready` on a queue input means "not full". It does not depend on `valid`.

Reset is synchronous and active low (`rst_n`, and `tile_rst_n` for the tile clock).

## The Codec (`codec`, `codec_tx`, `codec_rx`)

The Codec has two independent halves.

**Send side (`codec_tx`):**

- A round-robin arbiter (`rr_arbiter`) picks one requesting tile per cycle.
- The chosen flit is copied into an output register that drives the router port.
- A new flit is loaded whenever the register is empty or is being emptied in the same cycle. Back-to-back flits from different tiles therefore go out on consecutive cycles, and the port never idles while a tile is waiting.
- A tile's `ready` is high only in the cycle its flit is loaded. Other tiles wait, which is the "tile send stall".
- The round-robin pointer moves only when a flit is loaded. With all tiles busy, each tile gets exactly one flit in every TPC cycles.

**Receive side (`codec_rx`):**

- A queue (`flit_fifo`, default 4 flits) takes flits from the router.
- The head flit is offered to the tile named by its `dst_tile` field. It leaves the queue when that tile accepts it.
- If the tile holds `ready` low, the queue fills and the Codec stops accepting from the router. That backpressure then spreads back through the network.
- A flit whose `dst_tile` is beyond the Codec's tile count is dropped so that it cannot block the queue.

**Timing with the tiles on the router clock:**

- A flit accepted from a tile at edge *t* leaves the Codec register on the following cycle.
- With one cycle per router and one cycle in the receive queue, a tile on the same router sees it valid 3 cycles after it was offered.
- Each router-to-router hop adds 1 cycle.
- The testbenches check this `3 + hops` latency exactly on an idle network.

### Tiles on their own clock (`TILE_CDC`, `async_fifo`)

The 3D networks run the routers at a fast clock and the tile interfaces at a slower one: 200 MHz against 50 MHz. This ratio is also why four tiles per Codec is the natural size: four tiles at a quarter of the router rate fill one router port exactly.

With `TILE_CDC = 1`, every tile channel crosses clocks inside the Codec:

- each tile channel, in each direction, goes through an `async_fifo`;
- the FIFO has Gray-coded pointers and two-flop synchronizers, and holds 4 entries;
- the Codec's arbiter, output register and receive queue stay on the router clock `clk`;
- the tiles use `tile_clk`.

When the tile clock is a quarter of the router clock, four tiles sending continuously never stall each other. `tb_codec` checks that no tile waits.

The crossing is on by default in the 3D network and off in the 2D network, where the tiles share the router clock. Both resets must be asserted together for at least two cycles of the slower clock. The tile-side latency then becomes a few tile-clock cycles, depending on the clock phase.

## The router (`noc_router`)

The router is deliberately simple, because the subject here is the Codec and the way tiles attach to the network:

- **Ports and inputs:** the router has `NPORTS` ports. Each input has a 4-flit queue.
- **Routing:** a routing table parameter `ROUTE` maps each destination endpoint to an output port. The networks compute this table at elaboration.
- **Outputs:** each output has its own round-robin arbiter over the inputs that want it, and a crossbar multiplexer.
- **Forwarding:** an input's head flit leaves when its output grants it and the next stage is ready. A router adds one cycle per hop.
- **Flow control:** there are no virtual channels. Flow control is per link, through `ready`.

## 2D network B (`noc2d_mesh_codec`)

This network has four routers in a 2x2 mesh:

- Router `r` sits at column `r%2` and row `r/2`. Its X neighbour is `r^1` and its Y neighbour is `r^2`.
- Each router has `CPR` Codec ports plus one X port and one Y port. With the main configuration of one Codec per router, that is 3 ports.
- Each Codec serves `TPC` tiles.
- Numbering: Codec `c` of router `r` is endpoint `r*CPR+c`. Tile `k` of that Codec is tile `(r*CPR+c)*TPC+k`.

Routing is dimension-ordered: X first, then Y.

The same module builds the other ways of attaching 16, 32 or 64 tiles to these four routers:

- 1 Codec x 16 tiles;
- 2 Codecs x 8 tiles;
- 4 Codecs x 4 tiles;
- and so on, by setting `CPR` and `TPC`.

An elaboration check rejects sizes that do not fit the packet fields.

## 3D network (`noc3d_codec`)

This is the hardest part to picture:

- **Tiers:** there are `TIERS` tiers.
- **Planar links:** within a tier, `RPT` routers are joined either in a ring (`TOPO_RING`) or in a full mesh (`TOPO_FULL_MESH`).
- **Vertical links:** router `p` of each tier connects to router `p` of the tier above and the tier below.
- **Codecs:** every router has one Codec of `TPC` tiles.
- **Numbering:** router (tier `z`, position `p`) is endpoint `z*RPT+p`.

Port map of each router:

| port        | ring (RPT>2) | full mesh              |
|-------------|--------------|------------------------|
| 0           | Codec        | Codec                  |
| 1           | next router  | first other router     |
| 2           | previous     | second other router... |
| NPL+1       | down         | down                   |
| NPL+2       | up           | up                     |

Notes on the port map:

- NPL is the number of planar links.
- A two-router ring uses a single planar link.
- A one-router tier has no planar link.
- The bottom tier's down port and the top tier's up port are left unconnected: their input is never valid and their output is never ready. This way every router in the network has the same port count.

**Routing:**

- A packet first moves within its tier to the router at the destination's position.
  - On a ring it takes the shorter way round, choosing forward on a tie.
  - On a full mesh it takes the direct link.
- Then it goes straight up or down to the destination tier.
- The route is written into each router's table at elaboration by `route_table()`.

**Deadlock.** The rings have single-flit packets, no virtual channels and no escape path. Under sustained heavy load every queue around a ring can fill at once, and the ring then stops. The network testbenches inject at 15% per tile, which stays clear of this. At 40% per tile the 128-tile network was seen to lock up. A production design would need virtual channels or a dateline on each ring.

## Top module (`codec_noc_top`)

The top places the two designs side by side, each with its own tile ports:

- the 2D network B at 1 Codec per router and 4 tiles per Codec, with tiles on `clk`;
- the 8-tier, 4-router ring network at 4 tiles per Codec, with tiles on `tile_clk`.

## Testbenches

Every block has a testbench `tb/tb_<block>.sv`. Each one prints `TB_RESULT checks=N failures=M` and has a watchdog.

`tile_traffic.sv` is a behavioural model of a set of tiles:

- it sends random single-flit packets at a set load;
- it holds `ready` low at random;
- it keeps a scoreboard. Each payload carries its source, a sequence number and a hash, so loss, duplication, corruption, reordering per source and misdelivery are all detected;
- it measures latency.

The end-to-end test `tb_codec_noc_top` runs the top at its default sizes. It counts each mechanism and fails any that never occurs:

- Codec combining;
- tile send stalls;
- receive backpressure;
- same-router delivery;
- X, Y and XY routes;
- tier crossings;
- forward and backward ring traffic.

To run it with plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/noc_pkg.sv tb/tb_codec_noc_top.sv --top-module tb_codec_noc_top
./obj_dir/Vtb_codec_noc_top
```

Replace the testbench name to run any of the others.

## Where this design departs from the reference design

- **Router:**
  - The reference work uses a configurable, third-party virtual-channel router, modelled with service times of several cycles per packet.
  - Here the router is a minimal input-queued router with one cycle per hop. Absolute latencies are therefore lower, but the relative behaviour of the Codec configurations is the same.
- **Packets:** packets are single flits and there are no virtual channels.
- **Tiles:** the FPGA tiles themselves are not modelled as logic. Their ports are brought out, and the testbenches drive them with the traffic model.
- **Routing and numbering:** XY routing in 2D, planar-then-vertical routing in 3D, and the port numbering are choices of this design.
- **Clocks:** the 2D network runs its tiles on the router clock by default. Set `TILE_CDC = 1` to give them their own clock as in 3D.
- **Size limits:** the packet fields limit a network to 64 Codecs and 16 tiles per Codec. Within those limits every configuration studied can be built by setting parameters; the defaults build the main ones.
- **Deadlock:** ring deadlock under saturation is not prevented (see above).
