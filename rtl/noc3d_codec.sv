// noc3d_codec: three-dimensional network of routers with one Codec per router.
//
// TIERS tiers are stacked; each tier holds RPT routers joined in a ring or a full
// mesh (TOPO), and router p of a tier is linked vertically to router p of the
// tiers above and below. Every router has one Codec of TPC tiles, so a tier has
// RPT*TPC tiles and the network TIERS*RPT*TPC; the defaults (eight tiers, four
// routers per ring, four tiles per Codec) give the largest ring network evaluated,
// 16 tiles per tier and 128 tiles. Router (tier z, position p) is endpoint
// z*RPT+p, and its tiles are endpoint*TPC .. endpoint*TPC+TPC-1.
//
// Router port map: 0 Codec; 1..NPL planar links; NPL+1 down; NPL+2 up. In a ring
// port 1 goes to the next router (p+1) and port 2 to the previous one (two routers
// share a single link on port 1); in a full mesh port 1+j goes to the j-th other
// router of the tier. The down port of the bottom tier and the up port of the top
// tier are left idle, so every router has the same port count.
//
// Routing: inside the source tier first, to the router at the destination's
// position (a ring takes the shorter way round, the forward way on a tie; a full
// mesh takes the direct link), then straight up or down to the destination tier.
// With single-flit packets and no virtual channels the rings can, under heavy
// enough load, fill all their queues in a cycle and stall; the design has no
// deadlock avoidance.
//
// Interface and timing as in noc2d_mesh_codec: per tile a tx_* and an rx_*
// valid/ready/flit channel, one cycle per router hop.
//
// Tiers, ring and full-mesh planar topologies, one Codec per router and four tiles
// per Codec follow the document; the routing, the port numbering and the idle edge
// ports are this design's choices.
module noc3d_codec
  import noc_pkg::*;
#(
  parameter int unsigned TIERS = 8,
  parameter int unsigned RPT   = 4,          // routers per tier
  parameter topo_e       TOPO  = TOPO_RING,  // planar topology of a tier
  parameter int unsigned TPC   = 4,          // tiles per Codec
  parameter int unsigned DEPTH = 4,
  parameter bit          TILE_CDC = 1'b1,  // tiles on their own clock (tile_clk)
  localparam int unsigned NR   = TIERS * RPT,
  localparam int unsigned NT   = NR * TPC
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          tile_clk,
  input  logic          tile_rst_n,
  input  logic [NT-1:0] tx_valid,
  output logic [NT-1:0] tx_ready,
  input  flit_t         tx_flit [NT],
  output logic [NT-1:0] rx_valid,
  input  logic [NT-1:0] rx_ready,
  output flit_t         rx_flit [NT]
);

  localparam int unsigned NPL   = (RPT == 1) ? 0 :
                                  (TOPO == TOPO_FULL_MESH) ? RPT - 1 :
                                  (RPT == 2) ? 1 : 2;
  localparam int unsigned PDOWN = NPL + 1;
  localparam int unsigned PUP   = NPL + 2;
  localparam int unsigned NP    = NPL + 3;

  if (NR > 2**NODE_W || TPC > 2**TILE_W || NP > 2**PORT_W) begin : g_size_check
    $error("noc3d_codec: network too large for the flit header");
  end

  // Planar port of router position p that leads towards position q (q != p).
  function automatic int unsigned planar_port(input int unsigned p, input int unsigned q);
    int unsigned fwd;
    if (TOPO == TOPO_FULL_MESH) return 1 + ((q < p) ? q : q - 1);
    if (RPT == 2) return 1;
    fwd = (q + RPT - p) % RPT;
    return (fwd <= RPT / 2) ? 1 : 2;
  endfunction

  function automatic logic [NR-1:0][PORT_W-1:0] route_table(input int unsigned r);
    logic [NR-1:0][PORT_W-1:0] t;
    int unsigned z, p, zd, pd;
    z = r / RPT;
    p = r % RPT;
    for (int unsigned d = 0; d < NR; d++) begin
      zd = d / RPT;
      pd = d % RPT;
      if (pd != p)      t[d] = PORT_W'(planar_port(p, pd));
      else if (zd > z)  t[d] = PORT_W'(PUP);
      else if (zd < z)  t[d] = PORT_W'(PDOWN);
      else              t[d] = '0;
    end
    return t;
  endfunction

  // Neighbour of router r on port pp: returns router*NP + port, or -1 if idle.
  function automatic int nbr(input int unsigned r, input int unsigned pp);
    int unsigned z, p, q;
    z = r / RPT;
    p = r % RPT;
    if (pp == PDOWN) return (z == 0)         ? -1 : int'(((z - 1) * RPT + p) * NP + PUP);
    if (pp == PUP)   return (z == TIERS - 1) ? -1 : int'(((z + 1) * RPT + p) * NP + PDOWN);
    if (TOPO == TOPO_FULL_MESH) begin
      q = pp - 1;
      if (q >= p) q = q + 1;
      return int'((z * RPT + q) * NP + planar_port(q, p));
    end
    if (RPT == 2) return int'((z * RPT + (1 - p)) * NP + 1);
    if (pp == 1)  return int'((z * RPT + (p + 1) % RPT) * NP + 2);
    return int'((z * RPT + (p + RPT - 1) % RPT) * NP + 1);
  endfunction

  logic [NP-1:0] r_in_valid  [NR];
  logic [NP-1:0] r_in_ready  [NR];
  flit_t         r_in_flit   [NR][NP];
  logic [NP-1:0] r_out_valid [NR];
  logic [NP-1:0] r_out_ready [NR];
  flit_t         r_out_flit  [NR][NP];

  for (genvar r = 0; r < NR; r++) begin : g_rtr
    noc_router #(
      .NPORTS  (NP),
      .NUM_DEST(NR),
      .DEPTH   (DEPTH),
      .ROUTE   (route_table(r))
    ) u_router (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (r_in_valid[r]),
      .in_ready (r_in_ready[r]),
      .in_flit  (r_in_flit[r]),
      .out_valid(r_out_valid[r]),
      .out_ready(r_out_ready[r]),
      .out_flit (r_out_flit[r])
    );

    for (genvar pp = 1; pp < NP; pp++) begin : g_link
      localparam int N = nbr(r, pp);
      if (N < 0) begin : g_idle
        assign r_in_valid[r][pp]  = 1'b0;
        assign r_in_flit[r][pp]   = '0;
        assign r_out_ready[r][pp] = 1'b0;
      end else begin : g_wire
        assign r_in_valid[r][pp]  = r_out_valid[N / NP][N % NP];
        assign r_in_flit[r][pp]   = r_out_flit[N / NP][N % NP];
        assign r_out_ready[r][pp] = r_in_ready[N / NP][N % NP];
      end
    end

    localparam int unsigned T0 = r * TPC;

    codec #(.TPC(TPC), .DEPTH(DEPTH), .TILE_CDC(TILE_CDC)) u_codec (
      .clk          (clk),
      .rst_n        (rst_n),
      .tile_clk     (tile_clk),
      .tile_rst_n   (tile_rst_n),
      .tx_tile_valid(tx_valid[T0 +: TPC]),
      .tx_tile_ready(tx_ready[T0 +: TPC]),
      .tx_tile_flit (tx_flit[T0 : T0 + TPC - 1]),
      .rx_tile_valid(rx_valid[T0 +: TPC]),
      .rx_tile_ready(rx_ready[T0 +: TPC]),
      .rx_tile_flit (rx_flit[T0 : T0 + TPC - 1]),
      .rtr_out_valid(r_in_valid[r][0]),
      .rtr_out_ready(r_in_ready[r][0]),
      .rtr_out_flit (r_in_flit[r][0]),
      .rtr_in_valid (r_out_valid[r][0]),
      .rtr_in_ready (r_out_ready[r][0]),
      .rtr_in_flit  (r_out_flit[r][0])
    );
  end

endmodule
