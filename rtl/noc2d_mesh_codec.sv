// noc2d_mesh_codec: 2x2 mesh network of routers with Codecs ("network B").
//
// Four routers sit in a 2x2 mesh, router r at column r%2 and row r/2. Each router
// has CPR Codec ports plus one port to its X neighbour (router r^1) and one to its
// Y neighbour (router r^2), so it has CPR+2 ports: three in the main configuration
// of one Codec per router. Each Codec serves TPC tiles, giving 4*CPR*TPC tiles in
// all; 16 tiles with the defaults. Codec c of router r is endpoint r*CPR+c, and
// tile k of that Codec is tile (r*CPR+c)*TPC+k. A packet carries the destination
// endpoint and the tile address inside it.
//
// Routing is dimension ordered (X first, then Y), written into each router's
// routing table at elaboration. Port map of every router: 0..CPR-1 Codecs,
// CPR towards X, CPR+1 towards Y.
//
// Interface: per tile an outgoing channel (tx_*, tile to network) and an incoming
// channel (rx_*, network to tile), each valid/ready/flit. Timing without
// contention: a flit taken from a tile in cycle t reaches a tile on the same
// router at t+3 and one router away at t+4 (Codec register, one cycle per router,
// Codec receive queue).
//
// The 2x2 mesh, the three-port routers and the CPR/TPC configurations follow the
// document; XY routing, the port numbering and the single clock are this design's
// choices.
module noc2d_mesh_codec
  import noc_pkg::*;
#(
  parameter int unsigned CPR   = 1,   // Codecs per router
  parameter int unsigned TPC   = 4,   // tiles per Codec
  parameter int unsigned DEPTH = 4,   // packets per queue
  parameter bit          TILE_CDC = 1'b0,  // tiles on their own clock (tile_clk)
  localparam int unsigned NR   = 4,
  localparam int unsigned NT   = NR * CPR * TPC
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

  localparam int unsigned NP       = CPR + 2;
  localparam int unsigned NUM_DEST = NR * CPR;
  localparam int unsigned PX       = CPR;
  localparam int unsigned PY       = CPR + 1;

  if (NUM_DEST > 2**NODE_W || TPC > 2**TILE_W || NP > 2**PORT_W) begin : g_size_check
    $error("noc2d_mesh_codec: CPR/TPC too large for the flit header");
  end

  // Dimension-ordered routing table of router r.
  function automatic logic [NUM_DEST-1:0][PORT_W-1:0] xy_table(input int unsigned r);
    logic [NUM_DEST-1:0][PORT_W-1:0] t;
    for (int unsigned d = 0; d < NUM_DEST; d++) begin
      int unsigned dr;
      dr = d / CPR;
      if (dr == r)                  t[d] = PORT_W'(d % CPR);
      else if ((dr % 2) != (r % 2)) t[d] = PORT_W'(PX);
      else                          t[d] = PORT_W'(PY);
    end
    return t;
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
      .NUM_DEST(NUM_DEST),
      .DEPTH   (DEPTH),
      .ROUTE   (xy_table(r))
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

    // Mesh links: X neighbour r^1, Y neighbour r^2, same port number on both ends.
    assign r_in_valid[r][PX]  = r_out_valid[r ^ 1][PX];
    assign r_in_flit[r][PX]   = r_out_flit[r ^ 1][PX];
    assign r_out_ready[r][PX] = r_in_ready[r ^ 1][PX];
    assign r_in_valid[r][PY]  = r_out_valid[r ^ 2][PY];
    assign r_in_flit[r][PY]   = r_out_flit[r ^ 2][PY];
    assign r_out_ready[r][PY] = r_in_ready[r ^ 2][PY];

    for (genvar c = 0; c < CPR; c++) begin : g_codec
      localparam int unsigned T0 = (r * CPR + c) * TPC;

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
        .rtr_out_valid(r_in_valid[r][c]),
        .rtr_out_ready(r_in_ready[r][c]),
        .rtr_out_flit (r_in_flit[r][c]),
        .rtr_in_valid (r_out_valid[r][c]),
        .rtr_in_ready (r_out_ready[r][c]),
        .rtr_in_flit  (r_out_flit[r][c])
      );
    end
  end

endmodule
