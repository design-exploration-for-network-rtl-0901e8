// codec_noc_top: the two Codec networks side by side.
//
// The design connects many FPGA tiles to a network on chip without giving every
// tile its own router port: a Codec concentrates a group of tiles onto one port.
// This top holds both networks built from that idea, each with its own
// tile ports:
//   * net2d_*: the planar network (noc2d_mesh_codec), a 2x2 mesh of three-port
//     routers, one Codec of four tiles per router, 16 tiles;
//   * net3d_*: the stacked network (noc3d_codec), eight tiers of four-router rings,
//     one Codec of four tiles per router, 128 tiles.
// The tiles themselves are user logic and sit outside, on the tx_* (tile to
// network) and rx_* (network to tile) valid/ready/flit channels. Routers and
// Codecs run on clk. The tiles of the 3D network run on tile_clk, which may be
// slower (the intended ratio is four: 200 MHz routers, 50 MHz tiles), and cross
// into the router clock inside their Codecs; the tiles of the 2D network run on
// clk unless TILE_CDC_2D is set. Each clock has its own active-low synchronous
// reset; both must be asserted together.
module codec_noc_top
  import noc_pkg::*;
#(
  parameter int unsigned CPR_2D   = 1,
  parameter int unsigned TPC_2D   = 4,
  parameter int unsigned TIERS_3D = 8,
  parameter int unsigned RPT_3D   = 4,
  parameter topo_e       TOPO_3D  = TOPO_RING,
  parameter int unsigned DEPTH    = 4,
  parameter bit          TILE_CDC_2D = 1'b0,
  parameter bit          TILE_CDC_3D = 1'b1,
  localparam int unsigned NT2     = 4 * CPR_2D * TPC_2D,
  localparam int unsigned NT3     = TIERS_3D * RPT_3D * 4
) (
  input  logic           clk,         // router clock
  input  logic           rst_n,
  input  logic           tile_clk,    // tile clock (3D network tiles by default)
  input  logic           tile_rst_n,
  // 2D network B tiles
  input  logic [NT2-1:0] net2d_tx_valid,
  output logic [NT2-1:0] net2d_tx_ready,
  input  flit_t          net2d_tx_flit [NT2],
  output logic [NT2-1:0] net2d_rx_valid,
  input  logic [NT2-1:0] net2d_rx_ready,
  output flit_t          net2d_rx_flit [NT2],
  // 3D network tiles
  input  logic [NT3-1:0] net3d_tx_valid,
  output logic [NT3-1:0] net3d_tx_ready,
  input  flit_t          net3d_tx_flit [NT3],
  output logic [NT3-1:0] net3d_rx_valid,
  input  logic [NT3-1:0] net3d_rx_ready,
  output flit_t          net3d_rx_flit [NT3]
);

  noc2d_mesh_codec #(
    .CPR  (CPR_2D),
    .TPC  (TPC_2D),
    .DEPTH(DEPTH),
    .TILE_CDC(TILE_CDC_2D)
  ) u_net2d (
    .clk       (clk),
    .rst_n     (rst_n),
    .tile_clk  (tile_clk),
    .tile_rst_n(tile_rst_n),
    .tx_valid(net2d_tx_valid),
    .tx_ready(net2d_tx_ready),
    .tx_flit (net2d_tx_flit),
    .rx_valid(net2d_rx_valid),
    .rx_ready(net2d_rx_ready),
    .rx_flit (net2d_rx_flit)
  );

  noc3d_codec #(
    .TIERS(TIERS_3D),
    .RPT  (RPT_3D),
    .TOPO (TOPO_3D),
    .TPC  (4),
    .DEPTH(DEPTH),
    .TILE_CDC(TILE_CDC_3D)
  ) u_net3d (
    .clk       (clk),
    .rst_n     (rst_n),
    .tile_clk  (tile_clk),
    .tile_rst_n(tile_rst_n),
    .tx_valid(net3d_tx_valid),
    .tx_ready(net3d_tx_ready),
    .tx_flit (net3d_tx_flit),
    .rx_valid(net3d_rx_valid),
    .rx_ready(net3d_rx_ready),
    .rx_flit (net3d_rx_flit)
  );

endmodule
