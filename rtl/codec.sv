// codec: tile to router interface (concentrator) for TPC tiles.
//
// Lets TPC tiles share a single router port, so the router keeps a small port
// count however many tiles there are, as long as the tiles together need no more
// than one flit per cycle. The sending path (codec_tx) is a round-robin path
// combiner; the receiving path (codec_rx) queues packets from the router and
// steers each to the tile given by its tile address bits. The two paths are
// independent and can both move one flit per cycle.
//
// The tiles may run on a slower clock of their own (tile_clk) than the router
// (clk): with TILE_CDC set, every tile channel passes through a dual-clock queue
// (async_fifo) between the tile and the Codec, so TPC tiles at 1/TPC of the
// router clock together fill the router port exactly. With TILE_CDC clear, the
// tiles share the router clock and tile_clk/tile_rst_n are unused.
//
// Interface: per tile an outgoing (tile to Codec) and an incoming (Codec to tile)
// valid/ready/flit channel, on tile_clk when TILE_CDC is set and on clk otherwise;
// towards the router one channel each way on clk. Timing: one register stage in
// each direction, plus the clock crossing when TILE_CDC is set. The split into a
// combining send path and a router-like receive path follows the document, as do
// the separate tile and router clocks; the handshake, the widths and the place of
// the crossing are this design's choices.
module codec
  import noc_pkg::*;
#(
  parameter int unsigned TPC   = 4,
  parameter int unsigned DEPTH = 4,
  parameter bit          TILE_CDC = 1'b0
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           tile_clk,     // tile clock, used when TILE_CDC is set
  input  logic           tile_rst_n,
  // tiles -> Codec
  input  logic [TPC-1:0] tx_tile_valid,
  output logic [TPC-1:0] tx_tile_ready,
  input  flit_t          tx_tile_flit [TPC],
  // Codec -> tiles
  output logic [TPC-1:0] rx_tile_valid,
  input  logic [TPC-1:0] rx_tile_ready,
  output flit_t          rx_tile_flit [TPC],
  // Codec -> router port
  output logic           rtr_out_valid,
  input  logic           rtr_out_ready,
  output flit_t          rtr_out_flit,
  // router port -> Codec
  input  logic           rtr_in_valid,
  output logic           rtr_in_ready,
  input  flit_t          rtr_in_flit
);

  // Tile channels as seen in the router clock domain.
  logic [TPC-1:0] tx_valid_c, tx_ready_c, rx_valid_c, rx_ready_c;
  flit_t          tx_flit_c [TPC];
  flit_t          rx_flit_c [TPC];

  if (TILE_CDC) begin : g_cdc
    for (genvar t = 0; t < TPC; t++) begin : g_tile
      async_fifo #(.DEPTH(4)) u_tx_cdc (
        .wr_clk   (tile_clk),
        .wr_rst_n (tile_rst_n),
        .in_valid (tx_tile_valid[t]),
        .in_ready (tx_tile_ready[t]),
        .in_flit  (tx_tile_flit[t]),
        .rd_clk   (clk),
        .rd_rst_n (rst_n),
        .out_valid(tx_valid_c[t]),
        .out_ready(tx_ready_c[t]),
        .out_flit (tx_flit_c[t])
      );
      async_fifo #(.DEPTH(4)) u_rx_cdc (
        .wr_clk   (clk),
        .wr_rst_n (rst_n),
        .in_valid (rx_valid_c[t]),
        .in_ready (rx_ready_c[t]),
        .in_flit  (rx_flit_c[t]),
        .rd_clk   (tile_clk),
        .rd_rst_n (tile_rst_n),
        .out_valid(rx_tile_valid[t]),
        .out_ready(rx_tile_ready[t]),
        .out_flit (rx_tile_flit[t])
      );
    end
  end else begin : g_sync
    assign tx_valid_c    = tx_tile_valid;
    assign tx_tile_ready = tx_ready_c;
    assign tx_flit_c     = tx_tile_flit;
    assign rx_tile_valid = rx_valid_c;
    assign rx_ready_c    = rx_tile_ready;
    assign rx_tile_flit  = rx_flit_c;
  end

  codec_tx #(.TPC(TPC)) u_tx (
    .clk       (clk),
    .rst_n     (rst_n),
    .tile_valid(tx_valid_c),
    .tile_ready(tx_ready_c),
    .tile_flit (tx_flit_c),
    .out_valid (rtr_out_valid),
    .out_ready (rtr_out_ready),
    .out_flit  (rtr_out_flit)
  );

  codec_rx #(.TPC(TPC), .DEPTH(DEPTH)) u_rx (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (rtr_in_valid),
    .in_ready  (rtr_in_ready),
    .in_flit   (rtr_in_flit),
    .tile_valid(rx_valid_c),
    .tile_ready(rx_ready_c),
    .tile_flit (rx_flit_c)
  );

endmodule
