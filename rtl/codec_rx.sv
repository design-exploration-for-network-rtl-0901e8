// codec_rx: receiving path of the Codec (router to tiles).
//
// Works like a small router output stage: packets from the router port are queued
// in a DEPTH-entry flit_fifo, and the packet at the head is examined and steered to
// the tile named by its dst_tile field. Only that tile sees valid; the packet
// leaves when that tile is ready. A busy tile therefore holds back the packets
// behind it (head-of-line blocking, as in any single queue). A packet whose tile
// address is not below TPC has no tile to go to and is discarded.
//
// Interface: one valid/ready/flit channel in from the router; per tile a
// valid/ready/flit channel out. Timing: a packet accepted in cycle t is offered to
// its tile from cycle t+1. Queueing and address-based steering follow the document;
// the queue depth of four packets follows its network model; the rest is this
// design's choice.
module codec_rx
  import noc_pkg::*;
#(
  parameter int unsigned TPC   = 4,
  parameter int unsigned DEPTH = 4
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  output logic           in_ready,
  input  flit_t          in_flit,
  output logic [TPC-1:0] tile_valid,
  input  logic [TPC-1:0] tile_ready,
  output flit_t          tile_flit [TPC]
);

  logic  head_valid, head_ready;
  flit_t head;
  logic  bad_tile;

  flit_fifo #(.DEPTH(DEPTH)) u_queue (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .in_ready (in_ready),
    .in_flit  (in_flit),
    .out_valid(head_valid),
    .out_ready(head_ready),
    .out_flit (head)
  );

  assign bad_tile = (32'(head.dst_tile) >= TPC);

  always_comb begin
    tile_valid = '0;
    head_ready = bad_tile;
    for (int unsigned t = 0; t < TPC; t++) begin
      tile_flit[t] = head;
      if (head_valid && 32'(head.dst_tile) == t) begin
        tile_valid[t] = 1'b1;
        head_ready    = tile_ready[t];
      end
    end
  end

endmodule
