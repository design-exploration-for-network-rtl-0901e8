// codec_tx: sending path of the Codec (tiles to router).
//
// A path combiner for TPC tiles. A round-robin pointer rotates over the tiles; in
// each cycle the next tile after the last one served that has a payload waiting is
// taken, so the router port carries at most one flit per cycle and every tile gets
// an equal share when all are busy. The chosen flit is held in a one-entry output
// register, which is refilled in the same cycle it drains, so back-to-back flits
// leave at the full rate of one per cycle.
//
// Interface: per tile a valid/ready/flit channel in; one valid/ready/flit channel
// out to the router. Timing: a flit accepted from a tile in cycle t is offered to
// the router from cycle t+1. The combining by rotation follows the document; the
// output register and the handshake are this design's choice.
module codec_tx
  import noc_pkg::*;
#(
  parameter int unsigned TPC = 4
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [TPC-1:0] tile_valid,
  output logic [TPC-1:0] tile_ready,
  input  flit_t          tile_flit [TPC],
  output logic           out_valid,
  input  logic           out_ready,
  output flit_t          out_flit
);

  localparam int unsigned IDX_W = (TPC > 1) ? $clog2(TPC) : 1;

  logic [TPC-1:0]   grant;
  logic             any_grant;
  logic [IDX_W-1:0] grant_idx;
  logic             load;

  // The output register can take a flit when it is empty or drains this cycle.
  assign load = any_grant && (!out_valid || out_ready);

  rr_arbiter #(.N(TPC)) u_arb (
    .clk      (clk),
    .rst_n    (rst_n),
    .req      (tile_valid),
    .advance  (load),
    .grant    (grant),
    .any_grant(any_grant),
    .grant_idx(grant_idx)
  );

  assign tile_ready = load ? grant : '0;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
    end else if (load) begin
      out_valid <= 1'b1;
    end else if (out_ready) begin
      out_valid <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (load) out_flit <= tile_flit[grant_idx];
  end

endmodule
