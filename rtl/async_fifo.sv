// async_fifo: dual-clock flit queue for the tile-side clock crossing of a Codec.
//
// The classic Gray-pointer design: the writer and the reader each keep a binary
// and a Gray-coded pointer one bit wider than the address; each Gray pointer
// crosses to the other clock through a two-flop synchronizer. The writer sees the
// queue full when its Gray pointer equals the synchronized read pointer with the
// two top bits inverted; the reader sees it empty when the two Gray pointers are
// equal. Both flags are pessimistic, so the queue never overflows or underflows.
// Storage is a small register array written on the write clock and read
// combinationally from the read side.
//
// Interface: valid/ready/flit on each side, each in its own clock domain with its
// own active-low synchronous reset; both resets must be asserted together and held
// for at least two cycles of the slower clock. Timing:
// a flit written on the write clock is visible to the reader about two to three
// read-clock cycles later. DEPTH must be a power of two and at least 4.
//
// The document only states the two clock targets (routers and tile interfaces);
// where the crossing sits and how it is built are this design's choices.
module async_fifo
  import noc_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic  wr_clk,
  input  logic  wr_rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  flit_t in_flit,
  input  logic  rd_clk,
  input  logic  rd_rst_n,
  output logic  out_valid,
  input  logic  out_ready,
  output flit_t out_flit
);

  localparam int unsigned AW = $clog2(DEPTH);

  flit_t         mem [DEPTH];
  logic [AW:0]   wbin, wgray, rbin, rgray;
  logic [AW:0]   rgray_w1, rgray_w2;   // read pointer in the write domain
  logic [AW:0]   wgray_r1, wgray_r2;   // write pointer in the read domain
  logic [AW:0]   wbin_nxt, rbin_nxt;
  logic          push, pop;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // Write side.
  assign in_ready = (wgray != {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});
  assign push     = in_valid && in_ready;
  assign wbin_nxt = wbin + (AW+1)'(push);

  always_ff @(posedge wr_clk) begin
    if (!wr_rst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      wbin     <= wbin_nxt;
      wgray    <= bin2gray(wbin_nxt);
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
    end
  end

  always_ff @(posedge wr_clk) begin
    if (push) mem[wbin[AW-1:0]] <= in_flit;
  end

  // Read side.
  assign out_valid = (rgray != wgray_r2);
  assign out_flit  = mem[rbin[AW-1:0]];
  assign pop       = out_valid && out_ready;
  assign rbin_nxt  = rbin + (AW+1)'(pop);

  always_ff @(posedge rd_clk) begin
    if (!rd_rst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      rbin     <= rbin_nxt;
      rgray    <= bin2gray(rbin_nxt);
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
    end
  end

endmodule
