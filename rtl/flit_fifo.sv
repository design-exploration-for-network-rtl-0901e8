// flit_fifo: packet queue used at each router input and in the Codec receive path.
//
// A circular buffer of DEPTH flits held in registers, with a valid/ready handshake
// on both sides. A flit written in one cycle is visible at the head in the next
// cycle. in_ready is simply "not full" and out_valid "not empty", both taken from
// registers, so neither side sees a combinational path through the queue; this is
// what keeps chains of routers free of combinational loops. Writing and reading in
// the same cycle is allowed, also when the queue is full (a read frees the slot
// only in the next cycle, so a full queue refuses the write).
//
// The depth of four packets follows the buffer depth of the network model; the
// register implementation and the handshake are this design's choice.
module flit_fifo
  import noc_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  flit_t in_flit,
  output logic  out_valid,
  input  logic  out_ready,
  output flit_t out_flit
);

  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  flit_t              mem [DEPTH];
  logic [PTR_W-1:0]   wr_ptr, rd_ptr;
  logic [PTR_W:0]     count;
  logic               push, pop;

  assign in_ready  = (count != (PTR_W+1)'(DEPTH));
  assign out_valid = (count != '0);
  assign out_flit  = mem[rd_ptr];
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;

  function automatic logic [PTR_W-1:0] next_ptr(input logic [PTR_W-1:0] p);
    return (p == PTR_W'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= next_ptr(wr_ptr);
      if (pop)  rd_ptr <= next_ptr(rd_ptr);
      case ({push, pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  // Storage needs no reset: a slot is only read after it was written.
  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= in_flit;
  end

`ifndef SYNTHESIS
  // Handshake rule: once offered, a flit stays offered until it is taken.
  property p_out_stable;
    @(posedge clk) disable iff (!rst_n) (out_valid && !out_ready) |=> out_valid;
  endproperty
  a_out_stable: assert property (p_out_stable);
`endif

endmodule
