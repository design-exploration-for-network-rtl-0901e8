// noc_router: packet router with input queues, a routing table and a crossbar.
//
// Each of the NPORTS inputs has a DEPTH-flit queue (flit_fifo). The packet at the
// head of a queue looks up its output port in the routing table ROUTE, indexed by
// the destination Codec id; the table is a parameter, filled in by the network
// that places the router, so any topology and any deterministic routing can be
// expressed. Each output port has a round-robin arbiter that picks one of the
// inputs whose head packet wants that output; the winner's flit crosses the
// crossbar and leaves when the neighbour is ready, which also pops it from its
// queue. Every input and every output can move one flit per cycle.
//
// Interface: per port a valid/ready/flit channel in and one out. Timing: a packet
// written into an input queue in cycle t can leave in cycle t+1, so one router hop
// costs one cycle when there is no contention. Since in_ready is the queue's
// registered "not full", routers can be chained without combinational loops.
//
// The split into input queues, routing logic with a routing table and an output
// switch follows the router model of the document; it does not describe the
// insides of the router it synthesized, so single-flit packets, no virtual
// channels and valid/ready flow control are this design's choices. A destination
// id outside the table is sent to port 0.
module noc_router
  import noc_pkg::*;
#(
  parameter int unsigned NPORTS   = 3,
  parameter int unsigned NUM_DEST = 4,
  parameter int unsigned DEPTH    = 4,
  parameter logic [NUM_DEST-1:0][PORT_W-1:0] ROUTE = '0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NPORTS-1:0] in_valid,
  output logic [NPORTS-1:0] in_ready,
  input  flit_t             in_flit  [NPORTS],
  output logic [NPORTS-1:0] out_valid,
  input  logic [NPORTS-1:0] out_ready,
  output flit_t             out_flit [NPORTS]
);

  localparam int unsigned IDX_W = (NPORTS > 1) ? $clog2(NPORTS) : 1;

  logic [NPORTS-1:0] head_valid, head_pop;
  flit_t             head      [NPORTS];
  logic [PORT_W-1:0] want_port [NPORTS];

  // Request matrix, indexed [output][input], and the per-output grants.
  logic [NPORTS-1:0] req   [NPORTS];
  logic [NPORTS-1:0] grant [NPORTS];
  logic [IDX_W-1:0]  gidx  [NPORTS];
  logic [NPORTS-1:0] any_grant;

  for (genvar i = 0; i < NPORTS; i++) begin : g_in
    flit_fifo #(.DEPTH(DEPTH)) u_queue (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (in_valid[i]),
      .in_ready (in_ready[i]),
      .in_flit  (in_flit[i]),
      .out_valid(head_valid[i]),
      .out_ready(head_pop[i]),
      .out_flit (head[i])
    );

    // Route computation: table lookup on the destination Codec id.
    always_comb begin
      if (32'(head[i].dst_node) < NUM_DEST) want_port[i] = ROUTE[head[i].dst_node];
      else                                  want_port[i] = '0;
    end
  end

  for (genvar o = 0; o < NPORTS; o++) begin : g_out
    always_comb begin
      for (int unsigned i = 0; i < NPORTS; i++)
        req[o][i] = head_valid[i] && (32'(want_port[i]) == o);
    end

    rr_arbiter #(.N(NPORTS)) u_arb (
      .clk      (clk),
      .rst_n    (rst_n),
      .req      (req[o]),
      .advance  (out_ready[o]),
      .grant    (grant[o]),
      .any_grant(any_grant[o]),
      .grant_idx(gidx[o])
    );

    // Crossbar.
    assign out_valid[o] = any_grant[o];
    assign out_flit[o]  = head[gidx[o]];
  end

  // An input is popped when the output it won accepts its flit.
  always_comb begin
    head_pop = '0;
    for (int unsigned o = 0; o < NPORTS; o++)
      for (int unsigned i = 0; i < NPORTS; i++)
        if (grant[o][i] && out_ready[o]) head_pop[i] = 1'b1;
  end

endmodule
