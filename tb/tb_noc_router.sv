// tb_noc_router: self-checking test of the router.
//
// A four-port router with a six-entry routing table. Every input sends flits to
// random destinations under random output backpressure. Each flit carries its
// input port and a per-input sequence number; the testbench checks that it leaves
// on the port the table names, intact, once, and in order per input and output.
// Directed phases check the one-cycle hop latency, that two inputs competing for
// one output are served alternately at one flit per cycle, and that a destination
// outside the table goes to port 0.
module tb_noc_router;
  import noc_pkg::*;

  localparam int unsigned NP = 4;
  localparam int unsigned ND = 6;
  localparam logic [ND-1:0][PORT_W-1:0] TABLE = {4'd3, 4'd1, 4'd2, 4'd0, 4'd1, 4'd3};
  localparam int unsigned PKTS = 400;

  logic          clk = 1'b0;
  logic          rst_n;
  logic [NP-1:0] in_valid, in_ready, out_valid, out_ready;
  flit_t         in_flit  [NP];
  flit_t         out_flit [NP];
  int            checks = 0, failures = 0;
  int            sent [NP];
  bit            taken [NP];
  int            rcvd = 0;
  int            last_seq [NP][NP];

  always #5 clk = ~clk;

  noc_router #(.NPORTS(NP), .NUM_DEST(ND), .DEPTH(4), .ROUTE(TABLE)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic flit_t make(input int src, input int seq, input int dst);
    flit_t f;
    f.dst_node = NODE_W'(dst);
    f.dst_tile = TILE_W'(seq);
    f.data     = {8'(src), 12'(seq), 12'((src * 37 + seq * 11 + dst * 5) & 12'hfff)};
    return f;
  endfunction

  function automatic int port_of(input int dst);
    return (dst < ND) ? int'(TABLE[dst]) : 0;
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      for (int o = 0; o < NP; o++) begin
        if (out_valid[o] && out_ready[o]) begin
          int src, seq, dst;
          src = int'(out_flit[o].data[31:24]);
          seq = int'(out_flit[o].data[23:12]);
          dst = int'(out_flit[o].dst_node);
          check(port_of(dst) == o, "flit leaves on the port named by the table");
          check(out_flit[o] == make(src, seq, dst), "flit intact");
          check(src < NP && seq > last_seq[src][o], "in order per input and output");
          if (src < NP) last_seq[src][o] = seq;
          rcvd++;
        end
      end
      for (int i = 0; i < NP; i++)
        if (in_valid[i] && in_ready[i]) begin
          sent[i]++;
          taken[i] = 1'b1;
        end
    end
  end

  initial begin
    int alt;
    rst_n = 1'b0; in_valid = '0; out_ready = '1;
    foreach (last_seq[s, d]) last_seq[s][d] = -1;
    for (int i = 0; i < NP; i++) begin
      sent[i] = 0; taken[i] = 1'b0; in_flit[i] = '0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // One hop: written at this edge, out the next cycle. Destination 4 -> port 1.
    in_flit[0] = make(0, sent[0], 4); in_valid = 4'b0001;
    @(negedge clk);
    in_valid = '0;
    check(out_valid == 4'b0010, "one-cycle hop latency");
    @(negedge clk);
    // Destination outside the table goes to port 0.
    in_flit[1] = make(1, sent[1], ND + 3); in_valid = 4'b0010;
    @(negedge clk);
    in_valid = '0;
    check(out_valid == 4'b0001, "unknown destination to port 0");
    @(negedge clk);
    // Contention: inputs 2 and 3 both to port 3 (destination 0), eight flits each.
    // Port 3 must carry one flit per cycle, alternating between the two inputs.
    port3_log.delete();
    logging = 1'b1;
    while (sent[2] < 8 || sent[3] < 8) begin
      for (int i = 2; i < 4; i++)
        if (!in_valid[i] || taken[i]) begin
          taken[i] = 1'b0;
          in_flit[i] = make(i, sent[i], 0);
          in_valid[i] = (sent[i] < 8);
        end
      @(negedge clk);
    end
    in_valid = '0;
    repeat (12) @(negedge clk);
    logging = 1'b0;
    check(port3_log.size() == 16, "all competing flits delivered");
    alt = 1;
    for (int k = 1; k < 14; k++) if (port3_log[k] == port3_log[k-1]) alt = 0;
    check(alt == 1, "competing inputs served alternately");
    check(port3_busy >= 14, "one flit per cycle on the contended output");
    // Random traffic with backpressure.
    while (rcvd < 2 + 16 + NP * PKTS) begin
      for (int i = 0; i < NP; i++)
        if (!in_valid[i] || taken[i]) begin
          taken[i] = 1'b0;
          if (sent[i] < PKTS + (i >= 2 ? 8 : 1) && ($urandom % 100) < 70) begin
            in_flit[i]  = make(i, sent[i], $urandom % (ND + 1));
            in_valid[i] = 1'b1;
          end else in_valid[i] = 1'b0;
        end
      out_ready = NP'($urandom) | NP'($urandom);
      @(negedge clk);
    end
    repeat (5) @(negedge clk);
    check(out_valid == '0, "router drains");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Log of the inputs served on port 3 during the contention phase.
  int port3_log [$];
  int port3_busy = 0;
  bit logging = 1'b0;
  always @(posedge clk) begin
    if (rst_n && logging && out_valid[3] && out_ready[3]) begin
      port3_log.push_back(int'(out_flit[3].data[31:24]));
      if (port3_log.size() > 1) port3_busy++;
    end
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog rcvd=%0d", rcvd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
