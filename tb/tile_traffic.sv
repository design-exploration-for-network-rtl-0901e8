// tile_traffic: behavioural model of the FPGA tiles around a Codec network, for
// testbenches only.
//
// Every tile is a packet source and a sink. When `enable` is high each tile
// offers, with probability LOAD_PCT per cycle, a packet to a uniformly random tile
// (itself included) until it has sent PKTS, and each sink is ready with
// probability RDY_PCT. A packet carries its source tile, a per-source sequence
// number and a check field made from source, sequence and destination. The
// scoreboard checks every packet that arrives: at the tile its header names,
// intact, in order for each source and destination pair, and (at the end) each
// exactly once. Tile t belongs to endpoint (Codec) t/TPC and is tile t%TPC of it.
//
// The task send_one() sends one packet on an idle network and returns its
// latency in cycles, from the cycle the tile offers it to the cycle the
// destination tile sees it valid. Counters for the mechanisms of the network are
// kept for the testbench: cycles a tile waited to send, cycles a sink held a
// packet back, cycles two or more tiles of one Codec competed, and delivered
// packets per endpoint pair.
module tile_traffic
  import noc_pkg::*;
#(
  parameter int unsigned NT       = 16,
  parameter int unsigned TPC      = 4,
  parameter int unsigned PKTS     = 100,
  parameter int unsigned LOAD_PCT = 30,
  parameter int unsigned RDY_PCT  = 80
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          enable,
  output logic [NT-1:0] tx_valid,
  input  logic [NT-1:0] tx_ready,
  output flit_t         tx_flit [NT],
  input  logic [NT-1:0] rx_valid,
  output logic [NT-1:0] rx_ready,
  input  flit_t         rx_flit [NT],
  output logic          done
);

  localparam int unsigned NE = NT / TPC;

  int checks = 0, failures = 0;
  int sent [NT];
  int rcvd = 0;
  int last_seq [NT][NT];
  int stall_cycles = 0, backpressure_cycles = 0, combine_cycles = 0;
  int pair_cnt [NE][NE];
  int cycle = 0;
  int sent_cyc [NT][4096];
  int last_lat = 0;
  int max_lat = 0;

  // Directed single-packet requests from send_one().
  bit one_req = 1'b0;
  int one_src, one_dst;

  function automatic flit_t make(input int src, input int seq, input int dst);
    flit_t f;
    f.dst_node = NODE_W'(dst / TPC);
    f.dst_tile = TILE_W'(dst % TPC);
    f.data     = {8'(src), 12'(seq), 12'((src * 37 + seq * 11 + dst * 5) & 12'hfff)};
    return f;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    foreach (last_seq[s, d]) last_seq[s][d] = -1;
    foreach (pair_cnt[s, d]) pair_cnt[s][d] = 0;
    foreach (sent[t]) sent[t] = 0;
    tx_valid = '0;
    rx_ready = '0;
    done     = 1'b0;
    foreach (tx_flit[t]) tx_flit[t] = '0;
  end

  // Done once every tile has sent PKTS packets and all of them have arrived.
  always @(posedge clk) begin
    int total;
    bit all_sent;
    total = 0;
    all_sent = 1'b1;
    foreach (sent[t]) begin
      total += sent[t];
      if (sent[t] < int'(PKTS)) all_sent = 1'b0;
    end
    done <= all_sent && (rcvd == total) && (tx_valid == '0);
  end

  always @(posedge clk) begin
    if (!rst_n) begin
      tx_valid <= '0;
      rx_ready <= '0;
    end else begin
      cycle++;
      // Sinks.
      for (int t = 0; t < NT; t++) begin
        if (rx_valid[t] && !rx_ready[t]) backpressure_cycles++;
        if (rx_valid[t] && rx_ready[t]) begin
          int src, seq;
          src = int'(rx_flit[t].data[31:24]);
          seq = int'(rx_flit[t].data[23:12]);
          check(int'(rx_flit[t].dst_node) * TPC + int'(rx_flit[t].dst_tile) == t,
                "packet reaches the tile it names");
          check(src < NT && rx_flit[t] == make(src, seq, t), "packet intact");
          if (src < NT) begin
            check(seq > last_seq[src][t], "in order per source and destination");
            last_seq[src][t] = seq;
            pair_cnt[src / TPC][t / TPC]++;
            last_lat = cycle - sent_cyc[src][seq];
            if (last_lat > max_lat) max_lat = last_lat;
          end
          rcvd++;
        end
      end
      // Codec competition: two or more tiles of one Codec offering at once.
      for (int e = 0; e < NE; e++)
        if ($countones(tx_valid[e*TPC +: TPC]) > 1) combine_cycles++;
      // Sources.
      for (int t = 0; t < NT; t++) begin
        if (tx_valid[t] && !tx_ready[t]) stall_cycles++;
        if (!tx_valid[t] || tx_ready[t]) begin
          if (tx_valid[t]) sent[t]++;
          if (one_req && t == one_src) begin
            tx_flit[t]  <= make(t, sent[t], one_dst);
            tx_valid[t] <= 1'b1;
            sent_cyc[t][sent[t] % 4096] = cycle + 1;
            one_req = 1'b0;
          end else if (enable && sent[t] < int'(PKTS) && ($urandom % 100) < LOAD_PCT) begin
            int dst;
            dst = int'($urandom % NT);
            tx_flit[t]  <= make(t, sent[t], dst);
            tx_valid[t] <= 1'b1;
            sent_cyc[t][sent[t] % 4096] = cycle + 1;
          end else begin
            tx_valid[t] <= 1'b0;
          end
        end
        rx_ready[t] <= enable ? (($urandom % 100) < RDY_PCT) : 1'b1;
      end
    end
  end

  // Send one packet from tile src to tile dst on an idle network; wait for it.
  task automatic send_one(input int src, input int dst, output int lat);
    int rcvd0;
    rcvd0 = rcvd;
    @(negedge clk);
    one_src = src;
    one_dst = dst;
    one_req = 1'b1;
    while (rcvd == rcvd0) @(negedge clk);
    lat = last_lat;
  endtask

  // Final scoreboard step: every packet sent arrived once.
  task automatic final_check();
    int total;
    total = 0;
    foreach (sent[t]) total += sent[t];
    check(rcvd == total, "every packet delivered exactly once");
  endtask

endmodule
