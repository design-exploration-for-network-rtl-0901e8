// tb_codec: self-checking test of the whole Codec.
//
// The router side is looped back through a testbench pipe stage with random
// backpressure, so every flit a tile sends comes back into the receive path and
// must reach the tile named in its header. Each flit carries its source tile and
// a per-source sequence number; the testbench checks that every flit arrives once,
// at the right tile, uncorrupted and in order per source and destination, and
// that the loop latency is three cycles (send register, pipe stage, receive
// queue).
//
// A second Codec with the tile clock crossing enabled runs its tiles at a quarter
// of the router clock. All four tiles send on every tile cycle into a looped-back,
// always-ready router port: after the first few cycles no tile may ever wait,
// since four tiles at a quarter rate exactly fill one router port, and every flit
// must come back to its addressed tile intact.
module tb_codec;
  import noc_pkg::*;

  localparam int unsigned TPC = 4;
  localparam int unsigned PKTS = 300;

  logic           clk = 1'b0;
  logic           rst_n;
  logic [TPC-1:0] tx_tile_valid, tx_tile_ready, rx_tile_valid, rx_tile_ready;
  flit_t          tx_tile_flit [TPC];
  flit_t          rx_tile_flit [TPC];
  logic           rtr_out_valid, rtr_out_ready, rtr_in_valid, rtr_in_ready;
  flit_t          rtr_out_flit, rtr_in_flit;
  int             checks = 0, failures = 0;
  int             sent [TPC];
  int             rcvd = 0;
  int             last_seq [TPC][TPC];
  logic           pipe_en;
  bit             taken [TPC];

  logic           tile_clk, tile_rst_n;
  always #5 clk = ~clk;
  assign tile_clk   = clk;
  assign tile_rst_n = rst_n;

  codec #(.TPC(TPC)) dut (.*);

  // Codec with tiles on a four times slower clock, router port looped back directly.
  logic           tclk = 1'b0;
  always #20 tclk = ~tclk;
  logic [TPC-1:0] c_txv, c_txr, c_rxv, c_rxr;
  flit_t          c_txf [TPC];
  flit_t          c_rxf [TPC];
  logic           c_lv, c_lr;
  flit_t          c_lf;
  logic           c_lr2;
  int             c_sent [TPC];
  int             c_rcvd = 0, c_stalls = 0, c_tcyc = 0, c_bad = 0;
  bit             c_run = 1'b0;

  codec #(.TPC(TPC), .TILE_CDC(1'b1)) dut_cdc (
    .clk(clk), .rst_n(rst_n), .tile_clk(tclk), .tile_rst_n(rst_n),
    .tx_tile_valid(c_txv), .tx_tile_ready(c_txr), .tx_tile_flit(c_txf),
    .rx_tile_valid(c_rxv), .rx_tile_ready(c_rxr), .rx_tile_flit(c_rxf),
    .rtr_out_valid(c_lv), .rtr_out_ready(c_lr), .rtr_out_flit(c_lf),
    .rtr_in_valid(c_lv), .rtr_in_ready(c_lr2), .rtr_in_flit(c_lf)
  );
  assign c_lr = c_lr2;
  assign c_rxr = '1;

  // Tile side of the crossing Codec: every tile always offers a flit.
  always @(posedge tclk) begin
    if (!rst_n) begin
      c_txv <= '0;
      foreach (c_sent[t]) c_sent[t] = 0;
    end else begin
      c_tcyc++;
      for (int t = 0; t < TPC; t++) begin
        if (c_rxv[t]) begin
          int src, seq;
          src = int'(c_rxf[t].data[31:24]);
          seq = int'(c_rxf[t].data[23:12]);
          if (int'(c_rxf[t].dst_tile) != t || c_rxf[t] != make(src, seq, t)) begin
            c_bad++;
            if (c_bad < 5) $display("bad t=%0d src=%0d seq=%0d tile=%0d at %0t", t, src, seq, c_rxf[t].dst_tile, $time);
          end
          c_rcvd++;
        end
        if (c_txv[t] && !c_txr[t] && c_tcyc > 12) c_stalls++;
        if (c_txv[t] && c_txr[t]) c_sent[t]++;
        if (c_run) begin
          c_txv[t] <= 1'b1;
          c_txf[t] <= make(t, c_sent[t] + ((c_txv[t] && c_txr[t]) ? 0 : 0), (t + c_sent[t]) % TPC);
        end else c_txv[t] <= 1'b0;
      end
    end
  end

  // Loopback pipe stage with random stalls.
  assign rtr_out_ready = pipe_en && (!rtr_in_valid || rtr_in_ready);
  always_ff @(posedge clk) begin
    if (!rst_n) rtr_in_valid <= 1'b0;
    else if (rtr_out_ready) begin
      rtr_in_valid <= rtr_out_valid;
      rtr_in_flit  <= rtr_out_flit;
    end else if (rtr_in_ready) rtr_in_valid <= 1'b0;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic flit_t make(input int src, input int seq, input int dst);
    flit_t f;
    f.dst_node = '0;
    f.dst_tile = TILE_W'(dst);
    f.data     = {8'(src), 12'(seq), 12'((src * 37 + seq * 11 + dst * 5) & 12'hfff)};
    return f;
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      for (int t = 0; t < TPC; t++) begin
        if (rx_tile_valid[t] && rx_tile_ready[t]) begin
          int src, seq;
          src = int'(rx_tile_flit[t].data[31:24]);
          seq = int'(rx_tile_flit[t].data[23:12]);
          check(int'(rx_tile_flit[t].dst_tile) == t, "flit reaches addressed tile");
          check(rx_tile_flit[t] == make(src, seq, t), "flit intact");
          check(src < TPC && seq > last_seq[src][t], "in order per source and destination");
          if (src < TPC) last_seq[src][t] = seq;
          rcvd++;
        end
        if (tx_tile_valid[t] && tx_tile_ready[t]) begin
          sent[t]++;
          taken[t] = 1'b1;
        end
      end
    end
  end

  initial begin
    int lat;
    rst_n = 1'b0; tx_tile_valid = '0; rx_tile_ready = '1; pipe_en = 1'b1;
    foreach (last_seq[s, d]) last_seq[s][d] = -1;
    for (int t = 0; t < TPC; t++) begin
      sent[t] = 0;
      taken[t] = 1'b0;
      tx_tile_flit[t] = make(t, 0, 0);
    end
    repeat (12) @(posedge clk);   // covers two edges of the slow tile clock
    rst_n = 1'b1;
    @(negedge clk);
    // Latency of one flit from tile 0 to tile 2.
    tx_tile_flit[0] = make(0, 0, 2); tx_tile_valid = 4'b0001;
    @(negedge clk);
    tx_tile_valid = '0;
    lat = 1;
    while (!rx_tile_valid[2] && lat < 20) begin
      @(negedge clk);
      lat++;
    end
    check(lat == 3, "Codec loop latency three cycles");
    // Random traffic.
    while (rcvd < TPC * PKTS) begin
      for (int t = 0; t < TPC; t++) begin
        if (!tx_tile_valid[t] || taken[t]) begin
          // The previous flit was taken at the last edge (or none was offered).
          taken[t] = 1'b0;
          if (sent[t] < PKTS && ($urandom % 100) < 70) begin
            tx_tile_flit[t]  = make(t, sent[t], $urandom % TPC);
            tx_tile_valid[t] = 1'b1;
          end else tx_tile_valid[t] = 1'b0;
        end
      end
      rx_tile_ready = TPC'($urandom) | TPC'($urandom);
      pipe_en = ($urandom % 100) < 80;
      @(negedge clk);
    end
    repeat (5) @(negedge clk);
    check(rcvd == TPC * PKTS, "every flit delivered exactly once");
    // Rate through the tile clock crossing.
    c_run = 1'b1;
    repeat (400) @(posedge tclk);
    c_run = 1'b0;
    repeat (20) @(posedge tclk);
    check(c_stalls == 0, "four quarter-rate tiles never wait on one router port");
    check(c_bad == 0, "flits through the clock crossing intact and correctly steered");
    check(c_rcvd == c_sent[0] + c_sent[1] + c_sent[2] + c_sent[3] && c_rcvd > 1500,
          "every flit through the clock crossing delivered");
    $display("cdc: sent %0d received %0d stalls %0d", c_sent[0] + c_sent[1] + c_sent[2] + c_sent[3], c_rcvd, c_stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (80000) @(posedge clk);
    failures++;
    $display("FAIL watchdog rcvd=%0d", rcvd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
