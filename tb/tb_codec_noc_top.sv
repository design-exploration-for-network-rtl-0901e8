// tb_codec_noc_top: end-to-end test of the whole design at its default size.
//
// The top is instantiated with no parameter overrides: the 2x2 Codec mesh with 16
// tiles on the router clock and the eight-tier ring network with 128 tiles on a
// tile clock four times slower. Single packets on the idle networks check the
// zero-load latency (exact in the mesh, bounded through the clock crossings); then all 144 tiles send random traffic to
// random tiles of their own network under random sink backpressure, and the tile
// models check every delivery. The test counts how often each mechanism of the
// design happened and fails any that never did: Codec combining (two or more
// tiles of one Codec offering at once), a tile held back by a full path, a sink
// holding a packet back, delivery within one router, X-only, Y-only and XY mesh
// routes, packets changing tier, and ring traffic each way round.
module tb_codec_noc_top;
  import noc_pkg::*;

  localparam int unsigned NT2 = 16;
  localparam int unsigned NT3 = 128;
  localparam int unsigned RPT = 4;

  logic clk = 1'b0;
  logic rst_n;
  logic enable;
  int   checks = 0, failures = 0;

  logic tclk = 1'b0;
  always #5 clk = ~clk;      // routers and Codecs
  always #20 tclk = ~tclk;   // tiles of the 3D network, a quarter of the router clock

  logic [NT2-1:0] m_tx_valid, m_tx_ready, m_rx_valid, m_rx_ready;
  flit_t          m_tx_flit [NT2];
  flit_t          m_rx_flit [NT2];
  logic           m_done;
  logic [NT3-1:0] s_tx_valid, s_tx_ready, s_rx_valid, s_rx_ready;
  flit_t          s_tx_flit [NT3];
  flit_t          s_rx_flit [NT3];
  logic           s_done;

  codec_noc_top dut (
    .clk           (clk),
    .rst_n         (rst_n),
    .tile_clk      (tclk),
    .tile_rst_n    (rst_n),
    .net2d_tx_valid(m_tx_valid),
    .net2d_tx_ready(m_tx_ready),
    .net2d_tx_flit (m_tx_flit),
    .net2d_rx_valid(m_rx_valid),
    .net2d_rx_ready(m_rx_ready),
    .net2d_rx_flit (m_rx_flit),
    .net3d_tx_valid(s_tx_valid),
    .net3d_tx_ready(s_tx_ready),
    .net3d_tx_flit (s_tx_flit),
    .net3d_rx_valid(s_rx_valid),
    .net3d_rx_ready(s_rx_ready),
    .net3d_rx_flit (s_rx_flit)
  );

  tile_traffic #(.NT(NT2), .TPC(4), .PKTS(400), .LOAD_PCT(30), .RDY_PCT(80)) tiles_2d (
    .clk(clk), .rst_n(rst_n), .enable(enable),
    .tx_valid(m_tx_valid), .tx_ready(m_tx_ready), .tx_flit(m_tx_flit),
    .rx_valid(m_rx_valid), .rx_ready(m_rx_ready), .rx_flit(m_rx_flit), .done(m_done)
  );

  tile_traffic #(.NT(NT3), .TPC(4), .PKTS(100), .LOAD_PCT(15), .RDY_PCT(85)) tiles_3d (
    .clk(tclk), .rst_n(rst_n), .enable(enable),
    .tx_valid(s_tx_valid), .tx_ready(s_tx_ready), .tx_flit(s_tx_flit),
    .rx_valid(s_rx_valid), .rx_ready(s_rx_ready), .rx_flit(s_rx_flit), .done(s_done)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic need(input int count, input string what);
    $display("mechanism %-28s %0d", what, count);
    check(count > 0, {"mechanism never happened: ", what});
  endtask

  function automatic int mesh_hops(input int rs, input int rd);
    return ((rs % 2) != (rd % 2) ? 1 : 0) + ((rs / 2) != (rd / 2) ? 1 : 0);
  endfunction

  function automatic int ring_hops(input int es, input int ed);
    int fwd, planar;
    fwd = (ed % RPT - es % RPT + RPT) % RPT;
    planar = (fwd <= RPT / 2) ? fwd : RPT - fwd;
    return planar + ((es / RPT > ed / RPT) ? es / RPT - ed / RPT : ed / RPT - es / RPT);
  endfunction

  initial begin
    int lat, local_n, x_n, y_n, xy_n, vert, fwd_n, bwd_n;
    rst_n = 1'b0; enable = 1'b0;
    repeat (12) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    for (int s = 0; s < NT2; s++) begin
      tiles_2d.send_one(s, (s * 7 + 3) % NT2, lat);
      check(lat == 3 + mesh_hops(s / 4, ((s * 7 + 3) % NT2) / 4), "zero-load latency, 2D mesh");
    end
    for (int s = 0; s < NT3; s += 5) begin
      tiles_3d.send_one(s, (s * 11 + 17) % NT3, lat);
      // In tile cycles, through both clock crossings: 3 to 5 plus a quarter of the hops.
      check(lat >= 2 + ring_hops(s / 4, ((s * 11 + 17) % NT3) / 4) / 4 &&
            lat <= 5 + ring_hops(s / 4, ((s * 11 + 17) % NT3) / 4) / 4, "zero-load latency, 3D ring");
    end
    enable = 1'b1;
    wait (m_done && s_done);
    repeat (5) @(posedge clk);
    tiles_2d.final_check();
    tiles_3d.final_check();

    local_n = 0; x_n = 0; y_n = 0; xy_n = 0;
    for (int s = 0; s < 4; s++)
      for (int d = 0; d < 4; d++) begin
        int dx, dy;
        dx = (s % 2 != d % 2);
        dy = (s / 2 != d / 2);
        if (!dx && !dy) local_n += tiles_2d.pair_cnt[s][d];
        if (dx && !dy)  x_n     += tiles_2d.pair_cnt[s][d];
        if (!dx && dy)  y_n     += tiles_2d.pair_cnt[s][d];
        if (dx && dy)   xy_n    += tiles_2d.pair_cnt[s][d];
      end
    vert = 0; fwd_n = 0; bwd_n = 0;
    for (int s = 0; s < NT3 / 4; s++)
      for (int d = 0; d < NT3 / 4; d++) begin
        int f;
        f = (d % RPT - s % RPT + RPT) % RPT;
        if (s / RPT != d / RPT) vert += tiles_3d.pair_cnt[s][d];
        if (f != 0 && f <= RPT / 2) fwd_n += tiles_3d.pair_cnt[s][d];
        if (f > RPT / 2) bwd_n += tiles_3d.pair_cnt[s][d];
      end
    need(tiles_2d.combine_cycles, "2D Codec combining");
    need(tiles_3d.combine_cycles, "3D Codec combining");
    need(tiles_2d.stall_cycles + tiles_3d.stall_cycles, "tile send stall");
    need(tiles_2d.backpressure_cycles + tiles_3d.backpressure_cycles, "sink backpressure");
    need(local_n, "2D same-router delivery");
    need(x_n, "2D X route");
    need(y_n, "2D Y route");
    need(xy_n, "2D XY route");
    need(vert, "3D tier crossing");
    need(fwd_n, "3D ring forward");
    need(bwd_n, "3D ring backward");
    $display("delivered 2D=%0d 3D=%0d, max latency 2D=%0d 3D=%0d cycles",
             tiles_2d.rcvd, tiles_3d.rcvd, tiles_2d.max_lat, tiles_3d.max_lat);
    checks   += tiles_2d.checks + tiles_3d.checks;
    failures += tiles_2d.failures + tiles_3d.failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL watchdog 2D=%0d 3D=%0d", tiles_2d.rcvd, tiles_3d.rcvd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
