// tb_noc3d_codec: end-to-end test of the 3D Codec network.
//
// Networks run side by side: the default (eight tiers of four-router rings, 128
// tiles, tiles on a clock four times slower than the routers), the same ring with
// the tiles on the router clock (for exact latencies), two tiers of four-router full meshes (16 tiles per tier), and four
// tiers of a single router each (4 tiles per tier, the vertical-complexity
// setup). Single packets on an idle network check the latency, 3 cycles plus one
// per router hop where the tiles share the router clock (a bounded number of tile
// cycles through the clock crossings), where a hop count is the shorter way round the ring (or one
// link in a full mesh) plus the tier distance. Then every tile sends random
// traffic to random tiles and the tile model checks every delivery. Counted
// mechanisms: packets that change tier, ring packets going each way round, and
// Codec competition.
module tb_noc3d_codec;
  import noc_pkg::*;

  localparam int unsigned TA = 8, RA = 4;   // ring
  localparam int unsigned TB = 2, RB = 4;   // full mesh
  localparam int unsigned TC = 4, RC = 1;   // one router per tier
  localparam int unsigned NTA = TA * RA * 4;
  localparam int unsigned NTB = TB * RB * 4;
  localparam int unsigned NTC = TC * RC * 4;

  logic clk = 1'b0;
  logic rst_n;
  logic enable;
  int   checks = 0, failures = 0;

  logic tclk = 1'b0;
  always #5 clk = ~clk;
  always #20 tclk = ~tclk;   // tiles at a quarter of the router clock

  logic [NTA-1:0] a_tx_valid, a_tx_ready, a_rx_valid, a_rx_ready;
  flit_t          a_tx_flit [NTA];
  flit_t          a_rx_flit [NTA];
  logic           a_done;
  logic [NTB-1:0] b_tx_valid, b_tx_ready, b_rx_valid, b_rx_ready;
  flit_t          b_tx_flit [NTB];
  flit_t          b_rx_flit [NTB];
  logic           b_done;
  logic [NTC-1:0] c_tx_valid, c_tx_ready, c_rx_valid, c_rx_ready;
  flit_t          c_tx_flit [NTC];
  flit_t          c_rx_flit [NTC];
  logic           c_done;

  noc3d_codec dut_a (
    .clk(clk), .rst_n(rst_n), .tile_clk(tclk), .tile_rst_n(rst_n),
    .tx_valid(a_tx_valid), .tx_ready(a_tx_ready), .tx_flit(a_tx_flit),
    .rx_valid(a_rx_valid), .rx_ready(a_rx_ready), .rx_flit(a_rx_flit)
  );
  tile_traffic #(.NT(NTA), .TPC(4), .PKTS(60), .LOAD_PCT(15), .RDY_PCT(90)) tiles_a (
    .clk(tclk), .rst_n(rst_n), .enable(enable),
    .tx_valid(a_tx_valid), .tx_ready(a_tx_ready), .tx_flit(a_tx_flit),
    .rx_valid(a_rx_valid), .rx_ready(a_rx_ready), .rx_flit(a_rx_flit), .done(a_done)
  );

  noc3d_codec #(.TIERS(TB), .RPT(RB), .TOPO(TOPO_FULL_MESH), .TILE_CDC(1'b0)) dut_b (
    .clk(clk), .rst_n(rst_n), .tile_clk(clk), .tile_rst_n(rst_n),
    .tx_valid(b_tx_valid), .tx_ready(b_tx_ready), .tx_flit(b_tx_flit),
    .rx_valid(b_rx_valid), .rx_ready(b_rx_ready), .rx_flit(b_rx_flit)
  );
  tile_traffic #(.NT(NTB), .TPC(4), .PKTS(200), .LOAD_PCT(20), .RDY_PCT(85)) tiles_b (
    .clk(clk), .rst_n(rst_n), .enable(enable),
    .tx_valid(b_tx_valid), .tx_ready(b_tx_ready), .tx_flit(b_tx_flit),
    .rx_valid(b_rx_valid), .rx_ready(b_rx_ready), .rx_flit(b_rx_flit), .done(b_done)
  );

  noc3d_codec #(.TIERS(TC), .RPT(RC), .TILE_CDC(1'b0)) dut_c (
    .clk(clk), .rst_n(rst_n), .tile_clk(clk), .tile_rst_n(rst_n),
    .tx_valid(c_tx_valid), .tx_ready(c_tx_ready), .tx_flit(c_tx_flit),
    .rx_valid(c_rx_valid), .rx_ready(c_rx_ready), .rx_flit(c_rx_flit)
  );
  tile_traffic #(.NT(NTC), .TPC(4), .PKTS(200), .LOAD_PCT(20), .RDY_PCT(85)) tiles_c (
    .clk(clk), .rst_n(rst_n), .enable(enable),
    .tx_valid(c_tx_valid), .tx_ready(c_tx_ready), .tx_flit(c_tx_flit),
    .rx_valid(c_rx_valid), .rx_ready(c_rx_ready), .rx_flit(c_rx_flit), .done(c_done)
  );

  // The default ring again, tiles on the router clock, for exact latencies.
  logic [NTA-1:0] e_tx_valid, e_tx_ready, e_rx_valid, e_rx_ready;
  flit_t          e_tx_flit [NTA];
  flit_t          e_rx_flit [NTA];
  logic           e_done;
  noc3d_codec #(.TILE_CDC(1'b0)) dut_e (
    .clk(clk), .rst_n(rst_n), .tile_clk(clk), .tile_rst_n(rst_n),
    .tx_valid(e_tx_valid), .tx_ready(e_tx_ready), .tx_flit(e_tx_flit),
    .rx_valid(e_rx_valid), .rx_ready(e_rx_ready), .rx_flit(e_rx_flit)
  );
  tile_traffic #(.NT(NTA), .TPC(4), .PKTS(0)) tiles_e (
    .clk(clk), .rst_n(rst_n), .enable(enable),
    .tx_valid(e_tx_valid), .tx_ready(e_tx_ready), .tx_flit(e_tx_flit),
    .rx_valid(e_rx_valid), .rx_ready(e_rx_ready), .rx_flit(e_rx_flit), .done(e_done)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Router hops between endpoints es and ed: planar part plus tier distance.
  function automatic int hops(input int es, input int ed, input int rpt, input bit mesh);
    int ps, pd, zs, zd, fwd, planar;
    ps = es % rpt; pd = ed % rpt; zs = es / rpt; zd = ed / rpt;
    fwd = (pd - ps + rpt) % rpt;
    if (ps == pd)  planar = 0;
    else if (mesh) planar = 1;
    else           planar = (fwd <= rpt / 2) ? fwd : rpt - fwd;
    return planar + ((zs > zd) ? zs - zd : zd - zs);
  endfunction

  initial begin
    int lat, vert, cw, ccw;
    rst_n = 1'b0; enable = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    for (int s = 0; s < NTA; s += 13)
      for (int d = 0; d < NTA; d += 7) begin
        tiles_e.send_one(s, d, lat);
        check(lat == 3 + hops(s / 4, d / 4, RA, 0), "zero-load latency, ring");
        // Through the clock crossings, in tile cycles (one tile cycle = four router cycles).
        tiles_a.send_one(s, d, lat);
        check(lat >= 2 + hops(s / 4, d / 4, RA, 0) / 4 && lat <= 5 + hops(s / 4, d / 4, RA, 0) / 4,
              "zero-load latency, ring with tile clock crossing");
      end
    for (int s = 0; s < NTB; s += 3)
      for (int d = 0; d < NTB; d += 5) begin
        tiles_b.send_one(s, d, lat);
        check(lat == 3 + hops(s / 4, d / 4, RB, 1), "zero-load latency, full mesh");
      end
    for (int s = 0; s < NTC; s += 1)
      for (int d = 0; d < NTC; d += 3) begin
        tiles_c.send_one(s, d, lat);
        check(lat == 3 + hops(s / 4, d / 4, RC, 0), "zero-load latency, one router per tier");
      end
    enable = 1'b1;
    wait (a_done && b_done && c_done && e_done);
    repeat (5) @(posedge clk);
    tiles_a.final_check();
    tiles_b.final_check();
    tiles_c.final_check();
    // Mechanisms seen in the ring network.
    vert = 0; cw = 0; ccw = 0;
    for (int s = 0; s < TA * RA; s++)
      for (int d = 0; d < TA * RA; d++) begin
        int fwd;
        fwd = (d % RA - s % RA + RA) % RA;
        if (s / RA != d / RA) vert += tiles_a.pair_cnt[s][d];
        if (fwd != 0 && fwd <= RA / 2) cw += tiles_a.pair_cnt[s][d];
        if (fwd > RA / 2) ccw += tiles_a.pair_cnt[s][d];
      end
    $display("ring: rcvd=%0d tier-crossing=%0d forward=%0d backward=%0d combine=%0d stalls=%0d",
             tiles_a.rcvd, vert, cw, ccw, tiles_a.combine_cycles, tiles_a.stall_cycles);
    check(vert > 0, "tier-crossing packets");
    check(cw > 0 && ccw > 0, "ring used both ways round");
    check(tiles_a.combine_cycles > 0 && tiles_b.combine_cycles > 0 && tiles_c.combine_cycles > 0,
          "Codec combining exercised");
    checks   += tiles_a.checks + tiles_b.checks + tiles_c.checks;
    failures += tiles_a.failures + tiles_b.failures + tiles_c.failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL watchdog a=%0d b=%0d c=%0d", tiles_a.rcvd, tiles_b.rcvd, tiles_c.rcvd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
