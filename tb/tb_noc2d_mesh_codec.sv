// tb_noc2d_mesh_codec: end-to-end test of the 2x2 Codec mesh (network B).
//
// Four networks of Table-3.2 configurations are tested side by side: the main one
// (one Codec of four tiles per router, 16 tiles), two Codecs of two tiles per
// router (16 tiles), one Codec of sixteen tiles per router (64 tiles) and four
// Codecs of four tiles per router (64 tiles, six-port routers). On each, single packets on an idle network check the latency:
// 3 cycles to a tile of the same router (or the same Codec), 4 to a neighbouring
// router and 5 to the diagonal router. Then every tile sends random traffic to
// random tiles under random sink backpressure, and the tile model checks that each
// packet arrives once, intact, at the tile it names and in order.
module tb_noc2d_mesh_codec;
  import noc_pkg::*;

  localparam int unsigned NTA = 16;    // CPR=1, TPC=4
  localparam int unsigned NTB = 16;    // CPR=2, TPC=2

  logic clk = 1'b0;
  logic rst_n;
  logic enable;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic [NTA-1:0] a_tx_valid, a_tx_ready, a_rx_valid, a_rx_ready;
  flit_t          a_tx_flit [NTA];
  flit_t          a_rx_flit [NTA];
  logic           a_done;
  logic [NTB-1:0] b_tx_valid, b_tx_ready, b_rx_valid, b_rx_ready;
  flit_t          b_tx_flit [NTB];
  flit_t          b_rx_flit [NTB];
  logic           b_done;
  localparam int unsigned NTC = 64;    // CPR=1, TPC=16
  localparam int unsigned NTD = 64;    // CPR=4, TPC=4
  logic [NTC-1:0] c_tx_valid, c_tx_ready, c_rx_valid, c_rx_ready;
  flit_t          c_tx_flit [NTC];
  flit_t          c_rx_flit [NTC];
  logic           c_done;
  logic [NTD-1:0] d_tx_valid, d_tx_ready, d_rx_valid, d_rx_ready;
  flit_t          d_tx_flit [NTD];
  flit_t          d_rx_flit [NTD];
  logic           d_done;

  noc2d_mesh_codec #(.CPR(1), .TPC(4)) dut_a (
    .clk(clk), .rst_n(rst_n), .tile_clk(clk), .tile_rst_n(rst_n),
    .tx_valid(a_tx_valid), .tx_ready(a_tx_ready), .tx_flit(a_tx_flit),
    .rx_valid(a_rx_valid), .rx_ready(a_rx_ready), .rx_flit(a_rx_flit)
  );
  tile_traffic #(.NT(NTA), .TPC(4), .PKTS(300), .LOAD_PCT(25), .RDY_PCT(85)) tiles_a (
    .clk(clk), .rst_n(rst_n), .enable(enable),
    .tx_valid(a_tx_valid), .tx_ready(a_tx_ready), .tx_flit(a_tx_flit),
    .rx_valid(a_rx_valid), .rx_ready(a_rx_ready), .rx_flit(a_rx_flit), .done(a_done)
  );

  noc2d_mesh_codec #(.CPR(2), .TPC(2)) dut_b (
    .clk(clk), .rst_n(rst_n), .tile_clk(clk), .tile_rst_n(rst_n),
    .tx_valid(b_tx_valid), .tx_ready(b_tx_ready), .tx_flit(b_tx_flit),
    .rx_valid(b_rx_valid), .rx_ready(b_rx_ready), .rx_flit(b_rx_flit)
  );
  tile_traffic #(.NT(NTB), .TPC(2), .PKTS(300), .LOAD_PCT(25), .RDY_PCT(85)) tiles_b (
    .clk(clk), .rst_n(rst_n), .enable(enable),
    .tx_valid(b_tx_valid), .tx_ready(b_tx_ready), .tx_flit(b_tx_flit),
    .rx_valid(b_rx_valid), .rx_ready(b_rx_ready), .rx_flit(b_rx_flit), .done(b_done)
  );

  noc2d_mesh_codec #(.CPR(1), .TPC(16)) dut_c (
    .clk(clk), .rst_n(rst_n), .tile_clk(clk), .tile_rst_n(rst_n),
    .tx_valid(c_tx_valid), .tx_ready(c_tx_ready), .tx_flit(c_tx_flit),
    .rx_valid(c_rx_valid), .rx_ready(c_rx_ready), .rx_flit(c_rx_flit)
  );
  tile_traffic #(.NT(NTC), .TPC(16), .PKTS(60), .LOAD_PCT(6), .RDY_PCT(85)) tiles_c (
    .clk(clk), .rst_n(rst_n), .enable(enable),
    .tx_valid(c_tx_valid), .tx_ready(c_tx_ready), .tx_flit(c_tx_flit),
    .rx_valid(c_rx_valid), .rx_ready(c_rx_ready), .rx_flit(c_rx_flit), .done(c_done)
  );

  noc2d_mesh_codec #(.CPR(4), .TPC(4)) dut_d (
    .clk(clk), .rst_n(rst_n), .tile_clk(clk), .tile_rst_n(rst_n),
    .tx_valid(d_tx_valid), .tx_ready(d_tx_ready), .tx_flit(d_tx_flit),
    .rx_valid(d_rx_valid), .rx_ready(d_rx_ready), .rx_flit(d_rx_flit)
  );
  tile_traffic #(.NT(NTD), .TPC(4), .PKTS(60), .LOAD_PCT(6), .RDY_PCT(85)) tiles_d (
    .clk(clk), .rst_n(rst_n), .enable(enable),
    .tx_valid(d_tx_valid), .tx_ready(d_tx_ready), .tx_flit(d_tx_flit),
    .rx_valid(d_rx_valid), .rx_ready(d_rx_ready), .rx_flit(d_rx_flit), .done(d_done)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Router hops between the routers of tiles s and d in the 2x2 mesh.
  function automatic int hops(input int rs, input int rd);
    return ((rs % 2) != (rd % 2) ? 1 : 0) + ((rs / 2) != (rd / 2) ? 1 : 0);
  endfunction

  initial begin
    int lat;
    rst_n = 1'b0; enable = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    // Zero-load latency, configuration A: tile s on router s/4.
    for (int s = 0; s < NTA; s += 3)
      for (int d = 0; d < NTA; d += 5) begin
        tiles_a.send_one(s, d, lat);
        check(lat == 3 + hops(s / 4, d / 4), "zero-load latency (1 Codec per router)");
      end
    // Configuration B: tile s on Codec s/2, router s/4.
    for (int s = 0; s < NTB; s += 3)
      for (int d = 0; d < NTB; d += 5) begin
        tiles_b.send_one(s, d, lat);
        check(lat == 3 + hops(s / 4, d / 4), "zero-load latency (2 Codecs per router)");
      end
    // 64-tile configurations: 16 tiles per router.
    for (int s = 0; s < NTC; s += 7)
      for (int d = 0; d < NTC; d += 9) begin
        tiles_c.send_one(s, d, lat);
        check(lat == 3 + hops(s / 16, d / 16), "zero-load latency (1 Codec of 16 tiles)");
        tiles_d.send_one(s, d, lat);
        check(lat == 3 + hops(s / 16, d / 16), "zero-load latency (4 Codecs per router)");
      end
    enable = 1'b1;
    wait (a_done && b_done && c_done && d_done);
    repeat (5) @(posedge clk);
    tiles_a.final_check();
    tiles_b.final_check();
    tiles_c.final_check();
    tiles_d.final_check();
    check(tiles_a.combine_cycles > 0 && tiles_b.combine_cycles > 0 && tiles_c.combine_cycles > 0
          && tiles_d.combine_cycles > 0, "Codec combining exercised");
    check(tiles_a.stall_cycles > 0, "tile send stall exercised");
    check(tiles_a.backpressure_cycles > 0, "sink backpressure exercised");
    $display("A: rcvd=%0d stalls=%0d combine=%0d bp=%0d maxlat=%0d",
             tiles_a.rcvd, tiles_a.stall_cycles, tiles_a.combine_cycles,
             tiles_a.backpressure_cycles, tiles_a.max_lat);
    checks   += tiles_a.checks + tiles_b.checks + tiles_c.checks + tiles_d.checks;
    failures += tiles_a.failures + tiles_b.failures + tiles_c.failures + tiles_d.failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog a=%0d b=%0d c=%0d d=%0d", tiles_a.rcvd, tiles_b.rcvd, tiles_c.rcvd, tiles_d.rcvd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
