// tb_codec_tx: self-checking test of the Codec sending path.
//
// Four tiles offer flits under random valid and the router side applies random
// backpressure. A reference model here keeps the round-robin pointer and the
// output register and predicts every flit that reaches the router, in order.
// Directed phases check the rate (with all tiles busy and the router always ready,
// one flit per cycle, served 0,1,2,3,0,...) and the one-cycle latency.
module tb_codec_tx;
  import noc_pkg::*;

  localparam int unsigned TPC = 4;

  logic           clk = 1'b0;
  logic           rst_n;
  logic [TPC-1:0] tile_valid, tile_ready;
  flit_t          tile_flit [TPC];
  logic           out_valid, out_ready;
  flit_t          out_flit;
  int             checks = 0, failures = 0;
  flit_t          expect_q [$];
  int             ref_last;
  int             served [TPC];

  always #5 clk = ~clk;

  codec_tx #(.TPC(TPC)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Reference: which tile should be taken this cycle, if any.
  always @(posedge clk) begin
    if (rst_n) begin
      int pick;
      bit room;
      pick = -1;
      for (int k = 1; k <= TPC; k++)
        if (pick < 0 && tile_valid[(ref_last + k) % TPC]) pick = (ref_last + k) % TPC;
      room = !out_valid || out_ready;
      if (out_valid && out_ready) begin
        check(expect_q.size() > 0 && out_flit == expect_q[0], "flit to router matches model");
        if (expect_q.size() > 0) void'(expect_q.pop_front());
      end
      for (int t = 0; t < TPC; t++)
        check(tile_ready[t] == (room && pick == t), "tile_ready only for the tile served");
      if (room && pick >= 0) begin
        expect_q.push_back(tile_flit[pick]);
        ref_last = pick;
        served[pick]++;
      end
    end
  end

  task automatic new_flits();
    for (int t = 0; t < TPC; t++) begin
      tile_flit[t].dst_node = NODE_W'($urandom);
      tile_flit[t].dst_tile = TILE_W'($urandom);
      tile_flit[t].data     = {8'(t), 24'($urandom)};
    end
  endtask

  initial begin
    int cnt, order_ok;
    rst_n = 1'b0; tile_valid = '0; out_ready = 1'b0; ref_last = TPC - 1;
    new_flits();
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // Latency: a lone flit from tile 2 is offered one cycle after acceptance.
    tile_valid = 4'b0100; out_ready = 1'b1;
    @(negedge clk);
    tile_valid = '0;
    check(out_valid && out_flit.data[31:24] == 8'd2, "one-cycle latency to router");
    @(negedge clk);
    // Rate and rotation with all tiles busy and no backpressure.
    tile_valid = '1;
    cnt = 0; order_ok = 1;
    for (int k = 0; k < 40; k++) begin
      new_flits();
      @(negedge clk);
      if (out_valid) begin
        cnt++;
      end
    end
    check(cnt == 40, "one flit per cycle with all tiles busy");
    for (int t = 0; t < TPC; t++) check(served[t] >= 10, "equal share under full load");
    // Random traffic and backpressure.
    for (int k = 0; k < 4000; k++) begin
      tile_valid = TPC'($urandom);
      out_ready  = ($urandom % 100) < 70;
      new_flits();
      @(negedge clk);
    end
    tile_valid = '0; out_ready = 1'b1;
    repeat (3) @(negedge clk);
    check(expect_q.size() == 0 && !out_valid, "all flits delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
