// tb_codec_rx: self-checking test of the Codec receiving path.
//
// Sends packets with random tile addresses (a few beyond the last tile) under
// random tile backpressure. The testbench keeps its own copy of the queue and
// predicts, packet by packet, which tile must receive which flit; packets for a
// missing tile must be discarded. Also checks the one-cycle latency, that only
// the addressed tile sees valid, and that a busy tile blocks the queue behind it.
module tb_codec_rx;
  import noc_pkg::*;

  localparam int unsigned TPC   = 4;
  localparam int unsigned DEPTH = 4;

  logic           clk = 1'b0;
  logic           rst_n;
  logic           in_valid, in_ready;
  flit_t          in_flit;
  logic [TPC-1:0] tile_valid, tile_ready;
  flit_t          tile_flit [TPC];
  int             checks = 0, failures = 0;
  flit_t          model [$];
  int             delivered [TPC];
  int             dropped = 0;

  always #5 clk = ~clk;

  codec_rx #(.TPC(TPC), .DEPTH(DEPTH)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      check(in_ready == (model.size() < DEPTH), "in_ready tracks the queue");
      if (model.size() > 0) begin
        int t;
        t = int'(model[0].dst_tile);
        for (int k = 0; k < TPC; k++) begin
          check(tile_valid[k] == (k == t), "only the addressed tile sees valid");
          if (k == t) check(tile_flit[k] == model[0], "flit to tile matches model");
        end
        if (t >= TPC) begin
          void'(model.pop_front());
          dropped++;
        end else if (tile_ready[t]) begin
          void'(model.pop_front());
          delivered[t]++;
        end
      end else begin
        check(tile_valid == '0, "no valid when empty");
      end
      if (in_valid && in_ready) model.push_back(in_flit);
    end
  end

  function automatic flit_t pkt(input int tile);
    flit_t f;
    f.dst_node = NODE_W'($urandom);
    f.dst_tile = TILE_W'(tile);
    f.data     = $urandom;
    return f;
  endfunction

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; tile_ready = '0; in_flit = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // Latency and head-of-line blocking: tile 1 busy, a packet for tile 3 behind it waits.
    in_valid = 1'b1; in_flit = pkt(1);
    @(negedge clk);
    in_flit = pkt(3);
    check(tile_valid == 4'b0010, "one-cycle latency to the addressed tile");
    @(negedge clk);
    in_valid = 1'b0;
    repeat (3) @(negedge clk);
    check(tile_valid == 4'b0010, "busy tile blocks the packets behind it");
    tile_ready = 4'b0010;
    @(negedge clk);
    check(tile_valid == 4'b1000, "next packet steered after the busy tile accepts");
    tile_ready = '1;
    @(negedge clk);
    for (int k = 0; k < 4000; k++) begin
      in_valid   = ($urandom % 100) < 60;
      in_flit    = pkt(($urandom % 20 == 0) ? TPC + ($urandom % 4) : $urandom % TPC);
      tile_ready = TPC'($urandom) | TPC'($urandom);
      @(negedge clk);
    end
    in_valid = 1'b0; tile_ready = '1;
    repeat (DEPTH + 2) @(negedge clk);
    check(model.size() == 0 && tile_valid == '0, "queue drains");
    check(dropped > 0, "packets for a missing tile discarded");
    for (int t = 0; t < TPC; t++) check(delivered[t] > 100, "every tile receives");
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
