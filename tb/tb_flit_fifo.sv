// tb_flit_fifo: self-checking test of the packet queue.
//
// Pushes and pops under random valid/ready and compares every popped flit with a
// reference queue kept in the testbench. Also checks that a flit is visible one
// cycle after it is written, that a queue of DEPTH flits refuses further writes,
// and that it drains completely.
module tb_flit_fifo;
  import noc_pkg::*;

  localparam int unsigned DEPTH = 4;

  logic  clk = 1'b0;
  logic  rst_n;
  logic  in_valid, in_ready, out_valid, out_ready;
  flit_t in_flit, out_flit;
  int    checks = 0, failures = 0;
  flit_t model [$];
  int    full_seen = 0;

  always #5 clk = ~clk;

  flit_fifo #(.DEPTH(DEPTH)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic flit_t rand_flit();
    flit_t f;
    f.dst_node = NODE_W'($urandom);
    f.dst_tile = TILE_W'($urandom);
    f.data     = $urandom;
    return f;
  endfunction

  // Reference model, sampled on each rising edge before the design updates.
  always @(posedge clk) begin
    if (rst_n) begin
      check(in_ready == (model.size() < DEPTH), "in_ready matches occupancy");
      check(out_valid == (model.size() > 0), "out_valid matches occupancy");
      if (out_valid && out_ready) begin
        check(out_flit == model[0], "popped flit in order");
        void'(model.pop_front());
      end
      if (in_valid && in_ready) model.push_back(in_flit);
      if (model.size() == DEPTH) full_seen++;
    end
  end

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; out_ready = 1'b0; in_flit = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // Latency: a write is visible at the head in the next cycle.
    in_valid = 1'b1; in_flit = rand_flit();
    @(negedge clk);
    in_valid = 1'b0;
    check(out_valid && out_flit == model[0], "flit visible one cycle after write");
    // Fill to full with the reader stalled.
    for (int k = 0; k < DEPTH + 2; k++) begin
      in_valid = 1'b1; in_flit = rand_flit();
      @(negedge clk);
    end
    in_valid = 1'b0;
    check(!in_ready, "full queue refuses writes");
    // Random traffic.
    for (int k = 0; k < 3000; k++) begin
      in_valid  = ($urandom % 100) < 60;
      out_ready = ($urandom % 100) < 55;
      in_flit   = rand_flit();
      @(negedge clk);
    end
    in_valid = 1'b0; out_ready = 1'b1;
    repeat (DEPTH + 2) @(negedge clk);
    check(!out_valid && model.size() == 0, "queue drains");
    check(full_seen > 10, "full condition exercised");
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
