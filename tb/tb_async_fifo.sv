// tb_async_fifo: self-checking test of the dual-clock flit queue.
//
// Two queues run at once: one written fast and read slowly (write clock 7 ns,
// read clock 17 ns period), the other the reverse, each with random valid and
// ready. A reference queue per instance checks that every flit comes out once,
// intact and in order, that the queue fills and refuses writes when full, and
// that it drains to empty.
module tb_async_fifo;
  import noc_pkg::*;

  logic clk_a = 1'b0, clk_b = 1'b0;
  logic rst_n;
  int   checks = 0, failures = 0;
  always #3.5 clk_a = ~clk_a;
  always #8.5 clk_b = ~clk_b;

  // Instance 0: write on clk_a, read on clk_b. Instance 1: the reverse.
  logic  in_valid [2], in_ready [2], out_valid [2], out_ready [2];
  flit_t in_flit [2], out_flit [2];
  flit_t model0 [$], model1 [$];
  int    nout [2], full_seen [2];
  bit    src_on = 1'b0;

  async_fifo #(.DEPTH(4)) dut0 (
    .wr_clk(clk_a), .wr_rst_n(rst_n), .in_valid(in_valid[0]), .in_ready(in_ready[0]), .in_flit(in_flit[0]),
    .rd_clk(clk_b), .rd_rst_n(rst_n), .out_valid(out_valid[0]), .out_ready(out_ready[0]), .out_flit(out_flit[0])
  );
  async_fifo #(.DEPTH(4)) dut1 (
    .wr_clk(clk_b), .wr_rst_n(rst_n), .in_valid(in_valid[1]), .in_ready(in_ready[1]), .in_flit(in_flit[1]),
    .rd_clk(clk_a), .rd_rst_n(rst_n), .out_valid(out_valid[1]), .out_ready(out_ready[1]), .out_flit(out_flit[1])
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic flit_t rand_flit();
    flit_t f;
    f.dst_node = NODE_W'($urandom);
    f.dst_tile = TILE_W'($urandom);
    f.data     = $urandom;
    return f;
  endfunction

  // Writers.
  always @(posedge clk_a) begin
    if (rst_n) begin
      if (in_valid[0] && in_ready[0]) model0.push_back(in_flit[0]);
      if (in_valid[0] && !in_ready[0]) full_seen[0]++;
      if (!in_valid[0] || in_ready[0]) begin
        in_valid[0] <= src_on && ($urandom % 100 < 80);
        in_flit[0]  <= rand_flit();
      end
    end
  end
  always @(posedge clk_b) begin
    if (rst_n) begin
      if (in_valid[1] && in_ready[1]) model1.push_back(in_flit[1]);
      if (in_valid[1] && !in_ready[1]) full_seen[1]++;
      if (!in_valid[1] || in_ready[1]) begin
        in_valid[1] <= src_on && ($urandom % 100 < 40);
        in_flit[1]  <= rand_flit();
      end
    end
  end
  // Readers.
  always @(posedge clk_b) begin
    if (rst_n) begin
      if (out_valid[0] && out_ready[0]) begin
        check(model0.size() > 0 && out_flit[0] == model0[0], "slow reader gets flits in order");
        if (model0.size() > 0) void'(model0.pop_front());
        nout[0]++;
      end
      out_ready[0] <= ($urandom % 100 < 70) || !src_on;
    end
  end
  always @(posedge clk_a) begin
    if (rst_n) begin
      if (out_valid[1] && out_ready[1]) begin
        check(model1.size() > 0 && out_flit[1] == model1[0], "fast reader gets flits in order");
        if (model1.size() > 0) void'(model1.pop_front());
        nout[1]++;
      end
      out_ready[1] <= ($urandom % 100 < 30) || !src_on;
    end
  end

  initial begin
    rst_n = 1'b0;
    for (int k = 0; k < 2; k++) begin
      in_valid[k] = 1'b0; out_ready[k] = 1'b0; in_flit[k] = '0; nout[k] = 0; full_seen[k] = 0;
    end
    repeat (4) @(posedge clk_b);
    rst_n = 1'b1;
    repeat (2) @(posedge clk_b);
    src_on = 1'b1;
    repeat (3000) @(posedge clk_b);
    src_on = 1'b0;
    repeat (40) @(posedge clk_b);
    check(model0.size() == 0 && !out_valid[0], "slow-read queue drains");
    check(model1.size() == 0 && !out_valid[1], "fast-read queue drains");
    check(nout[0] > 1000 && nout[1] > 500, "flits crossed both ways");
    check(full_seen[0] > 0 && full_seen[1] > 0, "full queue refused writes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk_b);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
