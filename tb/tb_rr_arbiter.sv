// tb_rr_arbiter: self-checking test of the round-robin arbiter.
//
// Drives random request vectors and a random advance, and compares each grant with
// a reference computed here: the first requester after the last one served, with
// wrap-around. Checks that with all requesters active the grant rotates through
// every requester in turn, and that a grant not used (advance low) is held.
module tb_rr_arbiter;
  localparam int unsigned N = 5;

  logic         clk = 1'b0;
  logic         rst_n;
  logic [N-1:0] req, grant;
  logic         advance, any_grant;
  logic [2:0]   grant_idx;
  int           checks = 0, failures = 0;
  int           last_ref;

  always #5 clk = ~clk;

  rr_arbiter #(.N(N)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t req=%b grant=%b last=%0d", what, $time, req, grant, last_ref);
    end
  endtask

  function automatic int ref_pick(input logic [N-1:0] r, input int last);
    for (int k = 1; k <= N; k++) if (r[(last + k) % N]) return (last + k) % N;
    return -1;
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      int p;
      p = ref_pick(req, last_ref);
      check(any_grant == (p >= 0), "any_grant");
      if (p >= 0) begin
        check(grant == (N'(1) << p), "grant one-hot on expected requester");
        check(int'(grant_idx) == p, "grant index");
        if (advance) last_ref = p;
      end else begin
        check(grant == '0, "no grant without requests");
      end
    end
  end

  initial begin
    int seq [$];
    rst_n = 1'b0; req = '0; advance = 1'b0; last_ref = N - 1;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // All requesting: grants must visit 0,1,2,3,4,0,...
    req = '1; advance = 1'b1;
    for (int k = 0; k < 2 * N; k++) begin
      seq.push_back(int'(grant_idx));
      @(negedge clk);
    end
    for (int k = 0; k < 2 * N; k++) check(seq[k] == k % N, "rotation order with all requesting");
    // Unused grant is held.
    advance = 1'b0;
    begin
      logic [N-1:0] g0;
      g0 = grant;
      repeat (3) @(negedge clk);
      check(grant == g0, "grant held while advance is low");
    end
    for (int k = 0; k < 4000; k++) begin
      req     = N'($urandom);
      advance = $urandom % 2;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
