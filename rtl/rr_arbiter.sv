// rr_arbiter: round-robin arbiter.
//
// Grants one of N requesters, searching upwards (with wrap-around) from the
// requester after the one that last won. The pointer moves only when the grant is
// used (advance = 1), so a requester that wins but cannot send keeps its grant.
// The grant is a combinational function of req and the pointer; the pointer is a
// register. This is the rotating selection of the Codec send path ("rotates across
// all attached tiles") and of each router output port; the skip-over-idle search
// is this design's choice.
module rr_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         advance,
  output logic [N-1:0] grant,
  output logic         any_grant,
  output logic [(N > 1 ? $clog2(N) : 1)-1:0] grant_idx
);

  localparam int unsigned IDX_W = (N > 1) ? $clog2(N) : 1;

  logic [IDX_W-1:0] last;   // index of the last requester served

  always_comb begin
    int unsigned cand;
    grant     = '0;
    grant_idx = '0;
    any_grant = 1'b0;
    for (int unsigned k = 1; k <= N; k++) begin
      cand = 32'(last) + k;
      if (cand >= N) cand = cand - N;
      if (!any_grant && req[cand]) begin
        any_grant       = 1'b1;
        grant[cand]     = 1'b1;
        grant_idx       = IDX_W'(cand);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)                    last <= IDX_W'(N - 1);
    else if (advance && any_grant) last <= grant_idx;
  end

`ifndef SYNTHESIS
  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));
  a_grant_req: assert property (@(posedge clk) disable iff (!rst_n) (grant & ~req) == '0);
`endif

endmodule
