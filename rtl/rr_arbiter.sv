// rr_arbiter: round-robin arbiter between N parallel masters of one slave port.
//
// The grant is combinational: a master that requests and is granted accesses the
// slave in the same cycle, as the interconnect of the design expects. The search
// starts at the master after the one granted last, so every requester is served
// within N grants. The pointer moves only on a grant.
// Interface: req[N] in, grant[N] out (one-hot or zero). Timing: 0-cycle grant.
// The design calls for a round-robin arbiter; the priority-pointer structure is
// this design's own choice.
module rr_arbiter #(
  parameter int unsigned N = 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  output logic [N-1:0] grant
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] last_q;   // index of the master granted most recently

  always_comb begin
    int unsigned idx;
    grant = '0;
    for (int unsigned k = 1; k <= N; k++) begin
      idx = (int'(last_q) + k) % N;
      if (req[idx] && grant == '0) grant[idx] = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      last_q <= IW'(N - 1);
    end else begin
      for (int unsigned i = 0; i < N; i++)
        if (grant[i]) last_q <= IW'(i);
    end
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));
  a_granted_req: assert property (@(posedge clk) disable iff (!rst_n) (grant & ~req) == '0);
  a_work_conserving: assert property (@(posedge clk) disable iff (!rst_n) (req != '0) |-> (grant != '0));
endmodule
