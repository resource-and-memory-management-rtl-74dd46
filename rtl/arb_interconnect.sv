// arb_interconnect: connection generated between N parallel-executing master
// interfaces and one slave port (a memory port, a register, a lock, a barrier or a
// functional unit).
//
// Each master request first passes a req_module, the arbiter grants one of the
// remaining requests, and the granted request payload is steered to the slave in
// the same cycle. A master that requests but is not granted sees m_stall, which
// the owning function ORs with the stalls of its other interfaces. Its function
// stall (m_fn_stall) comes back to let the req_module mask a request that was
// already served. Returned data goes through a data_receiver per master, sized to
// the slave latency LAT; for a 0-latency slave (a register) the slave output is
// wired straight to every master, as the design prescribes.
// Interface: m_req/m_pay per master, m_fn_stall per master in; m_stall, m_rdata,
// m_grant per master out; s_en/s_pay to the slave, s_rdata/s_valid from it.
// Timing: 0-cycle arbitration; data LAT cycles after the grant.
module arb_interconnect #(
  parameter int unsigned N        = 3,
  parameter int unsigned PAY_W    = 65,
  parameter int unsigned RD_W     = 32,
  parameter int unsigned LAT      = 1,
  parameter bit          VARIABLE = 1'b0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [N-1:0]     m_req,
  input  logic [PAY_W-1:0] m_pay [N],
  input  logic [N-1:0]     m_fn_stall,
  output logic [N-1:0]     m_stall,
  output logic [N-1:0]     m_grant,
  output logic [RD_W-1:0]  m_rdata [N],
  output logic             s_en,
  output logic [PAY_W-1:0] s_pay,
  input  logic [RD_W-1:0]  s_rdata,
  input  logic             s_valid
);
  logic [N-1:0] req_eff;

  for (genvar i = 0; i < N; i++) begin : g_rq
    req_module u_rq (
      .clk, .rst_n,
      .req     (m_req[i]),
      .grant   (m_grant[i]),
      .fn_stall(m_fn_stall[i]),
      .req_out (req_eff[i])
    );
  end

  rr_arbiter #(.N(N)) u_arb (.clk, .rst_n, .req(req_eff), .grant(m_grant));

  assign m_stall = req_eff & ~m_grant;
  assign s_en    = |m_grant;

  always_comb begin
    s_pay = '0;
    for (int unsigned i = 0; i < N; i++)
      if (m_grant[i]) s_pay = m_pay[i];
  end

  for (genvar i = 0; i < N; i++) begin : g_rx
    if (LAT == 0 && !VARIABLE) begin : g_direct
      assign m_rdata[i] = s_rdata;
    end else begin : g_recv
      data_receiver #(.LAT(LAT == 0 ? 1 : LAT), .W(RD_W), .VARIABLE(VARIABLE)) u_rx (
        .clk, .rst_n,
        .grant  (m_grant[i]),
        .s_valid(s_valid),
        .s_rdata(s_rdata),
        .m_rdata(m_rdata[i])
      );
    end
  end
endmodule
