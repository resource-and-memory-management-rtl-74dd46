// or_interconnect: joins master interfaces whose functions never run at the same
// time (sequential execution) onto one slave port.
//
// Because the functions execute one after another, at most one of them is active,
// and every inactive master drives all-zero request signals. The slave request is
// then just the bitwise OR of all master requests; no multiplexer select and no
// arbiter is needed. Returned data and stall are broadcast to every master, and
// only the active one looks at them.
// Interface: m_req[N][W] in, s_req[W] out. Timing: purely combinational.
// The OR structure and the zero-when-idle rule follow the design description; an
// assertion checks that no two masters are active together (bit W-1 of a request
// is taken to be its enable).
module or_interconnect #(
  parameter int unsigned N = 2,
  parameter int unsigned W = 66
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] m_req [N],
  output logic [W-1:0] s_req
);
  always_comb begin
    s_req = '0;
    for (int unsigned i = 0; i < N; i++) s_req |= m_req[i];
  end

  logic [N-1:0] active;
  always_comb for (int unsigned i = 0; i < N; i++) active[i] = m_req[i][W-1];

  a_sequential: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(active));
  a_idle_zero: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0(active) |-> (active != '0 || s_req == '0));
endmodule
