// req_module: request half of the deadlock-prevention pair placed on every
// master interface that reaches an arbiter.
//
// A function stalls while any of its interfaces waits for a grant, and while it
// stalls its FSM keeps every request high. Without this module an interface that
// was already served would request again, and two functions that each hold one of
// two arbiters could wait on each other for ever. The module keeps one register
// that drops to 0 when the interface is granted while the function is still
// stalled by another interface; the register is AND-ed with the raw request, so a
// served interface stays quiet until the function moves on. Once the function
// stall clears the register returns to 1.
// Interface: req (raw), grant (from the arbiter), fn_stall (OR of the function's
// interface stalls), req_out (to the arbiter). Timing: one register, no latency on
// req_out. The register and AND follow the design description; that the register
// holds 0 for as long as the function stays stalled, rather than for a single
// cycle, is this design's reading, needed when more than two masters contend.
module req_module (
  input  logic clk,
  input  logic rst_n,
  input  logic req,
  input  logic grant,
  input  logic fn_stall,
  output logic req_out
);
  logic allow_q;

  always_ff @(posedge clk) begin
    if (!rst_n)             allow_q <= 1'b1;
    else if (!fn_stall)     allow_q <= 1'b1;
    else if (grant)         allow_q <= 1'b0;
  end

  assign req_out = req & allow_q;
endmodule
