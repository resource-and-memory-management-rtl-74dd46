// pipe_multiplier: integer multiplier functional unit, either shared between
// threads through an arbiter or replicated inside each thread.
//
// The low W bits of the product of the two operands are registered once, so a
// product is ready one cycle after its operands and one can start every cycle.
// Interface: en, a, b in; p out.
// Timing: LAT-cycle latency (1 by default, a pipeline of LAT registers).
// Sharing or replicating the multiplier is a configuration of the design; its
// latency and internal structure are this design's choices.
module pipe_multiplier #(
  parameter int unsigned W   = 32,
  parameter int unsigned LAT = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] p
);
  logic [W-1:0] pipe_q [LAT];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < LAT; i++) pipe_q[i] <= '0;
    end else begin
      if (en) pipe_q[0] <= W'(a * b);
      for (int unsigned i = 1; i < LAT; i++) pipe_q[i] <= pipe_q[i-1];
    end
  end

  assign p = pipe_q[LAT-1];
endmodule
