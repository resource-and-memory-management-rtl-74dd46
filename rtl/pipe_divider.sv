// pipe_divider: fully pipelined unsigned integer divider, the large functional
// unit that parallel threads share.
//
// Restoring division, one quotient bit per stage and one stage per clock, so the
// latency equals the operand width W and a new division can start every cycle.
// Stage k shifts the next dividend bit into the partial remainder and subtracts
// the divisor when it fits. Division by zero gives an all-ones quotient.
// Interface: en, a (dividend), b (divisor) in; q out.
// Timing: q is the quotient of the operands presented W cycles earlier.
// Pipelining to a depth equal to the bit width follows the design description;
// the restoring structure, unsigned operands and quotient-only result are this
// design's choices.
module pipe_divider #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] q
);
  logic [W-1:0] rem_q [W];
  logic [W-1:0] quo_q [W];
  logic [W-1:0] dvd_q [W];
  logic [W-1:0] dvs_q [W];

  // One restoring step: bring in the top bit of the remaining dividend.
  function automatic logic [2*W:0] step(input logic [W-1:0] rem, input logic [W-1:0] dvd,
                                        input logic [W-1:0] dvs);
    logic [W:0] trial;
    logic       fits;
    trial = {rem, dvd[W-1]};
    fits  = trial >= {1'b0, dvs};
    return {fits, fits ? W'(trial - {1'b0, dvs}) : trial[W-1:0], dvd << 1};
  endfunction

  always_ff @(posedge clk) begin
    logic [2*W:0] r;
    if (!rst_n) begin
      for (int unsigned k = 0; k < W; k++) begin
        rem_q[k] <= '0; quo_q[k] <= '0; dvd_q[k] <= '0; dvs_q[k] <= '0;
      end
    end else begin
      r = step('0, en ? a : '0, en ? b : '0);
      rem_q[0] <= r[2*W-1:W];
      dvd_q[0] <= r[W-1:0];
      quo_q[0] <= W'(r[2*W]);
      dvs_q[0] <= en ? b : '0;
      for (int unsigned k = 1; k < W; k++) begin
        r = step(rem_q[k-1], dvd_q[k-1], dvs_q[k-1]);
        rem_q[k] <= r[2*W-1:W];
        dvd_q[k] <= r[W-1:0];
        quo_q[k] <= {quo_q[k-1][W-2:0], r[2*W]};
        dvs_q[k] <= dvs_q[k-1];
      end
    end
  end

  assign q = quo_q[W-1];
endmodule
