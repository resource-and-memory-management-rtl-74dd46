// reg_module: a global variable or single-element array converted from memory to
// a register and shared by several functions.
//
// The value lives in one register whose output is wired to every accessing
// function, so a load has 0 cycles of latency and needs no data receiver. A
// granted store writes the register at the end of its cycle. Access arbitration
// between parallel users is done by the interconnect in front of it.
// Interface: en, we, wdata in; rdata out (always the current value).
// Timing: 0-cycle load, store visible from the next cycle.
// The 0-cycle load and direct output wiring follow the design description; the
// reset value INIT (the variable's initialiser) is this design's choice.
module reg_module #(
  parameter int unsigned W    = 32,
  parameter logic [W-1:0] INIT = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         we,
  input  logic [W-1:0] wdata,
  output logic [W-1:0] rdata
);
  always_ff @(posedge clk) begin
    if (!rst_n)        rdata <= INIT;
    else if (en && we) rdata <= wdata;
  end
endmodule
