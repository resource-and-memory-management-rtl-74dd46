// dp_ram: dual-ported on-chip RAM used for local and shared-local memories (and,
// unchanged, for the RAMs inside the global memory controller).
//
// Each array that a compile-time pointer analysis can pin down gets its own RAM
// with dedicated ports, so accesses to different arrays proceed concurrently.
// Both ports can read and write. A read returns the old contents (read-first) LAT
// cycles after the request; the first cycle is the RAM's own register, further
// cycles are output pipeline registers. If both ports write one word in the same
// cycle, port B's value is kept.
// Interface per port x in {a, b}: en_x, we_x, addr_x, wdata_x in; rdata_x out.
// Timing: LAT = 1 for local and shared-local memories, as the design sets it;
// depth, word width, read-first and the write-collision rule are this design's
// choices.
module dp_ram #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned W     = 32,
  parameter int unsigned LAT   = 1,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          en_a,
  input  logic          we_a,
  input  logic [AW-1:0] addr_a,
  input  logic [W-1:0]  wdata_a,
  output logic [W-1:0]  rdata_a,
  input  logic          en_b,
  input  logic          we_b,
  input  logic [AW-1:0] addr_b,
  input  logic [W-1:0]  wdata_b,
  output logic [W-1:0]  rdata_b
);
  logic [W-1:0] mem [DEPTH];
  logic [W-1:0] pipe_a [LAT];
  logic [W-1:0] pipe_b [LAT];

  always_ff @(posedge clk) begin
    if (en_a) begin
      pipe_a[0] <= mem[addr_a];
      if (we_a) mem[addr_a] <= wdata_a;
    end
    if (en_b) begin
      pipe_b[0] <= mem[addr_b];
      if (we_b) mem[addr_b] <= wdata_b;
    end
  end

  always_ff @(posedge clk) begin
    for (int unsigned i = 1; i < LAT; i++) begin
      pipe_a[i] <= pipe_a[i-1];
      pipe_b[i] <= pipe_b[i-1];
    end
  end

  assign rdata_a = pipe_a[LAT-1];
  assign rdata_b = pipe_b[LAT-1];
endmodule
