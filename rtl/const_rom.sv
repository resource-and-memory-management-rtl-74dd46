// const_rom: dual-ported read-only memory for a constant array.
//
// A constant array can be copied into every thread that reads it, so each thread
// gets its own ROM, reached without arbitration and without contention. The
// contents come from a hex file (INIT_FILE, one word per line, as produced from
// the program's initialiser); with no file the ROM reads as zero.
// Interface per port x in {a, b}: en_x, addr_x in; rdata_x out.
// Timing: LAT cycles from address to data (1, like any local memory).
// Replication and the 1-cycle latency follow the design description; the file
// format and dual porting of ROMs follow this design's memory convention.
module const_rom #(
  parameter int unsigned DEPTH     = 256,
  parameter int unsigned W         = 32,
  parameter int unsigned LAT       = 1,
  parameter string       INIT_FILE = "",
  localparam int unsigned AW       = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          en_a,
  input  logic [AW-1:0] addr_a,
  output logic [W-1:0]  rdata_a,
  input  logic          en_b,
  input  logic [AW-1:0] addr_b,
  output logic [W-1:0]  rdata_b
);
  logic [W-1:0] rom [DEPTH];
  logic [W-1:0] pipe_a [LAT];
  logic [W-1:0] pipe_b [LAT];

  initial begin
    for (int unsigned i = 0; i < DEPTH; i++) rom[i] = '0;
    if (INIT_FILE != "") $readmemh(INIT_FILE, rom);
  end

  always_ff @(posedge clk) begin
    if (en_a) pipe_a[0] <= rom[addr_a];
    if (en_b) pipe_b[0] <= rom[addr_b];
    for (int unsigned i = 1; i < LAT; i++) begin
      pipe_a[i] <= pipe_a[i-1];
      pipe_b[i] <= pipe_b[i-1];
    end
  end

  assign rdata_a = pipe_a[LAT-1];
  assign rdata_b = pipe_b[LAT-1];
endmodule
