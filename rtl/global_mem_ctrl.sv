// global_mem_ctrl: global memory controller for arrays whose pointers cannot be
// resolved at compile time.
//
// Every such array lives in its own RAM, and every pointer to it carries the
// array's tag in its top TAG_W (9) address bits. On each of the two ports the tag
// enables exactly one RAM (memory i answers to tag TAG_BASE+i) and the low address
// bits give the word offset. The tag is registered alongside the RAM read, then
// selects that RAM's output in a multiplexer whose output is registered again,
// so a load returns two cycles after it is issued. All RAMs share the controller's
// two ports, which limits the whole global space to two accesses per cycle.
// Interface per port x in {a, b}: en_x, we_x, addr_x (full ADDR_W bits), wdata_x
// in; rdata_x out. Timing: 2-cycle load latency.
// The 9-bit tag, the decode, the registered tag and registered output mux follow
// the design description and its figure (tags 2 and 3 for two memories); word
// addressing, the depth and zero output for an unknown tag are this design's
// choices.
module global_mem_ctrl
  import hls_pkg::*;
#(
  parameter int unsigned N_MEM    = 2,
  parameter int unsigned TAG_BASE = 2,
  parameter int unsigned DEPTH    = 256,
  localparam int unsigned OFF_W   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en_a,
  input  logic              we_a,
  input  logic [ADDR_W-1:0] addr_a,
  input  logic [DATA_W-1:0] wdata_a,
  output logic [DATA_W-1:0] rdata_a,
  input  logic              en_b,
  input  logic              we_b,
  input  logic [ADDR_W-1:0] addr_b,
  input  logic [DATA_W-1:0] wdata_b,
  output logic [DATA_W-1:0] rdata_b
);
  logic [TAG_W-1:0]  tag_a, tag_b, tag_a_q, tag_b_q;
  logic [DATA_W-1:0] ram_a [N_MEM];
  logic [DATA_W-1:0] ram_b [N_MEM];
  logic [DATA_W-1:0] mux_a, mux_b;

  assign tag_a = addr_a[ADDR_W-1 -: TAG_W];
  assign tag_b = addr_b[ADDR_W-1 -: TAG_W];

  for (genvar i = 0; i < N_MEM; i++) begin : g_mem
    dp_ram #(.DEPTH(DEPTH), .W(DATA_W), .LAT(1)) u_ram (
      .clk,
      .en_a   (en_a && tag_a == TAG_W'(TAG_BASE + i)),
      .we_a,
      .addr_a (addr_a[OFF_W-1:0]),
      .wdata_a,
      .rdata_a(ram_a[i]),
      .en_b   (en_b && tag_b == TAG_W'(TAG_BASE + i)),
      .we_b,
      .addr_b (addr_b[OFF_W-1:0]),
      .wdata_b,
      .rdata_b(ram_b[i])
    );
  end

  always_comb begin
    mux_a = '0;
    mux_b = '0;
    for (int unsigned i = 0; i < N_MEM; i++) begin
      if (tag_a_q == TAG_W'(TAG_BASE + i)) mux_a = ram_a[i];
      if (tag_b_q == TAG_W'(TAG_BASE + i)) mux_b = ram_b[i];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tag_a_q <= '0;
      tag_b_q <= '0;
      rdata_a <= '0;
      rdata_b <= '0;
    end else begin
      if (en_a) tag_a_q <= tag_a;
      if (en_b) tag_b_q <= tag_b;
      rdata_a <= mux_a;
      rdata_b <= mux_b;
    end
  end
endmodule
