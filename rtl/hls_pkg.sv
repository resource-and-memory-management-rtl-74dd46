// hls_pkg: widths and request bundles shared by the blocks of the flat-topology
// parallel HLS system.
//
// Every master interface of a thread carries the same memory-style request: an
// enable, a write enable, an address and write data. In the global address space
// the top TAG_W (9) bits of an address are the tag of the array it points into,
// which the global memory controller decodes; the 9-bit tag width follows the
// design description, the 32-bit data and address widths are this design's choice.
// Functional units (divider, multiplier) take two operands instead.
package hls_pkg;
  localparam int unsigned DATA_W = 32;
  localparam int unsigned ADDR_W = 32;
  localparam int unsigned TAG_W  = 9;

  // Load/store request of one master interface. Inactive masters drive all zero,
  // so that requests of sequentially executing masters can simply be OR-ed.
  typedef struct packed {
    logic              en;
    logic              we;
    logic [ADDR_W-1:0] addr;
    logic [DATA_W-1:0] wdata;
  } mem_req_t;

  // Operand request of a functional-unit interface.
  typedef struct packed {
    logic              en;
    logic [DATA_W-1:0] a;
    logic [DATA_W-1:0] b;
  } fu_req_t;

  localparam int unsigned MEM_PAY_W = $bits(mem_req_t) - 1;
  localparam int unsigned FU_PAY_W  = $bits(fu_req_t) - 1;
endpackage
