// tb_hls_system_share_mult: end-to-end run of the flat parallel system, main plus two
// workers, in the configuration that shares one multiplier between all threads
// through an arbiter (SHARE_MULT=1), ROMs loaded from tb/rom_init.hex.
// The workload and its checks are in hls_system_stim.svh.
module tb_hls_system_share_mult;
  import hls_pkg::*;
  localparam bit ROM_HAS_DATA = 1'b1;
  localparam int SL_LAT_TB = 1;
  localparam bit SHARED_MUL = 1'b1;
  logic clk, rst_n;
  int checks = 0, failures = 0;
  logic [2:0]        thr_stall;
  mem_req_t          gm_req [3][2];
  logic [DATA_W-1:0] gm_rdata [3][2];
  mem_req_t          seq_gm_req [2];
  mem_req_t          sl_req [3][2][2];
  logic [DATA_W-1:0] sl_rdata [3][2][2];
  mem_req_t          reg_req [3], lock_req [3], bar_req [3];
  logic [DATA_W-1:0] reg_rdata [3], lock_rdata [3], bar_rdata [3];
  fu_req_t           div_req [3], mul_req [3];
  logic [DATA_W-1:0] div_rdata [3], mul_rdata [3];
  mem_req_t          loc_req [2];
  logic [DATA_W-1:0] loc_rdata [2];
  mem_req_t          rom_req [2][2];
  logic [DATA_W-1:0] rom_rdata [2][2];

  hls_system #(.ROM_INIT("tb/rom_init.hex"), .SHARE_MULT(1'b1)) dut (.*);

  task automatic end_test();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  `include "hls_system_stim.svh"
endmodule
