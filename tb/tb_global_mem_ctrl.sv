// tb_global_mem_ctrl: two RAMs at tags 2 and 3. Writes random words to both
// arrays through both ports using tagged addresses, then reads them back and
// checks the data exactly two cycles after each load (after one cycle the
// previous load's data is still shown), that equal offsets in different arrays stay separate, and that a
// load with an unused tag returns zero.
module tb_global_mem_ctrl;
  import hls_pkg::*;
  localparam int DEPTH = 32;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  logic en_a, we_a, en_b, we_b;
  logic [ADDR_W-1:0] addr_a, addr_b;
  logic [DATA_W-1:0] wdata_a, wdata_b, rdata_a, rdata_b;
  logic [DATA_W-1:0] model [2][DEPTH];
  logic [DATA_W-1:0] prev_ea;

  global_mem_ctrl #(.N_MEM(2), .TAG_BASE(2), .DEPTH(DEPTH)) dut (
    .clk, .rst_n, .en_a, .we_a, .addr_a, .wdata_a, .rdata_a,
    .en_b, .we_b, .addr_b, .wdata_b, .rdata_b);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [ADDR_W-1:0] ptr(input int tag, input int off);
    return {TAG_W'(tag), (ADDR_W-TAG_W)'(off)};
  endfunction

  initial begin
    en_a = 0; we_a = 0; en_b = 0; we_b = 0; addr_a = '0; addr_b = '0; wdata_a = '0; wdata_b = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // port A writes array tag 2, port B writes array tag 3, same offsets
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      en_a = 1; we_a = 1; addr_a = ptr(2, i); wdata_a = DATA_W'($urandom); model[0][i] = wdata_a;
      en_b = 1; we_b = 1; addr_b = ptr(3, i); wdata_b = DATA_W'($urandom); model[1][i] = wdata_b;
    end
    // random loads, one at a time per port, crossing arrays and ports
    for (int n = 0; n < 300; n++) begin
      int ta, tb, oa, ob;
      logic [DATA_W-1:0] ea, eb;
      ta = $urandom_range(0, 2); tb = $urandom_range(0, 1);
      oa = $urandom_range(0, DEPTH-1); ob = $urandom_range(0, DEPTH-1);
      ea = (ta == 2) ? '0 : model[ta][oa];
      eb = model[tb][ob];
      @(negedge clk);
      en_a = 1; we_a = 0; addr_a = ptr(ta == 2 ? 7 : ta + 2, oa);
      en_b = 1; we_b = 0; addr_b = ptr(tb + 2, ob);
      @(negedge clk);
      en_a = 0; en_b = 0; addr_a = '0; addr_b = '0;
      checks++;
      if (n > 0 && rdata_a !== prev_ea) begin
        failures++; $display("after one cycle port a should still show the previous load");
      end
      @(negedge clk);
      checks += 2;
      if (rdata_a !== ea) begin failures++; $display("port a tag %0d off %0d: %h vs %h", ta + 2, oa, rdata_a, ea); end
      prev_ea = ea;
      if (rdata_b !== eb) begin failures++; $display("port b tag %0d off %0d: %h vs %h", tb + 2, ob, rdata_b, eb); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
