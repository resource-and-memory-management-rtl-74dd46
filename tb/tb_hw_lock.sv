// tb_hw_lock: a free lock answers the first load with 1 and every later load
// with 0 until a store frees it; random load/store sequences (stores only while
// held) are checked against a one-bit model, one cycle after each load.
module tb_hw_lock;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  logic en, we;
  logic [31:0] rdata;
  logic held;
  int acquires = 0;

  hw_lock #(.W(32)) dut (.clk, .rst_n, .en, .we, .rdata);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic access(input logic store, input logic [31:0] expect_val);
    @(negedge clk);
    en = 1; we = store;
    @(negedge clk);
    en = 0; we = 0;
    if (!store) begin
      checks++;
      if (rdata !== expect_val) begin failures++; $display("load returned %0d, expected %0d", rdata, expect_val); end
    end
  endtask

  initial begin
    en = 0; we = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    access(0, 1);   // acquire
    access(0, 0);   // already held
    access(0, 0);
    access(1, 0);   // release
    access(0, 1);   // acquire again
    held = 1;
    for (int i = 0; i < 1000; i++) begin
      if (held && $urandom_range(0, 2) == 0) begin
        access(1, 0); held = 0;
      end else begin
        access(0, held ? 0 : 1);
        if (!held) acquires++;
        held = 1;
      end
    end
    checks++;
    if (acquires < 10) begin failures++; $display("too few acquisitions"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
