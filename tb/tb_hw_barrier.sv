// tb_hw_barrier: a barrier for 3 parties. Checks that the generation read by a
// load changes only when the third arrival is stored, that the barrier restarts
// by itself for the next round, and that re-initialising it for 2 parties works.
module tb_hw_barrier;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  logic en, we, addr;
  logic [31:0] wdata, rdata;

  hw_barrier #(.W(32), .N_PARTIES(3)) dut (.clk, .rst_n, .en, .we, .addr, .wdata, .rdata);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic store(input logic a, input logic [31:0] d);
    @(negedge clk);
    en = 1; we = 1; addr = a; wdata = d;
    @(negedge clk);
    en = 0; we = 0; addr = 0; wdata = '0;
  endtask

  task automatic load_expect(input logic [31:0] g);
    @(negedge clk);
    en = 1; we = 0;
    @(negedge clk);
    en = 0;
    checks++;
    if (rdata !== g) begin failures++; $display("generation %0d, expected %0d", rdata, g); end
  endtask

  initial begin
    en = 0; we = 0; addr = 0; wdata = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    load_expect(0);
    for (int round = 0; round < 20; round++) begin
      int parties;
      parties = (round < 10) ? 3 : 2;
      if (round == 10) store(1, 2);
      for (int k = 0; k < parties; k++) begin
        load_expect(round);
        store(0, 0);
      end
      load_expect(round + 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
