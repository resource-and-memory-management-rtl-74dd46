// tb_or_interconnect: at most one of N sequential masters is active at a time
// and idle masters drive zero; checks that the slave sees exactly the active
// master's request, and zero when all are idle.
module tb_or_interconnect;
  localparam int N = 4, W = 20;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] m_req [N];
  logic [W-1:0] s_req;
  int checks = 0, failures = 0;

  or_interconnect #(.N(N), .W(W)) dut (.clk, .rst_n, .m_req, .s_req);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) m_req[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 1000; cyc++) begin
      int act;
      logic [W-1:0] r;
      @(negedge clk);
      act = $urandom_range(0, N);   // N means nobody active
      r = {1'b1, (W-1)'($urandom)};
      for (int i = 0; i < N; i++) m_req[i] = (i == act) ? r : '0;
      #1;
      checks++;
      if (s_req !== ((act < N) ? r : '0)) begin
        failures++; $display("cycle %0d active=%0d s_req=%h", cyc, act, s_req);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
