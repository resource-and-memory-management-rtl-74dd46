// tb_req_module: checks the request mask of the deadlock-prevention request
// module: transparent while the function runs, masked after a grant while the
// function stays stalled (for several cycles), released when the stall clears.
module tb_req_module;
  logic clk = 0, rst_n = 0;
  logic req, grant, fn_stall, req_out;
  int checks = 0, failures = 0;

  req_module dut (.clk, .rst_n, .req, .grant, .fn_stall, .req_out);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic r, g, s, input logic exp, input string what);
    @(negedge clk);
    req = r; grant = g; fn_stall = s;
    #1;
    checks++;
    if (req_out !== exp) begin
      failures++;
      $display("%s: req_out=%b expected %b", what, req_out, exp);
    end
  endtask

  initial begin
    req = 0; grant = 0; fn_stall = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    step(0, 0, 0, 0, "idle");
    step(1, 0, 1, 1, "request, not yet granted");
    step(1, 1, 1, 1, "granted while stalled by another interface");
    step(1, 0, 1, 0, "masked after grant, still stalled");
    step(1, 0, 1, 0, "masked, second stalled cycle");
    step(1, 0, 1, 0, "masked, third stalled cycle");
    step(1, 0, 0, 0, "function released this cycle");
    step(1, 0, 1, 1, "next state requests again");
    step(1, 1, 0, 1, "granted, no stall");
    step(1, 1, 0, 1, "back-to-back request granted");
    // random sequences against a model
    begin
      logic allow = 1;
      for (int i = 0; i < 500; i++) begin
        logic r, g, s;
        r = 1'($urandom); s = 1'($urandom); g = r & 1'($urandom) & allow;
        step(r, g, s, r & allow, "random");
        allow = !s ? 1'b1 : (g ? 1'b0 : allow);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
