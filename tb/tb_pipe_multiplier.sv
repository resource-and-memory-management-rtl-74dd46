// tb_pipe_multiplier: a new product every cycle with random operands; each low
// W-bit product must appear exactly LAT cycles later and stay while en is low.
module tb_pipe_multiplier;
  localparam int W = 32, LAT = 1;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  logic en;
  logic [W-1:0] a, b, p, last;

  pipe_multiplier #(.W(W), .LAT(LAT)) dut (.clk, .rst_n, .en, .a, .b, .p);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; a = '0; b = '0; last = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      if (i > 0) begin
        checks++;
        if (p !== last) begin failures++; $display("cycle %0d: p=%h expected %h", i, p, last); end
      end
      en = 1'($urandom);
      a = $urandom; b = $urandom;
      if (en) last = W'(a * b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
