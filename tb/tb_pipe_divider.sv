// tb_pipe_divider: a new unsigned division every cycle (random operands, small
// divisors, divide by zero); each quotient must appear exactly W cycles after
// its operands.
module tb_pipe_divider;
  localparam int W = 32;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  logic en;
  logic [W-1:0] a, b, q;
  logic [W-1:0] expq [$];

  pipe_divider #(.W(W)) dut (.clk, .rst_n, .en, .a, .b, .q);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; a = '0; b = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 1000 + W; i++) begin
      @(negedge clk);
      if (i >= W) begin
        logic [W-1:0] e;
        e = expq.pop_front();
        checks++;
        if (q !== e) begin failures++; $display("cycle %0d: q=%h expected %h", i, q, e); end
      end
      en = 1;
      a = $urandom;
      case ($urandom_range(0, 3))
        0: b = $urandom;
        1: b = W'($urandom_range(1, 255));
        2: b = '0;
        default: b = a >> $urandom_range(0, 31);
      endcase
      if (b == 0) b = (i % 7 == 0) ? '0 : 32'd3;
      expq.push_back(b == 0 ? '1 : a / b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
