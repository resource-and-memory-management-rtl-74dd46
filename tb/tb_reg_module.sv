// tb_reg_module: the converted register must show a stored value from the
// cycle after the store, keep it through loads and idle cycles, and come out of
// reset with its initial value.
module tb_reg_module;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  logic en, we;
  logic [31:0] wdata, rdata, model;

  reg_module #(.W(32), .INIT(32'h0000_00a5)) dut (.clk, .rst_n, .en, .we, .wdata, .rdata);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; we = 0; wdata = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (rdata !== 32'h0000_00a5) begin failures++; $display("reset value %h", rdata); end
    model = 32'h0000_00a5;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      checks++;
      if (rdata !== model) begin failures++; $display("cycle %0d: %h vs %h", i, rdata, model); end
      en = 1'($urandom); we = 1'($urandom); wdata = $urandom;
      if (en && we) model = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
