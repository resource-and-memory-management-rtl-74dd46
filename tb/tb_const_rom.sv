// tb_const_rom: loads tb/rom_init.hex (16 words) into a 16-word ROM and reads
// every word from both ports in random order, checking each word one cycle
// after its address against the same list held in the testbench.
module tb_const_rom;
  logic clk = 0;
  int checks = 0, failures = 0;
  logic en_a, en_b;
  logic [3:0] addr_a, addr_b;
  logic [31:0] rdata_a, rdata_b;
  logic [31:0] words [16] = '{32'h00000000, 32'h11111111, 32'hdeadbeef, 32'h00000003,
                              32'h12345678, 32'h0badf00d, 32'h00000006, 32'h7fffffff,
                              32'h80000000, 32'h00000009, 32'h0000000a, 32'hcafef00d,
                              32'h0000000c, 32'h0000000d, 32'h0000000e, 32'h0000000f};

  const_rom #(.DEPTH(16), .W(32), .LAT(1), .INIT_FILE("tb/rom_init.hex")) dut (
    .clk, .en_a, .addr_a, .rdata_a, .en_b, .addr_b, .rdata_b);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en_a = 0; en_b = 0; addr_a = 0; addr_b = 0;
    for (int i = 0; i < 500; i++) begin
      logic [3:0] pa, pb;
      @(negedge clk);
      pa = 4'($urandom); pb = 4'($urandom);
      en_a = 1; en_b = 1; addr_a = pa; addr_b = pb;
      @(negedge clk);
      en_a = 0; en_b = 0; addr_a = ~pa; addr_b = ~pb;
      checks += 2;
      if (rdata_a !== words[pa]) begin failures++; $display("a[%0d]=%h expected %h", pa, rdata_a, words[pa]); end
      if (rdata_b !== words[pb]) begin failures++; $display("b[%0d]=%h expected %h", pb, rdata_b, words[pb]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
