// tb_data_receiver: a slave of latency LAT returns a distinct word for every
// access; the receiver sees grants for a random subset of them. Checks that in
// the return cycle the master sees the slave data directly and that afterwards
// it holds the data of its own last access, whatever other accesses the slave
// serves. A second instance checks the variable-latency (valid) mode.
module tb_data_receiver;
  localparam int LAT = 3;
  localparam int W   = 16;
  logic clk = 0, rst_n = 0;
  logic grant, s_valid;
  logic [W-1:0] s_rdata, m_rdata;
  logic vgrant, vvalid;
  logic [W-1:0] vdata, vm_rdata;
  int checks = 0, failures = 0;

  data_receiver #(.LAT(LAT), .W(W)) dut (.clk, .rst_n, .grant, .s_valid(1'b1), .s_rdata, .m_rdata);
  data_receiver #(.LAT(1), .W(W), .VARIABLE(1'b1)) dutv (
    .clk, .rst_n, .grant(vgrant), .s_valid(vvalid), .s_rdata(vdata), .m_rdata(vm_rdata));
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // slave: returns LAT cycles later the word issued with the access
  logic [W-1:0] issued [LAT+1];
  logic         mine   [LAT+1];
  assign s_rdata = issued[LAT];
  logic [W-1:0] expect_hold;
  initial s_valid = 1'b1;

  initial begin
    grant = 0; vgrant = 0; vvalid = 0; vdata = '0;
    for (int i = 0; i <= LAT; i++) begin issued[i] = '0; mine[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    expect_hold = '0;
    for (int cyc = 0; cyc < 1000; cyc++) begin
      // present this cycle's access
      issued[0] = W'($urandom);
      grant = 1'($urandom);
      mine[0] = grant;
      #1;
      if (cyc > LAT) begin
        checks++;
        if (mine[LAT]) begin
          if (m_rdata !== issued[LAT]) begin failures++; $display("return cycle %0d: %h vs %h", cyc, m_rdata, issued[LAT]); end
          expect_hold = issued[LAT];
        end else if (m_rdata !== expect_hold) begin
          failures++; $display("hold cycle %0d: %h vs %h", cyc, m_rdata, expect_hold);
        end
      end
      @(negedge clk);
      for (int i = LAT; i > 0; i--) begin issued[i] = issued[i-1]; mine[i] = mine[i-1]; end
    end
    // variable latency: grant, then valid after a random delay
    for (int n = 0; n < 50; n++) begin
      logic [W-1:0] d;
      d = W'($urandom);
      vgrant = 1; @(negedge clk); vgrant = 0;
      repeat ($urandom_range(0, 5)) @(negedge clk);
      vdata = d; vvalid = 1; #1;
      checks++;
      if (vm_rdata !== d) begin failures++; $display("variable: pass-through %h vs %h", vm_rdata, d); end
      @(negedge clk); vvalid = 0; vdata = ~d; #1;
      checks++;
      if (vm_rdata !== d) begin failures++; $display("variable: hold %h vs %h", vm_rdata, d); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
