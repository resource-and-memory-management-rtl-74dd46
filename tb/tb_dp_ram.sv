// tb_dp_ram: random reads and writes on both ports of a small RAM against an
// array model; checks read-first data exactly LAT cycles after each read, for
// LAT = 1 and LAT = 2.
module tb_dp_ram;
  localparam int DEPTH = 16, W = 32;
  logic clk = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic          en_a [2], we_a [2], en_b [2], we_b [2];
  logic [3:0]    addr_a [2], addr_b [2];
  logic [W-1:0]  wdata_a [2], wdata_b [2], rdata_a [2], rdata_b [2];

  for (genvar L = 1; L <= 2; L++) begin : g_dut
    dp_ram #(.DEPTH(DEPTH), .W(W), .LAT(L)) dut (
      .clk, .en_a(en_a[L-1]), .we_a(we_a[L-1]), .addr_a(addr_a[L-1]), .wdata_a(wdata_a[L-1]),
      .rdata_a(rdata_a[L-1]), .en_b(en_b[L-1]), .we_b(we_b[L-1]), .addr_b(addr_b[L-1]),
      .wdata_b(wdata_b[L-1]), .rdata_b(rdata_b[L-1]));
  end

  logic [W-1:0] model [2][DEPTH];
  // expected read data and whether a read happened, per cycle offset
  logic [W-1:0] exp_a [2][3], exp_b [2][3];
  logic         rd_a  [2][3], rd_b  [2][3];

  initial begin
    for (int k = 0; k < 2; k++) begin
      en_a[k] = 1; we_a[k] = 1; en_b[k] = 0; we_b[k] = 0; wdata_b[k] = '0; addr_b[k] = '0;
      for (int i = 0; i < 3; i++) begin rd_a[k][i] = 0; rd_b[k][i] = 0; end
    end
    // fill through port A
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      for (int k = 0; k < 2; k++) begin
        addr_a[k] = 4'(i); wdata_a[k] = W'($urandom); model[k][i] = wdata_a[k];
      end
    end
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      for (int k = 0; k < 2; k++) begin
        // check what is due this cycle
        if (rd_a[k][k]) begin checks++; if (rdata_a[k] !== exp_a[k][k]) begin failures++; $display("LAT%0d port a: %h vs %h", k+1, rdata_a[k], exp_a[k][k]); end end
        if (rd_b[k][k]) begin checks++; if (rdata_b[k] !== exp_b[k][k]) begin failures++; $display("LAT%0d port b: %h vs %h", k+1, rdata_b[k], exp_b[k][k]); end end
        for (int i = 2; i > 0; i--) begin
          rd_a[k][i] = rd_a[k][i-1]; exp_a[k][i] = exp_a[k][i-1];
          rd_b[k][i] = rd_b[k][i-1]; exp_b[k][i] = exp_b[k][i-1];
        end
        en_a[k] = 1'($urandom); we_a[k] = 1'($urandom); addr_a[k] = 4'($urandom); wdata_a[k] = W'($urandom);
        en_b[k] = 1'($urandom); we_b[k] = 1'($urandom); addr_b[k] = 4'($urandom); wdata_b[k] = W'($urandom);
        if (en_a[k] && en_b[k] && we_a[k] && we_b[k] && addr_a[k] == addr_b[k]) we_a[k] = 0;
        rd_a[k][0] = en_a[k] && !we_a[k]; exp_a[k][0] = model[k][addr_a[k]];
        rd_b[k][0] = en_b[k] && !we_b[k]; exp_b[k][0] = model[k][addr_b[k]];
        if (en_a[k] && we_a[k]) model[k][addr_a[k]] = wdata_a[k];
        if (en_b[k] && we_b[k]) model[k][addr_b[k]] = wdata_b[k];
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
