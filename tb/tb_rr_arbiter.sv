// tb_rr_arbiter: random request patterns against an independent round-robin
// model (search upward from the last granted index, wrapping). Checks the grant
// every cycle, same-cycle granting, and that a steady requester is served within
// N grants.
module tb_rr_arbiter;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req, grant;
  int checks = 0, failures = 0;
  int last;

  rr_arbiter #(.N(N)) dut (.clk, .rst_n, .req, .grant);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] model(input logic [N-1:0] r, input int l);
    for (int k = 1; k <= N; k++) if (r[(l + k) % N]) return N'(1) << ((l + k) % N);
    return '0;
  endfunction

  initial begin
    req = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    last = N - 1;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      req = (cyc < 1000) ? N'($urandom) : {N{1'b1}};
      #1;
      checks++;
      if (grant !== model(req, last)) begin
        failures++;
        $display("cycle %0d req=%b grant=%b expected=%b", cyc, req, grant, model(req, last));
      end
      for (int i = 0; i < N; i++) if (grant[i]) last = i;
    end
    // all requesting: each master granted exactly once in every N cycles
    for (int rnd = 0; rnd < 5; rnd++) begin
      logic [N-1:0] seen = '0;
      for (int c = 0; c < N; c++) begin
        @(negedge clk); #1;
        seen |= grant;
      end
      checks++;
      if (seen != {N{1'b1}}) begin failures++; $display("fairness failed %b", seen); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
