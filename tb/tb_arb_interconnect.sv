// tb_arb_interconnect: the two-memory deadlock scenario, generalised. NF
// functions each issue, per operation, a load to both of two shared slaves in the
// same state (or to just one of them), through one arb_interconnect per slave.
// A function's stall is the OR of its two interface stalls and freezes it.
// Checks: every operation completes (no deadlock or livelock), every used
// interface is granted exactly once per operation, and LAT cycles after the
// function is released both returned words are correct (one passed through, the
// other held by its data receiver). Also counts how often a function had one
// interface granted while still stalled on the other, the case the request
// modules exist for.
module tb_arb_interconnect;
  localparam int NF = 3, LAT = 2, PW = 16, RW = 16, OPS = 300;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  int split_grants = 0;

  logic [NF-1:0] req   [2];
  logic [PW-1:0] pay   [2][NF];
  logic [NF-1:0] stall [2];
  logic [NF-1:0] grant [2];
  logic [RW-1:0] rdata [2][NF];
  logic          s_en  [2];
  logic [PW-1:0] s_pay [2];
  logic [RW-1:0] s_rd  [2];
  logic [NF-1:0] fn_stall;

  always #5 clk = ~clk;
  assign fn_stall = stall[0] | stall[1];

  // slave model: data = f(payload, slave), LAT cycles after the access
  function automatic logic [RW-1:0] f(input logic [PW-1:0] p, input int s);
    return RW'(p * 7 + 16'h1234 * (s + 1));
  endfunction
  logic [RW-1:0] spipe [2][LAT];
  for (genvar s = 0; s < 2; s++) begin : g_s
    arb_interconnect #(.N(NF), .PAY_W(PW), .RD_W(RW), .LAT(LAT)) dut (
      .clk, .rst_n, .m_req(req[s]), .m_pay(pay[s]), .m_fn_stall(fn_stall),
      .m_stall(stall[s]), .m_grant(grant[s]), .m_rdata(rdata[s]),
      .s_en(s_en[s]), .s_pay(s_pay[s]), .s_rdata(s_rd[s]), .s_valid(1'b1));
    always_ff @(posedge clk) begin
      spipe[s][0] <= s_en[s] ? f(s_pay[s], s) : 16'hdead;
      for (int i = 1; i < LAT; i++) spipe[s][i] <= spipe[s][i-1];
    end
    assign s_rd[s] = spipe[s][LAT-1];
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog: operations did not complete");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one process per function: issue, wait for release, check data LAT cycles later
  int done_ops [NF];
  for (genvar t = 0; t < NF; t++) begin : g_f
    initial begin
      logic [PW-1:0] a [2];
      logic use_s [2];
      int ngrant [2];
      req[0][t] = 0; req[1][t] = 0; pay[0][t] = '0; pay[1][t] = '0;
      done_ops[t] = 0;
      wait (rst_n);
      for (int op = 0; op < OPS; op++) begin
        @(negedge clk);
        repeat ($urandom_range(0, 1)) @(negedge clk);
        for (int s = 0; s < 2; s++) begin
          a[s] = PW'($urandom);
          ngrant[s] = 0;
        end
        use_s[0] = ($urandom_range(0, 3) != 0);
        use_s[1] = !use_s[0] || ($urandom_range(0, 3) != 0);
        for (int s = 0; s < 2; s++) begin
          req[s][t] = use_s[s]; pay[s][t] = use_s[s] ? a[s] : '0;
        end
        // stay in this state until the function is not stalled
        forever begin
          #1;
          for (int s = 0; s < 2; s++) if (grant[s][t]) ngrant[s]++;
          if ((grant[0][t] || grant[1][t]) && fn_stall[t]) split_grants++;
          if (!fn_stall[t]) break;
          @(negedge clk);
        end
        @(negedge clk);
        for (int s = 0; s < 2; s++) begin req[s][t] = 0; pay[s][t] = '0; end
        for (int s = 0; s < 2; s++) if (use_s[s]) begin
          checks++;
          if (ngrant[s] != 1) begin
            failures++; $display("f%0d op %0d slave %0d granted %0d times", t, op, s, ngrant[s]);
          end
        end
        repeat (LAT - 1) @(negedge clk);
        #1;
        for (int s = 0; s < 2; s++) if (use_s[s]) begin
          checks++;
          if (rdata[s][t] !== f(a[s], s)) begin
            failures++; $display("f%0d op %0d slave %0d data %h expected %h", t, op, s, rdata[s][t], f(a[s], s));
          end
        end
        done_ops[t]++;
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    wait (done_ops[0] == OPS && done_ops[1] == OPS && done_ops[2] == OPS);
    checks++;
    if (split_grants == 0) begin failures++; $display("no function was ever granted one slave while stalled on the other"); end
    $display("split grants (deadlock-prone cycles) = %0d", split_grants);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
