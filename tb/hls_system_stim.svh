// Stimulus shared by the end-to-end testbenches of hls_system. The including
// module declares clk, rst_n, the dut's port signals, checks/failures, and the
// localparams ROM_HAS_DATA (1 when the ROMs hold tb/rom_init.hex), SL_LAT_TB
// (the dut's shared-local latency, 1 or 2) and SHARED_MUL (the dut's SHARE_MULT).
//
// Workload: a parallel dot product with a lock-protected global sum.
//   main's callee 0 fills global array tag 2 and callee 1 fills tag 3 through
//   main's OR-ed port A; main fills the shared-local arrays A (memory 0) and B
//   (memory 1) with one store to each per state, and its local memory.
//   Workers 1 and 2 then take interleaved elements i: one state loads A[i],
//   B[i], G2[i] (port A), G3[i] (port B) and ROM[i%16] together; the next state
//   multiplies (private multiplier) and divides G2/(G3|1) (shared divider). Each
//   per-element result is stored to shared-local memory 1 at 64+i. Each worker
//   then takes the lock (polling), adds its partial sum to the shared register
//   (0-cycle load, then store) and releases it, meets the other worker at the
//   barrier, and worker 1 stores the final register value to G3[200].
//   main meanwhile adds 1000 to the register under the same lock, then reads
//   back G3[200], the per-element results and its local memory.
// Everything is checked against values computed here from the same inputs.

localparam int NE = 32;                  // elements
localparam int W1 = 1, W2 = 2;           // worker thread indices
logic [31:0] vA [NE], vB [NE], vG2 [NE], vG3 [NE], res [NE];
logic [31:0] rom_words [16] = '{32'h00000000, 32'h11111111, 32'hdeadbeef, 32'h00000003,
                               32'h12345678, 32'h0badf00d, 32'h00000006, 32'h7fffffff,
                               32'h80000000, 32'h00000009, 32'h0000000a, 32'hcafef00d,
                               32'h0000000c, 32'h0000000d, 32'h0000000e, 32'h0000000f};
logic [31:0] expected_total;
int workers_done = 0;
bit init_done = 0;

// mechanism counters
int n_mul_contend = 0;
int n_stall = 0, n_masked = 0, n_div_contend = 0, n_seq_or = 0, n_lock_busy = 0;
int n_bar_wait = 0, n_tag2 = 0, n_tag3 = 0, n_reg_load = 0, n_rom = 0, n_local = 0;

always #5 clk = ~clk;

initial begin : watchdog
  repeat (40000) @(posedge clk);
  failures++;
  $display("watchdog expired");
  end_test();
end

function automatic logic [31:0] gptr(input int tag, input int off);
  return {9'(tag), 23'(off)};
endfunction

task automatic clear_thread(input int t);
  gm_req[t][0] = '0; gm_req[t][1] = '0;
  for (int m = 0; m < 2; m++) begin sl_req[t][m][0] = '0; sl_req[t][m][1] = '0; end
  reg_req[t] = '0; lock_req[t] = '0; bar_req[t] = '0; div_req[t] = '0; mul_req[t] = '0;
  if (t == 0) begin loc_req[0] = '0; loc_req[1] = '0; seq_gm_req[0] = '0; seq_gm_req[1] = '0; end
  else begin rom_req[t-1][0] = '0; rom_req[t-1][1] = '0; end
endtask

// Hold the thread's current requests until it is released; return the 0-cycle
// register value seen in the release cycle. Returns at the next negedge with all
// requests of the thread cleared: 1-cycle data is then valid.
task automatic run_state(input int t, output logic [31:0] regv);
  forever begin
    #1;
    if (!thr_stall[t]) begin regv = reg_rdata[t]; break; end
    @(negedge clk);
  end
  @(negedge clk);
  clear_thread(t);
  #1;
endtask

function automatic mem_req_t ld(input logic [31:0] a);
  return '{en: 1'b1, we: 1'b0, addr: a, wdata: '0};
endfunction
function automatic mem_req_t st(input logic [31:0] a, input logic [31:0] d);
  return '{en: 1'b1, we: 1'b1, addr: a, wdata: d};
endfunction

task automatic expect32(input logic [31:0] got, input logic [31:0] exp, input string what);
  checks++;
  if (got !== exp) begin failures++; $display("%s: got %h expected %h", what, got, exp); end
endtask

// shared-local loads of latency 2 need one cycle more than run_state gives
task automatic sl_extra_wait();
  repeat (SL_LAT_TB - 1) begin @(negedge clk); #1; end
endtask

task automatic lock_acquire(input int t);
  logic [31:0] r;
  forever begin
    @(negedge clk);
    lock_req[t] = ld('0);
    run_state(t, r);
    if (lock_rdata[t] == 32'd1) break;
    n_lock_busy++;
  end
endtask

task automatic lock_release(input int t);
  logic [31:0] r;
  @(negedge clk);
  lock_req[t] = st('0, '0);
  run_state(t, r);
endtask

task automatic add_to_reg(input int t, input logic [31:0] v);
  logic [31:0] r, cur;
  @(negedge clk);
  reg_req[t] = ld('0);
  run_state(t, cur);
  n_reg_load++;
  reg_req[t] = st('0, cur + v);
  run_state(t, r);
endtask

// main thread
initial begin : main_thread
  logic [31:0] r;
  clk = 0; rst_n = 0;
  for (int t = 0; t < 3; t++) clear_thread(t);
  for (int i = 0; i < NE; i++) begin
    vA[i] = $urandom_range(0, 1000); vB[i] = $urandom_range(0, 1000);
    vG2[i] = $urandom; vG3[i] = $urandom_range(0, 70000);
  end
  expected_total = 32'd1000;
  for (int i = 0; i < NE; i++) begin
    res[i] = vA[i] * vB[i] + vG2[i] / (vG3[i] | 32'd1) + (ROM_HAS_DATA ? rom_words[i % 16] : 32'd0);
    expected_total += res[i];
  end
  repeat (3) @(negedge clk);
  rst_n = 1;
  // callees fill the global arrays one after another, then main fills A and B
  for (int i = 0; i < NE; i++) begin
    @(negedge clk); seq_gm_req[0] = st(gptr(2, i), vG2[i]); n_seq_or++; run_state(0, r);
  end
  for (int i = 0; i < NE; i++) begin
    @(negedge clk); seq_gm_req[1] = st(gptr(3, i), vG3[i]); n_seq_or++; run_state(0, r);
  end
  for (int i = 0; i < NE; i++) begin
    @(negedge clk);
    sl_req[0][0][0] = st(i, vA[i]);
    sl_req[0][1][0] = st(i, vB[i]);
    loc_req[0] = st(i, ~vA[i]);
    run_state(0, r);
  end
  init_done = 1;
  // main's own contribution, racing the workers for the lock
  lock_acquire(0);
  add_to_reg(0, 32'd1000);
  lock_release(0);
  // check the local memory while workers run
  for (int i = 0; i < NE; i++) begin
    @(negedge clk);
    loc_req[1] = ld(i);
    run_state(0, r);
    n_local++;
    expect32(loc_rdata[1], ~vA[i], "main local memory");
  end
  // join the workers' first state now and then, competing for shared-local
  // memory 1 in the cycle they load A and B
  for (int k = 0; k < NE; k += 8) begin
    wait (arrivals[k] >= 2);
    @(negedge clk);
    sl_req[0][1][0] = ld(k);
    run_state(0, r);
    sl_extra_wait();
    expect32(sl_rdata[0][1][0], vB[k], "main reads B with the workers");
  end
  // keep using shared-local memory 1 while the workers run
  while (workers_done < 2) begin
    int k;
    repeat ($urandom_range(0, 3)) @(negedge clk);
    k = $urandom_range(0, NE - 1);
    @(negedge clk);
    sl_req[0][1][0] = ld(k);
    run_state(0, r);
    sl_extra_wait();
    expect32(sl_rdata[0][1][0], vB[k], "main reads B while workers run");
  end
  // read back the total through the global memory (2-cycle load) and the register
  @(negedge clk);
  gm_req[0][1] = ld(gptr(3, 200));
  reg_req[0] = ld('0);
  run_state(0, r);
  @(negedge clk); #1;
  expect32(gm_rdata[0][1], expected_total, "total stored in G3[200]");
  expect32(r, expected_total, "register total");
  for (int i = 0; i < NE; i++) begin
    @(negedge clk);
    sl_req[0][1][1] = ld(64 + i);
    run_state(0, r);
    sl_extra_wait();
    expect32(sl_rdata[0][1][1], res[i], "per-element result");
  end
  // every mechanism must have occurred
  begin
    int cnt [11];
    string nm [11];
    cnt = '{n_stall, n_masked, n_div_contend, n_seq_or, n_lock_busy, n_bar_wait,
                     n_tag2, n_tag3, n_reg_load, n_rom, n_local};
    nm = '{"arbitration stall", "request masked after grant (deadlock prevention)",
                      "divider contention", "sequential OR path", "lock busy", "barrier wait",
                      "global memory tag 2", "global memory tag 3", "0-cycle register load",
                      "replicated ROM read", "local memory access"};
    for (int k = 0; k < 11; k++) begin
      $display("%-50s %0d", nm[k], cnt[k]);
      checks++;
      if (cnt[k] == 0) begin failures++; $display("mechanism never exercised: %s", nm[k]); end
    end
  end
  if (SHARED_MUL) begin
    $display("%-50s %0d", "shared multiplier contention", n_mul_contend);
    checks++;
    if (n_mul_contend == 0) begin failures++; $display("mechanism never exercised: shared multiplier contention"); end
  end
  end_test();
end

// Rendezvous of the two workers: both return in the same negedge.
int arrivals [2*NE + 2];
initial for (int k = 0; k < 2*NE + 2; k++) arrivals[k] = 0;
task automatic sync_workers(input int k);
  arrivals[k]++;
  wait (arrivals[k] >= 2);
  @(negedge clk);
endtask

// workers
for (genvar w = 1; w <= 2; w++) begin : g_worker
  initial begin
    logic [31:0] r, a, b, g2, g3, rv, partial, gen;
    partial = '0;
    wait (init_done);
    repeat (w) @(negedge clk);            // threads start one after another
    for (int i = w - 1; i < NE; i += 2) begin
      @(negedge clk);
      sync_workers(i - (i % 2));                 // both workers issue in the same cycle
      sl_req[w][0][0] = ld(i);
      sl_req[w][1][0] = ld(i);
      gm_req[w][0] = ld(gptr(2, i));
      gm_req[w][1] = ld(gptr(3, i));
      rom_req[w-1][0] = ld(i % 16);
      run_state(w, r);
      rv = rom_rdata[w-1][0];
      @(negedge clk); #1;
      a = sl_rdata[w][0][0]; b = sl_rdata[w][1][0];   // held if they returned earlier
      g2 = gm_rdata[w][0]; g3 = gm_rdata[w][1];
      expect32(a, vA[i], "worker load A");
      expect32(b, vB[i], "worker load B");
      expect32(g2, vG2[i], "worker load G2");
      expect32(g3, vG3[i], "worker load G3");
      expect32(rv, ROM_HAS_DATA ? rom_words[i % 16] : 32'd0, "worker ROM");
      n_rom++;
      sync_workers(i - (i % 2) + 1);
      mul_req[w] = '{en: 1'b1, a: a, b: b};
      div_req[w] = '{en: 1'b1, a: g2, b: g3 | 32'd1};
      run_state(w, r);
      expect32(mul_rdata[w], a * b, "multiplier");
      repeat (31) @(negedge clk);
      #1;
      expect32(div_rdata[w], g2 / (g3 | 32'd1), "shared divider");
      @(negedge clk);
      sl_req[w][1][1] = st(64 + i, mul_rdata[w] + div_rdata[w] + rv);
      run_state(w, r);
      partial += a * b + g2 / (g3 | 32'd1) + rv;
    end
    lock_acquire(w);
    add_to_reg(w, partial);
    lock_release(w);
    // barrier: read generation, arrive, poll
    @(negedge clk); bar_req[w] = ld('0); run_state(w, r); gen = bar_rdata[w];
    @(negedge clk); bar_req[w] = st('0, '0); run_state(w, r);
    forever begin
      @(negedge clk); bar_req[w] = ld('0); run_state(w, r);
      if (bar_rdata[w] != gen) break;
      n_bar_wait++;
    end
    if (w == 1) begin
      @(negedge clk); reg_req[w] = ld('0); run_state(w, rv);
      @(negedge clk); gm_req[w][1] = st(gptr(3, 200), rv); run_state(w, r);
    end
    workers_done++;
  end
end

// observe the interconnect
always @(posedge clk) if (rst_n) begin
  if (thr_stall != '0) n_stall++;
  if (dut.g_gm[0].u_ic.req_eff != dut.g_gm[0].req || dut.g_gm[1].u_ic.req_eff != dut.g_gm[1].req ||
      dut.g_sl[0].g_p[0].u_ic.req_eff != dut.g_sl[0].g_p[0].req ||
      dut.g_sl[1].g_p[0].u_ic.req_eff != dut.g_sl[1].g_p[0].req) n_masked++;
  if ((dut.g_div.req & ~dut.g_div.grant) != '0) n_div_contend++;
  if (dut.gm_en[0] && dut.gm_pay[0][63 -: 9] == 9'd2) n_tag2++;
  if (dut.gm_en[1] && dut.gm_pay[1][63 -: 9] == 9'd3) n_tag3++;
end

if (SHARED_MUL) begin : g_mul_count
  always @(posedge clk)
    if (rst_n && (dut.g_mul_shared.req & ~dut.g_mul_shared.grant) != '0) n_mul_contend++;
end
