// hls_system: flat-topology system of parallel HLS threads with its memory
// architecture, synchronisation hardware and shared functional units.
//
// N_THREADS threads run in parallel: thread 0 is main, threads 1.. are the forked
// workers (d0, d1 by default). The threads' own datapaths are produced per program
// and are outside this module: every master interface of every thread is a port
// here, and this module is the interconnect and shared hardware around them, all
// at one level of hierarchy. Per thread, per shared slave port, there is a
// dedicated master interface; the parallel masters of one slave port meet in an
// arb_interconnect (request module, round-robin arbiter, data receiver), and the
// OR of a thread's interface stalls is its stall, thr_stall[t], which must freeze
// that thread's FSM.
//
// Shared slaves (one arbitrated connection per port):
//   global memory controller, ports A and B     2-cycle loads   gm_*
//   N_SL shared-local dual-port memories        1-cycle loads   sl_*
//   a register module (memory-to-register)      0-cycle loads   reg_*
//   a hardware lock and a hardware barrier      1-cycle loads   lock_*, bar_*
//   a pipelined divider                         DATA_W cycles   div_*
//   a multiplier when SHARE_MULT = 1            1 cycle         mul_*
// Private slaves, wired straight to their owner with no arbitration and no stall:
//   main's local dual-port memory (loc_*), a replicated constant ROM per worker
//   (rom_*), and the multiplier of each thread when SHARE_MULT = 0.
// main's sequentially executing callees (N_SEQ of them, seq_gm_req) reach the
// global memory through main's port-A interface: their requests are OR-ed with
// main's, since only one of them runs at a time; they see main's data and stall.
//
// Timing: a request held while thr_stall is high is served once; the load data of
// an interface of latency L is valid on its *_rdata from L cycles after the cycle
// in which the thread's stall went low, and stays there until the interface's
// next access returns.
// The structure (flat topology, OR for sequential and arbiters for parallel
// masters, deadlock prevention on each master interface, the three memory
// classes and their latencies, ROM replication, register conversion, hardware
// lock and barrier, divider sharing and multiplier replication as in the
// best-performing configuration) follows the design description; the counts,
// depths and the assignment of the sequential callees to main's port A are this
// design's own defaults.
module hls_system
  import hls_pkg::*;
#(
  parameter int unsigned N_THREADS   = 3,
  parameter int unsigned N_SEQ       = 2,
  parameter int unsigned N_SL        = 2,
  parameter bit          SHARE_MULT  = 1'b0,
  parameter int unsigned GM_N_MEM    = 2,
  parameter int unsigned GM_DEPTH    = 256,
  parameter int unsigned SL_DEPTH    = 256,
  parameter int unsigned LOC_DEPTH   = 256,
  parameter int unsigned ROM_DEPTH   = 256,
  parameter string       ROM_INIT    = "",
  parameter int unsigned SL_LAT      = 1,
  parameter int unsigned N_BAR       = N_THREADS - 1
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic [N_THREADS-1:0] thr_stall,
  // global memory controller, two ports per thread, plus main's callees
  input  mem_req_t          gm_req     [N_THREADS][2],
  output logic [DATA_W-1:0] gm_rdata   [N_THREADS][2],
  input  mem_req_t          seq_gm_req [N_SEQ],
  // shared-local memories, two ports each
  input  mem_req_t          sl_req     [N_THREADS][N_SL][2],
  output logic [DATA_W-1:0] sl_rdata   [N_THREADS][N_SL][2],
  // register module, hardware lock, hardware barrier
  input  mem_req_t          reg_req    [N_THREADS],
  output logic [DATA_W-1:0] reg_rdata  [N_THREADS],
  input  mem_req_t          lock_req   [N_THREADS],
  output logic [DATA_W-1:0] lock_rdata [N_THREADS],
  input  mem_req_t          bar_req    [N_THREADS],
  output logic [DATA_W-1:0] bar_rdata  [N_THREADS],
  // functional units
  input  fu_req_t           div_req    [N_THREADS],
  output logic [DATA_W-1:0] div_rdata  [N_THREADS],
  input  fu_req_t           mul_req    [N_THREADS],
  output logic [DATA_W-1:0] mul_rdata  [N_THREADS],
  // main's local memory and the workers' replicated ROMs
  input  mem_req_t          loc_req    [2],
  output logic [DATA_W-1:0] loc_rdata  [2],
  input  mem_req_t          rom_req    [N_THREADS-1][2],
  output logic [DATA_W-1:0] rom_rdata  [N_THREADS-1][2]
);
  localparam int unsigned MPW = DATA_W + ADDR_W + 1;   // {we, addr, wdata}
  localparam int unsigned FPW = 2 * DATA_W;            // {a, b}
  // Interface numbering inside a thread, for the stall OR.
  localparam int unsigned K_GM   = 0;
  localparam int unsigned K_SL   = 2;
  localparam int unsigned K_REG  = K_SL + 2 * N_SL;
  localparam int unsigned K_LOCK = K_REG + 1;
  localparam int unsigned K_BAR  = K_REG + 2;
  localparam int unsigned K_DIV  = K_REG + 3;
  localparam int unsigned K_MUL  = K_REG + 4;
  localparam int unsigned NK     = K_MUL + 1;

  logic [NK-1:0] if_stall [N_THREADS];
  logic [N_THREADS-1:0] fn_stall;

  always_comb
    for (int unsigned t = 0; t < N_THREADS; t++) fn_stall[t] = |if_stall[t];
  assign thr_stall = fn_stall;

  // ---- main's sequential group: OR of main's and its callees' port-A requests
  mem_req_t main_gm_a;
  logic [$bits(mem_req_t)-1:0] seq_in [N_SEQ+1];
  logic [$bits(mem_req_t)-1:0] seq_out;
  always_comb begin
    seq_in[0] = gm_req[0][0];
    for (int unsigned s = 0; s < N_SEQ; s++) seq_in[s+1] = seq_gm_req[s];
  end
  or_interconnect #(.N(N_SEQ + 1), .W($bits(mem_req_t))) u_seq_or (
    .clk, .rst_n, .m_req(seq_in), .s_req(seq_out));
  assign main_gm_a = mem_req_t'(seq_out);

  // ---- global memory controller: one arbitrated connection per port
  logic              gm_en [2];
  logic [MPW-1:0]    gm_pay [2];
  logic [DATA_W-1:0] gm_rd [2];

  for (genvar p = 0; p < 2; p++) begin : g_gm
    logic [N_THREADS-1:0] req;
    logic [MPW-1:0]       pay [N_THREADS];
    logic [N_THREADS-1:0] stall, grant;
    logic [DATA_W-1:0]    rd [N_THREADS];
    always_comb
      for (int unsigned t = 0; t < N_THREADS; t++) begin
        mem_req_t r;
        r = (t == 0 && p == 0) ? main_gm_a : gm_req[t][p];
        req[t] = r.en;
        pay[t] = {r.we, r.addr, r.wdata};
      end
    arb_interconnect #(.N(N_THREADS), .PAY_W(MPW), .RD_W(DATA_W), .LAT(2)) u_ic (
      .clk, .rst_n, .m_req(req), .m_pay(pay), .m_fn_stall(fn_stall),
      .m_stall(stall), .m_grant(grant), .m_rdata(rd),
      .s_en(gm_en[p]), .s_pay(gm_pay[p]), .s_rdata(gm_rd[p]), .s_valid(1'b1));
    for (genvar t = 0; t < N_THREADS; t++) begin : g_t
      assign if_stall[t][K_GM + p] = stall[t];
      assign gm_rdata[t][p] = rd[t];
    end
  end

  global_mem_ctrl #(.N_MEM(GM_N_MEM), .TAG_BASE(2), .DEPTH(GM_DEPTH)) u_gmem (
    .clk, .rst_n,
    .en_a(gm_en[0]), .we_a(gm_pay[0][MPW-1]), .addr_a(gm_pay[0][MPW-2 -: ADDR_W]),
    .wdata_a(gm_pay[0][DATA_W-1:0]), .rdata_a(gm_rd[0]),
    .en_b(gm_en[1]), .we_b(gm_pay[1][MPW-1]), .addr_b(gm_pay[1][MPW-2 -: ADDR_W]),
    .wdata_b(gm_pay[1][DATA_W-1:0]), .rdata_b(gm_rd[1]));

  // ---- shared-local memories
  localparam int unsigned SL_AW = (SL_DEPTH > 1) ? $clog2(SL_DEPTH) : 1;
  for (genvar m = 0; m < N_SL; m++) begin : g_sl
    logic              en [2];
    logic [MPW-1:0]    spay [2];
    logic [DATA_W-1:0] srd [2];
    for (genvar p = 0; p < 2; p++) begin : g_p
      logic [N_THREADS-1:0] req;
      logic [MPW-1:0]       pay [N_THREADS];
      logic [N_THREADS-1:0] stall, grant;
      logic [DATA_W-1:0]    rd [N_THREADS];
      always_comb
        for (int unsigned t = 0; t < N_THREADS; t++) begin
          req[t] = sl_req[t][m][p].en;
          pay[t] = {sl_req[t][m][p].we, sl_req[t][m][p].addr, sl_req[t][m][p].wdata};
        end
      arb_interconnect #(.N(N_THREADS), .PAY_W(MPW), .RD_W(DATA_W), .LAT(SL_LAT)) u_ic (
        .clk, .rst_n, .m_req(req), .m_pay(pay), .m_fn_stall(fn_stall),
        .m_stall(stall), .m_grant(grant), .m_rdata(rd),
        .s_en(en[p]), .s_pay(spay[p]), .s_rdata(srd[p]), .s_valid(1'b1));
      for (genvar t = 0; t < N_THREADS; t++) begin : g_t
        assign if_stall[t][K_SL + 2*m + p] = stall[t];
        assign sl_rdata[t][m][p] = rd[t];
      end
    end
    dp_ram #(.DEPTH(SL_DEPTH), .W(DATA_W), .LAT(SL_LAT)) u_ram (
      .clk,
      .en_a(en[0]), .we_a(spay[0][MPW-1]), .addr_a(spay[0][DATA_W +: SL_AW]),
      .wdata_a(spay[0][DATA_W-1:0]), .rdata_a(srd[0]),
      .en_b(en[1]), .we_b(spay[1][MPW-1]), .addr_b(spay[1][DATA_W +: SL_AW]),
      .wdata_b(spay[1][DATA_W-1:0]), .rdata_b(srd[1]));
  end

  // ---- single-port shared slaves: register, lock, barrier
  logic              ss_en  [3];
  logic [MPW-1:0]    ss_pay [3];
  logic [DATA_W-1:0] ss_rd  [3];
  for (genvar j = 0; j < 3; j++) begin : g_ss
    localparam int unsigned LAT = (j == 0) ? 0 : 1;
    logic [N_THREADS-1:0] req;
    logic [MPW-1:0]       pay [N_THREADS];
    logic [N_THREADS-1:0] stall, grant;
    logic [DATA_W-1:0]    rd [N_THREADS];
    always_comb
      for (int unsigned t = 0; t < N_THREADS; t++) begin
        mem_req_t r;
        r = (j == 0) ? reg_req[t] : (j == 1) ? lock_req[t] : bar_req[t];
        req[t] = r.en;
        pay[t] = {r.we, r.addr, r.wdata};
      end
    arb_interconnect #(.N(N_THREADS), .PAY_W(MPW), .RD_W(DATA_W), .LAT(LAT)) u_ic (
      .clk, .rst_n, .m_req(req), .m_pay(pay), .m_fn_stall(fn_stall),
      .m_stall(stall), .m_grant(grant), .m_rdata(rd),
      .s_en(ss_en[j]), .s_pay(ss_pay[j]), .s_rdata(ss_rd[j]), .s_valid(1'b1));
    for (genvar t = 0; t < N_THREADS; t++) begin : g_t
      assign if_stall[t][K_REG + j] = stall[t];
      if (j == 0) begin : g_reg
        assign reg_rdata[t] = rd[t];
      end else if (j == 1) begin : g_lock
        assign lock_rdata[t] = rd[t];
      end else begin : g_bar
        assign bar_rdata[t] = rd[t];
      end
    end
  end

  reg_module #(.W(DATA_W)) u_reg (
    .clk, .rst_n, .en(ss_en[0]), .we(ss_pay[0][MPW-1]), .wdata(ss_pay[0][DATA_W-1:0]),
    .rdata(ss_rd[0]));
  hw_lock #(.W(DATA_W)) u_lock (
    .clk, .rst_n, .en(ss_en[1]), .we(ss_pay[1][MPW-1]), .rdata(ss_rd[1]));
  hw_barrier #(.W(DATA_W), .N_PARTIES(N_BAR)) u_bar (
    .clk, .rst_n, .en(ss_en[2]), .we(ss_pay[2][MPW-1]), .addr(ss_pay[2][DATA_W]),
    .wdata(ss_pay[2][DATA_W-1:0]), .rdata(ss_rd[2]));

  // ---- shared divider
  logic              div_en;
  logic [FPW-1:0]    div_pay;
  logic [DATA_W-1:0] div_q;
  begin : g_div
    logic [N_THREADS-1:0] req;
    logic [FPW-1:0]       pay [N_THREADS];
    logic [N_THREADS-1:0] stall, grant;
    always_comb
      for (int unsigned t = 0; t < N_THREADS; t++) begin
        req[t] = div_req[t].en;
        pay[t] = {div_req[t].a, div_req[t].b};
      end
    arb_interconnect #(.N(N_THREADS), .PAY_W(FPW), .RD_W(DATA_W), .LAT(DATA_W)) u_ic (
      .clk, .rst_n, .m_req(req), .m_pay(pay), .m_fn_stall(fn_stall),
      .m_stall(stall), .m_grant(grant), .m_rdata(div_rdata),
      .s_en(div_en), .s_pay(div_pay), .s_rdata(div_q), .s_valid(1'b1));
    for (genvar t = 0; t < N_THREADS; t++) begin : g_t
      assign if_stall[t][K_DIV] = stall[t];
    end
  end
  pipe_divider #(.W(DATA_W)) u_div (
    .clk, .rst_n, .en(div_en), .a(div_pay[FPW-1:DATA_W]), .b(div_pay[DATA_W-1:0]), .q(div_q));

  // ---- multiplier: shared through an arbiter, or one inside each thread
  if (SHARE_MULT) begin : g_mul_shared
    logic              en;
    logic [FPW-1:0]    spay;
    logic [DATA_W-1:0] p;
    logic [N_THREADS-1:0] req;
    logic [FPW-1:0]       pay [N_THREADS];
    logic [N_THREADS-1:0] stall, grant;
    always_comb
      for (int unsigned t = 0; t < N_THREADS; t++) begin
        req[t] = mul_req[t].en;
        pay[t] = {mul_req[t].a, mul_req[t].b};
      end
    arb_interconnect #(.N(N_THREADS), .PAY_W(FPW), .RD_W(DATA_W), .LAT(1)) u_ic (
      .clk, .rst_n, .m_req(req), .m_pay(pay), .m_fn_stall(fn_stall),
      .m_stall(stall), .m_grant(grant), .m_rdata(mul_rdata),
      .s_en(en), .s_pay(spay), .s_rdata(p), .s_valid(1'b1));
    pipe_multiplier #(.W(DATA_W), .LAT(1)) u_mul (
      .clk, .rst_n, .en, .a(spay[FPW-1:DATA_W]), .b(spay[DATA_W-1:0]), .p);
    for (genvar t = 0; t < N_THREADS; t++) begin : g_t
      assign if_stall[t][K_MUL] = stall[t];
    end
  end else begin : g_mul_repl
    for (genvar t = 0; t < N_THREADS; t++) begin : g_t
      pipe_multiplier #(.W(DATA_W), .LAT(1)) u_mul (
        .clk, .rst_n, .en(mul_req[t].en), .a(mul_req[t].a), .b(mul_req[t].b),
        .p(mul_rdata[t]));
      assign if_stall[t][K_MUL] = 1'b0;
    end
  end

  // ---- private memories
  localparam int unsigned LOC_AW = (LOC_DEPTH > 1) ? $clog2(LOC_DEPTH) : 1;
  localparam int unsigned ROM_AW = (ROM_DEPTH > 1) ? $clog2(ROM_DEPTH) : 1;
  dp_ram #(.DEPTH(LOC_DEPTH), .W(DATA_W), .LAT(1)) u_local (
    .clk,
    .en_a(loc_req[0].en), .we_a(loc_req[0].we), .addr_a(loc_req[0].addr[LOC_AW-1:0]),
    .wdata_a(loc_req[0].wdata), .rdata_a(loc_rdata[0]),
    .en_b(loc_req[1].en), .we_b(loc_req[1].we), .addr_b(loc_req[1].addr[LOC_AW-1:0]),
    .wdata_b(loc_req[1].wdata), .rdata_b(loc_rdata[1]));

  for (genvar t = 0; t < N_THREADS - 1; t++) begin : g_rom
    const_rom #(.DEPTH(ROM_DEPTH), .W(DATA_W), .LAT(1), .INIT_FILE(ROM_INIT)) u_rom (
      .clk,
      .en_a(rom_req[t][0].en), .addr_a(rom_req[t][0].addr[ROM_AW-1:0]), .rdata_a(rom_rdata[t][0]),
      .en_b(rom_req[t][1].en), .addr_b(rom_req[t][1].addr[ROM_AW-1:0]), .rdata_b(rom_rdata[t][1]));
  end
endmodule
