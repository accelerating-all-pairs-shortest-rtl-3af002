// tb_apsp_coprocessor: end-to-end run of the full accelerator at its default
// size (4 engines x 16 kernels, 512-entry FIFOs).  The engine-to-engine links
// are modelled as LINK_LAT-cycle delay lines closing the ring, and the 64
// memory ports share one memory model with random stalls and out-of-order
// responses.  The host part (graph in CSR form, initial distance words,
// initial tasks) is done by the testbench.  It checks the distance matrix
// against a software BFS and the final level, and counts how often each
// mechanism of the design happened: supersteps, token passes over the links,
// Q_n reservations, tasks waiting for the token, visited-node drops,
// duplicate tasks from concurrent reads, memory stalls, out-of-order
// responses and termination; one that never happened is a failure.
module tb_apsp_coprocessor;
  import apsp_pkg::*;
  import apsp_tb_pkg::*;

  localparam int N_AE = 4, K = 16, NK = N_AE * K;
  localparam int LINK_LAT = 3;
  localparam int N = 40;
  localparam int DEG = 4;
  localparam addr_t C_BASE = 48'h1000, D_BASE = 48'h10000,
                    Q0_BASE = 48'h20000, Q1_BASE = 48'h30000;

  logic clk = 0, rst_n = 0, start = 0;
  kcfg_t   host_cfg;
  token_t  [N_AE-1:0] ltok_out, ltok_in;
  kcfg_t   [N_AE-1:0] lcfg_out, lcfg_in;
  mc_req_t [NK-1:0] mc_req;
  logic    [NK-1:0] mc_ready;
  mc_rsp_t [NK-1:0] mc_rsp;
  logic    done, idle;
  level_t  level;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  apsp_coprocessor dut (
    .clk, .rst_n, .start, .host_cfg,
    .link_tok_out(ltok_out), .link_cfg_out(lcfg_out),
    .link_tok_in(ltok_in), .link_cfg_in(lcfg_in),
    .mc_req, .mc_ready, .mc_rsp, .done, .level, .idle);

  mc_model #(.NPORTS(NK)) u_mem (.clk, .rst_n, .mc_req, .mc_ready, .mc_rsp);

  // engine-to-engine links: delay lines, engine e feeds engine e+1
  token_t tdl [N_AE][LINK_LAT];
  kcfg_t  cdl [N_AE][LINK_LAT];
  always_ff @(posedge clk) begin
    for (int e = 0; e < N_AE; e++) begin
      tdl[e][0] <= rst_n ? ltok_out[e] : '0;
      cdl[e][0] <= rst_n ? lcfg_out[e] : '0;
      for (int s = 1; s < LINK_LAT; s++) begin
        tdl[e][s] <= rst_n ? tdl[e][s-1] : '0;
        cdl[e][s] <= rst_n ? cdl[e][s-1] : '0;
      end
    end
  end
  always_comb
    for (int e = 0; e < N_AE; e++) begin
      ltok_in[(e + 1) % N_AE] = tdl[e][LINK_LAT-1];
      lcfg_in[(e + 1) % N_AE] = cdl[e][LINK_LAT-1];
    end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_supersteps = 0, n_link_tokens = 0, n_grants = 0, n_wait_token = 0;
  int n_dropped = 0, n_pushed = 0, n_dwr_same = 0, n_done = 0;
  int d_writes [addr_t];

  always @(posedge clk) if (rst_n) begin
    for (int e = 0; e < N_AE; e++) if (ltok_out[e].valid) n_link_tokens++;
    if (dut.g_ae[0].u_ae.g_kernel[0].u_kernel.new_level) n_supersteps++;
    for (int k = 0; k < NK; k++) begin
      if (mc_req[k].valid && mc_ready[k] && mc_req[k].write &&
          mc_req[k].tag[TAG_W-1 -: SRC_W] == SRC_D_WR) begin
        if (d_writes.exists(mc_req[k].addr)) n_dwr_same++;
        d_writes[mc_req[k].addr] = 1;
      end
    end
    if (done) n_done++;
  end

  // per-kernel internal events, through the hierarchy
  for (genvar e = 0; e < N_AE; e++) begin : g_mon_ae
    for (genvar k = 0; k < K; k++) begin : g_mon_k
      always @(posedge clk) if (rst_n) begin
        if (dut.g_ae[e].u_ae.g_kernel[k].u_kernel.res_grant) n_grants++;
        if (dut.g_ae[e].u_ae.g_kernel[k].u_kernel.p4_dropped) n_dropped++;
        if (dut.g_ae[e].u_ae.g_kernel[k].u_kernel.p4_pushed) n_pushed++;
        if (dut.g_ae[e].u_ae.g_kernel[k].u_kernel.res_avail != '0 &&
            !dut.g_ae[e].u_ae.g_kernel[k].u_kernel.res_grant) n_wait_token++;
      end
    end
  end

  int R[], C[], hops[];

  initial begin
    host_cfg = '0;
    void'($urandom(5));
    gen_graph(N, DEG, R, C);
    bfs_all(N, R, C, hops);
    foreach (C[i]) u_mem.wr(C_BASE + addr_t'(i), word_t'(C[i]));
    for (int i = 0; i < N; i++) begin
      for (int j = 0; j < N; j++)
        u_mem.wr(D_BASE + addr_t'(i * N + j), (i == j) ? visited_word('0) : init_word(R, j));
      u_mem.wr(Q0_BASE + addr_t'(i), msg_word(R, i));
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    host_cfg <= '{valid: 1'b1, kernel_id: '0, num_kernels: 16'(NK), num_nodes: 32'(N),
                 d_base: D_BASE, c_base: C_BASE, q0_base: Q0_BASE, q1_base: Q1_BASE,
                 init_count: qidx_t'(N)};
    @(posedge clk);
    host_cfg <= '0;
    repeat (NK + N_AE * LINK_LAT + 4) @(posedge clk);
    checks++;
    if (dut.g_ae[N_AE-1].u_ae.g_kernel[K-1].u_kernel.cfg.kernel_id != 16'(NK - 1)) begin
      failures++; $display("configuration did not reach the last kernel");
    end
    start <= 1;
    @(posedge clk);
    start <= 0;
    wait (done);
    repeat (5) @(posedge clk);
    for (int u = 0; u < N; u++)
      for (int v = 0; v < N; v++) begin
        word_t got, exp;
        got = u_mem.rd(D_BASE + addr_t'(u * N + v));
        if (u == v) exp = visited_word('0);
        else if (hops[u * N + v] >= 0) exp = visited_word(level_t'(hops[u * N + v]));
        else exp = init_word(R, v);
        checks++;
        if (got !== exp) begin
          failures++;
          $display("d(%0d,%0d) = %h, expected %h", u, v, got, exp);
        end
      end
    checks++;
    if (level != level_t'(max_dist(N, hops) + 1)) begin
      failures++; $display("final level %0d, expected %0d", level, max_dist(N, hops) + 1);
    end
    $display("supersteps=%0d link_tokens=%0d reservations=%0d wait_for_token=%0d",
             n_supersteps, n_link_tokens, n_grants, n_wait_token);
    $display("pushed=%0d dropped_visited=%0d duplicate_d_writes=%0d stalls=%0d out_of_order=%0d done_cycles=%0d",
             n_pushed, n_dropped, n_dwr_same, u_mem.n_stalls, u_mem.n_out_of_order, n_done);
    checks++; if (n_supersteps < 2)            begin failures++; $display("no superstep swap"); end
    checks++; if (n_link_tokens == 0)          begin failures++; $display("token never crossed a link"); end
    checks++; if (n_grants == 0)               begin failures++; $display("no reservation"); end
    checks++; if (n_wait_token == 0)           begin failures++; $display("no task waited for the token"); end
    checks++; if (n_dropped == 0)              begin failures++; $display("no visited drop"); end
    checks++; if (n_dwr_same == 0)             begin failures++; $display("no duplicate task"); end
    checks++; if (u_mem.n_stalls == 0)         begin failures++; $display("no memory stall"); end
    checks++; if (u_mem.n_out_of_order == 0)   begin failures++; $display("no out-of-order response"); end
    checks++; if (n_done == 0)                 begin failures++; $display("no termination"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
