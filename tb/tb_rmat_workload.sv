// tb_rmat_workload: the full accelerator at its default size (4 engines x 16
// kernels, 512-entry FIFOs) running the kind of graph the architecture was
// evaluated on, R-MAT graphs, scaled down to SCALE = 7 (128 nodes) so that
// they can be simulated, with the four average out-degrees 8, 16, 32 and 64.
// The accelerator is reset between graphs.  It reports the cycle
// count and how busy the 64 memory ports were (requests accepted per port per
// cycle), and checks the result like the end-to-end test.  The engine-to-engine links
// are modelled as LINK_LAT-cycle delay lines closing the ring, and the 64
// memory ports share one memory model with random stalls and out-of-order
// responses.  The host part (graph in CSR form, initial distance words,
// initial tasks) is done by the testbench.  It checks the distance matrix
// against a software BFS and the final level, and counts how often each
// mechanism of the design happened: supersteps, token passes over the links,
// Q_n reservations, tasks waiting for the token, visited-node drops,
// duplicate tasks from concurrent reads, memory stalls, out-of-order
// responses and termination; one that never happened is a failure.
module tb_rmat_workload;
  import apsp_pkg::*;
  import apsp_tb_pkg::*;

  localparam int N_AE = 4, K = 16, NK = N_AE * K;
  localparam int LINK_LAT = 3;
  localparam int SCALE = 7;
  localparam int N = 1 << SCALE;
  localparam addr_t C_BASE = 48'h10000, D_BASE = 48'h100000,
                    Q0_BASE = 48'h200000, Q1_BASE = 48'h400000;

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
    repeat (4000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_supersteps = 0, n_link_tokens = 0, n_grants = 0, n_wait_token = 0;
  int n_dropped = 0, n_pushed = 0, n_dwr_same = 0, n_done = 0;
  int d_writes [addr_t];
  longint cycles = 0, n_acc = 0, t_start, t_end, acc_start;
  always @(posedge clk) begin
    cycles++;
    for (int k = 0; k < NK; k++) if (mc_req[k].valid && mc_ready[k]) n_acc++;
  end

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
  int degrees [4] = '{8, 16, 32, 64};

  task automatic run_one(int deg);
    rst_n <= 0;
    host_cfg = '0;
    u_mem.mem.delete();
    gen_rmat(SCALE, deg, R, C);
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
    start <= 1;
    @(posedge clk);
    start <= 0;
    t_start = cycles;
    acc_start = n_acc;
    wait (done);
    t_end = cycles;
    $display("R-MAT 2^%0d nodes, degree %0d: %0d edges, %0d levels, %0d cycles, %0d requests/1000 port-cycles",
             SCALE, deg, C.size(), level, t_end - t_start,
             1000 * (n_acc - acc_start) / ((t_end - t_start) * NK));
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
  endtask

  initial begin
    host_cfg = '0;
    void'($urandom(3));
    foreach (degrees[i]) run_one(degrees[i]);
    $display("reservations=%0d duplicate_d_writes=%0d stalls=%0d out_of_order=%0d",
             n_grants, n_dwr_same, u_mem.n_stalls, u_mem.n_out_of_order);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
