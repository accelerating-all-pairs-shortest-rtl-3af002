// tb_apsp_ae: one application engine of four kernels whose ring output is
// looped back to its input, running a complete all-pairs shortest path on a
// random graph.  Checks the distance matrix against a software BFS, the final
// level, that every kernel numbered itself and that the work was spread over
// all kernels (each kernel issued memory requests and reserved Q_n slots).
module tb_apsp_ae;
  import apsp_pkg::*;
  import apsp_tb_pkg::*;

  localparam int K = 4;
  localparam int N = 20;
  localparam int DEG = 3;
  localparam addr_t C_BASE = 48'h1000, D_BASE = 48'h10000,
                    Q0_BASE = 48'h20000, Q1_BASE = 48'h30000;

  logic clk = 0, rst_n = 0, start = 0;
  kcfg_t   cfg_in, cfg_out;
  token_t  tok;
  mc_req_t [K-1:0] mc_req;
  logic    [K-1:0] mc_ready;
  mc_rsp_t [K-1:0] mc_rsp;
  logic    done, idle;
  level_t  level;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  apsp_ae #(.K(K), .FIFO_DEPTH(8)) dut (
    .clk, .rst_n, .start, .cfg_in, .cfg_out, .tok_in(tok), .tok_out(tok),
    .mc_req, .mc_ready, .mc_rsp, .done, .level, .idle);

  mc_model #(.NPORTS(K)) u_mem (.clk, .rst_n, .mc_req, .mc_ready, .mc_rsp);

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int R[], C[], hops[];
  int reqs [K];
  initial foreach (reqs[k]) reqs[k] = 0;
  always @(posedge clk)
    for (int k = 0; k < K; k++) if (mc_req[k].valid && mc_ready[k]) reqs[k]++;

  initial begin
    cfg_in = '0;
    void'($urandom(11));
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
    cfg_in <= '{valid: 1'b1, kernel_id: '0, num_kernels: 16'(K), num_nodes: 32'(N),
               d_base: D_BASE, c_base: C_BASE, q0_base: Q0_BASE, q1_base: Q1_BASE,
               init_count: qidx_t'(N)};
    @(posedge clk);
    cfg_in <= '0;
    repeat (K + 2) @(posedge clk);
    checks++;
    if (dut.g_kernel[K-1].u_kernel.cfg.kernel_id != 16'(K - 1)) begin
      failures++; $display("last kernel id %0d", dut.g_kernel[K-1].u_kernel.cfg.kernel_id);
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
    for (int k = 0; k < K; k++) begin
      checks++;
      if (reqs[k] == 0) begin failures++; $display("kernel %0d issued nothing", k); end
    end
    checks++;
    if (!idle) begin failures++; $display("engine not idle at the end"); end
    $display("level=%0d requests per kernel: %0d %0d %0d %0d", level, reqs[0], reqs[1], reqs[2], reqs[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
