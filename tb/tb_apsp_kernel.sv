// tb_apsp_kernel: runs a complete all-pairs shortest path on one kernel whose
// token output is looped back to its own input (a ring of one), against a
// memory model with random stalls and out-of-order responses.  Small FIFOs
// force the credit and full-FIFO back-pressure paths.  The distance matrix
// left in memory is compared with a software breadth-first search from every
// node, and the final level with the longest shortest path plus one.
module tb_apsp_kernel;
  import apsp_pkg::*;
  import apsp_tb_pkg::*;

  localparam int N = 12;
  localparam int DEG = 2;
  localparam addr_t C_BASE = 48'h1000, D_BASE = 48'h10000,
                    Q0_BASE = 48'h20000, Q1_BASE = 48'h30000;

  logic clk = 0, rst_n = 0, start = 0;
  kcfg_t   cfg_in, cfg_out;
  token_t  tok;
  mc_req_t mc_req;
  logic    mc_ready;
  mc_rsp_t mc_rsp;
  logic    done, idle;
  level_t  level;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  apsp_kernel #(.FIFO_DEPTH(4)) dut (
    .clk, .rst_n, .start, .cfg_in, .cfg_out,
    .tok_in(tok), .tok_out(tok),
    .mc_req, .mc_ready, .mc_rsp, .done, .level, .idle);

  mc_model #(.NPORTS(1)) u_mem (
    .clk, .rst_n, .mc_req(mc_req), .mc_ready(mc_ready), .mc_rsp(mc_rsp));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int R[], C[], hops[];
  int grants = 0, levels = 0;
  always @(posedge clk) begin
    if (dut.res_grant) grants++;
    if (dut.new_level) levels++;
  end

  initial begin
    cfg_in = '0;
    void'($urandom(7));
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
    cfg_in <= '{valid: 1'b1, kernel_id: '0, num_kernels: 16'd1, num_nodes: 32'(N),
               d_base: D_BASE, c_base: C_BASE, q0_base: Q0_BASE, q1_base: Q1_BASE,
               init_count: qidx_t'(N)};
    @(posedge clk);
    cfg_in <= '0;
    #1;
    checks++;
    if (cfg_out.kernel_id != 16'd1 || !cfg_out.valid) begin
      failures++; $display("config not forwarded with incremented id");
    end
    @(posedge clk);
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
    checks++;
    if (!idle) begin failures++; $display("kernel not idle at the end"); end
    checks++;
    if (grants == 0 || u_mem.n_stalls == 0 || u_mem.n_out_of_order == 0) begin
      failures++; $display("mechanism not exercised: grants=%0d stalls=%0d ooo=%0d",
                           grants, u_mem.n_stalls, u_mem.n_out_of_order);
    end
    $display("levels=%0d grants=%0d stalls=%0d out_of_order=%0d reads=%0d writes=%0d",
             levels, grants, u_mem.n_stalls, u_mem.n_out_of_order, u_mem.n_reads, u_mem.n_writes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
