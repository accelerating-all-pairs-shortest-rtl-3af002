// tb_process4: random distance words, visited or not, with random full
// FIFOs.  An unvisited d(u,w) must produce a write of <level, 1> to
// d_base + u*n + w and the task <u, start, count> from the old word, both at
// once; a visited one must be dropped; nothing may be popped or pushed while
// an unvisited entry waits on a full FIFO.
module tb_process4;
  import apsp_pkg::*;
  addr_t d_base = 48'h90000;
  logic [31:0] num_nodes = 32'd1000;
  level_t level = 32'd7;
  logic uwd_empty, uwd_pop, dwr_push, dwr_full, qn_push, qn_full, pushed, dropped;
  node_t u, w;
  word_t d;
  proc_req_t dwr_data;
  msg_t qn_data;
  int checks = 0, failures = 0;
  logic clk = 0;
  int n_push = 0, n_drop = 0, n_wait = 0;

  always #5 clk = ~clk;
  process4 dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      uwd_empty = ($urandom_range(5) == 0);
      u = node_t'($urandom_range(999)); w = node_t'($urandom_range(999));
      d = {$urandom, $urandom};
      dwr_full = ($urandom_range(5) == 0);
      qn_full  = ($urandom_range(5) == 0);
      #1;
      checks++;
      if (uwd_empty) begin
        if (uwd_pop || dwr_push || qn_push) begin failures++; $display("activity while empty"); end
      end else if (d[0]) begin
        n_drop++;
        if (!uwd_pop || dwr_push || qn_push || !dropped) begin failures++; $display("visited not dropped"); end
      end else if (dwr_full || qn_full) begin
        n_wait++;
        if (uwd_pop || dwr_push || qn_push) begin failures++; $display("pushed into full FIFO"); end
      end else begin
        n_push++;
        if (!uwd_pop || !dwr_push || !qn_push || !pushed ||
            dwr_data.addr != d_base + addr_t'(u) * 1000 + addr_t'(w) || !dwr_data.write ||
            dwr_data.data != {32'd7, 31'd0, 1'b1} ||
            qn_data.u != u || qn_data.start != d[32 +: PTR_W] || qn_data.count != d[1 +: CNT_W]) begin
          failures++; $display("unvisited node handled wrongly");
        end
      end
    end
    checks++;
    if (n_push == 0 || n_drop == 0 || n_wait == 0) begin failures++; $display("case missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
