// tb_process2: a queue of random tasks (including empty adjacency lists) is
// offered to the process; every request must read C[start + i] for
// i = 0 .. count-1 in order with u in its context, each task must be popped
// exactly after its last request, and credits and a full FIFO must hold it.
module tb_process2;
  import apsp_pkg::*;
  localparam int CR = 4;
  logic clk = 0, rst_n = 0;
  addr_t c_base = 48'h7000;
  logic msg_empty, msg_pop, req_push, req_full = 0, credit_return = 0, busy;
  msg_t msg;
  proc_req_t req_data;
  int checks = 0, failures = 0;
  msg_t tasks [$];
  addr_t exp_addr [$];
  node_t exp_u [$];
  int outstanding = 0, n_tasks = 0, rem_cur = -1;
  logic pushed, popped;

  always #5 clk = ~clk;
  process2 #(.CREDITS(CR)) dut (.*);

  task automatic drive();
    msg_empty = (tasks.size() == 0);
    msg       = msg_empty ? '0 : tasks[0];
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    drive();
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      msg_t m;
      m.u = node_t'($urandom); m.start = PTR_W'($urandom_range(1000));
      m.count = CNT_W'($urandom_range(5));
      tasks.push_back(m);
      for (int i = 0; i < int'(m.count); i++) begin
        exp_addr.push_back(c_base + addr_t'(m.start) + addr_t'(i));
        exp_u.push_back(m.u);
      end
    end
    n_tasks = tasks.size();
    while (tasks.size() > 0) begin
      @(negedge clk);
      if (rem_cur < 0) rem_cur = int'(tasks[0].count);
      drive();
      req_full = ($urandom_range(7) == 0);
      credit_return = (outstanding > 0) && ($urandom_range(2) == 0);
      #1;
      if (req_push) begin
        checks++;
        if (req_full || outstanding >= CR || exp_addr.size() == 0 ||
            req_data.addr != exp_addr[0] || req_data.ctx[CTX_W-1 -: NODE_W] != exp_u[0]) begin
          failures++; $display("bad request addr %h", req_data.addr);
        end
      end
      checks++;
      if (msg_pop != ((tasks[0].count == '0) || (req_push && rem_cur == 1))) begin
        failures++; $display("task popped at the wrong time");
      end
      pushed = req_push; popped = msg_pop;
      @(posedge clk);
      if (pushed) begin void'(exp_addr.pop_front()); void'(exp_u.pop_front()); outstanding++; end
      if (credit_return) outstanding--;
      if (pushed) rem_cur--;
      if (popped) begin void'(tasks.pop_front()); rem_cur = -1; end
    end
    checks++;
    if (exp_addr.size() != 0) begin failures++; $display("%0d requests missing", exp_addr.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
