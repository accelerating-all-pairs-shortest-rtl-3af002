// tb_process3: random {u, w} pairs; each request must read
// d_base + u*n + w with {u, w} as context, in order, one per pair, and must
// respect the credit limit and a full request FIFO.
module tb_process3;
  import apsp_pkg::*;
  localparam int CR = 3;
  logic clk = 0, rst_n = 0;
  addr_t d_base = 48'h40000;
  logic [31:0] num_nodes = 32'd300;
  logic uw_empty, uw_pop, req_push, req_full = 0, credit_return = 0;
  node_t u, w;
  proc_req_t req_data;
  int checks = 0, failures = 0;
  node_t qu [$], qw [$];
  int outstanding = 0;
  logic pushed;

  always #5 clk = ~clk;
  process3 #(.CREDITS(CR)) dut (.*);

  task automatic drive();
    uw_empty = (qu.size() == 0);
    u = uw_empty ? '0 : qu[0];
    w = uw_empty ? '0 : qw[0];
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
    for (int i = 0; i < 200; i++) begin
      qu.push_back(node_t'($urandom_range(299)));
      qw.push_back(node_t'($urandom_range(299)));
    end
    while (qu.size() > 0) begin
      @(negedge clk);
      drive();
      req_full = ($urandom_range(7) == 0);
      credit_return = (outstanding > 0) && ($urandom_range(2) == 0);
      #1;
      checks++;
      if (req_push != uw_pop) begin failures++; $display("pop and push differ"); end
      if (req_push) begin
        checks++;
        if (req_full || outstanding >= CR ||
            req_data.addr != d_base + addr_t'(qu[0]) * 300 + addr_t'(qw[0]) ||
            req_data.ctx != {qu[0], qw[0]} || req_data.write) begin
          failures++; $display("bad request %h for (%0d,%0d)", req_data.addr, qu[0], qw[0]);
        end
      end
      pushed = req_push;
      @(posedge clk);
      if (pushed) begin void'(qu.pop_front()); void'(qw.pop_front()); outstanding++; end
      if (credit_return) outstanding--;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
