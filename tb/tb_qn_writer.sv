// tb_qn_writer: tasks are pushed at random; at random times a reservation is
// granted for everything offered, at a base chosen by the testbench (as the
// token would).  Every write must go to qn_base + slot of the reserved ranges
// in order, carry the tasks in push order, and no unreserved task may be
// written.  A small FIFO checks that full back-pressure works.
module tb_qn_writer;
  import apsp_pkg::*;
  logic clk = 0, rst_n = 0;
  addr_t qn_base = 48'h3000;
  logic push = 0, full, res_grant = 0, out_valid, out_pop = 0, empty;
  msg_t push_data;
  qidx_t res_avail, res_base;
  proc_req_t out_req;
  int checks = 0, failures = 0;
  msg_t pending [$];      // pushed, in order
  qidx_t slots [$];       // reserved slots, in order
  qidx_t next_base = 100;
  qidx_t avail;
  int n_written = 0, n_full = 0, n_range_full = 0;

  always #5 clk = ~clk;
  qn_writer #(.DEPTH(6), .RANGES(2)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push_data = '0; res_base = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      push = (cyc < 2800) && !full && ($urandom_range(99) < 50);
      push_data = msg_t'({$urandom, $urandom});
      if (full) n_full++;
      #1;
      res_grant = (res_avail != '0) && ($urandom_range(99) < 10);
      if (res_avail == '0 && dut.r_cnt == 2) n_range_full++;
      res_base  = next_base;
      out_pop   = out_valid && ($urandom_range(99) < 60);
      #1;
      checks++;
      if (out_valid && (slots.size() == 0 || out_req.addr != qn_base + addr_t'(slots[0]) ||
                        out_req.data != word_t'(pending[0]) || !out_req.write)) begin
        failures++; $display("write %h of %h not as reserved", out_req.addr, out_req.data);
      end
      avail = res_avail;
      @(posedge clk);
      if (res_grant) begin
        for (int i = 0; i < int'(avail); i++) slots.push_back(next_base + qidx_t'(i));
        next_base += avail + 7;   // other kernels reserve in between
      end
      if (out_pop) begin void'(slots.pop_front()); void'(pending.pop_front()); n_written++; end
      if (push) pending.push_back(push_data);

    end
    checks++;
    if (n_written < 100 || n_full == 0 || n_range_full == 0) begin
      failures++; $display("written=%0d full=%0d range_full=%0d", n_written, n_full, n_range_full);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
