// tb_process1: kernel 2 of 3 reading its interleaved share of a 20-message
// Q_c.  Checks the addresses (qc_base + 2, 5, 8, ...), that the credit limit
// holds requests back until credits are returned, that a full request FIFO
// stalls it, the done flag, and that a second level restarts the walk.
module tb_process1;
  import apsp_pkg::*;
  localparam int CR = 3;
  logic clk = 0, rst_n = 0;
  logic new_level = 0, req_push, req_full = 0, credit_return = 0, done;
  logic [KID_W-1:0] kernel_id = 16'd2, num_kernels = 16'd3;
  qidx_t qc_size;
  addr_t qc_base;
  proc_req_t req_data;
  int checks = 0, failures = 0;
  int outstanding = 0, stalls = 0;
  logic pushed;

  always #5 clk = ~clk;
  process1 #(.CREDITS(CR)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_level(int size, addr_t base);
    int expect_idx = 2;
    @(negedge clk);
    qc_size = qidx_t'(size); qc_base = base;
    new_level = 1;
    @(negedge clk);
    new_level = 0;
    while (expect_idx < size) begin
      req_full = ($urandom_range(9) == 0);
      credit_return = (outstanding > 0) && ($urandom_range(3) == 0);
      #1;
      checks++;
      if (req_push && (req_full || outstanding >= CR)) begin
        failures++; $display("push despite full FIFO or no credit");
      end
      if (req_push) begin
        checks++;
        if (req_data.addr != base + addr_t'(expect_idx) || req_data.write) begin
          failures++; $display("addr %h expected %h", req_data.addr, base + addr_t'(expect_idx));
        end
        expect_idx += 3;
      end else stalls++;
      pushed = req_push;
      @(posedge clk);
      if (pushed) outstanding++;
      if (credit_return) outstanding--;
      @(negedge clk);
      credit_return = 0;
    end
    #1;
    checks++;
    if (!done || req_push) begin failures++; $display("done not reached"); end
    // hand back all credits
    while (outstanding > 0) begin
      credit_return = 1; @(posedge clk); outstanding--; @(negedge clk);
    end
    credit_return = 0;
  endtask

  initial begin
    qc_size = '0; qc_base = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run_level(20, 48'h500);
    run_level(11, 48'h900);
    checks++;
    if (stalls == 0) begin failures++; $display("no stall seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
