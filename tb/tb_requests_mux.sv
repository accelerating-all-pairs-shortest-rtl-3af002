// tb_requests_mux: five request streams with random traffic and a port that
// stalls at random.  Every request that leaves must be the head of the
// stream it is tagged with (source in the tag, context and address kept),
// streams must stay in order, nothing may be lost, and with all streams
// waiting the grants must rotate round-robin.
module tb_requests_mux;
  import apsp_pkg::*;
  localparam int N = NUM_SRC;
  logic clk = 0, rst_n = 0;
  logic      [N-1:0] in_valid;
  proc_req_t [N-1:0] in_req;
  logic      [N-1:0] in_pop;
  mc_req_t           mc_req;
  logic              mc_ready;
  int checks = 0, failures = 0;
  proc_req_t q [N][$];
  int sent = 0, got = 0, rr_checked = 0;
  int last_src = -1;
  logic fire;
  int fsrc;

  always #5 clk = ~clk;

  requests_mux #(.N(N)) dut (.*);

  task automatic drive();
    for (int i = 0; i < N; i++) begin
      in_valid[i] = q[i].size() > 0;
      in_req[i]   = (q[i].size() > 0) ? q[i][0] : '0;
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mc_ready = 0;
    drive();
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      // new traffic
      for (int i = 0; i < N; i++)
        if (cyc < 2500 && $urandom_range(99) < 12) begin
          proc_req_t r;
          r.write = (i >= 3);
          r.addr  = addr_t'({$urandom, $urandom});
          r.data  = word_t'({$urandom, $urandom});
          r.ctx   = CTX_W'($urandom);
          q[i].push_back(r);
          sent++;
        end
      mc_ready = ($urandom_range(99) < 75);
      drive();
      #1;
      if (mc_req.valid && mc_ready) begin
        int s;
        s = int'(mc_req.tag[TAG_W-1 -: SRC_W]);
        checks++;
        if (s >= N || q[s].size() == 0 || !in_pop[s] || $countones(in_pop) != 1) begin
          failures++; $display("bad grant to %0d", s);
        end else begin
          proc_req_t h;
          h = q[s][0];
          checks++;
          if (mc_req.addr != h.addr || mc_req.data != h.data || mc_req.write != h.write ||
              mc_req.tag[CTX_W-1:0] != h.ctx) begin
            failures++; $display("request of stream %0d altered", s);
          end
          if (&in_valid && last_src >= 0) begin
            checks++; rr_checked++;
            if (s != (last_src + 1) % N) begin
              failures++; $display("round robin: %0d after %0d", s, last_src);
            end
          end
          last_src = s;
        end
      end else begin
        checks++;
        if (in_pop != '0 || (mc_req.valid != (|in_valid))) begin
          failures++; $display("pop without transfer or valid wrong");
        end
      end
      fire = mc_req.valid && mc_ready;
      fsrc = int'(mc_req.tag[TAG_W-1 -: SRC_W]);
      @(posedge clk);
      if (fire) begin
        void'(q[fsrc].pop_front());
        got++;
      end
    end
    checks++;
    if (got != sent || rr_checked == 0) begin
      failures++; $display("sent %0d delivered %0d rr %0d", sent, got, rr_checked);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
