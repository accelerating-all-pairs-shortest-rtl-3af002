// tb_response_decoder: random responses with every source tag; checks that
// each is routed to exactly the right process FIFO with u and w recovered
// from the tag and the data split as expected, and that write acknowledges
// and idle cycles push nothing.
module tb_response_decoder;
  import apsp_pkg::*;
  logic clk = 0, rst_n = 0;
  mc_rsp_t mc_rsp;
  logic msg_push, uw_push, uwd_push, rsp_seen, wr_ack;
  msg_t msg_data;
  node_t uw_u, uw_w, uwd_u, uwd_w;
  word_t uwd_d;
  logic msg_full = 0, uw_full = 0, uwd_full = 0;
  int checks = 0, failures = 0;
  int seen [NUM_SRC];

  always #5 clk = ~clk;
  response_decoder dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (seen[i]) seen[i] = 0;
    mc_rsp = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      int s;
      node_t u, w;
      word_t d;
      @(negedge clk);
      s = $urandom_range(NUM_SRC - 1);
      u = node_t'($urandom); w = node_t'($urandom);
      d = word_t'({$urandom, $urandom});
      mc_rsp.valid = ($urandom_range(9) != 0);
      mc_rsp.tag   = {SRC_W'(s), u, w};
      mc_rsp.data  = d;
      #1;
      checks++;
      if (!mc_rsp.valid) begin
        if (msg_push || uw_push || uwd_push || wr_ack || rsp_seen) begin
          failures++; $display("push on idle cycle");
        end
      end else begin
        seen[s]++;
        case (s)
          0: if (!msg_push || uw_push || uwd_push || wr_ack || msg_data != msg_t'(d)) begin
               failures++; $display("Q_c response misrouted");
             end
          1: if (!uw_push || msg_push || uwd_push || wr_ack || uw_u != u || uw_w != node_t'(d)) begin
               failures++; $display("C response misrouted");
             end
          2: if (!uwd_push || msg_push || uw_push || wr_ack || uwd_u != u || uwd_w != w || uwd_d != d) begin
               failures++; $display("d response misrouted");
             end
          default: if (!wr_ack || msg_push || uw_push || uwd_push) begin
               failures++; $display("write ack misrouted");
             end
        endcase
        checks++;
        if (!rsp_seen) begin failures++; $display("response not counted"); end
      end
    end
    mc_rsp = '0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
