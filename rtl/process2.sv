// process2: requests the neighbours listed in each traversal task.
//
// The head of the message FIFO is a task <u, start, count>.  For
// i = 0 .. count-1 the process pushes a read request for C[start + i]
// (word address c_base + start + i) carrying u as context, one per cycle,
// then pops the task.  A task with an empty adjacency list is popped at once.
// Like process 1 it spends one credit per request against the {u, w} FIFO of
// process 3 and gets it back when process 3 pops that FIFO.  The one-request-
// per-cycle walk and the credits are this design's choice.
module process2
  import apsp_pkg::*;
#(
  parameter int unsigned CREDITS = 512
) (
  input  logic      clk,
  input  logic      rst_n,
  input  addr_t     c_base,
  input  logic      msg_empty,
  input  msg_t      msg,
  output logic      msg_pop,
  output logic      req_push,
  output proc_req_t req_data,
  input  logic      req_full,
  input  logic      credit_return,
  output logic      busy
);
  localparam int unsigned CW = $clog2(CREDITS + 1);

  logic [CNT_W-1:0] offset;
  logic [CW-1:0]    credits;
  logic             last;

  assign last     = (offset + 1'b1 >= msg.count);
  assign req_push = !msg_empty && (msg.count != '0) && !req_full && (credits != '0);
  assign msg_pop  = !msg_empty && ((msg.count == '0) || (req_push && last));
  assign busy     = (offset != '0);

  always_comb begin
    req_data       = '0;
    req_data.write = 1'b0;
    req_data.addr  = c_base + addr_t'(msg.start) + addr_t'(offset);
    req_data.ctx   = {msg.u, {NODE_W{1'b0}}};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      offset  <= '0;
      credits <= CW'(CREDITS);
    end else begin
      if (msg_pop)       offset <= '0;
      else if (req_push) offset <= offset + 1'b1;
      case ({req_push, credit_return})
        2'b10:   credits <= credits - 1'b1;
        2'b01:   credits <= credits + 1'b1;
        default: credits <= credits;
      endcase
    end
  end
endmodule
