// process4: marks newly reached nodes and creates the next level's tasks.
//
// The head of the {u, w, d} FIFO holds d(u,w) as read from memory.  If its
// visit flag (bit 0) is clear, node w is reached from u for the first time at
// this level: the process pushes a write of <level, 1> to d(u,w) into the
// distance-write FIFO and the task <u, start, count> taken from the old
// distance word into the Q_n FIFO, both in the same cycle, and pops the
// entry; it waits while either FIFO is full.  If the flag is set the entry is
// dropped.  Two reads of the same d(u,w) before its write lands both see the
// flag clear; the resulting duplicate tasks write the same level and are
// harmless, as in the architecture.  pushed and dropped pulse for statistics.
module process4
  import apsp_pkg::*;
(
  input  addr_t       d_base,
  input  logic [31:0] num_nodes,
  input  level_t      level,
  input  logic        uwd_empty,
  input  node_t       u,
  input  node_t       w,
  input  word_t       d,
  output logic        uwd_pop,
  output logic        dwr_push,
  output proc_req_t   dwr_data,
  input  logic        dwr_full,
  output logic        qn_push,
  output msg_t        qn_data,
  input  logic        qn_full,
  output logic        pushed,
  output logic        dropped
);
  logic visited;
  assign visited = d[0];

  assign dwr_push = !uwd_empty && !visited && !dwr_full && !qn_full;
  assign qn_push  = dwr_push;
  assign dropped  = !uwd_empty && visited;
  assign pushed   = dwr_push;
  assign uwd_pop  = dropped || dwr_push;

  always_comb begin
    dwr_data       = '0;
    dwr_data.write = 1'b1;
    dwr_data.addr  = d_base + addr_t'(u) * addr_t'(num_nodes) + addr_t'(w);
    dwr_data.data  = visited_word(level);
    dwr_data.ctx   = {u, w};
    qn_data        = task_from_dist(u, d);
  end
endmodule
