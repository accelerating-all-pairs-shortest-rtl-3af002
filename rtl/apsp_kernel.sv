// apsp_kernel: one APSP processing element, attached to one memory
// controller port and to its two neighbours in the kernel ring.
//
// Four processes run concurrently and talk to memory only through FIFOs:
//   process 1  reads this kernel's share of Q_c           -> message FIFO
//   process 2  reads the neighbours w of each task in C   -> {u,w} FIFO
//   process 3  reads d(u,w)                                -> {u,w,d} FIFO
//   process 4  if d(u,w) is unvisited: writes <level,1> to d(u,w) and
//              queues the task <u, d(u,w)> for Q_n
// Each process pushes its requests into its own request FIFO; the requests
// multiplexer tags them and sends them to the port, and the responses decoder
// routes each response by its tag into the FIFO of the next process.  Q_n
// tasks wait in the Q_n writer until the kernel-to-kernel interface has
// reserved slots for them with the token.  All FIFOs are FIFO_DEPTH deep.
//
// Run-time parameters arrive on cfg_in and leave on cfg_out one cycle later
// with kernel_id incremented, so a chain of kernels numbers itself; the
// kernel that receives id 0 is the first kernel of the ring.  Q_c is q0 on
// odd levels and q1 on even ones (the host puts the initial tasks in q0).
// The kernel is idle for a level when its share of Q_c has been read, every
// FIFO is empty and no memory request is outstanding (writes are
// acknowledged by the memory port).  The structure follows the architecture;
// the credit scheme, the queue double-buffering and idle tracking are this
// design's choices.
module apsp_kernel
  import apsp_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 512
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,      // used by the first kernel only
  input  kcfg_t   cfg_in,
  output kcfg_t   cfg_out,
  input  token_t  tok_in,
  output token_t  tok_out,
  output mc_req_t mc_req,
  input  logic    mc_ready,
  input  mc_rsp_t mc_rsp,
  output logic    done,
  output level_t  level,
  output logic    idle
);
  localparam int unsigned RQW = $bits(proc_req_t);

  // ---------------------------------------------------------------- config
  kcfg_t cfg;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cfg     <= '0;
      cfg_out <= '0;
    end else begin
      cfg_out <= cfg_in;
      if (cfg_in.valid) begin
        cfg                <= cfg_in;
        cfg_out.kernel_id  <= cfg_in.kernel_id + 1'b1;
      end
    end
  end

  logic is_first;
  assign is_first = cfg.valid && (cfg.kernel_id == '0);

  // ---------------------------------------------------------- token ring
  qidx_t  qc_size, res_avail, res_base;
  logic   res_grant, new_level;
  addr_t  qc_base, qn_base;

  k2k_interface u_k2k (
    .clk, .rst_n,
    .is_first,
    .start      (start && is_first),
    .init_count (cfg.init_count),
    .tok_in, .tok_out,
    .my_idle    (idle),
    .res_avail, .res_grant, .res_base,
    .cur_level  (level),
    .qc_size,
    .new_level,
    .done
  );

  assign qc_base = level[0] ? cfg.q0_base : cfg.q1_base;
  assign qn_base = level[0] ? cfg.q1_base : cfg.q0_base;

  // ------------------------------------------------------------ FIFOs
  // request FIFOs: 0 = Q_c reads, 1 = C reads, 2 = d reads, 3 = d writes
  logic      [3:0] rq_push, rq_pop, rq_full, rq_empty;
  proc_req_t [3:0] rq_in, rq_out;

  for (genvar i = 0; i < 4; i++) begin : g_rq
    sync_fifo #(.WIDTH(RQW), .DEPTH(FIFO_DEPTH)) u_rq (
      .clk, .rst_n,
      .wr_en  (rq_push[i]),
      .wr_data(rq_in[i]),
      .rd_en  (rq_pop[i]),
      .rd_data(rq_out[i]),
      .full   (rq_full[i]),
      .empty  (rq_empty[i]),
      .count  ()
    );
  end

  // response-side FIFOs
  logic  msg_push, msg_pop, msg_full, msg_empty;
  msg_t  msg_in, msg_head;
  logic  uw_push, uw_pop, uw_full, uw_empty;
  node_t uw_u_in, uw_w_in, uw_u, uw_w;
  logic  uwd_push, uwd_pop, uwd_full, uwd_empty;
  node_t uwd_u_in, uwd_w_in, uwd_u, uwd_w;
  word_t uwd_d_in, uwd_d;

  sync_fifo #(.WIDTH($bits(msg_t)), .DEPTH(FIFO_DEPTH)) u_msg_fifo (
    .clk, .rst_n, .wr_en(msg_push), .wr_data(msg_in), .rd_en(msg_pop),
    .rd_data(msg_head), .full(msg_full), .empty(msg_empty), .count());

  sync_fifo #(.WIDTH(2*NODE_W), .DEPTH(FIFO_DEPTH)) u_uw_fifo (
    .clk, .rst_n, .wr_en(uw_push), .wr_data({uw_u_in, uw_w_in}), .rd_en(uw_pop),
    .rd_data({uw_u, uw_w}), .full(uw_full), .empty(uw_empty), .count());

  sync_fifo #(.WIDTH(2*NODE_W + DATA_W), .DEPTH(FIFO_DEPTH)) u_uwd_fifo (
    .clk, .rst_n, .wr_en(uwd_push), .wr_data({uwd_u_in, uwd_w_in, uwd_d_in}),
    .rd_en(uwd_pop), .rd_data({uwd_u, uwd_w, uwd_d}), .full(uwd_full),
    .empty(uwd_empty), .count());

  // ---------------------------------------------------------- processes
  logic p1_done, p2_busy, p4_pushed, p4_dropped;
  logic qn_push, qn_full, qn_empty;
  msg_t qn_data;

  process1 #(.CREDITS(FIFO_DEPTH)) u_p1 (
    .clk, .rst_n,
    .new_level,
    .kernel_id    (cfg.kernel_id),
    .num_kernels  (cfg.num_kernels),
    .qc_size,
    .qc_base,
    .req_push     (rq_push[0]),
    .req_data     (rq_in[0]),
    .req_full     (rq_full[0]),
    .credit_return(msg_pop),
    .done         (p1_done)
  );

  process2 #(.CREDITS(FIFO_DEPTH)) u_p2 (
    .clk, .rst_n,
    .c_base       (cfg.c_base),
    .msg_empty,
    .msg          (msg_head),
    .msg_pop,
    .req_push     (rq_push[1]),
    .req_data     (rq_in[1]),
    .req_full     (rq_full[1]),
    .credit_return(uw_pop),
    .busy         (p2_busy)
  );

  process3 #(.CREDITS(FIFO_DEPTH)) u_p3 (
    .clk, .rst_n,
    .d_base       (cfg.d_base),
    .num_nodes    (cfg.num_nodes),
    .uw_empty,
    .u            (uw_u),
    .w            (uw_w),
    .uw_pop,
    .req_push     (rq_push[2]),
    .req_data     (rq_in[2]),
    .req_full     (rq_full[2]),
    .credit_return(uwd_pop)
  );

  process4 u_p4 (
    .d_base    (cfg.d_base),
    .num_nodes (cfg.num_nodes),
    .level,
    .uwd_empty,
    .u         (uwd_u),
    .w         (uwd_w),
    .d         (uwd_d),
    .uwd_pop,
    .dwr_push  (rq_push[3]),
    .dwr_data  (rq_in[3]),
    .dwr_full  (rq_full[3]),
    .qn_push,
    .qn_data,
    .qn_full,
    .pushed    (p4_pushed),
    .dropped   (p4_dropped)
  );

  // --------------------------------------------------------- Q_n writer
  logic      qw_valid, qw_pop;
  proc_req_t qw_req;

  qn_writer #(.DEPTH(FIFO_DEPTH)) u_qn (
    .clk, .rst_n,
    .qn_base,
    .push     (qn_push),
    .push_data(qn_data),
    .full     (qn_full),
    .res_avail,
    .res_grant,
    .res_base,
    .out_valid(qw_valid),
    .out_req  (qw_req),
    .out_pop  (qw_pop),
    .empty    (qn_empty)
  );

  // ------------------------------------------------- memory port side
  logic      [NUM_SRC-1:0] mx_valid, mx_pop;
  proc_req_t [NUM_SRC-1:0] mx_req;

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      mx_valid[i] = !rq_empty[i];
      mx_req[i]   = rq_out[i];
      rq_pop[i]   = mx_pop[i];
    end
    mx_valid[SRC_QN_WR] = qw_valid;
    mx_req[SRC_QN_WR]   = qw_req;
    qw_pop              = mx_pop[SRC_QN_WR];
  end

  requests_mux #(.N(NUM_SRC)) u_mux (
    .clk, .rst_n,
    .in_valid(mx_valid),
    .in_req  (mx_req),
    .in_pop  (mx_pop),
    .mc_req,
    .mc_ready
  );

  logic rsp_seen, wr_ack;

  response_decoder u_dec (
    .clk, .rst_n,
    .mc_rsp,
    .msg_push, .msg_data(msg_in), .msg_full,
    .uw_push, .uw_u(uw_u_in), .uw_w(uw_w_in), .uw_full,
    .uwd_push, .uwd_u(uwd_u_in), .uwd_w(uwd_w_in), .uwd_d(uwd_d_in), .uwd_full,
    .rsp_seen, .wr_ack
  );

  // outstanding memory requests (reads and writes)
  logic [31:0] outstanding;
  logic        req_fire;
  assign req_fire = mc_req.valid && mc_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) outstanding <= '0;
    else        outstanding <= outstanding + 32'(req_fire) - 32'(rsp_seen);
  end

  assign idle = p1_done && !new_level && !p2_busy && (&rq_empty) && msg_empty &&
                uw_empty && uwd_empty && qn_empty && (outstanding == '0);
endmodule
