// qn_writer: Block 3 of the kernel template, "write to Q_n".
//
// Tasks produced by process 4 wait in an on-chip FIFO until the token has
// reserved space for them in Q_n.  res_avail tells the kernel-to-kernel
// interface how many buffered tasks are still unreserved; on res_grant those
// tasks become one reserved range {res_base, res_avail}, kept in a small range
// FIFO (RANGES entries; while it is full nothing more is offered).  The
// writer walks the oldest range and offers one write per cycle,
// Q_n[slot] <- task at word address qn_base + slot, to the requests
// multiplexer, which pops it with out_pop.  Reserved tasks are always the
// oldest ones in the FIFO, so ranges and tasks stay in step.
// Buffering until the token arrives follows the architecture; the range FIFO
// is this design's choice.  empty is high when nothing is buffered.
module qn_writer
  import apsp_pkg::*;
#(
  parameter int unsigned DEPTH  = 512,
  parameter int unsigned RANGES = 4
) (
  input  logic      clk,
  input  logic      rst_n,
  input  addr_t     qn_base,
  input  logic      push,
  input  msg_t      push_data,
  output logic      full,
  output qidx_t     res_avail,
  input  logic      res_grant,
  input  qidx_t     res_base,
  output logic      out_valid,
  output proc_req_t out_req,
  input  logic      out_pop,
  output logic      empty
);
  localparam int unsigned CW = $clog2(DEPTH + 1);
  localparam int unsigned RW = (RANGES > 1) ? $clog2(RANGES) : 1;

  typedef struct packed {
    qidx_t base;
    qidx_t len;
  } range_t;

  logic [CW-1:0] fifo_count;
  msg_t          head;
  qidx_t         reserved;      // reserved but not yet written
  range_t        ranges [RANGES];
  logic [RW-1:0] r_wr, r_rd;
  logic [RW:0]   r_cnt;
  qidx_t         cur_slot, cur_rem;
  logic          load;

  sync_fifo #(.WIDTH($bits(msg_t)), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n,
    .wr_en  (push),
    .wr_data(push_data),
    .rd_en  (out_pop),
    .rd_data(head),
    .full,
    .empty,
    .count  (fifo_count)
  );

  assign res_avail = (r_cnt == (RW+1)'(RANGES)) ? '0 : qidx_t'(fifo_count) - reserved;
  assign out_valid = (cur_rem != '0) && !empty;
  assign load      = (cur_rem == '0) && (r_cnt != '0);

  always_comb begin
    out_req       = '0;
    out_req.write = 1'b1;
    out_req.addr  = qn_base + addr_t'(cur_slot);
    out_req.data  = word_t'(head);
    out_req.ctx   = '0;
  end

  always_ff @(posedge clk) begin
    if (res_grant) ranges[r_wr] <= '{base: res_base, len: res_avail};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      reserved <= '0;
      r_wr     <= '0;
      r_rd     <= '0;
      r_cnt    <= '0;
      cur_slot <= '0;
      cur_rem  <= '0;
    end else begin
      reserved <= reserved + (res_grant ? res_avail : '0) - qidx_t'(out_pop);
      if (res_grant) r_wr <= (r_wr == RW'(RANGES - 1)) ? '0 : r_wr + 1'b1;
      if (load)      r_rd <= (r_rd == RW'(RANGES - 1)) ? '0 : r_rd + 1'b1;
      r_cnt <= r_cnt + (RW+1)'(res_grant) - (RW+1)'(load);
      if (load) begin
        cur_slot <= ranges[r_rd].base;
        cur_rem  <= ranges[r_rd].len;
      end else if (out_pop) begin
        cur_slot <= cur_slot + 1'b1;
        cur_rem  <= cur_rem - 1'b1;
      end
    end
  end

  a_pop_valid: assert property (@(posedge clk) disable iff (!rst_n) out_pop |-> out_valid);
  a_grant_ok:  assert property (@(posedge clk) disable iff (!rst_n) res_grant |-> res_avail != '0);
endmodule
