// response_decoder: the kernel's memory responses decoder.
//
// Every response from the memory controller port carries back the tag the
// requests multiplexer attached, {source, context}.  The decoder checks the
// source field and forwards the data in the same cycle:
//   - a Q_c read   -> the message FIFO of process 2 (the data is a message),
//   - a C read     -> the {u, w} FIFO of process 3 (u from the tag, w = data),
//   - a d read     -> the {u, w, d} FIFO of process 4 (u, w from the tag),
//   - a write ack  -> only counted (wr_ack).
// The memory port cannot be stalled, so the producing processes hold credits
// that guarantee room in these FIFOs; an assertion checks it.  Routing is as
// the architecture describes; tag layout and write acknowledges are this
// design's choice.
module response_decoder
  import apsp_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  mc_rsp_t mc_rsp,
  // to process 2
  output logic    msg_push,
  output msg_t    msg_data,
  input  logic    msg_full,
  // to process 3
  output logic    uw_push,
  output node_t   uw_u,
  output node_t   uw_w,
  input  logic    uw_full,
  // to process 4
  output logic    uwd_push,
  output node_t   uwd_u,
  output node_t   uwd_w,
  output word_t   uwd_d,
  input  logic    uwd_full,
  // any response (read data or write acknowledge)
  output logic    rsp_seen,
  output logic    wr_ack
);
  logic [SRC_W-1:0] src;
  node_t            ctx_u, ctx_w;

  assign src   = mc_rsp.tag[TAG_W-1 -: SRC_W];
  assign ctx_u = mc_rsp.tag[CTX_W-1 -: NODE_W];
  assign ctx_w = mc_rsp.tag[NODE_W-1:0];

  always_comb begin
    msg_push = 1'b0;
    uw_push  = 1'b0;
    uwd_push = 1'b0;
    wr_ack   = 1'b0;
    if (mc_rsp.valid) begin
      case (src)
        SRC_QC_RD: msg_push = 1'b1;
        SRC_C_RD:  uw_push  = 1'b1;
        SRC_D_RD:  uwd_push = 1'b1;
        default:   wr_ack   = 1'b1;
      endcase
    end
  end

  assign rsp_seen = mc_rsp.valid;
  assign msg_data = msg_t'(mc_rsp.data);
  assign uw_u     = ctx_u;
  assign uw_w     = node_t'(mc_rsp.data);
  assign uwd_u    = ctx_u;
  assign uwd_w    = ctx_w;
  assign uwd_d    = mc_rsp.data;

  a_msg_room: assert property (@(posedge clk) disable iff (!rst_n) !(msg_push && msg_full));
  a_uw_room:  assert property (@(posedge clk) disable iff (!rst_n) !(uw_push && uw_full));
  a_uwd_room: assert property (@(posedge clk) disable iff (!rst_n) !(uwd_push && uwd_full));
endmodule
