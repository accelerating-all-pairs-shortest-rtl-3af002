// requests_mux: the kernel's memory requests multiplexer.
//
// NUM_SRC request streams (the process FIFOs and the Q_n writer) compete for
// one memory controller port.  A round-robin arbiter picks one stream whose
// head is valid, starting after the stream served last, and forwards its
// request with a tag made of the stream number and the stream's context
// (the source node u and neighbour w that the response decoder will need).
// The choice is combinational; a request leaves when mc_ready is high and the
// chosen stream is popped in that cycle.  The architecture names the
// multiplexer and its tagging; round-robin order and the tag layout
// {source, context} are this design's choice.
module requests_mux
  import apsp_pkg::*;
#(
  parameter int unsigned N = NUM_SRC
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic      [N-1:0] in_valid,
  input  proc_req_t [N-1:0] in_req,
  output logic      [N-1:0] in_pop,
  output mc_req_t           mc_req,
  input  logic              mc_ready
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] last;   // stream served last
  logic [IW-1:0] sel;
  logic          any;

  always_comb begin
    any = 1'b0;
    sel = '0;
    for (int unsigned k = 1; k <= N; k++) begin
      int unsigned idx;
      idx = (int'(last) + k) % N;
      if (!any && in_valid[idx]) begin
        any = 1'b1;
        sel = IW'(idx);
      end
    end
  end

  always_comb begin
    mc_req       = '0;
    mc_req.valid = any;
    mc_req.write = in_req[sel].write;
    mc_req.addr  = in_req[sel].addr;
    mc_req.data  = in_req[sel].data;
    mc_req.tag   = {SRC_W'(sel), in_req[sel].ctx};
    in_pop       = '0;
    in_pop[sel]  = any && mc_ready;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)               last <= IW'(N - 1);
    else if (any && mc_ready) last <= sel;
  end
endmodule
