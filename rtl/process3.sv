// process3: requests the distance d(u,w) for every neighbour w of a task.
//
// The head of the {u, w} FIFO is turned into a read request for the
// distance word at d_base + u*n + w (row-major n x n matrix) that carries
// {u, w} as context, so that the response reaches process 4 with both nodes.
// One request per cycle; one credit per request against the {u, w, d} FIFO of
// process 4, returned when process 4 pops it.  The row-major layout and the
// credits are this design's choice.
module process3
  import apsp_pkg::*;
#(
  parameter int unsigned CREDITS = 512
) (
  input  logic        clk,
  input  logic        rst_n,
  input  addr_t       d_base,
  input  logic [31:0] num_nodes,
  input  logic        uw_empty,
  input  node_t       u,
  input  node_t       w,
  output logic        uw_pop,
  output logic        req_push,
  output proc_req_t   req_data,
  input  logic        req_full,
  input  logic        credit_return
);
  localparam int unsigned CW = $clog2(CREDITS + 1);

  logic [CW-1:0] credits;

  assign req_push = !uw_empty && !req_full && (credits != '0);
  assign uw_pop   = req_push;

  always_comb begin
    req_data       = '0;
    req_data.write = 1'b0;
    req_data.addr  = d_base + addr_t'(u) * addr_t'(num_nodes) + addr_t'(w);
    req_data.ctx   = {u, w};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) credits <= CW'(CREDITS);
    else begin
      case ({req_push, credit_return})
        2'b10:   credits <= credits - 1'b1;
        2'b01:   credits <= credits + 1'b1;
        default: credits <= credits;
      endcase
    end
  end
endmodule
