// process1: requests this kernel's share of the current messages queue Q_c.
//
// Kernels split Q_c by interleaving: kernel k of K reads messages k, k+K,
// k+2K, ... below qc_size.  A new_level pulse restarts the index at the
// kernel's own number.  Each cycle at most one read request for
// Q_c[idx] (word address qc_base + idx) is pushed into the process's request
// FIFO.  A request is only issued while a credit is left: credits start at
// CREDITS (the depth of the message FIFO the response will land in), are
// spent per request and returned when process 2 pops that FIFO, so a
// response always finds room.  done is high once every message of the share
// has been requested.  Interleaving and credits are this design's choice.
module process1
  import apsp_pkg::*;
#(
  parameter int unsigned CREDITS = 512
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             new_level,
  input  logic [KID_W-1:0] kernel_id,
  input  logic [KID_W-1:0] num_kernels,
  input  qidx_t            qc_size,
  input  addr_t            qc_base,
  output logic             req_push,
  output proc_req_t        req_data,
  input  logic             req_full,
  input  logic             credit_return,
  output logic             done
);
  localparam int unsigned CW = $clog2(CREDITS + 1);

  logic [QIDX_W:0] idx;      // one bit wider: idx may step past qc_size
  logic [CW-1:0]   credits;

  assign done     = (idx >= {1'b0, qc_size});
  assign req_push = !new_level && !done && !req_full && (credits != '0);

  always_comb begin
    req_data       = '0;
    req_data.write = 1'b0;
    req_data.addr  = qc_base + addr_t'(idx);
    req_data.ctx   = '0;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      idx     <= '1;
      credits <= CW'(CREDITS);
    end else begin
      if (new_level)     idx <= (QIDX_W+1)'(kernel_id);
      else if (req_push) idx <= idx + (QIDX_W+1)'(num_kernels);
      case ({req_push, credit_return})
        2'b10:   credits <= credits - 1'b1;
        2'b01:   credits <= credits + 1'b1;
        default: credits <= credits;
      endcase
    end
  end

  a_credit_bound: assert property (@(posedge clk) disable iff (!rst_n)
                                   credits <= CW'(CREDITS));
endmodule
