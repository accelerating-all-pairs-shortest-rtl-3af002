// apsp_ae: one application engine (FPGA) holding K APSP kernels.
//
// The kernels form a segment of the global ring: the token and the
// configuration enter kernel 0, pass from kernel to kernel, and leave kernel
// K-1 towards the next engine's link.  Each kernel drives exactly one memory
// controller port, so with the default K = 16 an engine uses all sixteen
// ports it has.  start is forwarded to every kernel; only the kernel that
// numbered itself 0 acts on it.  done and level are those of kernel 0.
module apsp_ae
  import apsp_pkg::*;
#(
  parameter int unsigned K          = 16,
  parameter int unsigned FIFO_DEPTH = 512
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  kcfg_t            cfg_in,
  output kcfg_t            cfg_out,
  input  token_t           tok_in,
  output token_t           tok_out,
  output mc_req_t [K-1:0]  mc_req,
  input  logic    [K-1:0]  mc_ready,
  input  mc_rsp_t [K-1:0]  mc_rsp,
  output logic             done,
  output level_t           level,
  output logic             idle
);
  kcfg_t  [K:0] cfg_chain;
  token_t [K:0] tok_chain;
  logic   [K-1:0] k_done, k_idle;
  level_t [K-1:0] k_level;

  assign cfg_chain[0] = cfg_in;
  assign tok_chain[0] = tok_in;
  assign cfg_out      = cfg_chain[K];
  assign tok_out      = tok_chain[K];

  for (genvar k = 0; k < K; k++) begin : g_kernel
    apsp_kernel #(.FIFO_DEPTH(FIFO_DEPTH)) u_kernel (
      .clk, .rst_n, .start,
      .cfg_in  (cfg_chain[k]),
      .cfg_out (cfg_chain[k+1]),
      .tok_in  (tok_chain[k]),
      .tok_out (tok_chain[k+1]),
      .mc_req  (mc_req[k]),
      .mc_ready(mc_ready[k]),
      .mc_rsp  (mc_rsp[k]),
      .done    (k_done[k]),
      .level   (k_level[k]),
      .idle    (k_idle[k])
    );
  end

  assign done  = k_done[0];
  assign level = k_level[0];
  assign idle  = &k_idle;
endmodule
