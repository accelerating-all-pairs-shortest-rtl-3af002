// apsp_coprocessor: the all-pairs shortest path accelerator, N_AE application
// engines of K_PER_AE kernels each (4 x 16 = 64 kernels by default).
//
// All kernels of all engines form one token ring.  Inside an engine the ring
// and the configuration chain run from kernel to kernel; between engines they
// travel over the platform's engine-to-engine links, which are outside this
// design: engine e drives link_out[e], and link_in[e] must carry what the
// previous engine sent (link_in[0] the output of the last engine), with any
// latency.  The host loads the run-time parameters through host_cfg
// (kernel_id 0, num_kernels = N_AE*K_PER_AE) into kernel 0 of engine 0, waits
// until they have reached every kernel, and pulses start.  The memory
// controller ports, one per kernel, are brought out as arrays indexed
// e*K_PER_AE + k.  done rises when a level produced no new tasks; level is
// then the last level processed.  The d matrix, C and the initial tasks in q0
// are prepared in memory by the host.
module apsp_coprocessor
  import apsp_pkg::*;
#(
  parameter int unsigned N_AE       = 4,
  parameter int unsigned K_PER_AE   = 16,
  parameter int unsigned FIFO_DEPTH = 512
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           start,
  input  kcfg_t                          host_cfg,
  output token_t  [N_AE-1:0]             link_tok_out,
  output kcfg_t   [N_AE-1:0]             link_cfg_out,
  input  token_t  [N_AE-1:0]             link_tok_in,
  input  kcfg_t   [N_AE-1:0]             link_cfg_in,
  output mc_req_t [N_AE*K_PER_AE-1:0]    mc_req,
  input  logic    [N_AE*K_PER_AE-1:0]    mc_ready,
  input  mc_rsp_t [N_AE*K_PER_AE-1:0]    mc_rsp,
  output logic                           done,
  output level_t                         level,
  output logic                           idle
);
  logic   [N_AE-1:0] ae_done, ae_idle;
  level_t [N_AE-1:0] ae_level;

  for (genvar e = 0; e < N_AE; e++) begin : g_ae
    apsp_ae #(.K(K_PER_AE), .FIFO_DEPTH(FIFO_DEPTH)) u_ae (
      .clk, .rst_n, .start,
      .cfg_in  ((e == 0) ? host_cfg : link_cfg_in[e]),
      .cfg_out (link_cfg_out[e]),
      .tok_in  (link_tok_in[e]),
      .tok_out (link_tok_out[e]),
      .mc_req  (mc_req[e*K_PER_AE +: K_PER_AE]),
      .mc_ready(mc_ready[e*K_PER_AE +: K_PER_AE]),
      .mc_rsp  (mc_rsp[e*K_PER_AE +: K_PER_AE]),
      .done    (ae_done[e]),
      .level   (ae_level[e]),
      .idle    (ae_idle[e])
    );
  end

  assign done  = ae_done[0];
  assign level = ae_level[0];
  assign idle  = &ae_idle;
endmodule
