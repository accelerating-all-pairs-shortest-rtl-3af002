// k2k_interface: one stage of the kernel-to-kernel token ring.
//
// A single token moves one kernel per clock cycle around the ring of all
// kernels (across FPGAs through their I/O links).  It carries the current
// level, the size of Q_c for that level, a running count of reserved Q_n
// slots, an "all idle" flag and a "done" flag.
//
// Every stage, on receiving the token:
//  - if the token brings a new level, adopts it (cur_level, qc_size) and
//    pulses new_level, which starts the kernel's processes; it reports itself
//    busy for that round;
//  - otherwise, if the kernel's Q_n FIFO holds res_avail unreserved messages,
//    reserves them: the token's count is the first reserved slot (res_base,
//    res_grant pulses) and is increased by res_avail;
//  - ANDs its own idle state into the token's idle flag.
// The first kernel (is_first) also owns the superstep sequence.  start makes
// it create the token for level 1 with count 0 and qc_size = init_count.
// Each time the token comes back it starts a new round with idle set; if the
// round it closes found every kernel idle, the level is finished and the
// count is the size of Q_n: a count of zero ends the run (a done token makes
// one last trip so that every kernel raises done), otherwise the token for
// level+1 leaves with qc_size = count and count = 0.
// The token ring, its reset to zero by the first kernel, the reservation by
// increment and the zero-count termination follow the architecture; the idle
// flag used to detect the end of a superstep and the level/size fields are
// this design's choice.  Latency: one cycle per stage.
module k2k_interface
  import apsp_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   is_first,
  input  logic   start,
  input  qidx_t  init_count,
  input  token_t tok_in,
  output token_t tok_out,
  input  logic   my_idle,
  input  qidx_t  res_avail,
  output logic   res_grant,
  output qidx_t  res_base,
  output level_t cur_level,
  output qidx_t  qc_size,
  output logic   new_level,
  output logic   done
);
  token_t base, nxt;

  always_comb begin
    base = tok_in;
    if (is_first) begin
      if (start) begin
        base         = '0;
        base.valid   = 1'b1;
        base.done    = (init_count == '0);
        base.idle    = 1'b1;
        base.level   = level_t'(1);
        base.qc_size = init_count;
      end else if (tok_in.valid) begin
        if (tok_in.done) begin
          base = '0;                       // the done token has gone round
        end else if (tok_in.idle && tok_in.level == cur_level) begin
          base       = '0;
          base.valid = 1'b1;
          base.idle  = 1'b1;
          if (tok_in.count == '0) begin
            base.done  = 1'b1;
            base.level = cur_level;
          end else begin
            base.level   = cur_level + 1'b1;
            base.qc_size = tok_in.count;
          end
        end else begin
          base.idle = 1'b1;                // a new round of the same level
        end
      end
    end
  end

  always_comb begin
    nxt       = base;
    new_level = 1'b0;
    res_grant = 1'b0;
    res_base  = base.count;
    if (base.valid && !base.done) begin
      if (base.level != cur_level || (is_first && start)) begin
        new_level = 1'b1;
        nxt.idle  = 1'b0;
      end else begin
        if (res_avail != '0) begin
          res_grant = 1'b1;
          nxt.count = base.count + res_avail;
        end
        nxt.idle = base.idle && my_idle && (res_avail == '0);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tok_out   <= '0;
      cur_level <= '0;
      qc_size   <= '0;
      done      <= 1'b0;
    end else begin
      tok_out <= nxt;
      if (new_level) begin
        cur_level <= base.level;
        qc_size   <= base.qc_size;
        done      <= 1'b0;
      end
      if (base.valid && base.done) done <= 1'b1;
    end
  end
endmodule
