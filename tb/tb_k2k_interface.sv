// tb_k2k_interface: a ring of three token stages, stage 0 being the first
// kernel.  A small model stands in for each kernel's work: on every new level
// it becomes busy for a random time and produces a random number of tasks
// (none from level 4 on), offering them for reservation.  Checks: every stage
// adopts each level with the right Q_c size; the reserved ranges of a level
// tile 0 .. size-1 with no gap or overlap; the next level's Q_c size is that
// size; no level ends while a stage is busy; the run stops with done on every
// stage after the first level that produced nothing; and the token returns
// to stage 0 every S cycles (one stage per clock cycle).
module tb_k2k_interface;
  import apsp_pkg::*;
  localparam int S = 3;
  logic clk = 0, rst_n = 0, start = 0;
  token_t tok [S+1];
  logic   [S-1:0] my_idle, res_grant, new_level, done;
  qidx_t  res_avail [S], res_base [S], qc_size [S];
  level_t cur_level [S];
  int checks = 0, failures = 0;
  int busy [S], pend [S];
  int reserved [int];           // slot -> count for the current level
  int produced_this_level = 0, level_count = 0;
  level_t exp_level = 0;
  int exp_qc = 5;

  always #5 clk = ~clk;

  for (genvar i = 0; i < S; i++) begin : g_stage
    k2k_interface u_stage (
      .clk, .rst_n, .is_first(i == 0), .start(start && i == 0),
      .init_count(qidx_t'(5)), .tok_in(tok[i]), .tok_out(tok[i+1]),
      .my_idle(my_idle[i]), .res_avail(res_avail[i]), .res_grant(res_grant[i]),
      .res_base(res_base[i]), .cur_level(cur_level[i]), .qc_size(qc_size[i]),
      .new_level(new_level[i]), .done(done[i]));
    assign my_idle[i]   = (busy[i] == 0) && (pend[i] == 0);
    assign res_avail[i] = (busy[i] < 3) ? qidx_t'(pend[i]) : '0;
  end
  assign tok[0] = tok[S];

  // the token each stage is acting on this cycle
  level_t base_lv [S];
  qidx_t  base_qc [S];
  assign base_lv[0] = g_stage[0].u_stage.base.level;
  assign base_qc[0] = g_stage[0].u_stage.base.qc_size;
  assign base_lv[1] = g_stage[1].u_stage.base.level;
  assign base_qc[1] = g_stage[1].u_stage.base.qc_size;
  assign base_lv[2] = g_stage[2].u_stage.base.level;
  assign base_qc[2] = g_stage[2].u_stage.base.qc_size;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    int p;
    for (int i = 0; i < S; i++) begin
      if (new_level[i]) begin
        if (i == 0) begin
          // the previous level must be complete: its slots tile 0..n-1
          checks++;
          for (int k = 0; k < produced_this_level; k++)
            if (!reserved.exists(k) || reserved[k] != 1) begin
              failures++; $display("slot %0d reserved %0d times", k, reserved.exists(k) ? reserved[k] : 0);
            end
          if (reserved.size() != produced_this_level) begin
            failures++; $display("reserved %0d slots, produced %0d", reserved.size(), produced_this_level);
          end
          if (exp_level != 0) exp_qc = produced_this_level;
          exp_level++;
          reserved.delete();
          produced_this_level = 0;
          level_count++;
        end
        checks++;
        if (base_lv[i] != exp_level || base_qc[i] != qidx_t'(exp_qc)) begin
          failures++; $display("stage %0d got level %0d size %0d, expected %0d/%0d",
                               i, base_lv[i], base_qc[i], exp_level, exp_qc);
        end
        p = (base_lv[i] < 4) ? ((i == 0) ? 1 + $urandom_range(3) : $urandom_range(4)) : 0;
        busy[i] <= $urandom_range(40);
        pend[i] <= p;
        produced_this_level += p;
      end else begin
        if (res_grant[i]) begin
          for (int k = 0; k < int'(res_avail[i]); k++) begin
            int slot;
            slot = int'(res_base[i]) + k;
            reserved[slot] = reserved.exists(slot) ? reserved[slot] + 1 : 1;
          end
          pend[i] <= 0;
        end
        if (busy[i] > 0) busy[i] <= busy[i] - 1;
      end
    end
  end

  // the token moves one stage per cycle: it returns to stage 0 every S cycles
  int last_arrival = -1, cyc = 0, n_rounds = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && tok[0].valid) begin
      if (last_arrival >= 0) begin
        checks++;
        n_rounds++;
        if (cyc - last_arrival != S) begin
          failures++; $display("token round took %0d cycles, expected %0d", cyc - last_arrival, S);
        end
      end
      last_arrival = cyc;
    end
  end

  initial begin
    foreach (busy[i]) begin busy[i] = 0; pend[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    start <= 1;
    @(posedge clk);
    start <= 0;
    wait (&done);
    repeat (2 * S + 2) @(posedge clk);
    checks++;
    if (level_count != 4 || cur_level[0] != 32'd4 || !(&done)) begin
      failures++; $display("ended after %0d levels at level %0d", level_count, cur_level[0]);
    end
    checks++;
    if (produced_this_level != 0) begin failures++; $display("last level produced work"); end
    $display("levels=%0d", level_count);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
