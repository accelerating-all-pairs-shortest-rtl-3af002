// tb_sync_fifo: random pushes and pops on an 8-entry FIFO, compared cycle by
// cycle with a queue model: head data, count, full and empty.  Pushes while
// full and pops while empty are never issued (they are assertion errors).
module tb_sync_fifo;
  localparam int W = 16, D = 8;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, rd_en = 0;
  logic [W-1:0] wr_data = '0, rd_data;
  logic full, empty;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] model [$];
  int n_full = 0, n_simul = 0;

  always #5 clk = ~clk;

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      checks++;
      if (count != ($clog2(D+1))'(model.size()) || empty != (model.size() == 0) ||
          full != (model.size() == D)) begin
        failures++;
        $display("status mismatch: count=%0d model=%0d", count, model.size());
      end
      if (model.size() > 0) begin
        checks++;
        if (rd_data != model[0]) begin failures++; $display("head %h exp %h", rd_data, model[0]); end
      end
      if (full) n_full++;
      // bias the fill level up and down in phases
      wr_en   = !full && ($urandom_range(99) < ((i / 300) % 2 ? 30 : 70));
      rd_en   = !empty && ($urandom_range(99) < ((i / 300) % 2 ? 70 : 30));
      wr_data = W'($urandom);
      if (wr_en && rd_en) n_simul++;
      @(posedge clk);
      #1;
      if (rd_en) void'(model.pop_front());
      if (wr_en) model.push_back(wr_data);
      wr_en = 0; rd_en = 0;
    end
    checks++;
    if (n_full == 0 || n_simul == 0) begin failures++; $display("full or simultaneous case not reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
