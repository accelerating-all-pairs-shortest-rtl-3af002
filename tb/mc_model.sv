// mc_model: behavioural model of the memory controller ports and the shared
// memory behind them (test only, not synthesizable).
//
// NPORTS independent valid/ready request ports share one sparse word memory.
// Each cycle a port refuses requests with probability STALL_PCT percent.  An
// accepted read samples the memory at once, an accepted write updates it at
// once; the response (read data, or an acknowledge for a write) comes back
// with the request's tag after a random latency of MIN_LAT..MAX_LAT cycles, so
// responses of one port return out of order.  At most one response per port
// per cycle.  Counters record stalls, out-of-order returns and accesses.
module mc_model
  import apsp_pkg::*;
#(
  parameter int NPORTS    = 1,
  parameter int MIN_LAT   = 2,
  parameter int MAX_LAT   = 12,
  parameter int STALL_PCT = 20
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  mc_req_t [NPORTS-1:0] mc_req,
  output logic    [NPORTS-1:0] mc_ready,
  output mc_rsp_t [NPORTS-1:0] mc_rsp
);
  typedef struct {
    longint            due;
    longint            seq;
    logic [TAG_W-1:0]  tag;
    word_t             data;
  } pend_t;

  word_t  mem [addr_t];
  pend_t  pq [NPORTS][$];
  longint cycle;
  longint seq_ctr;
  longint last_seq [NPORTS];

  int n_stalls, n_out_of_order, n_reads, n_writes;

  function automatic word_t rd(addr_t a);
    return mem.exists(a) ? mem[a] : '0;
  endfunction

  function automatic void wr(addr_t a, word_t d);
    mem[a] = d;
  endfunction

  initial begin
    cycle = 0; seq_ctr = 0;
    n_stalls = 0; n_out_of_order = 0; n_reads = 0; n_writes = 0;
    for (int p = 0; p < NPORTS; p++) last_seq[p] = -1;
  end

  always @(posedge clk) begin
    cycle <= cycle + 1;
    for (int p = 0; p < NPORTS; p++) begin
      pend_t e;
      int    pick;
      if (!rst_n) begin
        pq[p].delete();
        mc_ready[p] <= 1'b0;
        mc_rsp[p]   <= '0;
        last_seq[p] = -1;
      end else begin
        // accept
        if (mc_req[p].valid && !mc_ready[p]) n_stalls++;
        if (mc_req[p].valid && mc_ready[p]) begin
          e.due = cycle + MIN_LAT + longint'($urandom_range(MAX_LAT - MIN_LAT));
          e.seq = seq_ctr++;
          e.tag = mc_req[p].tag;
          if (mc_req[p].write) begin
            mem[mc_req[p].addr] = mc_req[p].data;
            e.data = '0;
            n_writes++;
          end else begin
            e.data = rd(mc_req[p].addr);
            n_reads++;
          end
          pq[p].push_back(e);
        end
        mc_ready[p] <= ($urandom_range(99) >= STALL_PCT);
        // respond
        pick = -1;
        for (int i = 0; i < pq[p].size(); i++)
          if (pick < 0 && pq[p][i].due <= cycle) pick = i;
        if (pick >= 0) begin
          e = pq[p][pick];
          if (e.seq < last_seq[p]) n_out_of_order++;
          last_seq[p] = e.seq;
          mc_rsp[p] <= '{valid: 1'b1, tag: e.tag, data: e.data};
          pq[p].delete(pick);
        end else begin
          mc_rsp[p] <= '0;
        end
      end
    end
  end
endmodule
