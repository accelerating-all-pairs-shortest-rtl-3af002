// apsp_tb_pkg: test helpers shared by the system-level testbenches.
//
// gen_graph builds a random directed graph in compressed-sparse-row form
// (row offsets R, column indices C) with out-degrees drawn from 0..2*deg.
// bfs_all computes the reference all-pairs hop distances (-1 = unreachable)
// with an ordinary breadth-first search from every node, independently of
// the hardware's level-synchronous scheme.  init_word and msg_word give the
// initial distance words and initial tasks the host writes before a run.
package apsp_tb_pkg;
  import apsp_pkg::*;

  function automatic void gen_graph(int n, int deg, ref int R[], ref int C[]);
    int q[$];
    R = new[n + 1];
    R[0] = 0;
    for (int v = 0; v < n; v++) begin
      int k = $urandom_range(2 * deg);
      for (int j = 0; j < k; j++) q.push_back($urandom_range(n - 1));
      R[v + 1] = q.size();
    end
    C = new[q.size()];
    foreach (q[i]) C[i] = q[i];
  endfunction

  // R-MAT graph with 2^scale nodes and deg*2^scale edges: each edge picks a
  // quadrant of the adjacency matrix recursively with probabilities
  // a = 0.45, b = 0.15, c = 0.15, d = 0.25 (per-mille below).
  function automatic void gen_rmat(int scale, int deg, ref int R[], ref int C[]);
    int n = 1 << scale;
    int m = deg * n;
    int src[], dst[], fill[];
    src = new[m]; dst = new[m];
    for (int e = 0; e < m; e++) begin
      int s = 0, t = 0;
      for (int b = 0; b < scale; b++) begin
        int r;
        r = $urandom_range(999);
        s = s << 1; t = t << 1;
        if (r < 450) ;
        else if (r < 600) t = t | 1;
        else if (r < 750) s = s | 1;
        else begin s = s | 1; t = t | 1; end
      end
      src[e] = s; dst[e] = t;
    end
    R = new[n + 1];
    foreach (R[i]) R[i] = 0;
    for (int e = 0; e < m; e++) R[src[e] + 1]++;
    for (int i = 0; i < n; i++) R[i + 1] += R[i];
    fill = new[n];
    foreach (fill[i]) fill[i] = R[i];
    C = new[m];
    for (int e = 0; e < m; e++) begin
      C[fill[src[e]]] = dst[e];
      fill[src[e]]++;
    end
  endfunction

  function automatic void bfs_all(int n, int R[], int C[], ref int hops[]);
    hops = new[n * n];
    for (int i = 0; i < n * n; i++) hops[i] = -1;
    for (int s = 0; s < n; s++) begin
      int fr[$];
      hops[s * n + s] = 0;
      fr.push_back(s);
      while (fr.size() > 0) begin
        int v = fr.pop_front();
        for (int e = R[v]; e < R[v + 1]; e++) begin
          int w = C[e];
          if (hops[s * n + w] < 0) begin
            hops[s * n + w] = hops[s * n + v] + 1;
            fr.push_back(w);
          end
        end
      end
    end
  endfunction

  function automatic word_t init_word(int R[], int j);
    return {32'(R[j]), 31'(R[j + 1] - R[j]), 1'b0};
  endfunction

  function automatic word_t msg_word(int R[], int i);
    msg_t m;
    m.u     = node_t'(i);
    m.start = PTR_W'(R[i]);
    m.count = CNT_W'(R[i + 1] - R[i]);
    return word_t'(m);
  endfunction

  function automatic int max_dist(int n, int hops[]);
    int m = 0;
    foreach (hops[i]) if (hops[i] > m) m = hops[i];
    return m;
  endfunction
endpackage
