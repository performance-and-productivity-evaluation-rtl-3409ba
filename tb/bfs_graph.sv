// bfs_graph: testbench helper that builds a random undirected graph in a word
// array laid out as bfs_pkg describes, and computes reference BFS levels.
package bfs_graph;
  // memory map used by the BFS testbenches (word addresses)
  localparam int VINFO = 0, ADJ = 1024, VIS = 8192, LVL = 9216, Q0 = 10240, Q1 = 11264,
                 CNT = 12288, BAR = 12800, WORDS = 16384;
  localparam int UNREACHED = 'hFFFF;

  // adjacency lists of nv vertices with about avg_deg neighbours each
  function automatic void make_graph(int nv, int avg_deg, ref int adj[$][$]);
    int none[$];
    adj = {};
    for (int v = 0; v < nv; v++) adj.push_back(none);
    for (int e = 0; e < nv * avg_deg / 2; e++) begin
      int a, b;
      a = $urandom_range(nv - 1);
      b = (e % 5 == 0) ? (a + 1) % nv : int'($urandom_range(nv - 1));
      if (a != b) begin adj[a].push_back(b); adj[b].push_back(a); end
    end
  endfunction

  function automatic void ref_levels(int nv, int src, ref int adj[$][$], ref int lvl[$]);
    int q[$];
    lvl = {};
    for (int v = 0; v < nv; v++) lvl.push_back(UNREACHED);
    lvl[src] = 0; q.push_back(src);
    while (q.size() > 0) begin
      int v;
      v = q.pop_front();
      foreach (adj[v][k]) if (lvl[adj[v][k]] == UNREACHED) begin
        lvl[adj[v][k]] = lvl[v] + 1; q.push_back(adj[v][k]);
      end
    end
  endfunction
endpackage
