// tb_bfs_unit: NU BFS units search one random graph together through a shared
// memory model (one port per unit, random stalls). The level of every vertex is
// compared with a software BFS, so are the per-level queue sizes, each vertex of
// the last level must appear exactly once in its queue, and the units must have waited at the barrier, lost a claim race
// to another unit and filled a NextEnq FIFO at least once.
module tb_bfs_unit;
  import ht_pkg::*;
  import bfs_pkg::*;
  import bfs_graph::*;
  localparam int NU = 3, NV = 180, DEG = 6, SRC = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start;
  bfs_cfg_t cfg [NU];
  logic busy [NU], done [NU], bw [NU], cl [NU], eq [NU], ef [NU];
  logic [15:0] level [NU];
  logic req_valid [NU]; mem_req_t req [NU]; logic req_ready [NU];
  logic rsp_valid [NU]; mem_rsp_t rsp [NU];
  int checks = 0, failures = 0, n_bar = 0, n_lost = 0, n_enq = 0, n_full = 0, n_done = 0;

  mem_model #(.NPORTS(NU), .WORDS(WORDS), .LAT(8), .STALL_PCT(15)) mem (
    .clk, .rst_n, .req_valid, .req, .req_ready, .rsp_valid, .rsp);

  for (genvar u = 0; u < NU; u++) begin : g_u
    bfs_unit #(.K_THREADS(8), .ENQ_DEPTH(4)) dut (
      .clk, .rst_n, .start, .cfg(cfg[u]), .busy(busy[u]), .done(done[u]), .level(level[u]),
      .mem_req_valid(req_valid[u]), .mem_req(req[u]), .mem_req_ready(req_ready[u]),
      .mem_rsp_valid(rsp_valid[u]), .mem_rsp(rsp[u]),
      .ev_barrier_wait(bw[u]), .ev_claim_lost(cl[u]), .ev_enq(eq[u]), .ev_enq_full(ef[u]));
  end

  always @(posedge clk) if (rst_n) for (int u = 0; u < NU; u++) begin
    if (bw[u]) n_bar++;
    if (cl[u]) n_lost++;
    if (eq[u]) n_enq++;
    if (ef[u]) n_full++;
    if (done[u]) n_done++;
  end

  initial begin
    #20000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int adj[$][$], lvl[$], a, nreach, seen[NV], maxl;
    start = 0;
    make_graph(NV, DEG, adj);
    ref_levels(NV, SRC, adj, lvl);
    a = ADJ;
    for (int v = 0; v < NV; v++) begin
      mem.mem[VINFO + v] = {32'(adj[v].size()), 32'(a)};
      foreach (adj[v][k]) begin mem.mem[a] = 64'(adj[v][k]); a++; end
      mem.mem[LVL + v] = 64'(UNREACHED);
    end
    mem.mem[VIS + SRC] = 1; mem.mem[LVL + SRC] = 0; mem.mem[Q0] = SRC; mem.mem[CNT] = 1;
    for (int u = 0; u < NU; u++)
      cfg[u] = '{unit_id: 8'(u), n_units: 8'(NU), vinfo_base: VINFO, vis_base: VIS, lvl_base: LVL,
                 q0_base: Q0, q1_base: Q1, cnt_base: CNT, bar_addr: BAR};
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    wait (n_done == NU);
    repeat (3) @(posedge clk);
    nreach = 0; maxl = 0;
    for (int v = 0; v < NV; v++) begin
      checks++;
      if (mem.mem[LVL + v] != 64'(lvl[v])) begin
        failures++; $display("vertex %0d level %0d exp %0d", v, mem.mem[LVL + v], lvl[v]);
      end
      if (lvl[v] != UNREACHED) begin nreach++; if (lvl[v] > maxl) maxl = lvl[v]; end
      seen[v] = 0;
    end
    // per-level queue sizes; the last level's queue is still in memory, and holds
    // each vertex of that level exactly once
    for (int l = 0; l <= maxl + 1; l++) begin
      int n;
      n = 0;
      for (int v = 0; v < NV; v++) if (lvl[v] == l) n++;
      checks++;
      if (int'(mem.mem[CNT + l]) != n) begin failures++; $display("cnt[%0d] = %0d exp %0d", l, mem.mem[CNT + l], n); end
    end
    for (int i = 0; i < int'(mem.mem[CNT + maxl]); i++) begin
      int v;
      v = int'(mem.mem[(maxl % 2 ? Q1 : Q0) + i]);
      checks++;
      if (v >= NV || lvl[v] != maxl) begin failures++; $display("last queue holds %0d", v); end
      else seen[v]++;
    end
    for (int v = 0; v < NV; v++) if (lvl[v] == maxl) begin
      checks++;
      if (seen[v] != 1) begin failures++; $display("vertex %0d queued %0d times", v, seen[v]); end
    end
    $display("%0d of %0d vertices reached, %0d levels; barrier cycles %0d, lost claims %0d, enqueues %0d, FIFO-full cycles %0d",
             nreach, NV, maxl + 1, n_bar, n_lost, n_enq, n_full);
    checks += 4;
    if (n_enq != nreach - 1) begin failures++; $display("enqueues %0d", n_enq); end
    if (n_bar == 0)  begin failures++; $display("no barrier wait"); end
    if (n_lost == 0) begin failures++; $display("no lost claim"); end
    if (n_full == 0) begin failures++; $display("NextEnq FIFO never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
