// tb_ht_coproc_top: the whole coprocessor at its default size, end to end. All
// memory ports share one memory model with random stalls. At the same time:
//  * the Sobel unit filters a frame, checked pixel by pixel against software;
//  * every Smith-Waterman unit aligns a three-segment query against its own
//    table of database sequences, every score checked against software;
//  * all BFS units search one random graph, every level checked against software.
// The Sobel write port is held off for 200 clocks so that the read credits run
// out. A hub vertex next to the BFS source makes a wide level. The testbench
// counts how often each mechanism happened and fails if one never did: Sobel
// read credits running out, Query-database threads retrying a busy memory port,
// multi-segment alignments, BFS barrier waits, lost claim races, full NextEnq FIFOs; it also checks that every reached vertex was enqueued exactly once.
module tb_ht_coproc_top;
  import ht_pkg::*;
  import sw_pkg::*;
  import bfs_pkg::*;
  import sw_ref::*;
  import bfs_graph::*;

  localparam int NSW = 16, NBFS = 16, NP = 2 + NSW + NBFS;
  localparam int SW_BASE = 16384, SW_REGION = 1024, SOB_SRC = 13000, SOB_DST = 14000;
  localparam int IW = 40, IH = 12, QL = 19, NSEQ = 3, NV = 1000, SRC = 7;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic     req_valid [NP]; mem_req_t req [NP]; logic req_ready [NP];
  logic     rsp_valid [NP]; mem_rsp_t rsp [NP];
  logic     m_valid [NP], m_ready [NP];
  logic     hold;    // holds the Sobel write port off for a while
  mem_model #(.NPORTS(NP), .WORDS(SW_BASE + NSW * SW_REGION), .LAT(12), .STALL_PCT(20)) mem (
    .clk, .rst_n, .req_valid(m_valid), .req, .req_ready(m_ready), .rsp_valid, .rsp);
  always_comb begin
    for (int p = 0; p < NP; p++) begin
      m_valid[p]   = req_valid[p] && !(p == 1 && hold);
      req_ready[p] = m_ready[p] && !(p == 1 && hold);
    end
  end

  logic sobel_start, sobel_busy, sobel_done;
  logic sw_start [NSW], sw_busy [NSW], sw_done [NSW], sw_tile [NSW];
  sw_cfg_t sw_cfg [NSW];
  logic sw_req_valid [NSW], sw_req_ready [NSW], sw_rsp_valid [NSW];
  mem_req_t sw_req [NSW]; mem_rsp_t sw_rsp [NSW];
  logic bfs_start, bfs_busy, bfs_done;
  bfs_cfg_t bfs_cfg;
  logic [15:0] bfs_level [NBFS];
  logic bfs_req_valid [NBFS], bfs_req_ready [NBFS], bfs_rsp_valid [NBFS];
  mem_req_t bfs_req [NBFS]; mem_rsp_t bfs_rsp [NBFS];
  logic [NBFS-1:0] ev_bar, ev_lost, ev_enq, ev_full;
  logic sobel_wr_req_ready_ext;

  ht_coproc_top dut (
    .clk, .rst_n,
    .sobel_start, .sobel_src(32'(SOB_SRC)), .sobel_dst(32'(SOB_DST)), .sobel_w(11'(IW)), .sobel_h(11'(IH)),
    .sobel_busy, .sobel_done,
    .sobel_rd_req_valid(req_valid[0]), .sobel_rd_req(req[0]), .sobel_rd_req_ready(req_ready[0]),
    .sobel_rd_rsp_valid(rsp_valid[0]), .sobel_rd_rsp(rsp[0]),
    .sobel_wr_req_valid(req_valid[1]), .sobel_wr_req(req[1]), .sobel_wr_req_ready(req_ready[1]),
    .sw_start, .sw_cfg, .sw_busy, .sw_done, .sw_tile_issue(sw_tile),
    .sw_req_valid, .sw_req, .sw_req_ready, .sw_rsp_valid, .sw_rsp,
    .bfs_start, .bfs_cfg, .bfs_busy, .bfs_done, .bfs_level,
    .bfs_req_valid, .bfs_req, .bfs_req_ready, .bfs_rsp_valid, .bfs_rsp,
    .bfs_ev_barrier_wait(ev_bar), .bfs_ev_claim_lost(ev_lost), .bfs_ev_enq(ev_enq), .bfs_ev_enq_full(ev_full));

  always_comb begin
    for (int u = 0; u < NSW; u++) begin
      req_valid[2+u] = sw_req_valid[u]; req[2+u] = sw_req[u];
      sw_req_ready[u] = req_ready[2+u]; sw_rsp_valid[u] = rsp_valid[2+u]; sw_rsp[u] = rsp[2+u];
    end
    for (int u = 0; u < NBFS; u++) begin
      req_valid[2+NSW+u] = bfs_req_valid[u]; req[2+NSW+u] = bfs_req[u];
      bfs_req_ready[u] = req_ready[2+NSW+u]; bfs_rsp_valid[u] = rsp_valid[2+NSW+u]; bfs_rsp[u] = rsp[2+NSW+u];
    end
  end

  int checks = 0, failures = 0, cyc = 0;
  int n_credit_out = 0, n_retry = 0, n_tiles = 0, n_bar = 0, n_lost = 0, n_full = 0, n_enq = 0, n_reached = 0, n_sw_done = 0;
  bit sobel_fin = 0;
  int exp_tiles = 0;
  assign hold = (cyc > 100 && cyc < 300);
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (dut.u_sobel.busy && dut.u_sobel.credits == 0) n_credit_out++;
    for (int u = 0; u < NSW; u++) begin
      if (sw_tile[u]) n_tiles++;
      if (sw_done[u]) n_sw_done++;
    end
    if (!sw_req_ready[0] && |dut.g_sw[0].u_sw.u_qdb.busy) n_retry++;
    n_bar += $countones(ev_bar); n_lost += $countones(ev_lost); n_full += $countones(ev_full); n_enq += $countones(ev_enq);
    if (sobel_done) sobel_fin = 1;
  end

  initial begin
    #50000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int img [IH][IW];
  int sw_exp [NSW][NSEQ];
  int adj[$][$], lvl[$];

  function automatic int sobel_ref(int r, int c);
    int gx, gy, m;
    gx = -img[r-1][c-1] + img[r-1][c+1] - 2*img[r][c-1] + 2*img[r][c+1] - img[r+1][c-1] + img[r+1][c+1];
    gy = -img[r-1][c-1] - 2*img[r-1][c] - img[r-1][c+1] + img[r+1][c-1] + 2*img[r+1][c] + img[r+1][c+1];
    m = (gx < 0 ? -gx : gx) + (gy < 0 ? -gy : gy);
    return m > 65535 ? 65535 : m;
  endfunction

  initial begin
    int a;
    sobel_start = 0; bfs_start = 0;
    for (int u = 0; u < NSW; u++) sw_start[u] = 0;
    // Sobel frame
    for (int r = 0; r < IH; r++) for (int c = 0; c < IW; c++) begin
      img[r][c] = (c > IW/2) ? 30000 + int'($urandom_range(2000)) : int'($urandom_range(65535));
      mem.mem[SOB_SRC + r*IW + c] = 64'(img[r][c]);
    end
    // Smith-Waterman: region per unit = query, table, results, sequences, scratch
    for (int u = 0; u < NSW; u++) begin
      int q[$], base, b;
      base = SW_BASE + u * SW_REGION;
      q = {};
      for (int i = 0; i < QL; i++) begin
        q.push_back($urandom_range(19));
        mem.mem[base + i/8][8*(i%8) +: 8] = 8'(q[i]);
      end
      b = base + 16;
      for (int s = 0; s < NSEQ; s++) begin
        int d[$], dl;
        dl = 4 + $urandom_range(40);
        d = {};
        for (int i = 0; i < dl; i++) d.push_back((s == 1 && i >= 2 && i < 2 + QL) ? q[i-2] : int'($urandom_range(19)));
        for (int i = 0; i < dl; i++) mem.mem[b + i/8][8*(i%8) +: 8] = 8'(d[i]);
        mem.mem[base + 4 + s] = {16'd0, 16'(dl), 32'(b)};
        b += (dl + 7) / 8;
        sw_exp[u][s] = sw_score(q, d, 5, 4, 10, 1);
        exp_tiles += ((QL + 7) / 8) * ((dl + 7) / 8);
      end
      sw_cfg[u] = '{q_addr: 32'(base), q_len: 16'(QL), tbl_addr: 32'(base + 4), n_seqs: 24'(NSEQ),
                    res_addr: 32'(base + 8), scr_base: 32'(base + 64), scr_stride: 24'd24};
    end
    // BFS graph
    make_graph(NV, 4, adj);
    // the source is a hub whose neighbours each lead to three more vertices, so
    // the second level is wide and floods the NextEnq FIFOs
    for (int v = 0; v + 3 < NV; v += 5)
      if (v != SRC) begin
        adj[SRC].push_back(v); adj[v].push_back(SRC);
        for (int k = 1; k <= 3; k++) begin adj[v].push_back(v + k); adj[v + k].push_back(v); end
      end
    ref_levels(NV, SRC, adj, lvl);
    a = ADJ;
    for (int v = 0; v < NV; v++) begin
      mem.mem[VINFO + v] = {32'(adj[v].size()), 32'(a)};
      foreach (adj[v][k]) begin mem.mem[a] = 64'(adj[v][k]); a++; end
      mem.mem[LVL + v] = 64'(UNREACHED);
    end
    mem.mem[VIS + SRC] = 1; mem.mem[LVL + SRC] = 0; mem.mem[Q0] = SRC; mem.mem[CNT] = 1;
    bfs_cfg = '{unit_id: 0, n_units: 0, vinfo_base: VINFO, vis_base: VIS, lvl_base: LVL,
                q0_base: Q0, q1_base: Q1, cnt_base: CNT, bar_addr: BAR};

    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk);
    sobel_start = 1; bfs_start = 1;
    for (int u = 0; u < NSW; u++) sw_start[u] = 1;
    @(negedge clk);
    sobel_start = 0; bfs_start = 0;
    for (int u = 0; u < NSW; u++) sw_start[u] = 0;
    wait (sobel_fin && n_sw_done == NSW && bfs_done);
    repeat (5) @(posedge clk);

    for (int r = 1; r < IH - 1; r++) for (int c = 1; c < IW - 1; c++) begin
      checks++;
      if (mem.mem[SOB_DST + r*IW + c] != 64'(sobel_ref(r, c))) begin
        failures++; $display("sobel (%0d,%0d) %0d exp %0d", r, c, mem.mem[SOB_DST + r*IW + c], sobel_ref(r, c));
      end
    end
    for (int u = 0; u < NSW; u++) for (int s = 0; s < NSEQ; s++) begin
      checks++;
      if (mem.mem[SW_BASE + u*SW_REGION + 8 + s] != 64'(sw_exp[u][s])) begin
        failures++; $display("sw unit %0d seq %0d score %0d exp %0d", u, s, mem.mem[SW_BASE + u*SW_REGION + 8 + s], sw_exp[u][s]);
      end
    end
    for (int v = 0; v < NV; v++) begin
      checks++;
      if (v != SRC && lvl[v] != UNREACHED) n_reached++;
      if (mem.mem[LVL + v] != 64'(lvl[v])) begin failures++; $display("bfs vertex %0d level %0d exp %0d", v, mem.mem[LVL + v], lvl[v]); end
    end
    $display("done in %0d cycles: sobel credit-out %0d, sw tiles %0d, sw retries %0d, bfs barrier %0d, lost claims %0d, enq full %0d",
             cyc, n_credit_out, n_tiles, n_retry, n_bar, n_lost, n_full);
    checks += 7;
    if (n_enq != n_reached) begin failures++; $display("BFS enqueued %0d vertices, %0d reached", n_enq, n_reached); end
    if (n_credit_out == 0) begin failures++; $display("sobel credits never ran out"); end
    if (n_retry == 0)      begin failures++; $display("no SW memory retry"); end
    if (n_tiles != exp_tiles) begin failures++; $display("SW tiles %0d exp %0d", n_tiles, exp_tiles); end
    if (n_bar == 0)        begin failures++; $display("no BFS barrier wait"); end
    if (n_lost == 0)       begin failures++; $display("no BFS lost claim"); end
    if (n_full == 0)       begin failures++; $display("no NextEnq FIFO full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
