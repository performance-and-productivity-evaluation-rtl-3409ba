// bfs_kernel: the Kernel module of a BFS unit.
//
// THREADS hardware threads, each expanding one vertex of the current-level
// queue. A thread forked with queue index i runs the instructions
//   RDQ  read queue[L][i]            -> vertex v
//   RDV  read vinfo[v]               -> neighbour list address and degree
//   RDN  read the next neighbour n   (or, past the last one, go to RTN)
//   CLM  atomic fetch-and-add of visited[n] by 1
//   CHK  if the old value was 0 the thread has claimed n: hand n to NextEnq;
//        back to RDN
//   RTN  finish (the Master counts idle threads)
// Each instruction that reads memory pauses the thread until its data return; the
// scheduler picks, round robin, one thread per clock whose instruction can run
// (memory port free, NextEnq able to take a vertex). The atomic claim makes a
// vertex enter the next queue exactly once even when several units reach it in
// the same level. The document gives the Kernel's role (one thread per queued
// node); its thread count and instruction sequence are this design's.
module bfs_kernel
  import ht_pkg::*;
  import bfs_pkg::*;
#(
  parameter int unsigned THREADS = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  input  bfs_cfg_t    cfg,
  // fork from the Master
  input  logic        fork_valid,
  input  logic [31:0] fork_idx,
  input  logic [15:0] fork_level,
  output logic        fork_ready,
  output logic        idle,
  // to NextEnq: a vertex claimed for level L+1
  output logic        enq_valid,
  output logic [31:0] enq_vertex,
  input  logic        enq_ready,
  // memory requester
  output logic        req_valid,
  output mem_req_t    req,
  input  logic        req_ready,
  input  logic        rsp_valid,
  input  mem_rsp_t    rsp,
  output logic        claim_lost      // a claim found the vertex already visited
);
  localparam int unsigned TID_W = (THREADS > 1) ? $clog2(THREADS) : 1;

  typedef enum logic [2:0] {K_IDLE, K_RDQ, K_RDV, K_RDN, K_CLM, K_CHK, K_RTN} kpc_e;

  typedef struct packed {
    kpc_e        pc;
    logic        wait_rsp;
    logic [15:0] level;
    logic [31:0] idx;
    logic [31:0] v;        // also the neighbour being claimed
    logic [31:0] nbr_addr;
    logic [31:0] left;     // neighbours still to visit
    logic        claimed;
  } kthread_t;

  kthread_t th [THREADS];

  logic [THREADS-1:0] can_run, is_idle;
  logic [TID_W-1:0]   rr, sel, fork_tid;
  logic               sel_valid, fork_ok, exec_mem;
  kthread_t           cur;

  always_comb begin
    for (int t = 0; t < THREADS; t++) begin
      is_idle[t] = (th[t].pc == K_IDLE);
      if (th[t].wait_rsp) can_run[t] = 1'b0;
      else unique case (th[t].pc)
        K_RDQ, K_RDV, K_CLM: can_run[t] = req_ready;
        K_RDN:               can_run[t] = req_ready || th[t].left == 0;
        K_CHK:               can_run[t] = enq_ready || !th[t].claimed;
        K_RTN:               can_run[t] = 1'b1;
        default:             can_run[t] = 1'b0;
      endcase
    end
  end

  always_comb begin
    sel_valid = 1'b0;
    sel       = '0;
    for (int o = THREADS-1; o >= 0; o--) begin
      int t;
      t = (int'(rr) + o) % THREADS;
      if (can_run[t]) begin sel_valid = 1'b1; sel = TID_W'(t); end
    end
    fork_ok  = 1'b0;
    fork_tid = '0;
    for (int t = THREADS-1; t >= 0; t--)
      if (is_idle[t]) begin fork_ok = 1'b1; fork_tid = TID_W'(t); end
  end

  assign cur        = th[sel];
  assign fork_ready = fork_ok;
  assign idle       = &is_idle;

  always_comb begin
    req      = '0;
    req.op   = MEM_RD;
    req.tag  = MEM_TAG_W'({BFS_REQ_KERNEL, 10'(sel)});
    exec_mem = 1'b0;
    if (sel_valid) unique case (cur.pc)
      K_RDQ: begin
        exec_mem = 1'b1;
        req.addr = (cur.level[0] ? cfg.q1_base : cfg.q0_base) + cur.idx;
      end
      K_RDV: begin exec_mem = 1'b1; req.addr = cfg.vinfo_base + cur.v; end
      K_RDN: if (cur.left != 0) begin exec_mem = 1'b1; req.addr = cur.nbr_addr; end
      K_CLM: begin
        exec_mem = 1'b1; req.op = MEM_FADD; req.addr = cfg.vis_base + cur.v; req.data = 64'd1;
      end
      default: ;
    endcase
  end
  assign req_valid  = exec_mem;
  assign enq_valid  = sel_valid && cur.pc == K_CHK && cur.claimed;
  assign enq_vertex = cur.v;

  logic [TID_W-1:0] r_tid;
  assign r_tid = rsp.tag[TID_W-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr <= '0;
      claim_lost <= 1'b0;
      for (int t = 0; t < THREADS; t++) th[t] <= '0;
    end else begin
      claim_lost <= 1'b0;
      if (fork_valid && fork_ok) begin
        th[fork_tid].pc       <= K_RDQ;
        th[fork_tid].wait_rsp <= 1'b0;
        th[fork_tid].idx      <= fork_idx;
        th[fork_tid].level    <= fork_level;
      end
      if (sel_valid) begin
        rr <= (int'(sel) == THREADS - 1) ? '0 : sel + 1'b1;
        if (exec_mem) th[sel].wait_rsp <= 1'b1;
        unique case (cur.pc)
          K_RDQ: th[sel].pc <= K_RDV;
          K_RDV: th[sel].pc <= K_RDN;
          K_RDN: begin
            if (cur.left == 0) th[sel].pc <= K_RTN;
            else begin
              th[sel].pc       <= K_CLM;
              th[sel].nbr_addr <= cur.nbr_addr + 1'b1;
              th[sel].left     <= cur.left - 1'b1;
            end
          end
          K_CLM: th[sel].pc <= K_CHK;
          K_CHK: th[sel].pc <= K_RDN;
          K_RTN: th[sel].pc <= K_IDLE;
          default: ;
        endcase
      end
      if (rsp_valid) begin
        th[r_tid].wait_rsp <= 1'b0;
        unique case (th[r_tid].pc)
          K_RDV: th[r_tid].v <= rsp.data[31:0];                 // answer of RDQ
          K_RDN: begin                                          // answer of RDV
            th[r_tid].nbr_addr <= rsp.data[31:0];
            th[r_tid].left     <= rsp.data[63:32];
          end
          K_CLM: th[r_tid].v <= rsp.data[31:0];                 // answer of RDN
          K_CHK: begin                                          // answer of CLM
            th[r_tid].claimed <= (rsp.data == 0);
            claim_lost        <= (rsp.data != 0);
          end
          default: ;
        endcase
      end
    end
  end

  a_rsp_waiting: assert property (@(posedge clk) disable iff (!rst_n)
    rsp_valid |-> th[r_tid].wait_rsp);
endmodule
