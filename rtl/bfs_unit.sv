// bfs_unit: one breadth-first-search unit: Master, Kernel and NextEnq modules
// sharing one memory port.
//
// The Master runs the levels and forks Kernel threads, one per vertex of this
// unit's share of the current-level queue; Kernel threads claim unvisited
// neighbours and pass them to NextEnq, which appends them to the next-level queue.
// All units of the design cooperate on one graph through shared memory: they
// split every level's queue by index and meet at a barrier counter updated with
// atomic fetch-and-add. On the memory port NextEnq has priority, then the Master,
// then the Kernel (whose threads retry when refused); responses are routed by the
// requester number in the top two tag bits. The module split follows the
// document; the port sharing is this design's.
module bfs_unit
  import ht_pkg::*;
  import bfs_pkg::*;
#(
  parameter int unsigned K_THREADS = 32,
  parameter int unsigned ENQ_DEPTH = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  bfs_cfg_t    cfg,
  output logic        busy,
  output logic        done,
  output logic [15:0] level,
  output logic        mem_req_valid,
  output mem_req_t    mem_req,
  input  logic        mem_req_ready,
  input  logic        mem_rsp_valid,
  input  mem_rsp_t    mem_rsp,
  // event strobes, for measurement
  output logic        ev_barrier_wait,
  output logic        ev_claim_lost,
  output logic        ev_enq,
  output logic        ev_enq_full
);
  bfs_cfg_t    cfg_q;
  logic        fork_valid, fork_ready, kernel_idle, enq_idle;
  logic [31:0] fork_idx;
  logic [15:0] fork_level;
  logic        enq_valid, enq_ready;
  logic [31:0] enq_vertex;
  logic        m_valid, k_valid, e_valid, m_ready, k_ready, e_ready;
  mem_req_t    m_req, k_req, e_req;
  logic [1:0]  rsp_who;

  // configuration is captured at start
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     cfg_q <= '0;
    else if (start) cfg_q <= cfg;
  end

  bfs_master u_master (
    .clk, .rst_n, .start, .cfg(start ? cfg : cfg_q), .busy, .done, .level,
    .fork_valid, .fork_idx, .fork_level, .fork_ready, .kernel_idle, .enq_idle,
    .req_valid(m_valid), .req(m_req), .req_ready(m_ready),
    .rsp_valid(mem_rsp_valid && rsp_who == BFS_REQ_MASTER), .rsp(mem_rsp),
    .barrier_wait(ev_barrier_wait));

  bfs_kernel #(.THREADS(K_THREADS)) u_kernel (
    .clk, .rst_n, .cfg(cfg_q), .fork_valid, .fork_idx, .fork_level, .fork_ready,
    .idle(kernel_idle), .enq_valid, .enq_vertex, .enq_ready,
    .req_valid(k_valid), .req(k_req), .req_ready(k_ready),
    .rsp_valid(mem_rsp_valid && rsp_who == BFS_REQ_KERNEL), .rsp(mem_rsp),
    .claim_lost(ev_claim_lost));

  bfs_next_enq #(.DEPTH(ENQ_DEPTH)) u_next_enq (
    .clk, .rst_n, .cfg(cfg_q), .level, .in_valid(enq_valid), .in_vertex(enq_vertex),
    .in_ready(enq_ready), .idle(enq_idle),
    .req_valid(e_valid), .req(e_req), .req_ready(e_ready),
    .rsp_valid(mem_rsp_valid && rsp_who == BFS_REQ_ENQ), .rsp(mem_rsp),
    .enq_done(ev_enq));

  assign rsp_who       = mem_rsp.tag[MEM_TAG_W-1 -: 2];
  assign e_ready       = mem_req_ready;
  assign m_ready       = mem_req_ready && !e_valid;
  assign k_ready       = mem_req_ready && !e_valid && !m_valid;
  assign mem_req_valid = e_valid || m_valid || k_valid;
  assign mem_req       = e_valid ? e_req : m_valid ? m_req : k_req;
  assign ev_enq_full   = !enq_ready;

  a_kernel_granted: assert property (@(posedge clk) disable iff (!rst_n)
    k_valid |-> k_ready);
endmodule
