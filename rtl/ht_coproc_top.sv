// ht_coproc_top: one coprocessor FPGA holding the three accelerator designs side
// by side, each with its own memory ports and host controls.
//
//  * Sobel edge detector: a single sobel_unit with a read port and a write port.
//  * Smith-Waterman: SW_UNITS sw_unit instances, each with one memory port and
//    its own dispatch inputs, so every unit works on a separate task.
//  * Breadth-first search: BFS_UNITS bfs_unit instances searching one graph
//    together; the top numbers the units and hands each the shared configuration.
//    `bfs_done` is high once every unit has reported the end of the search.
//
// The platform replicates a unit 64 times over four FPGAs, one unit per memory
// port, so one FPGA holds 16 units of a design; these are the defaults. The host
// interface and the memory controllers are outside this module: their signals are
// its ports. Memory ports follow ht_pkg. All units share clk and the active-low
// asynchronous reset rst_n.
module ht_coproc_top
  import ht_pkg::*;
  import sw_pkg::*;
  import bfs_pkg::*;
#(
  parameter int unsigned IMG_W_MAX     = 1920,
  parameter int unsigned IMG_H_MAX     = 1080,
  parameter int unsigned PIX_W         = 16,
  parameter int unsigned SW_UNITS      = 16,
  parameter int unsigned SW_THREADS    = 128,
  parameter int unsigned BFS_UNITS     = 16,
  parameter int unsigned BFS_K_THREADS = 32
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // ---- Sobel ----
  input  logic                  sobel_start,
  input  logic [MEM_ADDR_W-1:0] sobel_src,
  input  logic [MEM_ADDR_W-1:0] sobel_dst,
  input  logic [10:0]           sobel_w,
  input  logic [10:0]           sobel_h,
  output logic                  sobel_busy,
  output logic                  sobel_done,
  output logic                  sobel_rd_req_valid,
  output mem_req_t              sobel_rd_req,
  input  logic                  sobel_rd_req_ready,
  input  logic                  sobel_rd_rsp_valid,
  input  mem_rsp_t              sobel_rd_rsp,
  output logic                  sobel_wr_req_valid,
  output mem_req_t              sobel_wr_req,
  input  logic                  sobel_wr_req_ready,
  // ---- Smith-Waterman ----
  input  logic                  sw_start      [SW_UNITS],
  input  sw_cfg_t               sw_cfg        [SW_UNITS],
  output logic                  sw_busy       [SW_UNITS],
  output logic                  sw_done       [SW_UNITS],
  output logic                  sw_tile_issue [SW_UNITS],
  output logic                  sw_req_valid  [SW_UNITS],
  output mem_req_t              sw_req        [SW_UNITS],
  input  logic                  sw_req_ready  [SW_UNITS],
  input  logic                  sw_rsp_valid  [SW_UNITS],
  input  mem_rsp_t              sw_rsp        [SW_UNITS],
  // ---- BFS ----
  input  logic                  bfs_start,
  input  bfs_cfg_t              bfs_cfg,      // unit_id and n_units are set here
  output logic                  bfs_busy,
  output logic                  bfs_done,
  output logic [15:0]           bfs_level     [BFS_UNITS],
  output logic                  bfs_req_valid [BFS_UNITS],
  output mem_req_t              bfs_req       [BFS_UNITS],
  input  logic                  bfs_req_ready [BFS_UNITS],
  input  logic                  bfs_rsp_valid [BFS_UNITS],
  input  mem_rsp_t              bfs_rsp       [BFS_UNITS],
  output logic [BFS_UNITS-1:0]  bfs_ev_barrier_wait,
  output logic [BFS_UNITS-1:0]  bfs_ev_claim_lost,
  output logic [BFS_UNITS-1:0]  bfs_ev_enq,
  output logic [BFS_UNITS-1:0]  bfs_ev_enq_full
);

  sobel_unit #(.IMG_W_MAX(IMG_W_MAX), .IMG_H_MAX(IMG_H_MAX), .PIX_W(PIX_W)) u_sobel (
    .clk, .rst_n, .start(sobel_start), .cfg_src(sobel_src), .cfg_dst(sobel_dst),
    .cfg_w(sobel_w), .cfg_h(sobel_h), .busy(sobel_busy), .done(sobel_done),
    .rd_req_valid(sobel_rd_req_valid), .rd_req(sobel_rd_req), .rd_req_ready(sobel_rd_req_ready),
    .rd_rsp_valid(sobel_rd_rsp_valid), .rd_rsp(sobel_rd_rsp),
    .wr_req_valid(sobel_wr_req_valid), .wr_req(sobel_wr_req), .wr_req_ready(sobel_wr_req_ready));

  for (genvar u = 0; u < SW_UNITS; u++) begin : g_sw
    sw_unit #(.THREADS(SW_THREADS)) u_sw (
      .clk, .rst_n, .start(sw_start[u]),
      .cfg_q_addr(sw_cfg[u].q_addr), .cfg_q_len(sw_cfg[u].q_len),
      .cfg_tbl_addr(sw_cfg[u].tbl_addr), .cfg_n_seqs(sw_cfg[u].n_seqs),
      .cfg_res_addr(sw_cfg[u].res_addr), .cfg_scr_base(sw_cfg[u].scr_base),
      .cfg_scr_stride(sw_cfg[u].scr_stride),
      .busy(sw_busy[u]), .done(sw_done[u]), .tile_issue(sw_tile_issue[u]),
      .mem_req_valid(sw_req_valid[u]), .mem_req(sw_req[u]), .mem_req_ready(sw_req_ready[u]),
      .mem_rsp_valid(sw_rsp_valid[u]), .mem_rsp(sw_rsp[u]));
  end

  logic [BFS_UNITS-1:0] b_busy, b_done, b_finished;
  for (genvar u = 0; u < BFS_UNITS; u++) begin : g_bfs
    bfs_cfg_t c;
    always_comb begin
      c         = bfs_cfg;
      c.unit_id = 8'(u);
      c.n_units = 8'(BFS_UNITS);
    end
    bfs_unit #(.K_THREADS(BFS_K_THREADS)) u_bfs (
      .clk, .rst_n, .start(bfs_start), .cfg(c), .busy(b_busy[u]), .done(b_done[u]),
      .level(bfs_level[u]),
      .mem_req_valid(bfs_req_valid[u]), .mem_req(bfs_req[u]), .mem_req_ready(bfs_req_ready[u]),
      .mem_rsp_valid(bfs_rsp_valid[u]), .mem_rsp(bfs_rsp[u]),
      .ev_barrier_wait(bfs_ev_barrier_wait[u]), .ev_claim_lost(bfs_ev_claim_lost[u]),
      .ev_enq(bfs_ev_enq[u]), .ev_enq_full(bfs_ev_enq_full[u]));
  end

  // a unit's done pulse is remembered until the next start
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         b_finished <= '0;
    else if (bfs_start) b_finished <= '0;
    else                b_finished <= b_finished | b_done;
  end
  assign bfs_busy = |b_busy;
  assign bfs_done = &b_finished;
endmodule
