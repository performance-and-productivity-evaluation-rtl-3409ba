// bfs_next_enq: the NextEnq module of a BFS unit.
//
// Takes the vertices the Kernel threads have claimed (through a FIFO of DEPTH
// entries) and appends each to the next-level queue: it writes level[n] = L+1,
// reserves a queue slot with an atomic fetch-and-add on cnt[L+1], and writes n
// into the queue of level L+1 at that slot. Up to DEPTH vertices wait in the
// FIFO; the Kernel threads stall when it is full. `idle` is high when the FIFO
// is empty and no vertex is in progress. The module's role is the document's; its
// FIFO and single-vertex sequence are this design's.
module bfs_next_enq
  import ht_pkg::*;
  import bfs_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  bfs_cfg_t    cfg,
  input  logic [15:0] level,         // current level L
  input  logic        in_valid,
  input  logic [31:0] in_vertex,
  output logic        in_ready,
  output logic        idle,
  output logic        req_valid,
  output mem_req_t    req,
  input  logic        req_ready,
  input  logic        rsp_valid,
  input  mem_rsp_t    rsp,
  output logic        enq_done       // one vertex appended this clock
);
  localparam int unsigned AW = $clog2(DEPTH);
  typedef enum logic [1:0] {E_IDLE, E_LVL, E_SLOT, E_WQ} enq_e;

  logic [31:0]  fifo [DEPTH];
  logic [AW:0]  wp, rp;
  enq_e         st;
  logic [31:0]  v, slot;
  logic         slot_wait;
  logic [15:0]  nlevel;

  assign nlevel   = level + 1'b1;
  assign in_ready = (wp - rp) != (AW+1)'(DEPTH);
  assign idle     = (wp == rp) && st == E_IDLE;

  always_comb begin
    req       = '0;
    req.tag   = {BFS_REQ_ENQ, 10'd0};
    req_valid = 1'b0;
    unique case (st)
      E_LVL: begin
        req_valid = 1'b1; req.op = MEM_WR; req.addr = cfg.lvl_base + v; req.data = 64'(nlevel);
      end
      E_SLOT: if (!slot_wait) begin
        req_valid = 1'b1; req.op = MEM_FADD; req.addr = cfg.cnt_base + 32'(nlevel); req.data = 64'd1;
      end
      E_WQ: begin
        req_valid = 1'b1; req.op = MEM_WR;
        req.addr  = (nlevel[0] ? cfg.q1_base : cfg.q0_base) + slot;
        req.data  = 64'(v);
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) if (in_valid && in_ready) fifo[wp[AW-1:0]] <= in_vertex;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; st <= E_IDLE; v <= '0; slot <= '0; slot_wait <= 1'b0; enq_done <= 1'b0;
    end else begin
      enq_done <= 1'b0;
      if (in_valid && in_ready) wp <= wp + 1'b1;
      unique case (st)
        E_IDLE: if (wp != rp) begin
          v  <= fifo[rp[AW-1:0]];
          rp <= rp + 1'b1;
          st <= E_LVL;
        end
        E_LVL: if (req_ready) st <= E_SLOT;
        E_SLOT: begin
          if (!slot_wait && req_ready) slot_wait <= 1'b1;
          if (rsp_valid) begin
            slot      <= rsp.data[31:0];
            slot_wait <= 1'b0;
            st        <= E_WQ;
          end
        end
        E_WQ: if (req_ready) begin st <= E_IDLE; enq_done <= 1'b1; end
        default: st <= E_IDLE;
      endcase
    end
  end
endmodule
