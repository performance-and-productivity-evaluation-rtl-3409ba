// bfs_master: the Master module of a BFS unit.
//
// Runs the level-synchronous search loop. For level L it reads cnt[L], the size of
// the current-level queue; a zero ends the search. The units split the queue by
// index: unit u forks one Kernel thread for each index u, u+U, u+2U, ... (U units).
// When all its Kernel threads have returned and the NextEnq module is idle, the
// unit enters the barrier: it atomically adds 1 to the shared barrier counter and
// then polls it until it reaches U*(L+1), i.e. every unit has finished level L.
// Units do not message each other; the barrier through memory atomics is the
// document's replacement for a token ring, the rest of this loop is this design's.
//
// `level` is the level being searched; `done` pulses once the search has ended.
module bfs_master
  import ht_pkg::*;
  import bfs_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  bfs_cfg_t    cfg,
  output logic        busy,
  output logic        done,
  output logic [15:0] level,
  // fork to the Kernel module: one current-level queue index per thread
  output logic        fork_valid,
  output logic [31:0] fork_idx,
  output logic [15:0] fork_level,
  input  logic        fork_ready,
  input  logic        kernel_idle,
  input  logic        enq_idle,
  // memory requester
  output logic        req_valid,
  output mem_req_t    req,
  input  logic        req_ready,
  input  logic        rsp_valid,
  input  mem_rsp_t    rsp,
  output logic        barrier_wait     // high while polling the barrier
);
  typedef enum logic [3:0] {M_IDLE, M_RDCNT, M_WCNT, M_FORK, M_DRAIN, M_BAR, M_WBAR, M_POLL, M_WPOLL} mst_e;
  mst_e        st;
  logic [31:0] count, idx;
  logic [31:0] target;

  assign target     = 32'(cfg.n_units) * (32'(level) + 1);
  assign fork_valid = (st == M_FORK) && (idx < count);
  assign fork_idx   = idx;
  assign fork_level = level;
  assign barrier_wait = (st == M_WBAR) || (st == M_POLL) || (st == M_WPOLL);

  always_comb begin
    req       = '0;
    req.tag   = {BFS_REQ_MASTER, 10'd0};
    req_valid = 1'b0;
    unique case (st)
      M_RDCNT: begin req_valid = 1'b1; req.op = MEM_RD;   req.addr = cfg.cnt_base + 32'(level); end
      M_BAR:   begin req_valid = 1'b1; req.op = MEM_FADD; req.addr = cfg.bar_addr; req.data = 64'd1; end
      M_POLL:  begin req_valid = 1'b1; req.op = MEM_RD;   req.addr = cfg.bar_addr; end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= M_IDLE; busy <= 1'b0; done <= 1'b0; level <= '0; count <= '0; idx <= '0;
    end else begin
      done <= 1'b0;
      unique case (st)
        M_IDLE: if (start) begin st <= M_RDCNT; busy <= 1'b1; level <= '0; end
        M_RDCNT: if (req_ready) st <= M_WCNT;
        M_WCNT: if (rsp_valid) begin
          if (rsp.data == 0) begin
            st <= M_IDLE; busy <= 1'b0; done <= 1'b1;
          end else begin
            count <= rsp.data[31:0];
            idx   <= 32'(cfg.unit_id);
            st    <= M_FORK;
          end
        end
        M_FORK: begin
          if (idx >= count)                  st  <= M_DRAIN;
          else if (fork_ready)               idx <= idx + 32'(cfg.n_units);
        end
        M_DRAIN: if (kernel_idle && enq_idle) st <= M_BAR;
        M_BAR:   if (req_ready) st <= M_WBAR;
        M_WBAR:  if (rsp_valid) st <= M_POLL;
        M_POLL:  if (req_ready) st <= M_WPOLL;
        M_WPOLL: if (rsp_valid) begin
          if (rsp.data >= 64'(target)) begin
            level <= level + 1'b1;
            st    <= M_RDCNT;
          end else begin
            st <= M_POLL;
          end
        end
        default: st <= M_IDLE;
      endcase
    end
  end
endmodule
