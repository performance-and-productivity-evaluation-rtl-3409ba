// sw_qdb: the Query-database module of a Smith-Waterman unit.
//
// THREADS hardware threads share one memory port and one sw_tile_array. Each
// thread aligns one query against one database sequence and returns the best local
// alignment score. A thread walks the matrix in segments of N query residues; in
// each segment it sweeps the database in chunks of N residues, and each chunk is
// one N x N tile of the PE array. Inside a segment the tile's left boundary (H, E)
// and corner stay in the thread's private state. Between segments the lower
// boundary of every tile (H and F of its last row, four 64-bit words) is written
// to the job's scratch area and read back as the upper boundary of the tile below,
// so a query of any length can be aligned.
//
// Threads are time-multiplexed: every clock the scheduler picks one thread, round
// robin, whose next instruction can run, and executes that instruction. An
// instruction issues at most one memory request or one tile. A thread whose memory
// request cannot be accepted is simply not picked (it retries), a thread that
// waits for read data or for its tile is paused and is woken by their arrival.
// Instructions of a thread, per tile:
//   LDQ  (first chunk of a segment) read the query segment
//   LDD  read the database chunk
//   LDT0..3 (segments after the first) read the upper boundary
//   TILE (once all reads have returned) issue the tile, pause until it returns
//   ST0..3 (segments before the last) write the lower boundary
//   NEXT advance chunk / segment, or go to RTN
//   RTN  hand the score to the return interface
// Memory tags carry {thread, word index}, so read data may belong to any thread.
// Thread t keeps its boundary rows at job.scratch + t * job.scr_stride.
//
// The document gives the thread count, the shared memory interface and PE array,
// and processing in 8-residue segments with intermediate results kept in memory;
// the instruction sequence, memory layout and scheduler are this design's own.
//
// Interfaces: call (fork) `call_valid/call_ready/call_job`, accepted while a
// thread is idle; return `rtn_valid/rtn_ready/rtn`; one memory port.
module sw_qdb
  import ht_pkg::*;
  import sw_pkg::*;
#(
  parameter int unsigned THREADS  = 128,
  parameter int unsigned N        = SW_N,
  parameter int unsigned MATCH    = 5,
  parameter int unsigned MISMATCH = 4,
  parameter int unsigned GAP_OPEN = 10,
  parameter int unsigned GAP_EXT  = 1
) (
  input  logic        clk,
  input  logic        rst_n,
  // call interface
  input  logic        call_valid,
  input  sw_job_t     call_job,
  output logic        call_ready,
  // return interface
  output logic        rtn_valid,
  output sw_result_t  rtn,
  input  logic        rtn_ready,
  // memory port
  output logic        req_valid,
  output mem_req_t    req,
  input  logic        req_ready,
  input  logic        rsp_valid,
  input  mem_rsp_t    rsp,
  // status
  output logic        busy,
  output logic        tile_issue     // a tile entered the PE array this clock
);
  localparam int unsigned TID_W = (THREADS > 1) ? $clog2(THREADS) : 1;
  localparam int unsigned SPW   = MEM_DATA_W / SW_SCORE_W;   // scores per word

  typedef enum logic [3:0] {
    P_IDLE, P_LDQ, P_LDD, P_LDT, P_TILE, P_WAITT, P_ST, P_NEXT, P_RTN
  } pc_e;

  typedef struct packed {
    pc_e               pc;
    logic [1:0]        k;        // word index within LDT / ST
    sw_job_t           job;
    logic [15:0]       seg, chunk, nseg, nchunk;
    res_t   [N-1:0]    q, d;
    score_t [N-1:0]    top_h, top_f, left_h, left_e, bot_h, bot_f;
    score_t            corner, best;
  } thread_t;

  thread_t    th   [THREADS];
  logic [2:0] pend [THREADS];

  // ---------------- scheduler ----------------
  logic [THREADS-1:0] can_run, idle;
  logic [TID_W-1:0]   rr, sel, fork_tid;
  logic               sel_valid, fork_ok;
  thread_t            cur;

  always_comb begin
    for (int t = 0; t < THREADS; t++) begin
      idle[t] = (th[t].pc == P_IDLE);
      unique case (th[t].pc)
        P_LDQ, P_LDD, P_LDT, P_ST: can_run[t] = req_ready;
        P_TILE:                    can_run[t] = (pend[t] == 0);
        P_NEXT:                    can_run[t] = 1'b1;
        P_RTN:                     can_run[t] = rtn_ready;
        default:                   can_run[t] = 1'b0;
      endcase
    end
  end

  // round robin: the first runnable thread at or after rr
  always_comb begin
    sel_valid = 1'b0;
    sel       = '0;
    for (int o = THREADS-1; o >= 0; o--) begin
      int t;
      t = (int'(rr) + o) % THREADS;
      if (can_run[t]) begin
        sel_valid = 1'b1;
        sel       = TID_W'(t);
      end
    end
  end

  always_comb begin
    fork_ok  = 1'b0;
    fork_tid = '0;
    for (int t = THREADS-1; t >= 0; t--)
      if (idle[t]) begin
        fork_ok  = 1'b1;
        fork_tid = TID_W'(t);
      end
  end

  assign call_ready = fork_ok;
  assign busy       = ~&idle;
  assign cur        = th[sel];

  // ---------------- instruction execution: memory and return ----------------
  logic exec_mem;
  always_comb begin
    req       = '0;
    req.op    = MEM_RD;
    req.tag   = MEM_TAG_W'({sel, 3'd0});
    exec_mem  = sel_valid && (cur.pc inside {P_LDQ, P_LDD, P_LDT, P_ST});
    unique case (cur.pc)
      P_LDQ: req.addr = cur.job.q_addr + MEM_ADDR_W'(cur.seg);
      P_LDD: begin
        req.addr = cur.job.d_addr + MEM_ADDR_W'(cur.chunk);
        req.tag  = MEM_TAG_W'({sel, 3'd1});
      end
      P_LDT: begin
        req.addr = cur.job.scratch + MEM_ADDR_W'({cur.chunk, 2'b00}) + MEM_ADDR_W'(cur.k);
        req.tag  = MEM_TAG_W'({sel, 3'd2 + 3'(cur.k)});
      end
      P_ST: begin
        req.op   = MEM_WR;
        req.addr = cur.job.scratch + MEM_ADDR_W'({cur.chunk, 2'b00}) + MEM_ADDR_W'(cur.k);
        for (int s = 0; s < SPW; s++)
          req.data[s*SW_SCORE_W +: SW_SCORE_W] = cur.k[1] ? cur.bot_f[int'(cur.k[0])*SPW + s]
                                                           : cur.bot_h[int'(cur.k[0])*SPW + s];
      end
      default: ;
    endcase
  end
  assign req_valid = exec_mem;

  assign rtn_valid  = sel_valid && (cur.pc == P_RTN);
  assign rtn.job_id = cur.job.job_id;
  assign rtn.score  = cur.best;

  // ---------------- PE array ----------------
  logic              t_valid;
  logic [TID_W-1:0]  t_tag;
  score_t [N-1:0]    t_bot_h, t_bot_f, t_right_h, t_right_e;
  score_t            t_max;

  assign tile_issue = sel_valid && (cur.pc == P_TILE);

  sw_tile_array #(.N(N), .TAG_W(TID_W), .MATCH(MATCH), .MISMATCH(MISMATCH),
                  .GAP_OPEN(GAP_OPEN), .GAP_EXT(GAP_EXT)) u_array (
    .clk, .rst_n,
    .in_valid   (tile_issue),
    .in_tag     (sel),
    .in_q       (cur.q),
    .in_d       (cur.d),
    .in_top_h   (cur.top_h),
    .in_top_f   (cur.top_f),
    .in_left_h  (cur.left_h),
    .in_left_e  (cur.left_e),
    .in_corner  (cur.corner),
    .out_valid  (t_valid),
    .out_tag    (t_tag),
    .out_bot_h  (t_bot_h),
    .out_bot_f  (t_bot_f),
    .out_right_h(t_right_h),
    .out_right_e(t_right_e),
    .out_max    (t_max)
  );

  // ---------------- thread state ----------------
  logic [TID_W-1:0] r_tid;
  logic [2:0]       r_idx;
  assign {r_tid, r_idx} = rsp.tag[TID_W+2:0];

  // residues of a word, positions at or past `len` replaced by padding
  function automatic res_t [N-1:0] unpack_res(logic [MEM_DATA_W-1:0] w, logic [15:0] base,
                                              logic [15:0] len);
    res_t [N-1:0] r;
    for (int i = 0; i < N; i++)
      r[i] = (32'(base) + 32'(i) < 32'(len)) ? w[8*i +: SW_RES_W] : SW_PAD;
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr <= '0;
      for (int t = 0; t < THREADS; t++) begin
        th[t]   <= '0;
        pend[t] <= '0;
      end
    end else begin
      // fork a new job onto an idle thread
      if (call_valid && fork_ok) begin
        th[fork_tid].pc     <= P_LDQ;
        th[fork_tid].k      <= '0;
        th[fork_tid].job    <= call_job;
        th[fork_tid].job.scratch <= call_job.scratch
                                    + MEM_ADDR_W'(fork_tid) * MEM_ADDR_W'(call_job.scr_stride);
        th[fork_tid].seg    <= '0;
        th[fork_tid].chunk  <= '0;
        th[fork_tid].nseg   <= (call_job.q_len + 16'(N - 1)) / 16'(N);
        th[fork_tid].nchunk <= (call_job.d_len + 16'(N - 1)) / 16'(N);
        th[fork_tid].left_h <= '0;
        th[fork_tid].left_e <= '0;
        th[fork_tid].corner <= '0;
        th[fork_tid].best   <= '0;
      end

      // execute the selected thread's instruction
      if (sel_valid) begin
        rr <= (int'(sel) == THREADS - 1) ? '0 : sel + 1'b1;
        unique case (cur.pc)
          P_LDQ: th[sel].pc <= P_LDD;
          P_LDD: begin
            if (cur.seg == 0) begin
              th[sel].pc    <= P_TILE;
              th[sel].top_h <= '0;
              th[sel].top_f <= '0;
            end else begin
              th[sel].pc <= P_LDT;
              th[sel].k  <= '0;
            end
          end
          P_LDT: begin
            th[sel].k <= cur.k + 1'b1;
            if (cur.k == 2'd3) th[sel].pc <= P_TILE;
          end
          P_TILE: th[sel].pc <= P_WAITT;
          P_ST: begin
            th[sel].k <= cur.k + 1'b1;
            if (cur.k == 2'd3) th[sel].pc <= P_NEXT;
          end
          P_NEXT: begin
            if (cur.chunk + 1'b1 < cur.nchunk) begin
              th[sel].chunk  <= cur.chunk + 1'b1;
              th[sel].corner <= cur.top_h[N-1];
              th[sel].pc     <= P_LDD;
            end else if (cur.seg + 1'b1 < cur.nseg) begin
              th[sel].seg    <= cur.seg + 1'b1;
              th[sel].chunk  <= '0;
              th[sel].corner <= '0;
              th[sel].left_h <= '0;
              th[sel].left_e <= '0;
              th[sel].pc     <= P_LDQ;
            end else begin
              th[sel].pc <= P_RTN;
            end
          end
          P_RTN: th[sel].pc <= P_IDLE;
          default: ;
        endcase
      end

      // outstanding reads of a thread
      if (exec_mem && req.op == MEM_RD) begin
        if (!(rsp_valid && r_tid == sel)) pend[sel] <= pend[sel] + 1'b1;
      end
      if (rsp_valid && !(exec_mem && req.op == MEM_RD && r_tid == sel))
        pend[r_tid] <= pend[r_tid] - 1'b1;

      // read data
      if (rsp_valid) begin
        unique case (r_idx)
          3'd0: th[r_tid].q <= unpack_res(rsp.data, th[r_tid].seg * 16'(N), th[r_tid].job.q_len);
          3'd1: th[r_tid].d <= unpack_res(rsp.data, th[r_tid].chunk * 16'(N), th[r_tid].job.d_len);
          3'd2, 3'd3: for (int s = 0; s < SPW; s++)
                  th[r_tid].top_h[int'(r_idx[0])*SPW + s] <= rsp.data[s*SW_SCORE_W +: SW_SCORE_W];
          3'd4, 3'd5: for (int s = 0; s < SPW; s++)
                  th[r_tid].top_f[int'(r_idx[0])*SPW + s] <= rsp.data[s*SW_SCORE_W +: SW_SCORE_W];
          default: ;
        endcase
      end

      // tile result: wakes the thread
      if (t_valid) begin
        th[t_tag].left_h <= t_right_h;
        th[t_tag].left_e <= t_right_e;
        th[t_tag].bot_h  <= t_bot_h;
        th[t_tag].bot_f  <= t_bot_f;
        if (t_max > th[t_tag].best) th[t_tag].best <= t_max;
        th[t_tag].k  <= '0;
        th[t_tag].pc <= (th[t_tag].seg + 1'b1 < th[t_tag].nseg) ? P_ST : P_NEXT;
      end
    end
  end

  // a paused thread must not be woken twice, a tile must belong to a waiting thread
  a_tile_owner: assert property (@(posedge clk) disable iff (!rst_n)
    t_valid |-> th[t_tag].pc == P_WAITT);
  a_rsp_owner: assert property (@(posedge clk) disable iff (!rst_n)
    rsp_valid |-> pend[r_tid] != 0 || (exec_mem && r_tid == sel));
  a_valid_ready: assert property (@(posedge clk) disable iff (!rst_n)
    req_valid |-> req_ready);
endmodule
