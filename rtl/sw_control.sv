// sw_control: the Control module of a Smith-Waterman unit.
//
// The host starts the unit with one query and a table of database sequences (one
// 64-bit word per sequence: bits 31:0 its word address, bits 47:32 its length in
// residues). Control reads the table, forks one Query-database thread per database
// sequence (job id = table index), and writes each returned score to word
// res_addr + index (score in the low bits). It then pulses `done`.
//
// Table reads run ahead of the forks through a small queue (FORK_Q entries,
// counting reads still in flight). Returned scores go through a result queue,
// so the return interface never waits on the memory port combinationally.
// Control's memory requests carry tag bit MEM_TAG_W-1 set; sw_unit uses it to
// route responses. The document only names this module; its job (feeding the
// Query-database threads and collecting their results) is this design's reading.
module sw_control
  import ht_pkg::*;
  import sw_pkg::*;
#(
  parameter int unsigned FORK_Q = 4,
  parameter int unsigned RES_Q  = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  // host dispatch
  input  logic        start,
  input  logic [31:0] cfg_q_addr,
  input  logic [15:0] cfg_q_len,
  input  logic [31:0] cfg_tbl_addr,
  input  logic [23:0] cfg_n_seqs,
  input  logic [31:0] cfg_res_addr,
  input  logic [31:0] cfg_scr_base,
  input  logic [23:0] cfg_scr_stride,
  output logic        busy,
  output logic        done,
  // call / return to the Query-database module
  output logic        call_valid,
  output sw_job_t     call_job,
  input  logic        call_ready,
  input  logic        rtn_valid,
  input  sw_result_t  rtn,
  output logic        rtn_ready,
  // memory requester
  output logic        req_valid,
  output mem_req_t    req,
  input  logic        req_ready,
  input  logic        rsp_valid,
  input  mem_rsp_t    rsp
);
  localparam int unsigned FQ_W = $clog2(FORK_Q);
  localparam int unsigned RQ_W = $clog2(RES_Q);

  logic [31:0] q_addr, tbl_addr, res_addr, scr_base;
  logic [15:0] q_len;
  logic [23:0] n_seqs, scr_stride, n_read, n_forked, n_written;

  // fork queue: table entries that came back
  logic [63:0]   fq [FORK_Q];
  logic [FQ_W:0] fq_wp, fq_rp, fq_inflight;
  // result queue
  sw_result_t    rq [RES_Q];
  logic [RQ_W:0] rq_wp, rq_rp;

  logic fq_room, rq_empty, rd_tbl, wr_res, fork_go, rtn_go;

  assign fq_room   = (fq_wp - fq_rp) + fq_inflight < (FQ_W+1)'(FORK_Q);
  assign rq_empty  = (rq_wp == rq_rp);
  assign rtn_ready = busy && ((rq_wp - rq_rp) != (RQ_W+1)'(RES_Q));

  // memory: result writes first, then table reads
  always_comb begin
    req       = '0;
    req.tag   = MEM_TAG_W'(1) << (MEM_TAG_W - 1);
    req_valid = 1'b0;
    if (!rq_empty) begin
      req_valid = 1'b1;
      req.op    = MEM_WR;
      req.addr  = res_addr + MEM_ADDR_W'(rq[rq_rp[RQ_W-1:0]].job_id);
      req.data  = MEM_DATA_W'(rq[rq_rp[RQ_W-1:0]].score);
    end else if (busy && n_read != n_seqs && fq_room) begin
      req_valid = 1'b1;
      req.op    = MEM_RD;
      req.addr  = tbl_addr + MEM_ADDR_W'(n_read);
    end
  end
  assign wr_res = req_valid && req_ready && req.op == MEM_WR;
  assign rd_tbl = req_valid && req_ready && req.op == MEM_RD;

  // fork
  always_comb begin
    call_job            = '0;
    call_job.job_id     = n_forked;
    call_job.q_addr     = q_addr;
    call_job.q_len      = q_len;
    call_job.d_addr     = fq[fq_rp[FQ_W-1:0]][31:0];
    call_job.d_len      = fq[fq_rp[FQ_W-1:0]][47:32];
    call_job.scratch    = scr_base;
    call_job.scr_stride = scr_stride;
  end
  assign call_valid = (fq_wp != fq_rp);
  assign fork_go    = call_valid && call_ready;
  assign rtn_go     = rtn_valid && rtn_ready;

  always_ff @(posedge clk) begin
    if (rsp_valid) fq[fq_wp[FQ_W-1:0]] <= rsp.data;
    if (rtn_go)    rq[rq_wp[RQ_W-1:0]] <= rtn;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0;
      q_addr <= '0; q_len <= '0; tbl_addr <= '0; n_seqs <= '0; res_addr <= '0;
      scr_base <= '0; scr_stride <= '0;
      n_read <= '0; n_forked <= '0; n_written <= '0;
      fq_wp <= '0; fq_rp <= '0; fq_inflight <= '0; rq_wp <= '0; rq_rp <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy       <= (cfg_n_seqs != 0);
        done       <= (cfg_n_seqs == 0);
        q_addr     <= cfg_q_addr;
        q_len      <= cfg_q_len;
        tbl_addr   <= cfg_tbl_addr;
        n_seqs     <= cfg_n_seqs;
        res_addr   <= cfg_res_addr;
        scr_base   <= cfg_scr_base;
        scr_stride <= cfg_scr_stride;
        n_read <= '0; n_forked <= '0; n_written <= '0;
      end else if (busy) begin
        if (rd_tbl) n_read <= n_read + 1'b1;
        fq_inflight <= fq_inflight + (FQ_W+1)'(rd_tbl) - (FQ_W+1)'(rsp_valid);
        if (rsp_valid) fq_wp <= fq_wp + 1'b1;
        if (fork_go) begin
          fq_rp    <= fq_rp + 1'b1;
          n_forked <= n_forked + 1'b1;
        end
        if (rtn_go) rq_wp <= rq_wp + 1'b1;
        if (wr_res) begin
          rq_rp     <= rq_rp + 1'b1;
          n_written <= n_written + 1'b1;
          if (n_written + 1'b1 == n_seqs) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end
      end
    end
  end

  a_fq_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    rsp_valid |-> (fq_wp - fq_rp) != (FQ_W+1)'(FORK_Q));
endmodule
