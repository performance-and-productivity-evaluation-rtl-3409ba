// sw_unit: one Smith-Waterman unit, a Control module and a Query-database module
// sharing one memory port.
//
// Control's requests take priority on the port; the Query-database module is
// offered the port only when Control does not use it (its threads retry
// otherwise). Read responses return to whichever requester set the tag's top bit
// (Control) or not (Query-database). The host starts the unit through the cfg_*
// inputs described in sw_control. `tile_issue` pulses for each tile entering the
// PE array and is useful for measuring cell-update throughput (64 cells a tile).
// The unit's composition follows the document; the port sharing is this design's.
module sw_unit
  import ht_pkg::*;
  import sw_pkg::*;
#(
  parameter int unsigned THREADS  = 128,
  parameter int unsigned MATCH    = 5,
  parameter int unsigned MISMATCH = 4,
  parameter int unsigned GAP_OPEN = 10,
  parameter int unsigned GAP_EXT  = 1
) (
  input  logic        clk,
  input  logic        rst_n,
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
  output logic        tile_issue,
  output logic        mem_req_valid,
  output mem_req_t    mem_req,
  input  logic        mem_req_ready,
  input  logic        mem_rsp_valid,
  input  mem_rsp_t    mem_rsp
);
  logic       call_valid, call_ready, rtn_valid, rtn_ready, qdb_busy;
  sw_job_t    call_job;
  sw_result_t rtn;
  logic       c_req_valid, c_req_ready, q_req_valid, q_req_ready;
  mem_req_t   c_req, q_req;
  logic       rsp_to_ctl;

  sw_control u_control (
    .clk, .rst_n, .start, .cfg_q_addr, .cfg_q_len, .cfg_tbl_addr, .cfg_n_seqs,
    .cfg_res_addr, .cfg_scr_base, .cfg_scr_stride, .busy, .done,
    .call_valid, .call_job, .call_ready, .rtn_valid, .rtn, .rtn_ready,
    .req_valid(c_req_valid), .req(c_req), .req_ready(c_req_ready),
    .rsp_valid(mem_rsp_valid && rsp_to_ctl), .rsp(mem_rsp));

  sw_qdb #(.THREADS(THREADS), .MATCH(MATCH), .MISMATCH(MISMATCH),
           .GAP_OPEN(GAP_OPEN), .GAP_EXT(GAP_EXT)) u_qdb (
    .clk, .rst_n, .call_valid, .call_job, .call_ready, .rtn_valid, .rtn, .rtn_ready,
    .req_valid(q_req_valid), .req(q_req), .req_ready(q_req_ready),
    .rsp_valid(mem_rsp_valid && !rsp_to_ctl), .rsp(mem_rsp),
    .busy(qdb_busy), .tile_issue);

  assign rsp_to_ctl    = mem_rsp.tag[MEM_TAG_W-1];
  assign c_req_ready   = mem_req_ready;
  assign q_req_ready   = mem_req_ready && !c_req_valid;
  assign mem_req_valid = c_req_valid || q_req_valid;
  assign mem_req       = c_req_valid ? c_req : q_req;

  a_one_requester: assert property (@(posedge clk) disable iff (!rst_n)
    !(c_req_valid && q_req_valid && q_req_ready));
  a_idle_when_done: assert property (@(posedge clk) disable iff (!rst_n)
    done |-> !qdb_busy);
endmodule
