// tb_sw_control: the Control module against the memory model, with the
// Query-database side played by the testbench: calls are accepted at random,
// and scores (a function of the job) are returned out of order after random
// delays. Checks that every table entry is forked once with the right fields,
// that every score lands at res_addr + index, and that done comes at the end.
module tb_sw_control;
  import ht_pkg::*;
  import sw_pkg::*;
  localparam int NSEQ = 37, TBL = 100, RES = 300, QA = 7;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, busy, done, call_valid, call_ready, rtn_valid, rtn_ready;
  sw_job_t call_job;
  sw_result_t rtn;
  logic req_valid [1]; mem_req_t req [1]; logic req_ready [1];
  logic rsp_valid [1]; mem_rsp_t rsp [1];
  int checks = 0, failures = 0, forked [NSEQ];
  sw_result_t pending [$];

  mem_model #(.NPORTS(1), .WORDS(1024), .LAT(6), .STALL_PCT(30)) mem (
    .clk, .rst_n, .req_valid, .req, .req_ready, .rsp_valid, .rsp);

  sw_control dut (
    .clk, .rst_n, .start, .cfg_q_addr(32'(QA)), .cfg_q_len(16'd21), .cfg_tbl_addr(32'(TBL)),
    .cfg_n_seqs(24'(NSEQ)), .cfg_res_addr(32'(RES)), .cfg_scr_base(32'd900),
    .cfg_scr_stride(24'd12), .busy, .done,
    .call_valid, .call_job, .call_ready, .rtn_valid, .rtn, .rtn_ready,
    .req_valid(req_valid[0]), .req(req[0]), .req_ready(req_ready[0]),
    .rsp_valid(rsp_valid[0]), .rsp(rsp[0]));

  function automatic int score_of(int idx); return (idx * 37 + 11) % 1000; endfunction

  always_ff @(posedge clk) call_ready <= ($urandom_range(2) == 0);

  always @(posedge clk) if (rst_n) begin
    if (call_valid && call_ready) begin
      int i;
      i = int'(call_job.job_id);
      checks++;
      if (i >= NSEQ || call_job.d_addr != 32'(500 + 3*i) || call_job.d_len != 16'(10 + i)
          || call_job.q_addr != 32'(QA) || call_job.q_len != 16'd21
          || call_job.scratch != 32'd900 || call_job.scr_stride != 24'd12) begin
        failures++; $display("bad fork %0d", i);
      end else begin
        forked[i]++;
        pending.push_back('{job_id: call_job.job_id, score: score_t'(score_of(i))});
      end
    end
  end

  // return scores in random order
  initial begin
    rtn_valid = 0; rtn = '0;
    forever begin
      @(negedge clk);
      if (rtn_valid && rtn_ready) rtn_valid = 0;
      if (!rtn_valid && pending.size() > 0 && $urandom_range(1)) begin
        int k;
        k = $urandom_range(pending.size() - 1);
        rtn = pending[k]; pending.delete(k); rtn_valid = 1;
      end
    end
  end

  initial begin
    #1000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0;
    for (int i = 0; i < NSEQ; i++) begin
      mem.mem[TBL + i] = {16'd0, 16'(10 + i), 32'(500 + 3*i)};
      forked[i] = 0;
    end
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    checks++;
    if (!busy) begin failures++; $display("not busy after start"); end
    wait (done);
    repeat (3) @(posedge clk);
    for (int i = 0; i < NSEQ; i++) begin
      checks += 2;
      if (forked[i] != 1) begin failures++; $display("seq %0d forked %0d times", i, forked[i]); end
      if (mem.mem[RES + i] != 64'(score_of(i))) begin failures++; $display("result %0d wrong", i); end
    end
    checks++;
    if (busy) begin failures++; $display("still busy"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
