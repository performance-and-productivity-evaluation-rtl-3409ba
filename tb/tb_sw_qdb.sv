// tb_sw_qdb: forks alignment jobs of random lengths (one to several query
// segments, one to several database chunks) onto the Query-database module, with
// random memory stalls and return back-pressure, and compares every returned
// score with the software reference. It also requires that several threads were
// in flight at once, that multi-segment jobs (boundary rows through memory) ran,
// that a thread had to retry a memory instruction and that a return was held off.
module tb_sw_qdb;
  import ht_pkg::*;
  import sw_pkg::*;
  import sw_ref::*;
  localparam int THREADS = 8, NJOBS = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic call_valid, call_ready, rtn_valid, rtn_ready, busy, tile_issue;
  sw_job_t call_job;
  sw_result_t rtn;
  logic req_valid [1]; mem_req_t req [1]; logic req_ready [1];
  logic rsp_valid [1]; mem_rsp_t rsp [1];
  int checks = 0, failures = 0;
  int exp_score [NJOBS];
  bit got [NJOBS];
  int n_got = 0, max_busy = 0, n_retry = 0, n_held = 0, n_tiles = 0, n_multiseg = 0;

  mem_model #(.NPORTS(1), .WORDS(8192), .LAT(12), .STALL_PCT(25)) mem (
    .clk, .rst_n, .req_valid, .req, .req_ready, .rsp_valid, .rsp);

  sw_qdb #(.THREADS(THREADS)) dut (
    .clk, .rst_n, .call_valid, .call_job, .call_ready, .rtn_valid, .rtn, .rtn_ready,
    .req_valid(req_valid[0]), .req(req[0]), .req_ready(req_ready[0]),
    .rsp_valid(rsp_valid[0]), .rsp(rsp[0]), .busy, .tile_issue);

  always_ff @(posedge clk) rtn_ready <= ($urandom_range(3) != 0);

  always @(posedge clk) if (rst_n) begin
    int nb;
    nb = 0;
    for (int t = 0; t < THREADS; t++) if (dut.th[t].pc != 0) nb++;
    if (nb > max_busy) max_busy = nb;
    for (int t = 0; t < THREADS; t++)
      if (!req_ready[0] && dut.th[t].pc inside {1, 2, 3, 6}) begin n_retry++; break; end
    for (int t = 0; t < THREADS; t++) if (dut.th[t].pc == 8 && !rtn_ready) begin n_held++; break; end
    if (tile_issue) n_tiles++;
    if (rtn_valid && rtn_ready) begin
      checks++;
      if (got[rtn.job_id]) begin failures++; $display("job %0d returned twice", rtn.job_id); end
      got[rtn.job_id] = 1; n_got++;
      if (int'(rtn.score) != exp_score[rtn.job_id]) begin
        failures++; $display("job %0d score %0d exp %0d", rtn.job_id, rtn.score, exp_score[rtn.job_id]);
      end
    end
  end

  initial begin
    #3000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sw_job_t jobs [NJOBS];
    int base;
    call_valid = 0; call_job = '0; base = 0;
    for (int n = 0; n < NJOBS; n++) begin
      int q[$], d[$], ql, dl;
      ql = (n % 4 == 0) ? 1 + $urandom_range(6) : 5 + $urandom_range(28);
      dl = (n % 5 == 0) ? 1 + $urandom_range(7) : 3 + $urandom_range(45);
      if (ql > 8) n_multiseg++;
      q = {}; d = {};
      for (int i = 0; i < ql; i++) q.push_back($urandom_range(3));
      for (int i = 0; i < dl; i++) d.push_back((n == 3 && i < ql) ? q[i] : int'($urandom_range(3)));
      jobs[n].job_id = 24'(n); jobs[n].scr_stride = 0; jobs[n].q_len = 16'(ql); jobs[n].d_len = 16'(dl);
      jobs[n].q_addr = 32'(base); base += (ql + 7) / 8;
      jobs[n].d_addr = 32'(base); base += (dl + 7) / 8;
      jobs[n].scratch = 32'(base); base += 4 * ((dl + 7) / 8);
      for (int i = 0; i < ql; i++) mem.mem[jobs[n].q_addr + i/8][8*(i%8) +: 8] = 8'(q[i]);
      for (int i = 0; i < dl; i++) mem.mem[jobs[n].d_addr + i/8][8*(i%8) +: 8] = 8'(d[i]);
      // garbage beyond the sequence end must be ignored
      for (int i = ql; i < ((ql + 7) / 8) * 8; i++) mem.mem[jobs[n].q_addr + i/8][8*(i%8) +: 8] = 8'(i % 4);
      exp_score[n] = sw_score(q, d, 5, 4, 10, 1);
      got[n] = 0;
    end
    repeat (3) @(posedge clk); rst_n = 1;
    for (int n = 0; n < NJOBS; n++) begin
      @(negedge clk);
      call_valid = 1; call_job = jobs[n];
      @(posedge clk);
      while (!call_ready) @(posedge clk);
      @(negedge clk); call_valid = 0;
      if ($urandom_range(1)) @(negedge clk);
    end
    wait (n_got == NJOBS);
    repeat (5) @(posedge clk);
    $display("threads in flight %0d, retries %0d, held returns %0d, tiles %0d, multi-segment jobs %0d",
             max_busy, n_retry, n_held, n_tiles, n_multiseg);
    checks += 5;
    if (max_busy < 2) begin failures++; $display("threads never overlapped"); end
    if (n_retry == 0) begin failures++; $display("no memory retry seen"); end
    if (n_held == 0) begin failures++; $display("no held return seen"); end
    if (n_multiseg == 0) begin failures++; $display("no multi-segment job"); end
    if (busy) begin failures++; $display("module still busy"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
