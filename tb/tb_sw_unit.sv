// tb_sw_unit: a whole Smith-Waterman unit aligning one query (three segments)
// against a table of database sequences of random lengths, with memory stalls.
// Every score written back is compared with the software reference; the tile
// count must equal the number of 8x8 tiles the jobs contain.
module tb_sw_unit;
  import ht_pkg::*;
  import sw_pkg::*;
  import sw_ref::*;
  localparam int NSEQ = 24, QL = 19, QA = 0, TBL = 16, RES = 64, DB = 128, SCR = 2048;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, busy, done, tile_issue;
  logic req_valid [1]; mem_req_t req [1]; logic req_ready [1];
  logic rsp_valid [1]; mem_rsp_t rsp [1];
  int checks = 0, failures = 0, n_tiles = 0, exp_tiles = 0, cyc = 0;
  int exp_score [NSEQ];

  mem_model #(.NPORTS(1), .WORDS(4096), .LAT(10), .STALL_PCT(10)) mem (
    .clk, .rst_n, .req_valid, .req, .req_ready, .rsp_valid, .rsp);

  sw_unit #(.THREADS(16)) dut (
    .clk, .rst_n, .start, .cfg_q_addr(32'(QA)), .cfg_q_len(16'(QL)), .cfg_tbl_addr(32'(TBL)),
    .cfg_n_seqs(24'(NSEQ)), .cfg_res_addr(32'(RES)), .cfg_scr_base(32'(SCR)),
    .cfg_scr_stride(24'd32), .busy, .done, .tile_issue,
    .mem_req_valid(req_valid[0]), .mem_req(req[0]), .mem_req_ready(req_ready[0]),
    .mem_rsp_valid(rsp_valid[0]), .mem_rsp(rsp[0]));

  always @(posedge clk) begin cyc++; if (rst_n && tile_issue) n_tiles++; end

  initial begin
    #3000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int q[$], base, t0;
    start = 0; q = {};
    for (int i = 0; i < QL; i++) begin
      q.push_back($urandom_range(19));
      mem.mem[QA + i/8][8*(i%8) +: 8] = 8'(q[i]);
    end
    base = DB;
    for (int s = 0; s < NSEQ; s++) begin
      int d[$], dl;
      dl = 1 + $urandom_range(60);
      d = {};
      for (int i = 0; i < dl; i++) d.push_back((s % 6 == 0 && i >= 5 && i < 5 + QL) ? q[i-5] : int'($urandom_range(19)));
      for (int i = 0; i < dl; i++) mem.mem[base + i/8][8*(i%8) +: 8] = 8'(d[i]);
      mem.mem[TBL + s] = {16'd0, 16'(dl), 32'(base)};
      base += (dl + 7) / 8;
      exp_score[s] = sw_score(q, d, 5, 4, 10, 1);
      exp_tiles += ((QL + 7) / 8) * ((dl + 7) / 8);
    end
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk); start = 1; t0 = cyc; @(negedge clk); start = 0;
    wait (done);
    repeat (3) @(posedge clk);
    for (int s = 0; s < NSEQ; s++) begin
      checks++;
      if (mem.mem[RES + s] != 64'(exp_score[s])) begin
        failures++; $display("seq %0d score %0d exp %0d", s, mem.mem[RES + s], exp_score[s]);
      end
    end
    checks++;
    if (n_tiles != exp_tiles) begin failures++; $display("tiles %0d exp %0d", n_tiles, exp_tiles); end
    $display("%0d tiles (%0d cell updates) in %0d cycles", n_tiles, 64*n_tiles, cyc - t0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
