// tb_sobel_unit: runs whole frames through the Sobel unit against the memory
// model. Frame 1 is filtered with random stalls on both ports; frame 2 with ports
// always ready, where the run must take no more than W*H plus a fixed latency.
// Every interior result is compared with a direct software Sobel; border words of
// the destination must stay untouched.
module tb_sobel_unit;
  import ht_pkg::*;
  localparam int W = 21, H = 9, SRC = 0, DST = 1024;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, busy, done;
  logic [10:0] cfg_w, cfg_h;
  logic [MEM_ADDR_W-1:0] cfg_src, cfg_dst;
  logic     req_valid [2];
  mem_req_t req [2];
  logic     req_ready [2];
  logic     rsp_valid [2];
  mem_rsp_t rsp [2];
  logic     ready_all [2];
  logic     mvalid [2];
  int checks = 0, failures = 0;
  int img [H][W];
  bit stall;
  int cyc = 0;
  always @(posedge clk) cyc++;

  mem_model #(.NPORTS(2), .WORDS(2048), .LAT(10), .STALL_PCT(0)) mem (
    .clk, .rst_n, .req_valid(mvalid), .req, .req_ready(ready_all), .rsp_valid, .rsp);

  // optional extra stalls on top of the model
  logic [1:0] rnd;
  always_ff @(posedge clk) rnd <= 2'($urandom);
  always_comb begin
    req_ready[0] = ready_all[0] && !(stall && rnd[0] && rnd[1]);
    req_ready[1] = ready_all[1] && !(stall && rnd[1]);
    mvalid[0] = req_valid[0] && req_ready[0];
    mvalid[1] = req_valid[1] && req_ready[1];
  end

  sobel_unit #(.IMG_W_MAX(32), .IMG_H_MAX(16), .PIX_W(16), .OUT_DEPTH(32)) dut (
    .clk, .rst_n, .start, .cfg_src, .cfg_dst, .cfg_w, .cfg_h, .busy, .done,
    .rd_req_valid(req_valid[0]), .rd_req(req[0]), .rd_req_ready(req_ready[0]),
    .rd_rsp_valid(rsp_valid[0]), .rd_rsp(rsp[0]),
    .wr_req_valid(req_valid[1]), .wr_req(req[1]), .wr_req_ready(req_ready[1]));

  function automatic int ref_at(int r, int c);
    int gx, gy, m;
    gx = -img[r-1][c-1] + img[r-1][c+1] - 2*img[r][c-1] + 2*img[r][c+1] - img[r+1][c-1] + img[r+1][c+1];
    gy = -img[r-1][c-1] - 2*img[r-1][c] - img[r-1][c+1] + img[r+1][c-1] + 2*img[r+1][c] + img[r+1][c+1];
    m = (gx < 0 ? -gx : gx) + (gy < 0 ? -gy : gy);
    return m > 65535 ? 65535 : m;
  endfunction

  initial begin
    #2000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, cycles;
    start = 0; cfg_w = 11'(W); cfg_h = 11'(H); cfg_src = SRC; cfg_dst = DST; stall = 1;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      stall = (f == 0);
      for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) begin
        img[r][c] = (f == 0) ? int'($urandom_range(65535)) : ((c > 10) ? 40000 : int'($urandom_range(300)));
        mem.mem[SRC + r*W + c] = 64'(img[r][c]);
        mem.mem[DST + r*W + c] = 64'hDEAD;
      end
      @(negedge clk); start = 1; t0 = cyc;
      @(negedge clk); start = 0;
      wait (done);
      cycles = cyc - t0;
      repeat (2) @(posedge clk);
      for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) begin
        checks++;
        if (r == 0 || c == 0 || r == H-1 || c == W-1) begin
          if (mem.mem[DST + r*W + c] != 64'hDEAD) begin failures++; $display("border (%0d,%0d) written", r, c); end
        end else if (mem.mem[DST + r*W + c] != 64'(ref_at(r, c))) begin
          failures++;
          $display("pixel (%0d,%0d) = %0d exp %0d", r, c, mem.mem[DST + r*W + c], ref_at(r, c));
        end
      end
      $display("frame %0d: %0d cycles for %0d pixels", f, cycles, W*H);
      if (f == 1) begin
        checks++;
        if (cycles > W*H + 30) begin failures++; $display("too slow: %0d cycles", cycles); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
