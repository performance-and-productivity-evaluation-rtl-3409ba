// sobel_unit: the Sobel edge-detector unit.
//
// A streaming read interface fetches the source frame from coprocessor memory,
// one pixel per 64-bit word (pixel in the low PIX_W bits), at up to one request
// per clock. Returned pixels go through the smart buffer (sobel_window) and the
// multiply-add tree (sobel_mac_tree); each gradient magnitude is queued in an
// output FIFO and a streaming write interface stores it at the address of its
// centre pixel in the destination frame. Only interior pixels are written; the
// one-pixel frame border of the destination is left untouched.
//
// Flow control is by credits: a read may be issued only while fewer than
// OUT_DEPTH pixels are between the read port and the output FIFO's exit. A pixel
// hands its credit back when it turns out to be a border pixel or when its result
// leaves the FIFO, so the FIFO can never overflow, and reads run ahead of the
// computation (prefetching) as far as the credits allow. With both ports always
// ready, a W x H frame takes W*H clocks plus the memory and pipeline latency.
//
// The structure (stream in, smart buffer, multiply-add tree, stream out, one pixel
// per clock, pixels up to 16 bits, frames up to 1920x1080) follows the document;
// the memory format, credit scheme and border handling are this design's choice.
//
// Interface: pulse `start` for one clock with the cfg_* inputs valid; `busy` is
// high until the last result has been written, then `done` pulses for one clock.
module sobel_unit
  import ht_pkg::*;
#(
  parameter int unsigned IMG_W_MAX = 1920,
  parameter int unsigned IMG_H_MAX = 1080,
  parameter int unsigned PIX_W     = 16,
  parameter int unsigned OUT_DEPTH = 64
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic [MEM_ADDR_W-1:0]  cfg_src,
  input  logic [MEM_ADDR_W-1:0]  cfg_dst,
  input  logic [10:0]            cfg_w,
  input  logic [10:0]            cfg_h,
  output logic                   busy,
  output logic                   done,
  // read port
  output logic                   rd_req_valid,
  output mem_req_t               rd_req,
  input  logic                   rd_req_ready,
  input  logic                   rd_rsp_valid,
  input  mem_rsp_t               rd_rsp,
  // write port
  output logic                   wr_req_valid,
  output mem_req_t               wr_req,
  input  logic                   wr_req_ready
);

  localparam int unsigned COORD_W = 11;
  localparam int unsigned CNT_W   = $clog2(IMG_W_MAX * IMG_H_MAX + 1);
  localparam int unsigned CR_W    = $clog2(OUT_DEPTH + 1);
  localparam int unsigned FA_W    = $clog2(OUT_DEPTH);

  typedef struct packed {
    logic [MEM_ADDR_W-1:0] addr;
    logic [PIX_W-1:0]      mag;
  } out_t;

  logic [MEM_ADDR_W-1:0] src, dst;
  logic [COORD_W-1:0]    w;
  logic [CNT_W-1:0]      n_total, n_out_total, n_issued, n_written;
  logic [CR_W-1:0]       credits;

  // ---------------- streaming read interface ----------------
  logic issue;
  assign rd_req_valid = busy && (n_issued != n_total) && (credits != 0);
  assign issue        = rd_req_valid && rd_req_ready;
  always_comb begin
    rd_req      = '0;
    rd_req.op   = MEM_RD;
    rd_req.addr = src + MEM_ADDR_W'(n_issued);
  end

  // ---------------- smart buffer and multiply-add tree ----------------
  logic                       win_valid, win_border;
  logic [2:0][2:0][PIX_W-1:0] win;
  logic [COORD_W-1:0]         win_row, win_col;
  logic [MEM_ADDR_W-1:0]      win_addr;
  logic                       mag_valid;
  logic [PIX_W-1:0]           mag;
  logic [MEM_ADDR_W-1:0]      mag_addr;

  sobel_window #(.IMG_W_MAX(IMG_W_MAX), .PIX_W(PIX_W), .COORD_W(COORD_W)) u_window (
    .clk, .rst_n,
    .frame_start (start),
    .img_w       (w),
    .in_valid    (rd_rsp_valid),
    .in_pix      (rd_rsp.data[PIX_W-1:0]),
    .win_valid,
    .win,
    .win_row,
    .win_col,
    .border      (win_border)
  );

  assign win_addr = dst + MEM_ADDR_W'(win_row) * MEM_ADDR_W'(w) + MEM_ADDR_W'(win_col);

  sobel_mac_tree #(.PIX_W(PIX_W), .META_W(MEM_ADDR_W)) u_tree (
    .clk, .rst_n,
    .in_valid  (win_valid),
    .in_win    (win),
    .in_meta   (win_addr),
    .out_valid (mag_valid),
    .out_mag   (mag),
    .out_meta  (mag_addr)
  );

  // ---------------- output FIFO and streaming write interface ----------------
  out_t            fifo [OUT_DEPTH];
  logic [FA_W:0]   wp, rp;
  logic            fifo_empty, pop;

  assign fifo_empty   = (wp == rp);
  assign wr_req_valid = !fifo_empty;
  assign pop          = wr_req_valid && wr_req_ready;
  always_comb begin
    wr_req      = '0;
    wr_req.op   = MEM_WR;
    wr_req.addr = fifo[rp[FA_W-1:0]].addr;
    wr_req.data = MEM_DATA_W'(fifo[rp[FA_W-1:0]].mag);
  end

  always_ff @(posedge clk) begin
    if (mag_valid) fifo[wp[FA_W-1:0]] <= '{addr: mag_addr, mag: mag};
  end

  // ---------------- control ----------------
  logic [1:0] cr_back;
  assign cr_back = {1'b0, win_border} + {1'b0, pop};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0;
      src <= '0; dst <= '0; w <= '0;
      n_total <= '0; n_out_total <= '0; n_issued <= '0; n_written <= '0;
      credits <= '0; wp <= '0; rp <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy        <= 1'b1;
        src         <= cfg_src;
        dst         <= cfg_dst;
        w           <= cfg_w;
        n_total     <= CNT_W'(cfg_w) * CNT_W'(cfg_h);
        n_out_total <= CNT_W'(cfg_w - 11'd2) * CNT_W'(cfg_h - 11'd2);
        n_issued    <= '0;
        n_written   <= '0;
        credits     <= CR_W'(OUT_DEPTH);
        wp <= '0; rp <= '0;
      end else if (busy) begin
        if (issue) n_issued <= n_issued + 1'b1;
        credits <= credits + CR_W'(cr_back) - CR_W'(issue);
        if (mag_valid) wp <= wp + 1'b1;
        if (pop) begin
          rp        <= rp + 1'b1;
          n_written <= n_written + 1'b1;
          if (n_written + 1'b1 == n_out_total) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end
      end
    end
  end

  // The credit scheme must keep the FIFO from overflowing.
  a_fifo_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    (mag_valid && !pop) |-> (wp - rp) != (FA_W+1)'(OUT_DEPTH));
  a_credit_range: assert property (@(posedge clk) disable iff (!rst_n)
    credits <= CR_W'(OUT_DEPTH));

endmodule
