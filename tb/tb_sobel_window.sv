// tb_sobel_window: feeds random frames with random input gaps into the smart
// buffer and checks every presented window against the stored frame, the centre
// coordinates, and the number of windows and border pixels.
module tb_sobel_window;
  localparam int W = 7, H = 5, WMAX = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic frame_start, in_valid, win_valid, border;
  logic [15:0] in_pix;
  logic [2:0][2:0][15:0] win;
  logic [10:0] win_row, win_col;
  int checks = 0, failures = 0, n_win = 0, n_border = 0;
  logic [15:0] img [H][W];

  sobel_window #(.IMG_W_MAX(WMAX), .PIX_W(16), .COORD_W(11)) dut (
    .clk, .rst_n, .frame_start, .img_w(11'(W)), .in_valid, .in_pix,
    .win_valid, .win, .win_row, .win_col, .border);

  always @(posedge clk) begin
    if (win_valid) begin
      n_win++;
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < 3; c++) begin
          checks++;
          if (win[r][c] !== img[win_row + r - 1][win_col + c - 1]) begin
            failures++;
            $display("window mismatch centre (%0d,%0d) [%0d][%0d]", win_row, win_col, r, c);
          end
        end
    end
    if (border) n_border++;
  end

  initial begin
    #200000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    frame_start = 0; in_valid = 0; in_pix = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      n_win = 0; n_border = 0;
      for (int r = 0; r < H; r++) for (int c = 0; c < W; c++) img[r][c] = 16'($urandom);
      @(posedge clk); frame_start <= 1;
      @(posedge clk); frame_start <= 0;
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++) begin
          while ($urandom_range(3) == 0) begin in_valid <= 0; @(posedge clk); end
          in_valid <= 1; in_pix <= img[r][c];
          @(posedge clk);
        end
      in_valid <= 0;
      repeat (4) @(posedge clk);
      checks += 2;
      if (n_win != (W-2)*(H-2)) begin failures++; $display("windows %0d", n_win); end
      if (n_border != W*H - (W-2)*(H-2)) begin failures++; $display("borders %0d", n_border); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
