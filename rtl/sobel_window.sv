// sobel_window: the smart (stencil) buffer of the Sobel unit.
//
// Pixels of a frame arrive in raster order, at most one per clock. Two line
// buffers hold the two previous image rows; together with the incoming pixel they
// give one new 3-pixel column per input, which is shifted into a 3x3 window.
// Once the input has reached row 2 and column 2, the window is complete and is
// presented, one clock after the pixel that completed it, with the image
// coordinates of its centre pixel. Inputs in row 0/1 or column 0/1 complete no
// window; they are reported on `border` instead so that the caller can account for
// them. `frame_start` restarts the raster position; the width is a run-time input
// up to IMG_W_MAX. The document only names this buffer (an instance of a library
// stencil buffer); the line-buffer structure is this design's choice.
//
// win[r][c]: r = 0 is the oldest row, c = 0 the leftmost column.
module sobel_window #(
  parameter int unsigned IMG_W_MAX = 1920,
  parameter int unsigned PIX_W     = 16,
  parameter int unsigned COORD_W   = 11
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     frame_start,
  input  logic [COORD_W-1:0]       img_w,
  input  logic                     in_valid,
  input  logic [PIX_W-1:0]         in_pix,
  output logic                     win_valid,
  output logic [2:0][2:0][PIX_W-1:0] win,
  output logic [COORD_W-1:0]       win_row,   // centre pixel row
  output logic [COORD_W-1:0]       win_col,   // centre pixel column
  output logic                     border     // an input that completed no window
);

  logic [PIX_W-1:0] lb0 [IMG_W_MAX];  // row r-1
  logic [PIX_W-1:0] lb1 [IMG_W_MAX];  // row r-2
  logic [COORD_W-1:0] row, col;
  logic [PIX_W-1:0] up1, up2;

  assign up1 = lb0[col];
  assign up2 = lb1[col];

  always_ff @(posedge clk) begin
    if (in_valid) begin
      lb0[col] <= in_pix;
      lb1[col] <= up1;
      for (int r = 0; r < 3; r++) begin
        win[r][0] <= win[r][1];
        win[r][1] <= win[r][2];
      end
      win[0][2] <= up2;
      win[1][2] <= up1;
      win[2][2] <= in_pix;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row <= '0; col <= '0;
      win_valid <= 1'b0; border <= 1'b0;
      win_row <= '0; win_col <= '0;
    end else begin
      win_valid <= 1'b0;
      border    <= 1'b0;
      if (frame_start) begin
        row <= '0; col <= '0;
      end else if (in_valid) begin
        if (row >= 2 && col >= 2) begin
          win_valid <= 1'b1;
          win_row   <= row - 1'b1;
          win_col   <= col - 1'b1;
        end else begin
          border <= 1'b1;
        end
        if (col == img_w - 1'b1) begin
          col <= '0;
          row <= row + 1'b1;
        end else begin
          col <= col + 1'b1;
        end
      end
    end
  end

endmodule
