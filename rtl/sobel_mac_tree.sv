// sobel_mac_tree: multiply-add tree of the Sobel unit.
//
// Convolves a 3x3 window with the two Sobel filters
//   Gx = [-1 0 1; -2 0 2; -1 0 1]   Gy = [-1 -2 -1; 0 0 0; 1 2 1]
// using twelve multipliers (the non-zero coefficients of both filters) and an adder
// tree, then forms the gradient magnitude |Gx| + |Gy|, saturated to PIX_W bits.
// The filters and the count of twelve multipliers follow the document; the
// magnitude formula, the saturation and the pipelining are this design's choice.
//
// Timing: fully pipelined, one window per clock, result LAT = 4 clocks after the
// window. `in_meta` travels alongside unchanged.
module sobel_mac_tree #(
  parameter int unsigned PIX_W  = 16,
  parameter int unsigned META_W = 32
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  input  logic [2:0][2:0][PIX_W-1:0] in_win,
  input  logic [META_W-1:0]          in_meta,
  output logic                       out_valid,
  output logic [PIX_W-1:0]           out_mag,
  output logic [META_W-1:0]          out_meta
);

  localparam int unsigned PW = PIX_W + 3;   // product width, signed
  localparam int unsigned SW = PIX_W + 4;   // sum width, signed

  // Non-zero taps: {row, col, coefficient}. Taps 0-5 belong to Gx, 6-11 to Gy.
  localparam int TAP_R [12] = '{0, 0, 1, 1, 2, 2,   0, 0, 0, 2, 2, 2};
  localparam int TAP_C [12] = '{0, 2, 0, 2, 0, 2,   0, 1, 2, 0, 1, 2};
  localparam int TAP_K [12] = '{-1, 1, -2, 2, -1, 1, -1, -2, -1, 1, 2, 1};

  logic signed [PW-1:0] prod [12];
  logic signed [SW-1:0] psum [6];
  logic signed [SW-1:0] gx, gy;
  logic [SW-1:0]        mag;
  logic [3:0]           vld;
  logic [3:0][META_W-1:0] meta;

  always_ff @(posedge clk) begin
    // stage 1: twelve multipliers
    for (int t = 0; t < 12; t++)
      prod[t] <= PW'(signed'({3'b000, in_win[TAP_R[t]][TAP_C[t]]})) * PW'(TAP_K[t]);
    // stage 2: first adder level (6 adders)
    for (int p = 0; p < 6; p++)
      psum[p] <= SW'(prod[2*p]) + SW'(prod[2*p+1]);
    // stage 3: second adder level (4 adders)
    gx <= psum[0] + psum[1] + psum[2];
    gy <= psum[3] + psum[4] + psum[5];
    // stage 4: absolute values and final adder
    mag <= SW'(gx < 0 ? -gx : gx) + SW'(gy < 0 ? -gy : gy);
    meta <= {meta[2:0], in_meta};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[2:0], in_valid};
  end

  assign out_valid = vld[3];
  assign out_meta  = meta[3];
  assign out_mag   = (mag > SW'({PIX_W{1'b1}})) ? {PIX_W{1'b1}} : mag[PIX_W-1:0];

endmodule
