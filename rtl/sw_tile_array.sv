// sw_tile_array: the 8x8 PE array of the Query-database module as a pipelined
// datapath.
//
// One issue computes an N x N tile of the Smith-Waterman matrix: N query residues
// (rows) against N database residues (columns). The tile's inputs are its upper
// boundary (H and F of the row above), its left boundary (H and E of the column to
// the left) and the corner H above-left. Cells on anti-diagonal k (row + column =
// k) depend only on earlier anti-diagonals, so pipeline stage k holds the N x N PEs'
// work for that diagonal: with N = 8 there are 2N-1 = 15 stages and 64 PEs, and a
// new tile (from any thread) can enter every clock. The tile leaves LAT = 2N-1
// clocks after it entered, with its lower boundary (H, F of the last row), its
// right boundary (H, E of the last column) and the largest H inside it; `tag`
// (the thread number) travels along. The 8x8 array and the 15 stages are the
// document's; the anti-diagonal mapping is how this design reads them.
module sw_tile_array
  import sw_pkg::*;
#(
  parameter int unsigned N        = SW_N,
  parameter int unsigned TAG_W    = 7,
  parameter int unsigned MATCH    = 5,
  parameter int unsigned MISMATCH = 4,
  parameter int unsigned GAP_OPEN = 10,
  parameter int unsigned GAP_EXT  = 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic [TAG_W-1:0]       in_tag,
  input  res_t   [N-1:0]         in_q,       // query residues, row i
  input  res_t   [N-1:0]         in_d,       // database residues, column j
  input  score_t [N-1:0]         in_top_h,
  input  score_t [N-1:0]         in_top_f,
  input  score_t [N-1:0]         in_left_h,
  input  score_t [N-1:0]         in_left_e,
  input  score_t                 in_corner,
  output logic                   out_valid,
  output logic [TAG_W-1:0]       out_tag,
  output score_t [N-1:0]         out_bot_h,
  output score_t [N-1:0]         out_bot_f,
  output score_t [N-1:0]         out_right_h,
  output score_t [N-1:0]         out_right_e,
  output score_t                 out_max
);
  localparam int unsigned STAGES = 2*N - 1;

  typedef struct packed {
    logic [TAG_W-1:0]          tag;
    res_t   [N-1:0]            q, d;
    score_t [N-1:0]            top_h, top_f, left_h, left_e;
    score_t                    corner, mx;
    score_t [N-1:0][N-1:0]     h, e, f;
  } tile_t;

  tile_t st  [STAGES+1];   // st[k]: input of stage k (st[0] from the ports)
  tile_t nx  [STAGES];     // stage k with anti-diagonal k filled in
  logic  vld [STAGES+1];

  always_comb begin
    st[0]        = '0;
    st[0].tag    = in_tag;
    st[0].q      = in_q;
    st[0].d      = in_d;
    st[0].top_h  = in_top_h;
    st[0].top_f  = in_top_f;
    st[0].left_h = in_left_h;
    st[0].left_e = in_left_e;
    st[0].corner = in_corner;
    vld[0]       = in_valid;
  end

  for (genvar k = 0; k < STAGES; k++) begin : g_stage
    score_t [N-1:0] dh, de, df;
    for (genvar i = 0; i < N; i++) begin : g_cell
      if (k - i >= 0 && k - i < N) begin : g_pe
        localparam int J = k - i;
        score_t hd, hu, fu, hl, el;
        always_comb begin
          if (i == 0 && J == 0) hd = st[k].corner;
          else if (i == 0)      hd = st[k].top_h[(J > 0) ? J-1 : 0];
          else if (J == 0)      hd = st[k].left_h[(i > 0) ? i-1 : 0];
          else                  hd = st[k].h[(i > 0) ? i-1 : 0][(J > 0) ? J-1 : 0];
          hu = (i == 0) ? st[k].top_h[J] : st[k].h[(i > 0) ? i-1 : 0][J];
          fu = (i == 0) ? st[k].top_f[J] : st[k].f[(i > 0) ? i-1 : 0][J];
          hl = (J == 0) ? st[k].left_h[i] : st[k].h[i][(J > 0) ? J-1 : 0];
          el = (J == 0) ? st[k].left_e[i] : st[k].e[i][(J > 0) ? J-1 : 0];
        end
        sw_pe #(.MATCH(MATCH), .MISMATCH(MISMATCH), .GAP_OPEN(GAP_OPEN), .GAP_EXT(GAP_EXT)) u_pe (
          .q(st[k].q[i]), .d(st[k].d[J]),
          .h_diag(hd), .h_up(hu), .f_up(fu), .h_left(hl), .e_left(el),
          .h(dh[i]), .e(de[i]), .f(df[i]));
      end else begin : g_none
        assign dh[i] = '0;
        assign de[i] = '0;
        assign df[i] = '0;
      end
    end

    always_comb begin
      nx[k] = st[k];
      for (int i = 0; i < N; i++) begin
        if (k - i >= 0 && k - i < N) begin
          nx[k].h[i][k-i] = dh[i];
          nx[k].e[i][k-i] = de[i];
          nx[k].f[i][k-i] = df[i];
          if (dh[i] > nx[k].mx) nx[k].mx = dh[i];
        end
      end
    end

    always_ff @(posedge clk) st[k+1] <= nx[k];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) vld[k+1] <= 1'b0;
      else        vld[k+1] <= vld[k];
    end
  end

  assign out_valid = vld[STAGES];
  assign out_tag   = st[STAGES].tag;
  assign out_max   = st[STAGES].mx;
  always_comb begin
    for (int j = 0; j < N; j++) begin
      out_bot_h[j] = st[STAGES].h[N-1][j];
      out_bot_f[j] = st[STAGES].f[N-1][j];
    end
    for (int i = 0; i < N; i++) begin
      out_right_h[i] = st[STAGES].h[i][N-1];
      out_right_e[i] = st[STAGES].e[i][N-1];
    end
  end
endmodule
