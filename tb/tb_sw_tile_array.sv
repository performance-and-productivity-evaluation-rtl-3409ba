// tb_sw_tile_array: random tiles issued back to back and with gaps. Each result
// (both boundaries and the tile maximum) is compared with a software evaluation
// of the 8x8 tile, and must leave exactly 15 clocks after its issue, in order.
module tb_sw_tile_array;
  import sw_pkg::*;
  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, out_valid;
  logic [6:0] in_tag, out_tag;
  res_t [N-1:0] in_q, in_d;
  score_t [N-1:0] in_top_h, in_top_f, in_left_h, in_left_e;
  score_t [N-1:0] out_bot_h, out_bot_f, out_right_h, out_right_e;
  score_t in_corner, out_max;
  int checks = 0, failures = 0, cyc = 0;

  typedef struct { int tag; int t; int bh[N]; int bf[N]; int rh[N]; int re[N]; int mx; } exp_t;
  exp_t expq [$];

  sw_tile_array #(.N(N), .TAG_W(7)) dut (.*);

  function automatic int mx2(int a, int b); return a > b ? a : b; endfunction

  function automatic void model(int tag, int t, output exp_t x);
    int H[N][N]; int E[N][N]; int F[N][N];
    x.tag = tag; x.t = t; x.mx = 0;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        int hd, hu, fu, hl, el, s;
        hd = (i == 0 && j == 0) ? int'(in_corner) : (i == 0) ? int'(in_top_h[j-1]) : (j == 0) ? int'(in_left_h[i-1]) : H[i-1][j-1];
        hu = (i == 0) ? int'(in_top_h[j]) : H[i-1][j];
        fu = (i == 0) ? int'(in_top_f[j]) : F[i-1][j];
        hl = (j == 0) ? int'(in_left_h[i]) : H[i][j-1];
        el = (j == 0) ? int'(in_left_e[i]) : E[i][j-1];
        s  = (in_q[i] == in_d[j] && in_q[i] != SW_PAD) ? 5 : -4;
        E[i][j] = mx2(0, mx2(hl - 11, el - 1));
        F[i][j] = mx2(0, mx2(hu - 11, fu - 1));
        H[i][j] = mx2(mx2(0, hd + s), mx2(E[i][j], F[i][j]));
        x.mx = mx2(x.mx, H[i][j]);
      end
    for (int k = 0; k < N; k++) begin
      x.bh[k] = H[N-1][k]; x.bf[k] = F[N-1][k]; x.rh[k] = H[k][N-1]; x.re[k] = E[k][N-1];
    end
  endfunction

  always @(posedge clk) begin
    cyc++;
    if (out_valid && rst_n) begin
      if (expq.size() == 0) begin failures++; $display("unexpected tile"); end
      else begin
        exp_t x;
        x = expq.pop_front();
        checks += 3;
        if (int'(out_tag) != x.tag) begin failures++; $display("tag %0d exp %0d", out_tag, x.tag); end
        if (cyc - x.t != 15) begin failures++; $display("latency %0d", cyc - x.t); end
        if (int'(out_max) != x.mx) begin failures++; $display("max %0d exp %0d", out_max, x.mx); end
        for (int k = 0; k < N; k++) begin
          checks += 4;
          if (int'(out_bot_h[k]) != x.bh[k]) begin failures++; $display("bot_h[%0d] %0d exp %0d", k, out_bot_h[k], x.bh[k]); end
          if (int'(out_bot_f[k]) != x.bf[k]) begin failures++; $display("bot_f[%0d]", k); end
          if (int'(out_right_h[k]) != x.rh[k]) begin failures++; $display("right_h[%0d] %0d exp %0d", k, out_right_h[k], x.rh[k]); end
          if (int'(out_right_e[k]) != x.re[k]) begin failures++; $display("right_e[%0d]", k); end
        end
      end
    end
    if (in_valid) begin
      exp_t x;
      model(int'(in_tag), cyc, x);
      expq.push_back(x);
    end
  end

  initial begin
    #200000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; in_tag = 0; in_q = '0; in_d = '0; in_top_h = '0; in_top_f = '0;
    in_left_h = '0; in_left_e = '0; in_corner = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      in_valid = (n < 60) || ($urandom_range(2) != 0);
      in_tag = 7'(n);
      for (int k = 0; k < N; k++) begin
        in_q[k] = res_t'($urandom_range(3)); in_d[k] = res_t'($urandom_range(3));
        if (n % 7 == 3 && k > 4) in_d[k] = SW_PAD;
        in_top_h[k] = score_t'($urandom_range(60)); in_top_f[k] = score_t'($urandom_range(60));
        in_left_h[k] = score_t'($urandom_range(60)); in_left_e[k] = score_t'($urandom_range(60));
      end
      in_corner = score_t'($urandom_range(60));
    end
    @(negedge clk); in_valid = 0;
    repeat (20) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("tiles missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
