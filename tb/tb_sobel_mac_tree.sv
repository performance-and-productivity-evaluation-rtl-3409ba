// tb_sobel_mac_tree: random and extreme windows through the multiply-add tree,
// compared with a direct evaluation of |Gx|+|Gy| (saturated), plus a check of the
// four-clock latency and of the sideband data.
module tb_sobel_mac_tree;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, out_valid;
  logic [2:0][2:0][15:0] in_win;
  logic [31:0] in_meta, out_meta;
  logic [15:0] out_mag;
  int checks = 0, failures = 0, cyc = 0;
  int exp_mag [$];
  int exp_meta [$];
  int exp_cyc [$];

  sobel_mac_tree #(.PIX_W(16), .META_W(32)) dut (.*);

  function automatic int ref_mag(logic [2:0][2:0][15:0] w);
    int gx, gy, m;
    gx = -int'(w[0][0]) + int'(w[0][2]) - 2*int'(w[1][0]) + 2*int'(w[1][2]) - int'(w[2][0]) + int'(w[2][2]);
    gy = -int'(w[0][0]) - 2*int'(w[0][1]) - int'(w[0][2]) + int'(w[2][0]) + 2*int'(w[2][1]) + int'(w[2][2]);
    m = (gx < 0 ? -gx : gx) + (gy < 0 ? -gy : gy);
    return m > 65535 ? 65535 : m;
  endfunction

  always @(posedge clk) begin
    cyc++;
    if (out_valid && rst_n) begin
      checks += 3;
      if (exp_mag.size() == 0) begin failures++; $display("unexpected output"); end
      else begin
        if (int'(out_mag) != exp_mag[0]) begin failures++; $display("mag %0d exp %0d", out_mag, exp_mag[0]); end
        if (int'(out_meta) != exp_meta[0]) failures++;
        if (cyc - exp_cyc[0] != 4) begin failures++; $display("latency %0d", cyc - exp_cyc[0]); end
        void'(exp_mag.pop_front()); void'(exp_meta.pop_front()); void'(exp_cyc.pop_front());
      end
    end
    if (in_valid) begin
      exp_mag.push_back(ref_mag(in_win)); exp_meta.push_back(int'(in_meta)); exp_cyc.push_back(cyc);
    end
  end

  initial begin
    #100000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; in_win = '0; in_meta = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(4) != 0);
      for (int r = 0; r < 3; r++) for (int c = 0; c < 3; c++) begin
        case (i % 4)
          0: in_win[r][c] = 16'($urandom);
          1: in_win[r][c] = (c == 2) ? 16'hFFFF : 16'h0000;   // strong vertical edge
          2: in_win[r][c] = (r == 0) ? 16'hFFFF : 16'h0000;   // strong horizontal edge
          default: in_win[r][c] = 16'($urandom_range(255));
        endcase
      end
      in_meta = $urandom;
    end
    @(negedge clk); in_valid = 0;
    repeat (8) @(posedge clk);
    checks++;
    if (exp_mag.size() != 0) begin failures++; $display("missing outputs"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
