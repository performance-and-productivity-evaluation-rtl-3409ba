// tb_sw_pe: random and directed cell inputs through one PE, compared with an
// integer evaluation of the affine-gap recurrences.
module tb_sw_pe;
  import sw_pkg::*;
  res_t q, d;
  score_t h_diag, h_up, f_up, h_left, e_left, h, e, f;
  int checks = 0, failures = 0;

  sw_pe #(.MATCH(5), .MISMATCH(4), .GAP_OPEN(10), .GAP_EXT(1)) dut (.*);

  function automatic int mx(int a, int b); return a > b ? a : b; endfunction

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      int ee, ff, hh, s;
      q = res_t'($urandom_range(3)); d = res_t'($urandom_range(3));
      if (n % 50 == 0) begin q = SW_PAD; d = SW_PAD; end
      h_diag = score_t'($urandom_range(n % 2 ? 30 : 2000));
      h_up   = score_t'($urandom_range(40)); f_up = score_t'($urandom_range(40));
      h_left = score_t'($urandom_range(40)); e_left = score_t'($urandom_range(40));
      #1;
      s  = (q == d && q != SW_PAD) ? 5 : -4;
      ee = mx(0, mx(int'(h_left) - 11, int'(e_left) - 1));
      ff = mx(0, mx(int'(h_up) - 11, int'(f_up) - 1));
      hh = mx(mx(0, int'(h_diag) + s), mx(ee, ff));
      checks += 3;
      if (int'(e) != ee) begin failures++; $display("E %0d exp %0d", e, ee); end
      if (int'(f) != ff) begin failures++; $display("F %0d exp %0d", f, ff); end
      if (int'(h) != hh) begin failures++; $display("H %0d exp %0d", h, hh); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
