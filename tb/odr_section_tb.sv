// odr_section_tb: self-checking test of one double-rotation section.
//
// Applies random coefficient pairs and random samples on the three lines and
// compares the three outputs with a floating-point model of the two
// rotations (top/middle by k1, then middle/bottom by k2), using the same
// quantised coefficients. Two roundings occur on the middle path, so the
// tolerance is a little over one LSB on mid_out and bot_out.
module odr_section_tb;
  import odr_pkg::*;

  section_coef_t coef;
  sample_t mid_in, top_in, bot_in, mid_out, top_out, bot_out;
  int checks = 0, failures = 0;

  odr_section dut (.*);

  localparam real CSCALE = real'(1 << COEF_FRAC);

  function automatic real rnd_k();
    return (real'($urandom % 20001) - 10000.0) / 10000.0;
  endfunction

  function automatic sample_t rnd_s();
    return sample_t'($signed($urandom % 65537) - 32768);
  endfunction

  task automatic cmp(string what, sample_t got, real exp, real tol);
    checks++;
    if ((real'(got) - exp) > tol || (exp - real'(got)) > tol) begin
      failures++;
      $display("FAIL %s: got %0d exp %f", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      real k1, k2, c1, c2, m, e_top, e_mid, e_bot;
      k1 = (i % 7 == 0) ? 0.0 : rnd_k();
      k2 = (i % 11 == 0) ? -1.0 : rnd_k();
      coef = mk_section(k1, k2);
      mid_in = rnd_s();
      top_in = rnd_s();
      bot_in = rnd_s();
      #1;
      k1 = real'(coef.k1) / CSCALE; c1 = real'(coef.c1) / CSCALE;
      k2 = real'(coef.k2) / CSCALE; c2 = real'(coef.c2) / CSCALE;
      e_top = c1 * real'(top_in) + k1 * real'(mid_in);
      m     = c1 * real'(mid_in) - k1 * real'(top_in);
      e_bot = c2 * real'(bot_in) + k2 * m;
      e_mid = c2 * m - k2 * real'(bot_in);
      cmp("top", top_out, e_top, 0.51);
      cmp("bot", bot_out, e_bot, 1.2);
      cmp("mid", mid_out, e_mid, 1.2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
