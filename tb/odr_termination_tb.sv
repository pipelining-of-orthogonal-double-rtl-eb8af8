// odr_termination_tb: self-checking test of the terminating section.
//
// Checks top_out = k_N1 * mid_in and bot_out = k_N2*sqrt(1-k_N1^2) * mid_in
// against floating-point products for random inputs and coefficients,
// including the default terminations (k_N2 = -1), within one rounding step.
module odr_termination_tb;
  import odr_pkg::*;

  term_coef_t coef;
  sample_t mid_in, top_out, bot_out;
  int checks = 0, failures = 0;

  odr_termination dut (.*);

  localparam real CSCALE = real'(1 << COEF_FRAC);

  task automatic cmp(string what, sample_t got, real exp);
    checks++;
    if ((real'(got) - exp) > 0.51 || (exp - real'(got)) > 0.51) begin
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
    for (int i = 0; i < 2000; i++) begin
      real kn1, kn2;
      kn1 = (real'($urandom % 20001) - 10000.0) / 10000.0;
      kn2 = (i % 2 == 0) ? -1.0 : (real'($urandom % 20001) - 10000.0) / 10000.0;
      if (i < EX_M) coef = EX_TERM[i];
      else          coef = mk_term(kn1, kn2);
      mid_in = sample_t'($signed($urandom % 65537) - 32768);
      #1;
      cmp("top", top_out, real'(coef.kt) / CSCALE * real'(mid_in));
      cmp("bot", bot_out, real'(coef.kb) / CSCALE * real'(mid_in));
    end
    // The example's printed bottom gain of the last section is -0.4497
    // (four printed digits, so one coefficient LSB of slack).
    checks++;
    if (EX_TERM[0].kb - to_coef(-0.4497) > 1 || to_coef(-0.4497) - EX_TERM[0].kb > 1) begin
      failures++;
      $display("FAIL: terminating bottom gain %0d", EX_TERM[0].kb);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
