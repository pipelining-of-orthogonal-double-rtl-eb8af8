// givens_rotation_tb: self-checking test of one plane rotation.
//
// Drives random forward/return samples and random sines k (with the
// matching cosine c = sqrt(1-k^2) computed here in floating point), plus the
// corner cases k = 0, k = +1 and k = -1. Each output is compared with the
// exact rotation computed in real arithmetic: it must lie within one rounding
// step (plus the coefficient quantisation) of it. The rotation must also keep
// the energy fwd^2 + ret^2 within the same rounding budget.
module givens_rotation_tb;
  import odr_pkg::*;

  sample_t fwd_in, ret_in, fwd_out, ret_out;
  coef_t   k, c;
  int checks = 0, failures = 0;

  givens_rotation dut (.*);

  localparam real SCALE  = real'(1 << SAMPLE_FRAC);
  localparam real CSCALE = real'(1 << COEF_FRAC);

  function automatic real rsample(int range_lsb);
    return real'($signed($urandom % (2 * range_lsb + 1)) - range_lsb);
  endfunction

  task automatic check_one(real kr);
    real kq, cq, a, b, ef, er, tol;
    k  = to_coef(kr);
    c  = to_coef($sqrt(1.0 - kr * kr));
    kq = real'(k) / CSCALE;
    cq = real'(c) / CSCALE;
    a = rsample(1 << SAMPLE_FRAC);
    b = rsample(1 << SAMPLE_FRAC);
    fwd_in = sample_t'($rtoi(a));
    ret_in = sample_t'($rtoi(b));
    #1;
    // Exact result with the quantised coefficients, in LSBs.
    er = cq * b + kq * a;
    ef = cq * a - kq * b;
    tol = 0.51;
    checks += 2;
    if ((real'(ret_out) - er) > tol || (er - real'(ret_out)) > tol) begin
      failures++;
      $display("FAIL ret: k=%f a=%0d b=%0d got %0d exp %f", kr, fwd_in, ret_in, ret_out, er);
    end
    if ((real'(fwd_out) - ef) > tol || (ef - real'(fwd_out)) > tol) begin
      failures++;
      $display("FAIL fwd: k=%f a=%0d b=%0d got %0d exp %f", kr, fwd_in, ret_in, fwd_out, ef);
    end
    // Energy is kept up to rounding and coefficient quantisation.
    checks++;
    begin
      real ein, eout, d;
      ein  = (a * a + b * b) / (SCALE * SCALE);
      eout = (real'(fwd_out) * real'(fwd_out) + real'(ret_out) * real'(ret_out)) / (SCALE * SCALE);
      d = eout - ein;
      if (d > 1e-3 || d < -1e-3) begin
        failures++;
        $display("FAIL energy: k=%f in=%f out=%f", kr, ein, eout);
      end
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
    for (int i = 0; i < 20; i++) check_one(0.0);
    for (int i = 0; i < 20; i++) check_one(1.0);
    for (int i = 0; i < 20; i++) check_one(-1.0);
    for (int i = 0; i < 2000; i++)
      check_one((real'($urandom % 20001) - 10000.0) / 10000.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
