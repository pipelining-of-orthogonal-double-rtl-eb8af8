// odr_lattice_tb: self-checking test of the pipelined ODR lattice.
//
// Reference: a bit-accurate model of the lattice in its original, unretimed
// form (odr_model_pkg::lattice_model). Each sample it evaluates the termination
// and then every section from the far end back to section 0 along the top
// and bottom lines, with the same rounding rule as the hardware, and then
// shifts the M middle-line delays of every section. Retiming must not change
// a single output bit, so every instance is compared exactly, every cycle:
//   dut_a  default (branch 0 of the example, M = 2, retimed)
//   dut_b  branch 1 of the example, M = 2, not retimed
//   dut_c  M = 3, two sections, retimed, other coefficients
//   dut_d  M = 1, not retimed: the ordinary non-pipelined lattice
// Stimulus: an impulse, then random samples in [-1, 1).
// Independent of the structure, the impulse response of dut_a is also
// compared with the direct-form filters N0(z)/D(z^2) and E0(z)/D(z^2) of the
// example (floating point, tolerance 5e-4 for the four-digit coefficients),
// which also fixes the latency: output at lag 0, odd lags exactly zero.
// Finally the structure must be lossless: for every instance the energy of
// the impulse response at the two outputs, summed over 80 samples, must
// equal the input energy to within 0.2 %.
module odr_lattice_tb;
  import odr_pkg::*;
  import odr_model_pkg::*;


  localparam section_coef_t [0:1] C_COEF = '{mk_section(0.4, -0.7), mk_section(-0.55, 0.3)};
  localparam term_coef_t          C_TERM = mk_term(-0.6, -1.0);
  localparam section_coef_t [0:2] D_COEF = '{mk_section(0.3, 0.8), mk_section(-0.2, 0.5),
                                             mk_section(0.6, -0.4)};
  localparam term_coef_t          D_TERM = mk_term(0.7, -1.0);

  logic clk = 0, rst_n = 0;
  sample_t x;
  sample_t ya, ea, yb, eb, yc, ec, yd, ed;
  int checks = 0, failures = 0;

  odr_lattice dut_a (.clk, .rst_n, .x_in(x), .y_out(ya), .e_out(ea));
  odr_lattice #(.M(2), .RETIME(1'b0), .COEF(EX_COEF[1]), .TERM(EX_TERM[1]))
    dut_b (.clk, .rst_n, .x_in(x), .y_out(yb), .e_out(eb));
  odr_lattice #(.NSEC(2), .M(3), .RETIME(1'b1), .COEF(C_COEF), .TERM(C_TERM))
    dut_c (.clk, .rst_n, .x_in(x), .y_out(yc), .e_out(ec));
  odr_lattice #(.NSEC(3), .M(1), .RETIME(1'b0), .COEF(D_COEF), .TERM(D_TERM))
    dut_d (.clk, .rst_n, .x_in(x), .y_out(yd), .e_out(ed));

  always #5 clk = ~clk;

  lattice_model ma, mb, mc, md;

  // Direct-form references for the impulse response of dut_a.
  real dd [7] = '{1.0, 0.0, -1.7399, 0.0, 1.2893, 0.0, -0.3468};
  real nn [7] = '{0.0322, 0.0, 0.0128, 0.0, 0.0372, 0.0, 0.0189};
  real ee [7] = '{0.9650, 0.0, -1.7402, 0.0, 1.3106, 0.0, -0.3598};
  localparam int NIMP = 80;
  real href [NIMP], gref [NIMP];
  real energy [4] = '{0.0, 0.0, 0.0, 0.0};

  task automatic cmp_exact(string what, int n, sample_t got, longint exp);
    checks++;
    if (longint'(got) != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s n=%0d got %0d exp %0d", what, n, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ma = new(EX_NSEC, 2);
    mb = new(EX_NSEC, 2);
    mc = new(2, 3);
    md = new(3, 1);
    for (int j = 0; j < EX_NSEC; j++) begin
      ma.coef[j] = EX_COEF[0][j];
      mb.coef[j] = EX_COEF[1][j];
    end
    ma.term = EX_TERM[0];
    mb.term = EX_TERM[1];
    for (int j = 0; j < 2; j++) mc.coef[j] = C_COEF[j];
    mc.term = C_TERM;
    for (int j = 0; j < 3; j++) md.coef[j] = D_COEF[j];
    md.term = D_TERM;

    // Direct-form impulse responses: D(z) h = N(z) delta.
    for (int n = 0; n < NIMP; n++) begin
      real hs, gs;
      hs = (n < 7) ? nn[n] : 0.0;
      gs = (n < 7) ? ee[n] : 0.0;
      for (int i = 1; i < 7; i++)
        if (n - i >= 0) begin
          hs -= dd[i] * href[n-i];
          gs -= dd[i] * gref[n-i];
        end
      href[n] = hs;
      gref[n] = gs;
    end

    x = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    for (int n = 0; n < 3000; n++) begin
      if (n == 0)         x = sample_t'(32767);
      else if (n < NIMP)  x = '0;
      else                x = sample_t'($signed($urandom % 65536) - 32768);
      #1;
      ma.step(longint'(x));
      mb.step(longint'(x));
      mc.step(longint'(x));
      md.step(longint'(x));
      cmp_exact("a.y", n, ya, ma.y);  cmp_exact("a.e", n, ea, ma.e);
      cmp_exact("b.y", n, yb, mb.y);  cmp_exact("b.e", n, eb, mb.e);
      cmp_exact("c.y", n, yc, mc.y);  cmp_exact("c.e", n, ec, mc.e);
      cmp_exact("d.y", n, yd, md.y);  cmp_exact("d.e", n, ed, md.e);
      if (n < NIMP) begin
        real hy, he;
        energy[0] += (real'(ya) * real'(ya) + real'(ea) * real'(ea)) / (32767.0 * 32767.0);
        energy[1] += (real'(yb) * real'(yb) + real'(eb) * real'(eb)) / (32767.0 * 32767.0);
        energy[2] += (real'(yc) * real'(yc) + real'(ec) * real'(ec)) / (32767.0 * 32767.0);
        energy[3] += (real'(yd) * real'(yd) + real'(ed) * real'(ed)) / (32767.0 * 32767.0);
        hy = real'(ya) / 32767.0;
        he = real'(ea) / 32767.0;
        checks += 2;
        if ((hy - href[n]) > 5e-4 || (href[n] - hy) > 5e-4) begin
          failures++;
          $display("FAIL impulse y n=%0d got %f exp %f", n, hy, href[n]);
        end
        if ((he - gref[n]) > 5e-4 || (gref[n] - he) > 5e-4) begin
          failures++;
          $display("FAIL impulse e n=%0d got %f exp %f", n, he, gref[n]);
        end
        if (n % 2 == 1) begin
          checks++;
          if (ya != 0 || ea != 0) begin
            failures++;
            $display("FAIL odd lag %0d not zero", n);
          end
        end
      end
      if (n == NIMP - 1) begin
        // Lossless: the impulse energy leaves through the two outputs.
        for (int i = 0; i < 4; i++) begin
          checks++;
          if (energy[i] > 1.002 || energy[i] < 0.998) begin
            failures++;
            $display("FAIL energy of instance %0d: %f", i, energy[i]);
          end
        end
      end
      @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
