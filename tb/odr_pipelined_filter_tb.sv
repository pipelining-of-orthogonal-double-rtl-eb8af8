// odr_pipelined_filter_tb: end-to-end test of the 2-level pipelined filter
// at its default parameters (the 6th-order example).
//
// Three references are used.
//  1. Bit-accurate: two unretimed lattice models (odr_model_pkg), one per
//     polyphase branch, fed with the registered input; branch 0 is delayed
//     one sample, added to branch 1 and registered, as in the hardware's
//     specification. y_out and both e_out are compared exactly every cycle.
//  2. Transfer function: the direct form N(z)/D(z^2) of the example in
//     floating point, delayed by the 3-cycle latency (input register,
//     combiner z^-1, output register). Impulse taps must match within 5e-4,
//     random inputs (|x| <= 0.5) within 2.5e-3, the bound set by the
//     four-digit k-parameters.
//  3. Timing: the first output of an impulse appears exactly 3 cycles after
//     the input, and a new output is produced every clock.
// Mechanism counters (each must be non-zero): impulse taps carried by branch
// 0 (even lags) and branch 1 (odd lags), zero taps of the complementary
// outputs at odd lags (the zero sections), outputs delivered on consecutive
// clocks.
module odr_pipelined_filter_tb;
  import odr_pkg::*;
  import odr_model_pkg::*;

  localparam int LAT  = 3;
  localparam int NIMP = 100;
  localparam int NRND = 4000;

  logic clk = 0, rst_n = 0;
  in_sample_t x;
  sample_t y;
  sample_t e [EX_M];
  int checks = 0, failures = 0;

  odr_pipelined_filter dut (.clk, .rst_n, .x_in(x), .y_out(y), .e_out(e));

  always #5 clk = ~clk;

  real dd [7] = '{1.0, 0.0, -1.7399, 0.0, 1.2893, 0.0, -0.3468};
  real nn [7] = '{0.0322, 0.0623, 0.0128, -0.0174, 0.0372, 0.0564, 0.0189};
  real xs [$];      // input history (real), newest last
  real ys [$];      // direct-form output history

  lattice_model br [EX_M];
  longint br0_dly, y_sum_q, e_q [EX_M], xq;

  int cnt_even = 0, cnt_odd = 0, cnt_ezero = 0, cnt_stream = 0, first_out = -1;

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL %s", msg);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < EX_M; i++) begin
      br[i] = new(EX_NSEC, EX_M);
      for (int j = 0; j < EX_NSEC; j++) br[i].coef[j] = EX_COEF[i][j];
      br[i].term = EX_TERM[i];
      e_q[i] = 0;
    end
    br0_dly = 0;
    y_sum_q = 0;
    xq = 0;

    x = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    for (int n = 0; n < NIMP + NRND; n++) begin
      real xr, yr, yd;
      longint ysum;
      sample_t y_prev;
      if (n == 0)        x = in_sample_t'(16'sh7fff);
      else if (n < NIMP) x = '0;
      else               x = in_sample_t'($signed($urandom % 32769) - 16384);
      xr = real'(x) / 32768.0;
      xs.push_back(xr);

      // Direct form: D(z^2) y = N(z) x.
      yd = 0.0;
      for (int i = 0; i < 7; i++)
        if (xs.size() > i) yd += nn[i] * xs[xs.size()-1-i];
      for (int i = 1; i < 7; i++)
        if (ys.size() >= i) yd -= dd[i] * ys[ys.size()-i];
      ys.push_back(yd);

      #1;
      y_prev = y;

      // Bit-accurate model, before the clock edge: outputs are registered.
      checks++;
      if (longint'(y) != y_sum_q) fail($sformatf("n=%0d y=%0d model=%0d", n, y, y_sum_q));
      for (int i = 0; i < EX_M; i++) begin
        checks++;
        if (longint'(e[i]) != e_q[i]) fail($sformatf("n=%0d e[%0d]=%0d model=%0d", n, i, e[i], e_q[i]));
      end

      // Direct form, LAT samples back.
      if (n >= LAT) begin
        real tol;
        yr = real'(y) / 32768.0;
        tol = (n < NIMP) ? 5e-4 : 2.5e-3;
        checks++;
        if ((yr - ys[n-LAT]) > tol || (ys[n-LAT] - yr) > tol)
          fail($sformatf("n=%0d y=%f direct form %f", n, yr, ys[n-LAT]));
      end

      // Impulse response bookkeeping.
      if (n < NIMP) begin
        if (y != 0 && first_out < 0) first_out = n;
        if (n >= LAT && y != 0) begin
          if ((n - LAT) % 2 == 0) cnt_even++;
          else                    cnt_odd++;
        end
        // The complementary outputs come straight from the lattices
        // (latency 2) and only have taps at even lags.
        if (n >= 2 && (n - 2) % 2 == 1) begin
          checks++;
          if (e[0] != 0 || e[1] != 0) fail($sformatf("n=%0d odd-lag e tap", n));
          else cnt_ezero++;
        end
      end

      // Advance the reference by one clock: registers take their inputs.
      for (int i = 0; i < EX_M; i++) br[i].step(xq);
      ysum = br0_dly + br[1].y;
      br0_dly = br[0].y;
      y_sum_q = longint'(sample_t'(ysum));
      for (int i = 0; i < EX_M; i++) e_q[i] = br[i].e;
      xq = longint'(x);

      @(posedge clk);
      #1;
      if (n >= NIMP && y != y_prev) cnt_stream++;
    end

    checks++;
    if (first_out != LAT) fail($sformatf("impulse latency %0d, expected %0d", first_out, LAT));
    $display("mechanisms: branch0 taps=%0d branch1 taps=%0d zero e taps=%0d streamed outputs=%0d",
             cnt_even, cnt_odd, cnt_ezero, cnt_stream);
    checks += 4;
    if (cnt_even == 0)  fail("branch 0 never contributed");
    if (cnt_odd == 0)   fail("branch 1 never contributed");
    if (cnt_ezero == 0) fail("zero sections never observed");
    if (cnt_stream < NRND * 9 / 10) fail("output not renewed every clock");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
