// polyphase_combiner_tb: self-checking test of the branch recombination.
//
// With M = 2 the output must be y0(n-1) + y1(n); a second instance with M = 3
// must give y0(n-2) + y1(n-1) + y2(n). Random branch samples are driven and
// the sums are recomputed here from stored input histories.
module polyphase_combiner_tb;
  import odr_pkg::*;

  logic clk = 0, rst_n = 0;
  sample_t y2 [2];
  sample_t y3 [3];
  sample_t out2, out3;
  sample_t h2 [2][3];   // h2[i][d]: branch i, d samples ago
  sample_t h3 [3][3];
  int checks = 0, failures = 0;

  polyphase_combiner #(.M(2)) dut2 (.clk, .rst_n, .y_in(y2), .y_out(out2));
  polyphase_combiner #(.M(3)) dut3 (.clk, .rst_n, .y_in(y3), .y_out(out3));

  always #5 clk = ~clk;

  function automatic sample_t rnd_s();
    return sample_t'($signed($urandom % 65537) - 32768);
  endfunction

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2; i++) y2[i] = '0;
    for (int i = 0; i < 3; i++) y3[i] = '0;
    for (int i = 0; i < 2; i++) for (int d = 0; d < 3; d++) h2[i][d] = '0;
    for (int i = 0; i < 3; i++) for (int d = 0; d < 3; d++) h3[i][d] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      sample_t e2, e3;
      for (int i = 0; i < 2; i++) y2[i] = rnd_s();
      for (int i = 0; i < 3; i++) y3[i] = rnd_s();
      for (int i = 0; i < 2; i++) h2[i][0] = y2[i];
      for (int i = 0; i < 3; i++) h3[i][0] = y3[i];
      #1;
      e2 = h2[0][1] + h2[1][0];
      e3 = h3[0][2] + h3[1][1] + h3[2][0];
      checks += 2;
      if (out2 !== e2) begin
        failures++;
        $display("FAIL M=2 n=%0d got %0d exp %0d", n, out2, e2);
      end
      if (out3 !== e3) begin
        failures++;
        $display("FAIL M=3 n=%0d got %0d exp %0d", n, out3, e3);
      end
      @(posedge clk);
      #1;
      for (int i = 0; i < 2; i++) for (int d = 2; d > 0; d--) h2[i][d] = h2[i][d-1];
      for (int i = 0; i < 3; i++) for (int d = 2; d > 0; d--) h3[i][d] = h3[i][d-1];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
