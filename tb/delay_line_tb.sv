// delay_line_tb: self-checking test of the z^-1 register chain.
//
// Runs a 3-deep and a 0-deep (wire) instance on random data and compares the
// outputs with a history of the inputs kept here; also checks that reset
// clears the chain (output zero for DEPTH cycles after reset).
module delay_line_tb;

  localparam int W = 18;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] din, dout3, dout0;
  logic [W-1:0] hist [4];
  int checks = 0, failures = 0;

  delay_line #(.W(W), .DEPTH(3)) dut3 (.clk, .rst_n, .din, .dout(dout3));
  delay_line #(.W(W), .DEPTH(0)) dut0 (.clk, .rst_n, .din, .dout(dout0));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = '1;
    for (int i = 0; i < 4; i++) hist[i] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      din = W'($urandom);
      #1;
      checks += 2;
      if (dout0 !== din) begin
        failures++;
        $display("FAIL depth0 n=%0d", n);
      end
      if (dout3 !== hist[2]) begin
        failures++;
        $display("FAIL depth3 n=%0d got %h exp %h", n, dout3, hist[2]);
      end
      @(posedge clk);
      hist[2] = hist[1];
      hist[1] = hist[0];
      hist[0] = din;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
