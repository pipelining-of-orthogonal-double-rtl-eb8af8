// polyphase_combiner: recombines the M polyphase branch outputs.
//
// Branch i realises z^i N^(i)(z) / D(z^M) up to a common delay. Delaying
// branch i by M-1-i samples and adding all branches gives
// z^-(M-1) H(z); for M = 2 this is the z^-1 on branch 0 and the adder of the
// two-branch scheme, generalised here to M branches. The adder is a plain
// sum in the sample format (its guard bits hold the result, a choice of this
// implementation); the sum is combinational after the delay registers.
// Ports: y_in[i] is branch i's output, y_out the sum.
module polyphase_combiner
  import odr_pkg::*;
#(
  parameter int M = EX_M
) (
  input  logic    clk,
  input  logic    rst_n,
  input  sample_t y_in [M],
  output sample_t y_out
);

  sample_t y_dly [M];

  for (genvar i = 0; i < M; i++) begin : g_br
    delay_line #(.W(SAMPLE_W), .DEPTH(M - 1 - i)) u_dly (
      .clk, .rst_n, .din(y_in[i]), .dout(y_dly[i])
    );
  end

  always_comb begin
    y_out = '0;
    for (int i = 0; i < M; i++) y_out = y_out + y_dly[i];
  end

endmodule
