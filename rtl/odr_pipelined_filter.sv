// odr_pipelined_filter: M-level pipelined ODR digital lattice filter.
//
// The transfer function H(z) = N(z)/D(z^M) is split into M polyphase
// branches that share the input. Branch i is an ODR lattice (odr_lattice)
// realising N^(i)/D(z^M), where N^(i) keeps the numerator taps n_{i+jM}. A
// polyphase_combiner delays branch i by M-1-i samples and adds the branches.
// Inside each lattice every loop holds M delays, one of which is retimed
// onto the return lines, so the clock period is set by one double-rotation
// section rather than by the whole lattice. The gain can be used as a higher
// sample rate, or kept at the old rate with a lower supply voltage.
//
// Interface: one sample per clock on x_in (Q1.15); y_out is the filter
// output, e_out[i] the complementary (bottom-line) output of branch i.
// The input and all outputs are registered, so
//   y_out(n) = sum_k h(k) x(n - 2 - (M-1) - k)
// where h is the impulse response of N(z)/D(z^M): the register pair adds two
// cycles to the z^-(M-1) of the combiner. Active-low synchronous reset
// clears all state. Defaults are the 6th-order 2-level pipelined example;
// word lengths and the I/O registers are this design's choices.
module odr_pipelined_filter
  import odr_pkg::*;
#(
  parameter int            M      = EX_M,
  parameter int            NSEC   = EX_NSEC,
  parameter bit            RETIME = 1'b1,
  parameter section_coef_t [0:M-1][0:NSEC-1] COEF = EX_COEF,
  parameter term_coef_t    [0:M-1] TERM = EX_TERM
) (
  input  logic       clk,
  input  logic       rst_n,
  input  in_sample_t x_in,
  output sample_t    y_out,
  output sample_t    e_out [M]
);

  sample_t x_q;
  sample_t y_br [M];
  sample_t e_br [M];
  sample_t y_sum;

  always_ff @(posedge clk) begin
    if (!rst_n) x_q <= '0;
    else        x_q <= sample_t'(x_in);
  end

  for (genvar i = 0; i < M; i++) begin : g_branch
    odr_lattice #(
      .NSEC  (NSEC),
      .M     (M),
      .RETIME(RETIME),
      .COEF  (COEF[i]),
      .TERM  (TERM[i])
    ) u_lat (
      .clk, .rst_n,
      .x_in (x_q),
      .y_out(y_br[i]),
      .e_out(e_br[i])
    );
  end

  polyphase_combiner #(.M(M)) u_comb (
    .clk, .rst_n,
    .y_in (y_br),
    .y_out(y_sum)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      y_out <= '0;
      for (int i = 0; i < M; i++) e_out[i] <= '0;
    end else begin
      y_out <= y_sum;
      for (int i = 0; i < M; i++) e_out[i] <= e_br[i];
    end
  end

endmodule
