// odr_termination: the last section (section N) of an ODR lattice.
//
// The middle line ends here and is reflected onto both return lines:
//
//   top_out = kt * mid_in      kt = k_N1
//   bot_out = kb * mid_in      kb = k_N2 * sqrt(1 - k_N1^2)
//
// Both gains are given by the lattice's terminating k-parameters; the
// products are rounded once to the sample format (round half up).
// Combinational: two multipliers, no latency.
module odr_termination
  import odr_pkg::*;
(
  input  term_coef_t coef,
  input  sample_t    mid_in,
  output sample_t    top_out,
  output sample_t    bot_out
);

  acc_t acc_top, acc_bot;

  always_comb begin
    acc_top = acc_t'(coef.kt) * acc_t'(mid_in);
    acc_bot = acc_t'(coef.kb) * acc_t'(mid_in);
    top_out = round_acc(acc_top);
    bot_out = round_acc(acc_bot);
  end

endmodule
