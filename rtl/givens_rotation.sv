// givens_rotation: one plane rotation of an ODR lattice section.
//
// A lattice section passes a forward signal (travelling away from the input)
// and a return signal (travelling back towards the output). The rotation
// mixes them with the pair (k, c), c = sqrt(1 - k^2):
//
//   ret_out = c * ret_in + k * fwd_in     (the branch labelled  k)
//   fwd_out = c * fwd_in - k * ret_in     (the branch labelled -k)
//
// so the pair (fwd, ret) is rotated and its energy is kept. This is the
// signal flow of every k / -k / sqrt(1-k^2) group of the lattice diagram.
// Each output is computed as one full-precision sum of two products and then
// rounded once (round half up) to the sample format; rounding and word
// lengths are this implementation's choices. There is no saturation: the
// sample format carries two guard bits above the [-1, 1) input range, more
// than the internal gain of the lattice needs. The multipliers are general,
// so the coefficients are ports; fed from constants they reduce to constant
// multipliers.
//
// Purely combinational: four multipliers and two adders, no latency.
module givens_rotation
  import odr_pkg::*;
(
  input  sample_t fwd_in,
  input  sample_t ret_in,
  input  coef_t   k,
  input  coef_t   c,
  output sample_t fwd_out,
  output sample_t ret_out
);

  acc_t acc_ret, acc_fwd;

  always_comb begin
    acc_ret = acc_t'(c) * acc_t'(ret_in) + acc_t'(k) * acc_t'(fwd_in);
    acc_fwd = acc_t'(c) * acc_t'(fwd_in) - acc_t'(k) * acc_t'(ret_in);
    ret_out = round_acc(acc_ret);
    fwd_out = round_acc(acc_fwd);
  end

endmodule
