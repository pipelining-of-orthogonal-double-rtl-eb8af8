// odr_section: one orthogonal double-rotation section of the lattice.
//
// Three signal lines run through the lattice: the top line returns towards
// the filter output, the middle line carries the input forward, the bottom
// line returns towards the complementary output. A section first rotates the
// top and middle lines by (k1, c1), then the middle and bottom lines by
// (k2, c2), as in the section diagram:
//
//   top_out = c1*top_in + k1*mid_in          m = c1*mid_in - k1*top_in
//   bot_out = c2*bot_in + k2*m               mid_out = c2*m - k2*bot_in
//
// The z^-1 that follows the section on the middle line is not part of this
// module; the lattice places it (and, when retimed, moves part of it onto the
// return lines). Combinational, built from two givens_rotation instances.
// The longest path, mid_in to mid_out, is two multiplies and two additions.
module odr_section
  import odr_pkg::*;
(
  input  section_coef_t coef,
  input  sample_t       mid_in,
  input  sample_t       top_in,
  input  sample_t       bot_in,
  output sample_t       mid_out,
  output sample_t       top_out,
  output sample_t       bot_out
);

  sample_t m;

  givens_rotation u_rot1 (
    .fwd_in (mid_in),
    .ret_in (top_in),
    .k      (coef.k1),
    .c      (coef.c1),
    .fwd_out(m),
    .ret_out(top_out)
  );

  givens_rotation u_rot2 (
    .fwd_in (m),
    .ret_in (bot_in),
    .k      (coef.k2),
    .c      (coef.c2),
    .fwd_out(mid_out),
    .ret_out(bot_out)
  );

endmodule
