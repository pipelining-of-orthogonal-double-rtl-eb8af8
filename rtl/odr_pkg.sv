// odr_pkg: number formats, coefficient types and the default filter of the
// pipelined orthogonal double-rotation (ODR) lattice filter.
//
// Samples are two's-complement fixed point with SAMPLE_FRAC fractional bits
// and SAMPLE_W - SAMPLE_FRAC integer bits (sign included); the two guard
// integer bits above the [-1, 1) input range cover the internal gain of the
// lattice (at most about 1.14 for the default filter). Rotation coefficients
// use COEF_FRAC fractional bits so that k = -1 is exact. Word lengths are a
// choice of this design; the filter itself only fixes the k-parameters.
//
// The default filter is the 6th-order, 2-level pipelined example: the
// denominator is a polynomial in z^2, the numerator is split into two
// polyphase branches, and each branch is an ODR lattice whose odd-numbered
// sections have zero k-parameters. Only the non-zero sections (0, 2, 4) and
// the terminating section 6 are stored. The rotation cosines are derived
// from the sines: c = sqrt(1 - k^2); the terminating bottom gain is
// k_N2 * sqrt(1 - k_N1^2).
package odr_pkg;

  localparam int SAMPLE_W    = 18;
  localparam int SAMPLE_FRAC = 15;
  localparam int IN_W        = 16;   // input samples, Q1.15
  localparam int COEF_W      = 16;
  localparam int COEF_FRAC   = 14;

  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic signed [IN_W-1:0]     in_sample_t;
  typedef logic signed [COEF_W-1:0]   coef_t;

  // One double-rotation section: (k1, c1) rotates the top and middle lines,
  // (k2, c2) the middle and bottom lines.
  typedef struct packed {
    coef_t k1;
    coef_t c1;
    coef_t k2;
    coef_t c2;
  } section_coef_t;

  // Terminating section N: top gain k_N1, bottom gain k_N2*sqrt(1-k_N1^2).
  typedef struct packed {
    coef_t kt;
    coef_t kb;
  } term_coef_t;

  // Default configuration: pipelining level M = 2, order N = 6, so N/M = 3
  // non-zero sections per branch.
  localparam int EX_M    = 2;
  localparam int EX_NSEC = 3;

  // Round a real coefficient to the coefficient format.
  function automatic coef_t to_coef(real r);
    real s;
    s = r * real'(1 << COEF_FRAC);
    return coef_t'($rtoi(s >= 0.0 ? s + 0.5 : s - 0.5));
  endfunction

  function automatic real cosine(real k);
    return $sqrt(1.0 - k * k);
  endfunction

  function automatic section_coef_t mk_section(real k1, real k2);
    section_coef_t s;
    s.k1 = to_coef(k1);
    s.c1 = to_coef(cosine(k1));
    s.k2 = to_coef(k2);
    s.c2 = to_coef(cosine(k2));
    return s;
  endfunction

  function automatic term_coef_t mk_term(real kn1, real kn2);
    term_coef_t t;
    t.kt = to_coef(kn1);
    t.kb = to_coef(kn2 * cosine(kn1));
    return t;
  endfunction

  // k-parameters of the non-zero sections 0, 2, 4 of each branch.
  localparam section_coef_t [0:EX_M-1][0:EX_NSEC-1] EX_COEF = '{
    '{ mk_section(0.0323,  0.9656), mk_section(0.2653, -0.9034), mk_section(0.5574, 0.9426) },
    '{ mk_section(0.0,     0.9645), mk_section(0.2356, -0.9072), mk_section(0.3617, 0.8745) }
  };

  // Terminating section 6 of each branch.
  localparam term_coef_t [0:EX_M-1] EX_TERM = '{
    mk_term(0.8932, -1.0),
    mk_term(0.9180, -1.0)
  };

  // Rounds a full-precision product sum (COEF_FRAC extra fractional bits)
  // back to the sample format, round half up.
  localparam int ACC_W = SAMPLE_W + COEF_W + 1;
  typedef logic signed [ACC_W-1:0] acc_t;

  function automatic sample_t round_acc(acc_t a);
    return sample_t'((a + acc_t'(1 <<< (COEF_FRAC - 1))) >>> COEF_FRAC);
  endfunction

endpackage
