// odr_model_pkg: bit-accurate reference model of an ODR lattice for the
// testbenches.
//
// lattice_model evaluates the lattice in its original, unretimed form: per
// sample it applies the termination to the oldest middle-line delay of the
// last section, walks the sections from the far end back to section 0 along
// the top and bottom lines (rotation by k1 between top and middle, then by k2
// between middle and bottom), and finally shifts the M middle-line delays of
// every section. Products are summed in full precision and rounded half up,
// the same arithmetic rule the hardware uses, so a correct retimed lattice
// matches it bit for bit.
package odr_model_pkg;
  import odr_pkg::*;

class lattice_model;
  int nsec, m;
  section_coef_t coef [];
  term_coef_t term;
  longint st [][];   // st[j][d]: d-th delay after section j (d = m-1 oldest)
  longint y, e;

  function new(int nsec_i, int m_i);
    nsec = nsec_i;
    m = m_i;
    coef = new[nsec];
    st = new[nsec];
    foreach (st[j]) begin
      st[j] = new[m];
      foreach (st[j][d]) st[j][d] = 0;
    end
  endfunction

  static function longint rnd(longint a);
    return (a + (64'sd1 <<< (COEF_FRAC - 1))) >>> COEF_FRAC;
  endfunction

  function void step(longint x);
    longint t, b, xi, tout, mm, bout, mo;
    longint mid_out [];
    mid_out = new[nsec];
    t = rnd(longint'(term.kt) * st[nsec-1][m-1]);
    b = rnd(longint'(term.kb) * st[nsec-1][m-1]);
    for (int j = nsec - 1; j >= 0; j--) begin
      xi   = (j == 0) ? x : st[j-1][m-1];
      tout = rnd(longint'(coef[j].c1) * t + longint'(coef[j].k1) * xi);
      mm   = rnd(longint'(coef[j].c1) * xi - longint'(coef[j].k1) * t);
      bout = rnd(longint'(coef[j].c2) * b + longint'(coef[j].k2) * mm);
      mo   = rnd(longint'(coef[j].c2) * mm - longint'(coef[j].k2) * b);
      mid_out[j] = mo;
      t = tout;
      b = bout;
    end
    y = t;
    e = b;
    for (int j = 0; j < nsec; j++) begin
      for (int d = m - 1; d > 0; d--) st[j][d] = st[j][d-1];
      st[j][0] = mid_out[j];
    end
  endfunction
endclass

endpackage
