// odr_lattice: one M-level pipelined orthogonal double-rotation lattice.
//
// The lattice realises N(z)/D(z^M) at the top-line output (y_out) and the
// complementary E(z)/D(z^M) at the bottom-line output (e_out). Because the
// denominator is a polynomial in z^M, all k-parameters of sections that are
// not a multiple of M are zero; such a section is an identity and reduces to
// its z^-1. What remains is NSEC non-zero sections (sections 0, M, 2M, ...),
// each followed by M delays on the middle line, and the terminating section
// N = NSEC*M.
//
// Every feedback loop between neighbouring non-zero sections (forward on the
// middle line, back on the top or bottom line) therefore holds M delays.
// With RETIME = 1 one of them is moved, by a cut-set retiming at each
// boundary between sections, from the middle line onto the two return lines:
// M-1 registers forward, one register on each return line. Input/output
// behaviour is unchanged (the input and output are on the same side of
// every cut), but every register-to-register path now crosses at most one
// section (two multiplies, two additions) instead of the whole top-line
// chain. RETIME = 0 gives the unretimed lattice, and with M = 1 the ordinary
// non-pipelined ODR lattice (RETIME = 1 needs M >= 2).
//
// Section 0 is combinational from x_in to y_out / e_out, as in the lattice
// itself; the surrounding design registers the ports. One sample per clock.
// Coefficients are parameters; the defaults are branch 0 of the 2-level
// pipelined 6th-order example. Moving exactly one delay per boundary is this
// design's choice for M > 2 as well.
module odr_lattice
  import odr_pkg::*;
#(
  parameter int            NSEC   = EX_NSEC,
  parameter int            M      = EX_M,
  parameter bit            RETIME = 1'b1,
  parameter section_coef_t [0:NSEC-1] COEF = EX_COEF[0],
  parameter term_coef_t    TERM   = EX_TERM[0]
) (
  input  logic    clk,
  input  logic    rst_n,
  input  sample_t x_in,
  output sample_t y_out,
  output sample_t e_out
);

  localparam int FWD_D = RETIME ? M - 1 : M;   // middle-line delays per boundary
  localparam int RET_D = RETIME ? 1 : 0;       // return-line delays per boundary

  if (NSEC < 1) begin : g_bad_nsec
    $error("odr_lattice: NSEC must be at least 1");
  end
  if (M < 1) begin : g_bad_m
    $error("odr_lattice: M must be at least 1");
  end
  if (RETIME && M < 2) begin : g_bad_retime
    $error("odr_lattice: retiming needs M >= 2");
  end

  // Index j = 0..NSEC-1: non-zero sections; index NSEC: termination.
  sample_t mid_in  [NSEC+1];   // middle line entering j
  sample_t mid_out [NSEC];     // middle line leaving section j
  sample_t top_in  [NSEC];     // top line entering section j (from j+1)
  sample_t bot_in  [NSEC];
  sample_t top_out [NSEC+1];   // top line leaving j, before retiming regs
  sample_t bot_out [NSEC+1];
  sample_t top_ret [NSEC+1];   // top line leaving j, after retiming regs
  sample_t bot_ret [NSEC+1];

  assign mid_in[0] = x_in;

  for (genvar j = 0; j < NSEC; j++) begin : g_sec
    odr_section u_sec (
      .coef   (COEF[j]),
      .mid_in (mid_in[j]),
      .top_in (top_in[j]),
      .bot_in (bot_in[j]),
      .mid_out(mid_out[j]),
      .top_out(top_out[j]),
      .bot_out(bot_out[j])
    );

    // Own z^-1 plus those of the M-1 zero sections that follow.
    delay_line #(.W(SAMPLE_W), .DEPTH(FWD_D)) u_fwd (
      .clk, .rst_n, .din(mid_out[j]), .dout(mid_in[j+1])
    );

    assign top_in[j] = top_ret[j+1];
    assign bot_in[j] = bot_ret[j+1];
  end

  odr_termination u_term (
    .coef   (TERM),
    .mid_in (mid_in[NSEC]),
    .top_out(top_out[NSEC]),
    .bot_out(bot_out[NSEC])
  );

  // Return-line registers of the retimed lattice: at the outputs of every
  // section except section 0, whose outputs are the filter outputs.
  assign top_ret[0] = top_out[0];
  assign bot_ret[0] = bot_out[0];
  for (genvar j = 1; j <= NSEC; j++) begin : g_ret
    delay_line #(.W(SAMPLE_W), .DEPTH(RET_D)) u_top (
      .clk, .rst_n, .din(top_out[j]), .dout(top_ret[j])
    );
    delay_line #(.W(SAMPLE_W), .DEPTH(RET_D)) u_bot (
      .clk, .rst_n, .din(bot_out[j]), .dout(bot_ret[j])
    );
  end

  assign y_out = top_ret[0];
  assign e_out = bot_ret[0];

endmodule
