// tfp_cond_det: condition detector and result flush multiplexers.
//
// Subnormal numbers are not supported: a result whose exponent falls below
// the smallest normal exponent of the selected range, or whose significand
// has no leading one (an exact cancellation, or a sum of two zeros), is
// flushed to zero (SUBN: Ez = 0, Mz = 0).  A result whose exponent exceeds
// the largest normal exponent of the range becomes infinity (INFTY:
// Ez = 255, Mz = 0).  Flush to zero and infinity follow the document.
// The sign is passed through; the caller makes it positive for an exact
// cancellation.
//
// The range is that of an e-bit exponent (e = 5..8, codes outside are
// clamped), kept in the binary32 container with bias 127: an e-bit format
// has bias 2^(e-1)-1 and normal exponents -(2^(e-1)-2) .. 2^(e-1)-1, so the
// stored exponent must lie in 129-2^(e-1) .. 126+2^(e-1).  For e = 8 these
// limits are 1 and 254, the plain binary32 range.  The document gives the
// exponent widths and the flush rule; the way the range is stored in the
// container is this design's choice.
//
// Inputs: e_upd, the signed updated exponent; m_sel, the 24-bit significand
// from the masked result mux (integer bit on top); e_w, the range code.
// Outputs are the fields of the result.  Combinational, end of stage 2.
module tfp_cond_det
  import tfp_pkg::*;
(
  input  logic [EW+1:0] e_upd,
  input  logic [MW-1:0] m_sel,
  input  logic          sign,
  input  logic [QW-1:0] e_w,
  output logic          subn,
  output logic          infty,
  output tfp_num_t      z
);

  logic [QW-1:0] e_c;
  logic [EW+1:0] half, e_lo, e_hi;
  logic          below, above;

  always_comb begin
    e_c = e_w;
    if (e_w < QW'(E_MIN)) e_c = QW'(E_MIN);
    if (e_w > QW'(EW))    e_c = QW'(EW);
  end

  // limits of the normal range in the container
  assign half = (EW+2)'(1) << (e_c - 1'b1);
  assign e_lo = (EW+2)'(129) - half;
  assign e_hi = (EW+2)'(126) + half;

  assign below = e_upd[EW+1] || (e_upd < e_lo);
  assign above = !e_upd[EW+1] && (e_upd > e_hi);

  assign subn  = below || !m_sel[MW-1];
  assign infty = !subn && above;

  always_comb begin
    z.sign = sign;
    if (subn) begin
      z.exp  = '0;
      z.frac = '0;
    end else if (infty) begin
      z.exp  = EXP_MAX;
      z.frac = '0;
    end else begin
      z.exp  = e_upd[EW-1:0];
      z.frac = m_sel[FW-1:0];
    end
  end

endmodule
