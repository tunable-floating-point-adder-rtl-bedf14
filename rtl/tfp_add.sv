// tfp_add: two-stage Tunable Floating-Point adder (top level).
//
// Adds or subtracts two numbers held in binary32 containers and rounds the
// result to nearest-even at a precision m (4 to 24 significand bits,
// integer bit included) chosen anew with every operation.  The exponent is
// always 8 bits wide.  The adder uses the double-path scheme:
//   - tfp_exp_diff computes D = Ex - Ey, the larger exponent and CLS, the
//     choice between the paths (effective subtraction with |D| <= 1);
//   - tfp_close_path subtracts operands that are at most one place apart
//     and normalises by a variable left shift;
//   - tfp_far_path aligns by a variable right shift, adds with a compound
//     adder and normalises by at most one place;
//   - tfp_decoder turns m into the rounding word RW and the MASK that move
//     the rounding position;
//   - a masked 2:1 mux selects the path result and clears the bits below
//     the m-th; tfp_exp_update and tfp_cond_det finish the exponent, flush
//     subnormal results to zero and turn exponent overflow into infinity.
// Inputs with a zero exponent are read as zero (flush-to-zero), as the
// document specifies.  Adding zero to a number converts it to precision m
// with correct rounding (the number may then have any precision).
// A second per-operation code e_w (5..8) selects the exponent width whose
// range the result must fit; results outside it are flushed to zero or
// become infinity (tfp_cond_det).  Exponents stay stored with bias 127, so
// operands need no conversion; adding zero also converts to a narrower
// range.  The document gives the exponent widths 8 to 5; carrying the width
// as an input beside m is this design's choice.
//
// Sign handling is not drawn in the document; here the FAR path takes the
// sign of the operand with the larger exponent, the CLOSE path the sign of
// x flipped when the carry-around adder reports a negative difference, and
// an exact cancellation gives +0, as does a sum of zeros unless both are
// negative.  An operation with a zero operand is treated as an addition.
// Inputs with the all-ones exponent are not treated as special values (no
// NaN is ever produced); the op input 'sub' (negate y) is this design's.
//
// Timing: an operation presented with in_valid before clock edge k moves
// into the stage register at edge k and its result is registered at edge
// k+1, so out_valid and z follow in_valid by two cycles.  One operation can
// start every cycle.  The document places the stage boundary after the
// carry-around adder (CLOSE), after the operand masking (FAR) and on the
// RW/MASK lines; the output register is this design's.
module tfp_add
  import tfp_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  tfp_num_t      x,
  input  tfp_num_t      y,
  input  logic          sub,        // 1: compute x - y
  input  logic [PW-1:0] m,          // precision of this operation
  input  logic [QW-1:0] e_w,        // exponent range of this operation
  output logic          out_valid,
  output tfp_num_t      z,
  output logic          z_subn,     // result was flushed to zero
  output logic          z_infty     // result overflowed to infinity
);

  // ---------------- stage 1 ----------------
  logic [MW-1:0] mx, my;
  logic          sy_eff, eop;
  logic          sign_d, d_one, cls;
  logic [EW-1:0] d_abs, emax;
  logic [MW-1:0] rw_s1, mask_s1, rw_s2, mask_s2;

  // integer bit set for a non-zero exponent; zero exponent flushes
  assign mx = (x.exp != '0) ? {1'b1, x.frac} : '0;
  assign my = (y.exp != '0) ? {1'b1, y.frac} : '0;

  // A zero operand makes the operation an effective addition, so that adding
  // zero (conversion to precision m) always takes the FAR path and rounds.
  assign sy_eff = y.sign ^ sub;
  assign eop    = (x.sign ^ sy_eff) && (mx != '0) && (my != '0);

  tfp_exp_diff u_ediff (
    .ex    (x.exp),
    .ey    (y.exp),
    .eop   (eop),
    .sign_d(sign_d),
    .d_abs (d_abs),
    .d_one (d_one),
    .cls   (cls),
    .emax  (emax)
  );

  tfp_decoder u_dec (
    .clk    (clk),
    .rst_n  (rst_n),
    .valid  (in_valid),
    .m      (m),
    .rw_s1  (rw_s1),
    .mask_s1(mask_s1),
    .rw_s2  (rw_s2),
    .mask_s2(mask_s2)
  );

  logic [MW-1:0] s_close, s_far;
  logic [4:0]    shamt;
  logic          close_zero, close_neg, ovf, sh1l;

  tfp_close_path u_close (
    .clk    (clk),
    .en     (in_valid),
    .mx     (mx),
    .my     (my),
    .sign_d (sign_d),
    .d_one  (d_one),
    .rw     (rw_s2),
    .s_close(s_close),
    .shamt  (shamt),
    .zero   (close_zero),
    .neg    (close_neg)
  );

  tfp_far_path u_far (
    .clk    (clk),
    .en     (in_valid),
    .mx     (mx),
    .my     (my),
    .sign_d (sign_d),
    .d_abs  (d_abs),
    .eop    (eop),
    .rw_s1  (rw_s1),
    .mask_s1(mask_s1),
    .rw_s2  (rw_s2),
    .s_far  (s_far),
    .ovf    (ovf),
    .sh1l   (sh1l)
  );

  // stage register of the common path
  logic          v_q, cls_q, sx_q, sfar_q;
  logic [EW-1:0] emax_q;
  logic [QW-1:0] e_w_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v_q <= 1'b0;
    else        v_q <= in_valid;
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      cls_q  <= cls;
      emax_q <= emax;
      e_w_q  <= e_w;
      sx_q   <= x.sign;
      // the operand with the larger exponent; -0 only for (-0) + (-0)
      sfar_q <= sign_d ? sy_eff : (mx == '0) ? (x.sign & sy_eff) : x.sign;
    end
  end

  // ---------------- stage 2 ----------------
  logic [MW-1:0]   m_sel;
  logic [EW+1:0]   e_upd;
  logic            sign_z, subn, infty;
  tfp_num_t        z_c;

  // masked 2:1 mux: CLOSE on 1, FAR on 0, bits beyond precision m cleared
  assign m_sel = (cls_q ? s_close : s_far) & mask_s2;

  assign sign_z = cls_q ? (close_zero ? 1'b0 : sx_q ^ close_neg) : sfar_q;

  tfp_exp_update u_eupd (
    .emax (emax_q),
    .cls  (cls_q),
    .shamt(shamt),
    .ovf  (ovf),
    .sh1l (sh1l),
    .e_upd(e_upd)
  );

  tfp_cond_det u_cdet (
    .e_upd(e_upd),
    .m_sel(m_sel),
    .sign (sign_z),
    .e_w  (e_w_q),
    .subn (subn),
    .infty(infty),
    .z    (z_c)
  );

  // output register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= v_q;
  end

  always_ff @(posedge clk) begin
    if (v_q) begin
      z       <= z_c;
      z_subn  <= subn;
      z_infty <= infty;
    end
  end

endmodule
