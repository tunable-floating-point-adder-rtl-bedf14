// tfp_far_path: FAR path of the double-path TFP adder.
//
// Handles every addition and every subtraction whose exponent difference is
// at least 2.  The result then needs at most a one-bit normalisation shift,
// right after an overflow (OVF) or left after a subtraction (SH1L), and it
// is rounded to nearest-even in the position set by the precision m.
//
// Stage 1 (structure of the document):
//   swap        the operand with the smaller exponent becomes Y (sign(D)=1);
//   shift-right Y is aligned by |D| in a wide frame that keeps every bit;
//   extract bit T = OR of the aligned Y bits beyond R (weight <= 2^-(m+2));
//   bit invert  the upper 26 bits of Y are complemented when EOP = 1;
//   AND         Fx = X AND MASK, Fy = Y AND MASK keep the m upper bits;
//   extract LGR L*, L of Fx + Fy (from the bits of both operands), G and R
//               of Y, picked with the rounding word RW, and the bit
//               C = ~EOP | (G | R ~T) to inject in the G position.
// Stage 2:
//   append bit  C is ORed into Fx in the G position, a 1 into Fy (OR array)
//               for the second sum, so that CPA0 and CPA1 give
//               S0 = Fx + Fy + C.G and S1 = Fx + Fy + (C + 1).G;
//   rounding control 1/2 (tfp_far_round_ctrl) choose S0 or S1 (MUXR) and
//   shift-1 L or R normalises by one position on OVF or SH1L.
// Bits below L that survive in the result are cleared later by the masked
// result mux.
//
// Choices of this design where the document is not explicit:
//   - the aligned Y is kept in a 50-bit frame (26 upper + 24 lower bits) and
//     the shift saturates at 26: an operand shifted 26 places or more lies
//     wholly below R for every m, and none of its bits is lost for T;
//   - the sticky window is every position of weight 2^-(m+2) or less,
//     built by wiring ~MASK two places down, so T also covers operands
//     aligned far beyond the last bit of the result;
//   - bits of X below L (its G, R and sticky bits) are ORed into G, R and
//     T.  For operands of at most m bits X has none, and when Y is zero
//     (conversion of X to precision m by adding zero) Y has none, so the
//     OR is the exact combination in both uses the document names.
//
// Interface: en loads the stage register; rw_s1/mask_s1 are the decoded
// vectors for stage 1, rw_s2 the registered rounding word for stage 2.
// Outputs are stage-2 combinational.
module tfp_far_path
  import tfp_pkg::*;
(
  input  logic          clk,
  input  logic          en,
  input  logic [MW-1:0] mx,
  input  logic [MW-1:0] my,
  input  logic          sign_d,
  input  logic [EW-1:0] d_abs,
  input  logic          eop,
  input  logic [MW-1:0] rw_s1,
  input  logic [MW-1:0] mask_s1,
  input  logic [MW-1:0] rw_s2,
  output logic [MW-1:0] s_far,
  output logic          ovf,
  output logic          sh1l
);

  localparam int unsigned HW = MW + 2;          // 26 upper bits (to R)
  localparam int unsigned AW = HW + MW;         // 50-bit alignment frame

  // ---------------- stage 1 ----------------
  logic [MW-1:0] x, y;
  logic [4:0]    sh;
  logic [AW-1:0] y_al, st_mask;
  logic [HW-1:0] y_hi;
  logic [MW-1:0] fx, fy;
  logic          t, g, r, lx, ly, lsx, lsy, l, l_star, c;
  logic          ty, tx, gy, gx, ry, rx;

  // swap
  assign x = sign_d ? my : mx;
  assign y = sign_d ? mx : my;

  // right-shift, saturated at 26
  assign sh   = (d_abs > EW'(HW)) ? 5'(HW) : d_abs[4:0];
  assign y_al = {y, {HW{1'b0}}} >> sh;

  // extract bit: sticky over weights 2^-(m+2) and below
  assign st_mask = {2'b00, ~mask_s1, {MW{1'b1}}};
  assign ty      = |(y_al & st_mask);
  assign tx      = |(x & ~{2'b11, mask_s1[MW-1:2]});
  assign t       = ty | tx;

  // bit invert of the upper part
  assign y_hi = y_al[AW-1 -: HW] ^ {HW{eop}};

  // masking to m bits
  assign fx = x & mask_s1;
  assign fy = y_hi[HW-1:2] & mask_s1;

  // extract LGR.  RW[k] has weight 2^-(24-k): it lines up with y_hi[k+1]
  // / x[k-1] for G, y_hi[k] / x[k-2] for R, y_hi[k+2] / x[k] for L and
  // y_hi[k+3] / x[k+1] for L*.
  assign gy  = |(y_hi[HW-2:1] & rw_s1);
  assign ry  = |(y_hi[HW-3:0] & rw_s1);
  assign gx  = |(x[MW-2:0] & rw_s1[MW-1:1]);
  assign rx  = |(x[MW-3:0] & rw_s1[MW-1:2]);
  assign g   = gy | gx;
  assign r   = ry | rx;
  assign ly  = |(y_hi[HW-1:2] & rw_s1);
  assign lx  = |(x & rw_s1);
  assign lsy = |(y_hi[HW-1:3] & rw_s1[MW-2:0]);
  assign lsx = |(x[MW-1:1] & rw_s1[MW-2:0]);
  assign l      = lx ^ ly;
  assign l_star = lsx ^ lsy ^ (lx & ly);
  assign c      = ~eop | g | (r & ~t);

  logic [MW-1:0] fx_q, fy_q;
  logic          eop_q, c_q, t_q, g_q, r_q, l_q, ls_q;

  always_ff @(posedge clk) begin
    if (en) begin
      fx_q  <= fx;
      fy_q  <= fy;
      eop_q <= eop;
      c_q   <= c;
      t_q   <= t;
      g_q   <= g;
      r_q   <= r;
      l_q   <= l;
      ls_q  <= l_star;
    end
  end

  // ---------------- stage 2 ----------------
  logic [HW-1:0] a, b0, b1, s0, s1, sel;
  logic [1:0]    muxc;
  logic          muxr;

  // append bit: S frame bit k has weight 2^(k-24), RW[k] lines up with it
  assign a  = {1'b0, fx_q, 1'b0} | {2'b00, rw_s2 & {MW{c_q}}};
  assign b0 = {1'b0, fy_q, 1'b0};
  assign b1 = b0 | {2'b00, rw_s2};

  // compound adder
  assign s0 = a + b0;
  assign s1 = a + b1;

  tfp_far_round_ctrl u_rc (
    .eop   (eop_q),
    .l_star(ls_q),
    .l     (l_q),
    .g     (g_q),
    .r     (r_q),
    .t     (t_q),
    .s0_top(s0[HW-1 -: 3]),
    .s1_top(s1[HW-1 -: 3]),
    .muxc  (muxc),
    .ovf   (ovf),
    .sh1l  (sh1l),
    .muxr  (muxr)
  );

  assign sel = muxr ? s1 : s0;

  // shift-1 L or R
  always_comb begin
    if (ovf)       s_far = sel[HW-1:2];
    else if (sh1l) s_far = sel[MW-1:0];
    else           s_far = sel[HW-2:1];
  end

endmodule
