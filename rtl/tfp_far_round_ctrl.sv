// tfp_far_round_ctrl: rounding control 1 and 2 of the FAR path.
//
// The FAR path forms two sums in a compound adder, S0 = Fx + Fy and
// S1 = Fx + Fy + one unit in the G position (see tfp_far_path), and must pick
// one of them and the final one-bit normalisation shift.  All conditions are
// those of the document for round-to-nearest-even.
//
// Rounding control 1 gives the 2-bit MUXC: MUXC(0) is the round-up decision
// when the result needs no one-bit shift, MUXC(1) when it does.
//   EOP = 0 (addition; G, R of the aligned Y, T its sticky bit):
//     MUXC(0) = G (R | T | L)            MUXC(1) = L (L* | G | R | T)
//   EOP = 1 (subtraction; G, R taken after Y was complemented, T from Y
//   before complementing):
//     MUXC(0) = G | L ~G R ~T            MUXC(1) = G (R | ~T) | R T
// Rounding control 2 decides the shift from the sum bits of weight 2, 1 and
// 1/2 (index 1, 0, -1 below) and selects the sum:
//   OVF  = ~EOP & (S1_1 S0_1 | S1_1 MUXC(1) MUXC(0))
//   SH1L =  EOP & (~S1_0 S1_-1 | ~S0_0 S0_-1 ~MUXC(1) MUXC(0))
//   MUXR = (OVF | SH1L) ? MUXC(1) : MUXC(0)
// The EOP gating of OVF and SH1L is this design's: in a subtraction bit
// S_1 holds the wrap-around of the complemented operand, and an addition
// never needs a left shift.
//
// Combinational, stage 2.
module tfp_far_round_ctrl (
  input  logic       eop,
  input  logic       l_star,
  input  logic       l,
  input  logic       g,
  input  logic       r,
  input  logic       t,
  input  logic [2:0] s0_top,   // S0 bits of weight 2, 1, 1/2
  input  logic [2:0] s1_top,   // S1 bits of weight 2, 1, 1/2
  output logic [1:0] muxc,
  output logic       ovf,
  output logic       sh1l,
  output logic       muxr
);

  // rounding control 1
  always_comb begin
    if (!eop) begin
      muxc[0] = g & (r | t | l);
      muxc[1] = l & (l_star | g | r | t);
    end else begin
      muxc[0] = g | (l & ~g & r & ~t);
      muxc[1] = (g & (r | ~t)) | (r & t);
    end
  end

  // rounding control 2
  assign ovf  = ~eop & ((s1_top[2] & s0_top[2]) | (s1_top[2] & muxc[1] & muxc[0]));
  assign sh1l =  eop & ((~s1_top[1] & s1_top[0]) |
                        (~s0_top[1] & s0_top[0] & ~muxc[1] & muxc[0]));
  assign muxr = (ovf | sh1l) ? muxc[1] : muxc[0];

endmodule
