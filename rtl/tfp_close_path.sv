// tfp_close_path: CLOSE path of the double-path TFP adder.
//
// Handles effective subtractions with exponent difference 0 or 1, where the
// result can lose many leading bits but needs at most one alignment shift.
//
// Stage 1: the operand with the smaller exponent is shifted right by one
//   position (two 2:1 muxes, SHIFT X = sign(D) and (|D|=1),
//   SHIFT Y = not sign(D) and (|D|=1)); My is always the one complemented;
//   the carry-around adder with bit inversion gives S = |X - Y| (25 bits,
//   S[24-i] has weight 2^-i) and NEG.  S, NEG and |D|=1 are registered.
// Stage 2: two parallel paths selected by RND = MSB(S) and (|D|=1):
//   - normalisation: a leading-one detector gives SHAMT and S is shifted
//     left by it; such a result is exact and is not rounded;
//   - rounding: bits L and G are extracted with the rounding word RW
//     (AND-OR networks), U = L and G, and the CPA adds U in the G position
//     (RW AND U).  When G = 1 that carries into L, which is the round-up
//     of round-to-nearest-even; the bits below L are dropped later by the
//     masked result mux.
// All of this follows the document.  Rounding is correct for operands whose
// significands have at most m bits, the precision the document works with.
//
// Interface: en loads the stage register (the operation is valid); rw is the
// stage-2 (registered) rounding word.  Outputs are stage-2 combinational:
// s_close is the 24-bit significand, shamt the normalisation shift applied
// (the exponent decrement), zero flags an exact cancellation, neg the sign
// flip of the result.
module tfp_close_path
  import tfp_pkg::*;
(
  input  logic          clk,
  input  logic          en,
  input  logic [MW-1:0] mx,
  input  logic [MW-1:0] my,
  input  logic          sign_d,
  input  logic          d_one,
  input  logic [MW-1:0] rw,        // stage-2 rounding word
  output logic [MW-1:0] s_close,
  output logic [4:0]    shamt,
  output logic          zero,
  output logic          neg
);

  localparam int unsigned SW = MW + 1;   // 25-bit difference

  // ---------------- stage 1 ----------------
  logic          shift_x, shift_y;
  logic [SW-1:0] xa, ya, s1_s;
  logic          s1_neg;

  assign shift_x = sign_d & d_one;
  assign shift_y = ~sign_d & d_one;
  assign xa = shift_x ? {1'b0, mx} : {mx, 1'b0};
  assign ya = shift_y ? {1'b0, my} : {my, 1'b0};

  tfp_ca_adder #(.W(SW)) u_ca (
    .x  (xa),
    .yc (~ya),
    .s  (s1_s),
    .neg(s1_neg)
  );

  logic [SW-1:0] s_q;
  logic          neg_q, d_one_q;

  always_ff @(posedge clk) begin
    if (en) begin
      s_q     <= s1_s;
      neg_q   <= s1_neg;
      d_one_q <= d_one;
    end
  end

  // ---------------- stage 2 ----------------
  logic          rnd;
  logic [SW-1:0] s_ls;
  logic          bit_l, bit_g, u;
  logic [MW-1:0] cpa;

  tfp_lod #(.W(SW), .SW(5)) u_lod (
    .s    (s_q),
    .shamt(shamt),
    .zero (zero)
  );

  assign s_ls = s_q << shamt;

  // RW marks G; in the 25-bit frame S[k] and RW[k] have the same weight.
  assign bit_g = |(s_q[MW-1:0] & rw);
  assign bit_l = |(s_q[SW-1:1] & rw);
  assign u     = bit_l & bit_g;

  // The difference is below 1.5, so the rounding add cannot carry out.
  assign cpa = s_q[MW-1:0] + (rw & {MW{u}});

  assign rnd     = s_q[SW-1] & d_one_q;
  assign s_close = rnd ? {s_q[SW-1], cpa[MW-1:1]} : s_ls[SW-1:1];
  assign neg     = neg_q;

endmodule
