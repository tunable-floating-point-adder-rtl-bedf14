// tfp_decoder: precision decoder and the RW/MASK pipeline registers.
//
// From the precision m the decoder builds the two bit-vectors that let the
// datapath round in a variable position:
//   RW   (rounding word): all zeros except the bit of weight 2^-m, which is
//        the guard bit G of an m-bit significand (frame RW[24-i] = 2^-i);
//   MASK: the m most-significant positions of a 24-bit significand set,
//        the rest zero (frame MASK[23-i] = 2^-i).
// Stage 1 of the adder uses the decoded values directly (rw_s1, mask_s1).
// Stage 2 uses the registered copies (rw_s2, mask_s2).  These registers load
// only when an operation enters with a precision different from the one they
// hold, which is what lets them be clock-gated while m stays the same.
//
// Timing: rw_s1/mask_s1 are combinational from m; rw_s2/mask_s2 follow one
// clock edge after a valid operation that carries a new m.  Reset loads m=24.
// A code m outside [4,24] is clamped to the nearest end of the range: the
// document gives the range but not what happens outside it.
module tfp_decoder
  import tfp_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          valid,       // an operation enters stage 1
  input  logic [PW-1:0] m,           // requested precision
  output logic [MW-1:0] rw_s1,
  output logic [MW-1:0] mask_s1,
  output logic [MW-1:0] rw_s2,
  output logic [MW-1:0] mask_s2
);

  logic [PW-1:0] m_c;     // clamped precision
  logic [PW-1:0] m_q;     // precision held by the stage-2 registers

  always_comb begin
    if (m < PW'(M_MIN))   m_c = PW'(M_MIN);
    else if (m > PW'(MW)) m_c = PW'(MW);
    else                  m_c = m;
  end

  // One-hot at bit MW-m, and m leading ones.
  assign rw_s1   = MW'(1) << (PW'(MW) - m_c);
  assign mask_s1 = ~({MW{1'b1}} >> m_c);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_q     <= PW'(MW);
      rw_s2   <= MW'(1);
      mask_s2 <= '1;
    end else if (valid && (m_c != m_q)) begin
      m_q     <= m_c;
      rw_s2   <= rw_s1;
      mask_s2 <= mask_s1;
    end
  end

endmodule
