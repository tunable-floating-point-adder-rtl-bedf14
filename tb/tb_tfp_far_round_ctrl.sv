// tb_tfp_far_round_ctrl: rounding control of the FAR path, exhaustively.
//
// Every combination of EOP, L*, L, G, R, T and of the top bits of S0 and
// S1 is applied.  The expected MUXC comes from the round-up table (addition:
// ties-to-even on G with R, T and L; overflow: the same one place higher;
// subtraction: the conditions that account for the complemented operand
// and the pending two's-complement one), and OVF, SH1L and MUXR from the
// decision rules on the sums.  The table is written as explicit case
// analysis, independent of the gate equations of the block.
module tb_tfp_far_round_ctrl;
  logic       eop, l_star, l, g, r, t, ovf, sh1l, muxr;
  logic [2:0] s0_top, s1_top;
  logic [1:0] muxc;
  int checks = 0, failures = 0;

  tfp_far_round_ctrl dut (.eop(eop), .l_star(l_star), .l(l), .g(g), .r(r), .t(t),
                          .s0_top(s0_top), .s1_top(s1_top), .muxc(muxc), .ovf(ovf),
                          .sh1l(sh1l), .muxr(muxr));

  initial begin
    logic [1:0] w_muxc;
    logic w_ovf, w_sh1l, w_muxr, half, above;
    for (int v = 0; v < 4096; v++) begin
      {eop, l_star, l, g, r, t, s0_top, s1_top} = 12'(v);
      #1;
      if (!eop) begin
        // no shift: round bit G, sticky R|T, tie broken by L
        above = g && (r || t);
        half  = g && !r && !t;
        w_muxc[0] = above || (half && l);
        // overflow: round bit L, sticky G|R|T, tie broken by L*
        w_muxc[1] = (l && (g || r || t)) || (l && !g && !r && !t && l_star);
      end else begin
        // subtraction: G,R of the complemented operand, T of the original
        case ({g, r, t})
          3'b110:  w_muxc = 2'b11;          // nothing shifted out: exact
          3'b100:  w_muxc = 2'b11;          // remainder 01 below L
          3'b010:  w_muxc = {1'b0, l};      // tie below L, break on L
          3'b000:  w_muxc = 2'b00;
          default: w_muxc = {r, g};         // sticky set: bits are final
        endcase
      end
      w_ovf  = !eop && s1_top[2] && (s0_top[2] || (w_muxc == 2'b11));
      w_sh1l = eop && ((!s1_top[1] && s1_top[0]) ||
                       (!s0_top[1] && s0_top[0] && w_muxc == 2'b01));
      w_muxr = (w_ovf || w_sh1l) ? w_muxc[1] : w_muxc[0];
      checks++;
      if (muxc != w_muxc || ovf != w_ovf || sh1l != w_sh1l || muxr != w_muxr) begin
        failures++;
        if (failures < 10) $display("FAIL: in=%b got %b %0d %0d %0d want %b %0d %0d %0d",
                                    12'(v), muxc, ovf, sh1l, muxr, w_muxc, w_ovf, w_sh1l, w_muxr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
