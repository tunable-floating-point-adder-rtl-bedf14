// tb_tfp_cond_det: flush to zero for exponents below the normal range of
// the selected exponent width and for significands without integer bit,
// infinity for exponents above it, pass-through otherwise.  The limits are
// worked out from the e-bit bias for every range code 0..15 (codes outside
// 5..8 act as the nearest end).
module tb_tfp_cond_det;
  import tfp_pkg::*;
  logic [9:0]  e_upd;
  logic [23:0] m_sel;
  logic        sign, subn, infty;
  logic [3:0]  e_w;
  tfp_num_t    z;
  int checks = 0, failures = 0;

  tfp_cond_det dut (.e_upd(e_upd), .m_sel(m_sel), .sign(sign), .e_w(e_w),
                    .subn(subn), .infty(infty), .z(z));

  initial begin
    int e, ew, bias, lo, hi;
    logic ws, wi;
    tfp_num_t wz;
    for (int i = 0; i < 40000; i++) begin
      e_w = 4'($urandom);
      if ($urandom % 2) e_w = 4'(5 + $urandom % 4);
      ew = (e_w < 5) ? 5 : (e_w > 8) ? 8 : int'(e_w);
      bias = (1 << (ew - 1)) - 1;
      lo = 127 - bias + 1;
      hi = 127 + bias;
      // mostly near one of the two limits
      case ($urandom % 3)
        0: e = lo + int'($urandom % 7) - 3;
        1: e = hi + int'($urandom % 7) - 3;
        default: e = int'($urandom % 300) - 30;
      endcase
      e_upd = 10'(e);
      m_sel = 24'($urandom);
      if ($urandom % 4 != 0) m_sel[23] = 1'b1;
      sign = 1'($urandom);
      #1;
      ws = (e < lo) || !m_sel[23];
      wi = !ws && (e > hi);
      wz.sign = sign;
      wz.exp  = ws ? 8'd0 : wi ? 8'd255 : 8'(e);
      wz.frac = (ws || wi) ? 23'd0 : m_sel[22:0];
      checks++;
      if (subn != ws || infty != wi || z != wz) begin
        failures++;
        if (failures < 10)
          $display("FAIL: e=%0d ew=%0d m=%h -> %0d %0d %h", e, ew, m_sel, subn, infty, z);
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
