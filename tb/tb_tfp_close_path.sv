// tb_tfp_close_path: CLOSE path against exact integer subtraction.
//
// Random significands of at most m bits (m random in 4..24, RW and MASK
// built here from m) with exponent difference 0 or 1, now and then a zero
// operand or equal operands.  One operation enters per cycle; the stage-2
// outputs are checked one cycle later: the masked significand must equal
// |X - Y| rounded to nearest-even at m bits, SHAMT the normalising shift,
// and the zero and sign flags must match.  Counts the rounding path with a
// round-up, the shifting path and cancellations, and fails if one of them
// was never taken.
module tb_tfp_close_path;
  import tfp_tb_pkg::*;
  logic        clk = 0, en = 0;
  logic [23:0] mx, my, rw, s_close;
  logic        sign_d, d_one, zero, neg;
  logic [4:0]  shamt;
  int checks = 0, failures = 0;
  int n_up = 0, n_shift = 0, n_zero = 0;

  tfp_close_path dut (.clk(clk), .en(en), .mx(mx), .my(my), .sign_d(sign_d), .d_one(d_one),
                      .rw(rw), .s_close(s_close), .shamt(shamt), .zero(zero), .neg(neg));

  always #5 clk = ~clk;

  function automatic logic [23:0] sig_m(int m);
    logic [23:0] v = {1'b1, 23'($urandom)};
    if ($urandom % 8 == 0) v = '1;
    return v & ~(24'hFFFFFF >> m);
  endfunction

  initial begin
    int m, pos;
    logic [24:0] xv, yv;
    logic [23:0] mask, sig;
    wide_t diff;
    logic w_neg;
    for (int i = 0; i < 40000; i++) begin
      @(negedge clk);
      m = 4 + int'($urandom % 21);
      d_one = 1'($urandom); sign_d = d_one & 1'($urandom);
      mx = sig_m(m); my = sig_m(m);
      if (i % 13 == 0) my = mx;
      if (d_one && ($urandom % 16 == 0)) begin
        if (sign_d) mx = '0; else my = '0;    // the smaller operand is zero
      end
      en = 1;
      @(posedge clk);
      #1;
      en = 0;
      rw = 24'h1 << (24 - m);
      mask = ~(24'hFFFFFF >> m);
      #1;
      xv = (sign_d & d_one) ? {1'b0, mx} : {mx, 1'b0};
      yv = (~sign_d & d_one) ? {1'b0, my} : {my, 1'b0};
      w_neg = (xv <= yv);
      diff = w_neg ? wide_t'(yv - xv) : wide_t'(xv - yv);
      round_m(diff, m, sig, pos);
      checks++;
      if (diff == 0) begin
        n_zero++;
        if (!zero || !neg) begin
          failures++;
          $display("FAIL: cancellation not flagged mx=%h my=%h", mx, my);
        end
      end else begin
        if (dut.rnd && dut.u) n_up++;
        if (pos < 24) n_shift++;
        if ((s_close & mask) != sig || int'(shamt) != 24 - pos || zero || neg != w_neg) begin
          failures++;
          if (failures < 10)
            $display("FAIL: sq=%h rnd=%0d u=%0d m=%0d mx=%h my=%h sd=%0d d1=%0d got %h sh=%0d neg=%0d want %h sh=%0d neg=%0d",
                     dut.s_q, dut.rnd, dut.u, m, mx, my, sign_d, d_one, s_close & mask, shamt, neg, sig, 24 - pos, w_neg);
        end
      end
    end
    checks++;
    if (n_up == 0 || n_shift == 0 || n_zero == 0) begin
      failures++;
      $display("FAIL: round-up %0d, shift %0d, zero %0d", n_up, n_shift, n_zero);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
