// tb_tfp_exp_diff: random and corner exponent pairs against integer
// arithmetic: sign of D, |D|, |D| = 1, the CLOSE/FAR choice and the larger
// exponent.
module tb_tfp_exp_diff;
  logic [7:0] ex, ey, d_abs, emax;
  logic       eop, sign_d, d_one, cls;
  int checks = 0, failures = 0;

  tfp_exp_diff dut (.ex(ex), .ey(ey), .eop(eop), .sign_d(sign_d), .d_abs(d_abs),
                    .d_one(d_one), .cls(cls), .emax(emax));

  initial begin
    int d, ad;
    for (int i = 0; i < 20000; i++) begin
      ex = 8'($urandom); eop = 1'($urandom);
      ey = (i % 2) ? 8'(int'(ex) + int'($urandom % 5) - 2) : 8'($urandom);
      if (i < 4) begin ex = (i < 2) ? 8'd255 : 8'd0; ey = (i % 2) ? 8'd0 : 8'd255; end
      #1;
      d = int'(ex) - int'(ey);
      ad = (d < 0) ? -d : d;
      checks++;
      if (sign_d != (d < 0) || int'(d_abs) != ad || d_one != (ad == 1) ||
          cls != (eop && ad <= 1) || int'(emax) != ((d < 0) ? int'(ey) : int'(ex))) begin
        failures++;
        if (failures < 10) $display("FAIL: ex=%0d ey=%0d eop=%0d -> %0d %0d %0d %0d %0d",
                                    ex, ey, eop, sign_d, d_abs, d_one, cls, emax);
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
