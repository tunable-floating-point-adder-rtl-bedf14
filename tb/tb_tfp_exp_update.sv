// tb_tfp_exp_update: updated exponent for both paths against integer
// arithmetic, including results below 1 and at the top of the range.
module tb_tfp_exp_update;
  logic [7:0] emax;
  logic       cls, ovf, sh1l;
  logic [4:0] shamt;
  logic [9:0] e_upd;
  int checks = 0, failures = 0;

  tfp_exp_update dut (.emax(emax), .cls(cls), .shamt(shamt), .ovf(ovf), .sh1l(sh1l), .e_upd(e_upd));

  initial begin
    int want;
    for (int i = 0; i < 20000; i++) begin
      emax = 8'($urandom); cls = 1'($urandom); shamt = 5'($urandom % 26);
      ovf = 1'($urandom); sh1l = ~ovf & 1'($urandom);
      #1;
      want = cls ? int'(emax) - int'(shamt) : int'(emax) + int'(ovf) - int'(sh1l);
      checks++;
      if ($signed(e_upd) != want) begin
        failures++;
        if (failures < 10) $display("FAIL: emax=%0d cls=%0d shamt=%0d ovf=%0d sh1l=%0d -> %0d",
                                    emax, cls, shamt, ovf, sh1l, $signed(e_upd));
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
