// tb_tfp_lod: leading-one detector on inputs with the leading one at every
// position (random bits below it) and on zero.
module tb_tfp_lod;
  localparam int W = 25;
  logic [W-1:0] s;
  logic [4:0]   shamt;
  logic         zero;
  int checks = 0, failures = 0;

  tfp_lod #(.W(W), .SW(5)) dut (.s(s), .shamt(shamt), .zero(zero));

  initial begin
    int p;
    for (int i = 0; i < 5000; i++) begin
      p = (i < W) ? i : int'($urandom % (W + 1)) - 1;   // -1: zero input
      if (p < 0) s = '0;
      else s = (W'(1) << p) | (W'($urandom) & ((W'(1) << p) - 1));
      #1;
      checks++;
      if (zero != (p < 0) || (p >= 0 && int'(shamt) != W - 1 - p) || (p < 0 && int'(shamt) != W)) begin
        failures++;
        if (failures < 10) $display("FAIL: s=%h shamt=%0d zero=%0d", s, shamt, zero);
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
