// tb_tfp_ca_adder: the carry-around adder with bit inversion must give
// |x - y| and flag x <= y, for random operands, operands that differ in one
// bit, and equal operands.
module tb_tfp_ca_adder;
  localparam int W = 25;
  logic [W-1:0] x, y, s;
  logic         neg;
  int checks = 0, failures = 0;

  tfp_ca_adder #(.W(W)) dut (.x(x), .yc(~y), .s(s), .neg(neg));

  initial begin
    logic [W-1:0] want;
    for (int i = 0; i < 30000; i++) begin
      x = W'($urandom);
      case (i % 3)
        0: y = W'($urandom);
        1: y = x ^ (W'(1) << ($urandom % W));
        default: y = x;
      endcase
      #1;
      want = (x > y) ? x - y : y - x;
      checks++;
      if (s != want || neg != (x <= y)) begin
        failures++;
        if (failures < 10) $display("FAIL: x=%h y=%h s=%h neg=%0d", x, y, s, neg);
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
