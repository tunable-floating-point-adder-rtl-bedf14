// tb_tfp_decoder: checks the precision decoder and its RW/MASK registers.
//
// For every 5-bit code m it checks that RW is one-hot at bit 24-m and that
// MASK holds exactly m leading ones (m clamped to 4..24).  It then checks
// the stage-2 registers: they take the new vectors one edge after a valid
// operation with a different m, and hold their value while no operation
// enters.
module tb_tfp_decoder;
  logic        clk = 0, rst_n = 0, valid = 0;
  logic [4:0]  m = 24;
  logic [23:0] rw_s1, mask_s1, rw_s2, mask_s2;
  int checks = 0, failures = 0;

  tfp_decoder dut (.clk(clk), .rst_n(rst_n), .valid(valid), .m(m),
                   .rw_s1(rw_s1), .mask_s1(mask_s1), .rw_s2(rw_s2), .mask_s2(mask_s2));

  always #5 clk = ~clk;

  function automatic int clampm(int v);
    return (v < 4) ? 4 : (v > 24) ? 24 : v;
  endfunction

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (m=%0d rw=%h mask=%h rw2=%h mask2=%h)", what, m, rw_s1, mask_s1, rw_s2, mask_s2);
    end
  endtask

  initial begin
    int mc, ones;
    logic [23:0] hold_rw, hold_mask;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(rw_s2 == 24'h000001 && mask_s2 == 24'hFFFFFF, "reset value is m=24");
    for (int v = 0; v < 32; v++) begin
      m = 5'(v);
      #1;
      mc = clampm(v);
      ones = 0;
      for (int i = 0; i < 24; i++) ones += int'(mask_s1[i]);
      check($onehot(rw_s1) && rw_s1[24 - mc], "RW one-hot at the guard bit");
      check(ones == mc && mask_s1[23] && (mc == 24 || !mask_s1[23 - mc]), "MASK has m leading ones");
      // registered copy
      @(negedge clk);
      valid = 1;
      @(negedge clk);
      valid = 0;
      check(rw_s2 == rw_s1 && mask_s2 == mask_s1, "registers follow a new m");
    end
    // registers hold while no operation enters
    hold_rw = rw_s2; hold_mask = mask_s2;
    m = 5'd7;
    repeat (3) @(negedge clk);
    check(rw_s2 == hold_rw && mask_s2 == hold_mask, "registers hold without valid");
    valid = 1;
    @(negedge clk);
    valid = 0;
    check(rw_s2 == 24'h1 << 17 && mask_s2 == 24'hFE0000, "m=7 loaded");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
