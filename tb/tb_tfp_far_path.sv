// tb_tfp_far_path: FAR path against exact integer addition/subtraction.
//
// Random significands of at most m bits, random m, exponent differences
// from 0 (additions only) to far beyond the significand width, and zero
// for the smaller operand now and then.  Operations stream one per cycle
// with a new m each time; RW and MASK are built here from m and delayed by
// one cycle for stage 2, as the decoder registers do.  Stage-2 outputs are
// checked against the reference: the masked significand is the exact
// result rounded to nearest-even at m bits, OVF flags a result in [2,4)
// and SH1L one below 1, both after rounding.  Fails if overflow, left
// shift, round-up or the sticky bit never occurred.
module tb_tfp_far_path;
  import tfp_tb_pkg::*;
  logic        clk = 0, en = 0;
  logic [23:0] mx, my, rw_s1, mask_s1, rw_s2, s_far;
  logic [7:0]  d_abs;
  logic        sign_d, eop, ovf, sh1l;
  int checks = 0, failures = 0;
  int n_ovf = 0, n_sh1l = 0, n_up = 0, n_t = 0;

  tfp_far_path dut (.clk(clk), .en(en), .mx(mx), .my(my), .sign_d(sign_d), .d_abs(d_abs),
                    .eop(eop), .rw_s1(rw_s1), .mask_s1(mask_s1), .rw_s2(rw_s2),
                    .s_far(s_far), .ovf(ovf), .sh1l(sh1l));

  always #5 clk = ~clk;

  function automatic logic [23:0] sig_m(int m);
    logic [23:0] v = {1'b1, 23'($urandom)};
    if ($urandom % 8 == 0) v = '1;
    if ($urandom % 8 == 0) v = 24'h800000;
    return v & ~(24'hFFFFFF >> m);
  endfunction

  typedef struct {
    logic [23:0] sig, mask;
    int adj, m;
    logic [23:0] mx, my;
    int d;
    logic eop, sd;
  } exp_t;

  initial begin
    int m, pos, d;
    logic [23:0] xs, ys, sig;
    wide_t a, b, mag;
    exp_t e, prev;
    logic have_prev = 0;
    for (int i = 0; i < 60000; i++) begin
      @(negedge clk);
      // outputs now belong to the previous operation
      if (have_prev) begin
        checks++;
        if ((s_far & prev.mask) != prev.sig || ovf != (prev.adj == 1) || sh1l != (prev.adj == -1)) begin
          failures++;
          if (failures < 10)
            $display("FAIL: m=%0d mx=%h my=%h d=%0d sd=%0d eop=%0d got %h ovf=%0d sh1l=%0d want %h adj=%0d",
                     prev.m, prev.mx, prev.my, prev.d, prev.sd, prev.eop, s_far & prev.mask, ovf, sh1l,
                     prev.sig, prev.adj);
        end
        if (ovf) n_ovf++;
        if (sh1l) n_sh1l++;
        if (dut.muxr) n_up++;
        if (dut.t_q) n_t++;
      end
      m = 4 + int'($urandom % 21);
      eop = 1'($urandom);
      case ($urandom % 4)
        0: d = 2 + int'($urandom % 4);
        1: d = 2 + int'($urandom % 30);
        2: d = 2 + int'($urandom % 254);
        default: d = eop ? 2 + int'($urandom % 3) : int'($urandom % 3);
      endcase
      sign_d = 1'($urandom);
      d_abs = 8'(d);
      mx = sig_m(m); my = sig_m(m);
      if ($urandom % 32 == 0) begin
        if (sign_d) mx = '0; else my = '0;
      end
      rw_s2 = rw_s1;
      rw_s1 = 24'h1 << (24 - m);
      mask_s1 = ~(24'hFFFFFF >> m);
      en = 1;
      // reference
      xs = sign_d ? my : mx;
      ys = sign_d ? mx : my;
      a = wide_t'(xs) << LOW;
      b = align(ys, 0, d);
      mag = eop ? a - b : a + b;
      round_m(mag, m, sig, pos);
      e.sig = sig; e.mask = mask_s1; e.adj = pos - (LOW + 23); e.m = m;
      e.mx = mx; e.my = my; e.d = d; e.eop = eop; e.sd = sign_d;
      @(posedge clk);
      #1;
      rw_s2 = rw_s1;   // the registered copy the decoder would now hold
      prev = e; have_prev = 1;
    end
    checks++;
    if (n_ovf == 0 || n_sh1l == 0 || n_up == 0 || n_t == 0) begin
      failures++;
      $display("FAIL: ovf %0d sh1l %0d round-up %0d sticky %0d", n_ovf, n_sh1l, n_up, n_t);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #3000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
