// tb_tfp_nn: neural-network inference workload on the TFP adder.
//
// Runs the forward pass of a network with one input, two hidden layers of
// four neurons and one output (weights w0[j], w1[j][i], w2[i]) for random
// inputs, with one precision per weight level.  The level settings are the
// per-level combinations (m0, m1, m2) with m in {24, 16, 8} and an 8-bit
// exponent, then the (m, e) pairs 24/8, 20/8, 16/8, 14/8, 11/5, 9/5, 7/5,
// 5/5 used at every level.  Consecutive operations therefore switch the
// adder's precision and exponent range from one level to the next.
//
// The weights are random full-precision numbers.  They are quantised to
// their level by the adder itself, by adding zero (conversion).  Products
// come from a behavioural multiplier in this testbench: the exact product,
// rounded to nearest-even at m bits.  Every sum of a neuron is accumulated
// by the adder.  Between layers a rectifier (negative values to zero)
// stands in for the activation function, which the network's description
// does not give.  Every result of the adder is checked against the exact
// reference adder of tfp_tb_pkg.  The mean deviation of the output from the
// all-24-bit network is printed for information.  The test fails if the
// precision never changed between consecutive operations.
module tb_tfp_nn;
  import tfp_pkg::*;
  import tfp_tb_pkg::*;

  localparam int NPTS = 100;          // input points per setting
  localparam int NSET = 17;
  // level precisions and exponent width of each setting
  localparam int M0[NSET] = '{24, 16, 16, 16, 16,  8,  8,  8,  8, 24, 20, 16, 14, 11,  9,  7,  5};
  localparam int M1[NSET] = '{24, 16, 16,  8,  8, 16, 16,  8,  8, 24, 20, 16, 14, 11,  9,  7,  5};
  localparam int M2[NSET] = '{24, 16,  8, 16,  8, 16,  8, 16,  8, 24, 20, 16, 14, 11,  9,  7,  5};
  localparam int EWS[NSET] = '{8,  8,  8,  8,  8,  8,  8,  8,  8,  8,  8,  8,  8,  5,  5,  5,  5};

  logic       clk = 0, rst_n = 0, in_valid = 0, sub = 0;
  tfp_num_t   x, y, z;
  logic [4:0] m = 24;
  logic [3:0] e_w = 8;
  logic       out_valid, z_subn, z_infty;
  int checks = 0, failures = 0, n_switch = 0, prev_m = 24;

  tfp_add dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x), .y(y), .sub(sub),
               .m(m), .e_w(e_w), .out_valid(out_valid), .z(z), .z_subn(z_subn),
               .z_infty(z_infty));

  always #5 clk = ~clk;

  // behavioural TFP multiplier: exact product rounded at m bits
  function automatic num_t tfp_mul(num_t a, num_t b, int mm);
    wide_t p;
    logic [23:0] sig;
    int pos, e;
    num_t r;
    r.sign = a.sign ^ b.sign;
    if (a.exp == 0 || b.exp == 0) begin r.exp = 0; r.frac = 0; return r; end
    p = wide_t'({1'b1, a.frac}) * wide_t'({1'b1, b.frac});
    round_m(p, mm, sig, pos);
    e = int'(a.exp) + int'(b.exp) - 127 + (pos - 46);
    if (e <= 0) begin r.exp = 0; r.frac = 0; end
    else if (e >= 255) begin r.exp = 8'hFF; r.frac = 0; end
    else begin r.exp = 8'(e); r.frac = sig[22:0]; end
    return r;
  endfunction

  function automatic real to_real(num_t a);
    real v;
    if (a.exp == 0) return 0.0;
    v = (1.0 + real'(a.frac) / 8388608.0) * $pow(2.0, real'(int'(a.exp) - 127));
    return a.sign ? -v : v;
  endfunction

  function automatic num_t relu(num_t a);
    return a.sign ? num_t'(0) : a;
  endfunction

  function automatic num_t rand_num(int e_lo, int e_span);
    num_t r;
    r.sign = 1'($urandom);
    r.exp  = 8'(e_lo + int'($urandom % e_span));
    r.frac = 23'($urandom);
    return r;
  endfunction

  // one addition through the pipeline, checked against the reference
  task automatic add_chk(num_t a, num_t b, int mm, int ew, output num_t r);
    num_t want;
    logic w_subn, w_inf;
    if (mm != prev_m) n_switch++;
    prev_m = mm;
    want = ref_add(a, b, 1'b0, mm, ew, w_subn, w_inf);
    @(negedge clk);
    x = tfp_num_t'(a); y = tfp_num_t'(b); m = 5'(mm); e_w = 4'(ew); in_valid = 1;
    @(negedge clk);
    in_valid = 0;
    @(posedge clk);
    #1;
    r = num_t'(z);
    checks++;
    if (!out_valid || r != want || z_subn != w_subn || z_infty != w_inf) begin
      failures++;
      if (failures < 10)
        $display("FAIL: %h + %h m=%0d e=%0d: got %h want %h", a, b, mm, ew, r, want);
    end
  endtask

  // forward pass with the weights of one setting
  task automatic forward(num_t xin, num_t w0[4], num_t w1[4][4], num_t w2[4],
                         int m0, int m1, int m2, int ew, output num_t yout);
    num_t p1[4], p2[4], acc;
    for (int j = 0; j < 4; j++) begin
      // a single input: the product goes through the adder to meet the range
      add_chk(tfp_mul(w0[j], xin, m0), num_t'(0), m0, ew, acc);
      p1[j] = relu(acc);
    end
    for (int i = 0; i < 4; i++) begin
      acc = tfp_mul(w1[0][i], p1[0], m1);
      for (int j = 1; j < 4; j++) add_chk(acc, tfp_mul(w1[j][i], p1[j], m1), m1, ew, acc);
      p2[i] = relu(acc);
    end
    acc = tfp_mul(w2[0], p2[0], m2);
    for (int i = 1; i < 4; i++) add_chk(acc, tfp_mul(w2[i], p2[i], m2), m2, ew, acc);
    yout = acc;
  endtask

  initial begin
    num_t w0f[4], w1f[4][4], w2f[4];         // full precision
    num_t w0[4], w1[4][4], w2[4];            // quantised per level
    num_t xs[NPTS], yref[NPTS], yo;
    real  dev;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int j = 0; j < 4; j++) begin
      w0f[j] = rand_num(124, 6);
      w2f[j] = rand_num(124, 6);
      for (int i = 0; i < 4; i++) w1f[j][i] = rand_num(124, 6);
    end
    for (int p = 0; p < NPTS; p++) xs[p] = rand_num(122, 8);
    for (int s = 0; s < NSET; s++) begin
      // quantise the weights of each level by adding zero
      for (int j = 0; j < 4; j++) begin
        add_chk(w0f[j], num_t'(0), M0[s], EWS[s], w0[j]);
        add_chk(w2f[j], num_t'(0), M2[s], EWS[s], w2[j]);
        for (int i = 0; i < 4; i++) add_chk(w1f[j][i], num_t'(0), M1[s], EWS[s], w1[j][i]);
      end
      dev = 0.0;
      for (int p = 0; p < NPTS; p++) begin
        forward(xs[p], w0, w1, w2, M0[s], M1[s], M2[s], EWS[s], yo);
        if (s == 0) yref[p] = yo;
        dev += (to_real(yo) > to_real(yref[p])) ? to_real(yo) - to_real(yref[p])
                                                : to_real(yref[p]) - to_real(yo);
      end
      $display("m0=%0d m1=%0d m2=%0d e=%0d: mean |y - y24| = %e",
               M0[s], M1[s], M2[s], EWS[s], dev / NPTS);
    end
    checks++;
    if (n_switch == 0) begin
      failures++;
      $display("FAIL: the precision never changed");
    end
    $display("precision changes: %0d", n_switch);
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
