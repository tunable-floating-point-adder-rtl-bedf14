// tb_tfp_add: end-to-end test of the two-stage TFP adder at its default
// configuration.
//
// Streams random additions and subtractions through the pipeline, one per
// cycle with random idle cycles, with a new random precision m (4..24) for
// most operations.  Operands have at most m significant bits and are drawn
// from scenarios that steer them to each part of the datapath: the CLOSE
// path (exponents at most one apart, effective subtraction), the FAR path
// with small and very large alignment, exponents near underflow and
// overflow, exponents near the limits of a narrower exponent range, zero
// operands, and conversions (a number of full binary32 precision plus zero,
// rounded to m bits).  Half of the operations use a random exponent range
// code (0..15, clamped to 5..8 by the adder), the rest the binary32 range.
// Each result is compared with an exact integer reference
// (tfp_tb_pkg::ref_add), and the latency of every result is checked to be
// two cycles.  The test also counts how often each
// mechanism of the design fired (CLOSE rounding and normalising shift,
// cancellation, FAR overflow and left shift, FAR round-up, sticky bit,
// flush to zero, infinity, a result outside a narrow exponent range, change
// of precision, conversion) and fails if one never did.
module tb_tfp_add;
  import tfp_pkg::*;
  import tfp_tb_pkg::*;

  localparam int N_OPS = 300000;

  logic          clk = 0;
  logic          rst_n = 0;
  logic          in_valid = 0;
  tfp_num_t      x, y, z;
  logic          sub;
  logic [4:0]    m;
  logic [3:0]    e_w;
  logic          out_valid, z_subn, z_infty;

  tfp_add dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x), .y(y), .sub(sub),
    .m(m), .e_w(e_w), .out_valid(out_valid), .z(z), .z_subn(z_subn), .z_infty(z_infty)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // expected results in issue order
  typedef struct {
    num_t   z, a, b;
    logic   sub;
    int     m, ew;
    logic   subn, infty;
    longint issued;
  } exp_t;
  exp_t q[$];

  // mechanism counters
  int n_close, n_close_rnd, n_close_shift, n_cancel;
  int n_far, n_ovf, n_sh1l, n_far_up, n_sticky;
  int n_subn, n_infty, n_mchange, n_conv, n_range;

  always @(posedge clk) begin
    if (rst_n && dut.v_q) begin
      if (dut.cls_q) begin
        n_close++;
        if (dut.u_close.rnd && dut.u_close.u) n_close_rnd++;
        if (!dut.u_close.rnd && dut.shamt != 0 && !dut.close_zero) n_close_shift++;
        if (dut.close_zero) n_cancel++;
      end else begin
        n_far++;
        if (dut.ovf) n_ovf++;
        if (dut.sh1l) n_sh1l++;
        if (dut.u_far.muxr) n_far_up++;
        if (dut.u_far.t_q) n_sticky++;
      end
      if (dut.subn) n_subn++;
      if (dut.infty) n_infty++;
      // out of a narrow exponent range but inside the binary32 one
      if ((dut.u_cdet.below || dut.u_cdet.above) && dut.m_sel[23] &&
          !dut.e_upd[9] && dut.e_upd >= 1 && dut.e_upd <= 254) n_range++;
    end
    if (rst_n && in_valid && (dut.u_dec.m_c != dut.u_dec.m_q)) n_mchange++;
  end

  // checker
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL: result with nothing outstanding");
      end else begin
        e = q.pop_front();
        if (z !== tfp_num_t'(e.z) || z_subn !== e.subn || z_infty !== e.infty ||
            (cycle - e.issued) != 2) begin
          failures++;
          if (failures < 10)
            $display("FAIL: %h %s %h m=%0d e=%0d: got %h subn=%0d inf=%0d exp %h subn=%0d inf=%0d lat=%0d",
                     e.a, e.sub ? "-" : "+", e.b, e.m, e.ew, z, z_subn, z_infty,
                     e.z, e.subn, e.infty, cycle - e.issued);
        end
      end
    end
  end

  task automatic gen_op(input int keep_m, output num_t a, output num_t b,
                        output logic s, output int mm, output int ewc);
    int sc, ea, eb;
    // keep the previous precision for a while now and then
    mm = ($urandom % 4 == 0) ? keep_m : 4 + int'($urandom % 21);
    // exponent range: binary32 half of the time, else any code 0..15
    ewc = ($urandom % 2) ? 8 : int'($urandom % 16);
    sc = $urandom % 10;
    a.sign = 1'($urandom); b.sign = 1'($urandom); s = 1'($urandom);
    ea = 1 + ($urandom % 254);
    case (sc)
      0, 1: begin                      // CLOSE: |D| <= 1, effective subtract
        eb = ea + int'($urandom % 3) - 1;
        b.sign = a.sign ^ s ^ 1'b1;
      end
      2, 3: eb = ea + int'($urandom % 61) - 30;     // FAR, moderate D
      4: eb = 1 + ($urandom % 254);                  // anything
      5: begin ea = 1 + ($urandom % 6); eb = 1 + ($urandom % 6); end
      6: begin ea = 248 + ($urandom % 7); eb = ea - int'($urandom % 4); end
      7: eb = ($urandom % 2) ? 0 : ea;               // zero or equal exps
      8: eb = 0;                       // conversion: full-precision a plus zero
      default: begin                   // near the limits of a narrow range
        ea = ($urandom % 2) ? 98 + int'($urandom % 20) : 140 + int'($urandom % 20);
        eb = ea + int'($urandom % 5) - 2;
      end
    endcase
    if (eb < 0) eb = 0;
    if (eb > 254) eb = 254;
    a.exp = 8'(ea); b.exp = 8'(eb);
    a.frac = rand_frac(mm); b.frac = rand_frac(mm);
    if (sc == 8) begin
      a.frac = 23'($urandom);
      if ($urandom % 4 == 0) a.frac = 23'($urandom) | 23'h7FFFFF >> ($urandom % 23);
      n_conv++;
    end
    if ($urandom % 2) begin num_t t = a; a = b; b = t; end
  endtask

  int mm_prev = 24;

  initial begin
    num_t a, b;
    logic s;
    int   mm, ewc, ew;
    exp_t e;
    x = '0; y = '0; sub = 0; m = 5'd24; e_w = 4'd8;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < N_OPS; i++) begin
      @(negedge clk);
      if ($urandom % 5 == 0) begin
        in_valid = 0;
        @(negedge clk);
      end
      gen_op(mm_prev, a, b, s, mm, ewc);
      mm_prev = mm;
      ew = (ewc < 5) ? 5 : (ewc > 8) ? 8 : ewc;
      x = tfp_num_t'(a); y = tfp_num_t'(b); sub = s; m = 5'(mm); e_w = 4'(ewc);
      in_valid = 1;
      e.z = ref_add(a, b, s, mm, ew, e.subn, e.infty);
      e.ew = ew;
      e.issued = cycle;
      e.a = a; e.b = b; e.sub = s; e.m = mm;
      q.push_back(e);
    end
    @(negedge clk);
    in_valid = 0;
    repeat (5) @(posedge clk);
    if (q.size() != 0) begin
      failures++;
      $display("FAIL: %0d results missing", q.size());
    end
    $display("mechanisms: close=%0d close_round_up=%0d close_shift=%0d cancel=%0d",
             n_close, n_close_rnd, n_close_shift, n_cancel);
    $display("            far=%0d ovf=%0d sh1l=%0d far_round_up=%0d sticky=%0d",
             n_far, n_ovf, n_sh1l, n_far_up, n_sticky);
    $display("            flush=%0d infinity=%0d m_change=%0d conversions=%0d narrow_range=%0d",
             n_subn, n_infty, n_mchange, n_conv, n_range);
    checks++;
    if (n_close == 0 || n_close_rnd == 0 || n_close_shift == 0 || n_cancel == 0 ||
        n_far == 0 || n_ovf == 0 || n_sh1l == 0 || n_far_up == 0 || n_sticky == 0 ||
        n_subn == 0 || n_infty == 0 || n_mchange == 0 || n_conv == 0 || n_range == 0) begin
      failures++;
      $display("FAIL: a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(N_OPS * 40 + 1000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
