// tb_tfp_matmul: matrix-multiplication workload on the TFP adder.
//
// Multiplies two 10x10 matrices with 8-bit exponents at each significand
// precision m in {24, 20, 16, 14, 11, 8, 6}.  Matrix elements are random
// numbers of m significant bits; their products are formed by a behavioural
// TFP multiplier in this testbench (exact product rounded to nearest-even at
// m bits), and every dot product is accumulated by the adder, one addition
// after another.  Each partial sum is checked against the exact reference
// adder of tfp_tb_pkg, and the final matrices against a reference
// accumulation; the mean relative error against real (double) arithmetic is
// printed per precision for information.
module tb_tfp_matmul;
  import tfp_pkg::*;
  import tfp_tb_pkg::*;

  localparam int N = 10;
  localparam int NM = 7;
  localparam int M_LIST[NM] = '{24, 20, 16, 14, 11, 8, 6};

  logic       clk = 0, rst_n = 0, in_valid = 0, sub = 0;
  tfp_num_t   x, y, z;
  logic [4:0] m = 24;
  logic       out_valid, z_subn, z_infty;
  int checks = 0, failures = 0;

  tfp_add dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x), .y(y), .sub(sub),
               .m(m), .e_w(4'd8), .out_valid(out_valid), .z(z), .z_subn(z_subn), .z_infty(z_infty));

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

  // one addition through the pipeline
  task automatic dut_add(num_t a, num_t b, int mm, output num_t r);
    @(negedge clk);
    x = tfp_num_t'(a); y = tfp_num_t'(b); m = 5'(mm); in_valid = 1;
    @(negedge clk);
    in_valid = 0;
    @(posedge clk);
    #1;
    if (!out_valid) begin
      failures++;
      $display("FAIL: no result two cycles after the operation");
    end
    r = num_t'(z);
  endtask

  initial begin
    num_t A[N][N], B[N][N], acc, racc, prod, want;
    real  exact, err_sum;
    logic s_subn, s_inf;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int mi = 0; mi < NM; mi++) begin
      int mm;
      mm = M_LIST[mi];
      err_sum = 0.0;
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          A[i][j].sign = 1'($urandom); A[i][j].exp = 8'(120 + $urandom % 16);
          A[i][j].frac = rand_frac(mm);
          B[i][j].sign = 1'($urandom); B[i][j].exp = 8'(120 + $urandom % 16);
          B[i][j].frac = rand_frac(mm);
        end
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          acc = '0; racc = '0; exact = 0.0;
          for (int k = 0; k < N; k++) begin
            prod = tfp_mul(A[i][k], B[k][j], mm);
            exact += to_real(A[i][k]) * to_real(B[k][j]);
            want = ref_add(acc, prod, 1'b0, mm, 8, s_subn, s_inf);
            dut_add(acc, prod, mm, acc);
            racc = ref_add(racc, prod, 1'b0, mm, 8, s_subn, s_inf);
            checks++;
            if (acc != want) begin
              failures++;
              if (failures < 10) $display("FAIL: m=%0d C[%0d][%0d] k=%0d got %h want %h",
                                          mm, i, j, k, acc, want);
            end
          end
          checks++;
          if (acc != racc) failures++;
          if (exact != 0.0)
            err_sum += ((to_real(acc) - exact) / exact < 0) ? -(to_real(acc) - exact) / exact
                                                            : (to_real(acc) - exact) / exact;
        end
      $display("m=%0d: mean relative error of C %e", mm, err_sum / (N * N));
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
