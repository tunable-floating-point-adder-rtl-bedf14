// tfp_tb_pkg: reference arithmetic for the TFP adder testbenches.
//
// Works on exact integers, independently of the adder's structure: the
// operands are placed in a 128-bit frame with 64 bits below their least
// significant bit, the smaller one is aligned with a sticky bit for anything
// shifted further, the signed sum is formed, and the magnitude is rounded
// to nearest-even at m bits.  Also provides operand generators that give
// significands of at most m bits.
package tfp_tb_pkg;

  localparam int FRAME = 128;
  localparam int LOW   = 64;     // fraction bits kept below the operand LSB

  typedef logic [FRAME-1:0] wide_t;

  // Position of the leading one of v, -1 when v is zero.
  function automatic int lead_one(wide_t v);
    int p = -1;
    for (int i = 0; i < FRAME; i++) if (v[i]) p = i;
    return p;
  endfunction

  // Round v to m significant bits, ties to even.  Returns the 24-bit
  // significand (integer bit on top, bits below the m-th zero) and the
  // position of its leading one in v's frame (one higher when rounding
  // carried out of the top).
  function automatic void round_m(input wide_t v, input int m,
                                  output logic [23:0] sig, output int pos);
    int    p;
    wide_t keep, rest, half, q;
    p = lead_one(v);
    if (p < 0) begin
      sig = '0; pos = -1; return;
    end
    if (p - m + 1 <= 0) begin
      // fewer bits than m: exact
      q = v << (m - 1 - p);
      sig = 24'(q << (24 - m));
      pos = p;
      return;
    end
    keep = v >> (p - m + 1);                 // m bits
    rest = v & ((wide_t'(1) << (p - m + 1)) - 1);
    half = wide_t'(1) << (p - m);
    if (rest > half || (rest == half && keep[0])) keep = keep + 1;
    pos = p;
    if (keep[m]) begin
      keep = keep >> 1;
      pos  = p + 1;
    end
    sig = 24'(keep << (24 - m));
  endfunction

  // Align an operand of significand sig, exponent e to exponent emax in the
  // wide frame; bits shifted beyond the frame leave a sticky 1.
  function automatic wide_t align(logic [23:0] sig, int e, int emax);
    wide_t v = wide_t'(sig) << LOW;
    int    sh = emax - e;
    wide_t o;
    if (sh == 0) return v;
    if (sh >= LOW + 24) return (sig != 0) ? wide_t'(1) : '0;
    o = v >> sh;
    if ((o << sh) != v) o[0] = 1'b1;
    return o;
  endfunction

  typedef struct packed {
    logic       sign;
    logic [7:0] exp;
    logic [22:0] frac;
  } num_t;

  // Reference result of x + (-1)^sub y at precision m, flush-to-zero,
  // overflow to infinity, exact cancellation to +0.  ew (5..8) is the
  // exponent width: an ew-bit exponent of bias 2^(ew-1)-1 holds the stored
  // (bias 127) exponents 128-bias .. 127+bias.
  function automatic num_t ref_add(num_t x, num_t y, logic sub, int m, int ew,
                                   output logic subn, output logic infty);
    logic [23:0] mx, my, sig;
    int          ex, ey, emax, pos, e, bias;
    logic        sy;
    wide_t       a, b, mag;
    logic        neg;
    num_t        z;
    mx = (x.exp != 0) ? {1'b1, x.frac} : '0;
    my = (y.exp != 0) ? {1'b1, y.frac} : '0;
    ex = int'(x.exp); ey = int'(y.exp);
    sy = y.sign ^ sub;
    emax = (ex > ey) ? ex : ey;
    a = align(mx, ex, emax);
    b = align(my, ey, emax);
    subn = 0; infty = 0;
    if (x.sign == sy) begin
      mag = a + b; neg = x.sign;
    end else if (a >= b) begin
      mag = a - b; neg = x.sign;
    end else begin
      mag = b - a; neg = sy;
    end
    z.sign = neg;
    if (mag == 0) begin
      z.exp = 0; z.frac = 0; subn = 1;
      if (!(x.sign == 1 && sy == 1)) z.sign = 0;
      return z;
    end
    round_m(mag, m, sig, pos);
    e = emax + (pos - (LOW + 23));
    bias = (1 << (ew - 1)) - 1;
    if (e < 128 - bias) begin
      z.exp = 0; z.frac = 0; subn = 1;
    end else if (e > 127 + bias) begin
      z.exp = 8'hFF; z.frac = 0; infty = 1;
    end else begin
      z.exp = 8'(e); z.frac = sig[22:0];
    end
    return z;
  endfunction

  // Random significand (integer bit set) with at most m significant bits.
  function automatic logic [22:0] rand_frac(int m);
    logic [22:0] f = 23'($urandom);
    // special patterns now and then: all ones, all zeros
    case ($urandom % 8)
      0: f = '0;
      1: f = '1;
      default: ;
    endcase
    return f & ~(23'h7FFFFF >> (m - 1));
  endfunction

endpackage
