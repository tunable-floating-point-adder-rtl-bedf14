// tfp_pkg: widths, constants and shared types of the Tunable Floating-Point
// adder.
//
// The adder works on binary32 containers: a sign, an 8-bit biased exponent
// (bias 127) and a 23-bit stored fraction.  Significands carry their integer
// bit, so they are 24 bits wide (MW).  A precision m between M_MIN and MW
// selects how many significand bits, integer bit included, the result keeps;
// the numbers 24, 4 and 8 follow the document, the 5-bit width of m is the
// smallest that holds 24.  An exponent range code e between E_MIN (5) and
// EW (8) limits results to the range of an e-bit exponent, still stored
// with the binary32 bias; the 4-bit width of e is the smallest that holds 8.
//
// Bit frames used throughout (i = weight exponent, bit has weight 2^-i):
//   significand M[23:0]     : M[23-i], i = 0..23, M[23] is the integer bit
//   rounding word RW[23:0]  : RW[24-i], i = 1..24, one-hot at i = m (bit G)
//   MASK[23:0]              : same frame as M, ones for i < m
//   FAR sums S0/S1[25:0]    : S[24-i], i = -1..24 (bit 25 has weight 2)
package tfp_pkg;

  localparam int unsigned EW    = 8;          // exponent bits
  localparam int unsigned FW    = 23;         // stored fraction bits
  localparam int unsigned MW    = FW + 1;     // significand with integer bit
  localparam int unsigned M_MIN = 4;          // smallest precision
  localparam int unsigned PW    = 5;          // width of the precision code m
  localparam int unsigned DW    = EW + 1;     // signed exponent difference
  localparam int unsigned E_MIN = 5;          // narrowest exponent range
  localparam int unsigned QW    = 4;          // width of the range code e

  localparam logic [EW-1:0] EXP_MAX = '1;     // all-ones exponent: infinity

  // A number in the binary32 container.
  typedef struct packed {
    logic          sign;
    logic [EW-1:0] exp;
    logic [FW-1:0] frac;
  } tfp_num_t;

endpackage
