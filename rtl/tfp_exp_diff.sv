// tfp_exp_diff: exponent difference, path selection and larger exponent.
//
// Computes D = Ex - Ey on biased exponents.  sign_d is set when Ey > Ex,
// d_abs is |D|, d_one flags |D| = 1.  The larger exponent is picked by the
// 2:1 mux steered by sign_d (Ex on 0, Ey on 1).  The CLOSE path is chosen
// when the effective operation is a subtraction and |D| is 0 or 1:
//   CLS = EOP and ((D = 1) or (D = 0)),
// and the FAR path otherwise; both follow the document.
//
// Purely combinational, part of stage 1.
module tfp_exp_diff
  import tfp_pkg::*;
(
  input  logic [EW-1:0] ex,
  input  logic [EW-1:0] ey,
  input  logic          eop,       // 1: effective subtraction
  output logic          sign_d,    // Ey > Ex
  output logic [EW-1:0] d_abs,     // |Ex - Ey|
  output logic          d_one,     // |D| = 1
  output logic          cls,       // take the CLOSE path
  output logic [EW-1:0] emax       // exponent of the larger operand
);

  logic [DW-1:0] d;

  assign d      = {1'b0, ex} - {1'b0, ey};
  assign sign_d = d[DW-1];
  assign d_abs  = sign_d ? EW'(-d) : d[EW-1:0];
  assign d_one  = (d_abs == EW'(1));
  assign cls    = eop && (d_abs <= EW'(1));
  assign emax   = sign_d ? ey : ex;

endmodule
