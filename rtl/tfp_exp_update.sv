// tfp_exp_update: exponent update after normalisation.
//
// The result exponent starts as the larger operand exponent and is then
// corrected by the normalisation of whichever path produced the result:
//   CLOSE path: minus SHAMT, the left shift found by the leading-one
//               detector;
//   FAR path:   plus one on overflow (OVF), minus one on a one-bit left
//               shift (SH1L).
// The document gives this function; the adder/subtracter is the simplest
// form of it.  The output is a signed value two bits wider than the
// exponent, so that the condition detector can see both underflow (<= 0)
// and overflow (>= 255).
//
// Combinational, stage 2.
module tfp_exp_update
  import tfp_pkg::*;
(
  input  logic [EW-1:0]   emax,
  input  logic            cls,
  input  logic [4:0]      shamt,
  input  logic            ovf,
  input  logic            sh1l,
  output logic [EW+1:0]   e_upd    // signed
);

  always_comb begin
    if (cls) e_upd = {2'b00, emax} - (EW+2)'(shamt);
    else     e_upd = {2'b00, emax} + (EW+2)'(ovf) - (EW+2)'(sh1l);
  end

endmodule
