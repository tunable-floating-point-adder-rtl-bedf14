// tfp_ca_adder: carry-around (end-around-carry) adder with bit inversion.
//
// The CLOSE path subtracts without first deciding which operand is larger.
// It always complements the same operand, adds in one's complement and then
// fixes the sign of the result:
//   sum  = x + yc, with the carry out of the top bit added back at the LSB
//   neg  = no carry out (the difference x - y was negative or zero)
//   s    = neg ? ~sum : sum          (the "bit invert" XOR array)
// With yc = ~y this gives s = |x - y| and neg = (x <= y); an exact
// cancellation gives s = 0 with neg = 1.  Structure as in the document; the
// end-around carry is written as a second addition of the carry bit.
//
// Combinational; W is the operand width (25 in the CLOSE path).
module tfp_ca_adder #(
  parameter int unsigned W = 25
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] yc,     // already one's-complemented operand
  output logic [W-1:0] s,      // magnitude of x - y
  output logic         neg     // x - y <= 0
);

  logic [W:0]   raw;
  logic [W-1:0] sum;

  assign raw = {1'b0, x} + {1'b0, yc};
  assign sum = raw[W-1:0] + W'(raw[W]);
  assign neg = ~raw[W];
  assign s   = sum ^ {W{neg}};

endmodule
