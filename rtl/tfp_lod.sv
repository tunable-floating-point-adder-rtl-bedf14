// tfp_lod: leading-one detector of the CLOSE path.
//
// Returns in shamt the number of zeros above the most-significant one of s,
// which is the left shift that normalises s, and flags an all-zero input.
// For an all-zero input shamt is W.  Written as a priority scan from the
// LSB up, so the last (highest) one found wins.  The document gives only the
// function of this block.
//
// Combinational; W is the input width (25 in the CLOSE path), SW the width
// of the shift amount (5 in the document's figure).
module tfp_lod #(
  parameter int unsigned W  = 25,
  parameter int unsigned SW = 5
) (
  input  logic [W-1:0]  s,
  output logic [SW-1:0] shamt,
  output logic          zero
);

  always_comb begin
    shamt = SW'(W);
    for (int i = 0; i < W; i++) begin
      if (s[i]) shamt = SW'(W - 1 - i);
    end
  end

  assign zero = (s == '0);

endmodule
