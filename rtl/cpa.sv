// cpa: final carry-propagate adder of the multiplier.
//
// Adds the two rows left by the carry-save tree into the product, modulo 2^W. The
// adder architecture is left to synthesis (ripple, carry-lookahead or a prefix
// adder, as the target favours); the design only requires a carry-propagate adder
// at this point. Purely combinational.
module cpa #(
  parameter int W = 24  // operand and result width
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  output logic [W-1:0] s   // x + y, carry out of bit W-1 dropped
);

  assign s = x + y;

endmodule
