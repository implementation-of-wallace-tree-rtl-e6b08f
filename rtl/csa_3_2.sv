// csa_3_2: carry-save adder, the 3:2 layer of a Wallace tree.
//
// A row of W full adders, one per bit position, adds three operands without
// propagating carries: s is the bitwise sum (x ^ y ^ z) and c the bitwise majority
// shifted one place to the left, so that s + c = x + y + z (mod 2^W). Where one of
// the three inputs is constant zero, as at the ragged edges of a partial-product
// matrix, the full adder reduces to a half adder after constant propagation.
// The three-in, two-out layer follows the design; dropping the carry out of the
// top bit (results are modulo 2^W) is this implementation's choice.
// Purely combinational.
module csa_3_2 #(
  parameter int W = 24  // operand width
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W-1:0] s,  // sum bits, same weight as the inputs
  output logic [W-1:0] c   // carry bits, already moved to the next weight
);

  logic [W-2:0] maj;  // the carry out of the top bit falls outside the word

  always_comb begin
    s   = x ^ y ^ z;
    maj = (x[W-2:0] & y[W-2:0]) | (x[W-2:0] & z[W-2:0]) | (y[W-2:0] & z[W-2:0]);
    c   = {maj, 1'b0};
  end

endmodule
