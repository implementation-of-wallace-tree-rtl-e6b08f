// partial_product_gen: AND array of an unsigned N x N multiplier.
//
// Row i is the multiplicand gated by multiplier bit i and shifted left by i places,
// as a 2N-bit word: pp[i] = (a & {N{b[i]}}) << i. The sum of the N rows is a * b.
// Column c of the matrix therefore holds a[c-i] & b[i] for every row i that reaches
// it; the bits outside the N-bit wide band of each row are constant zero.
// Unsigned operands follow the design; N = 12 is its main size.
// Purely combinational.
module partial_product_gen #(
  parameter int N = 12  // operand width
) (
  input  logic [N-1:0]   a,       // multiplicand
  input  logic [N-1:0]   b,       // multiplier
  output logic [2*N-1:0] pp [N]   // shifted partial-product rows
);

  always_comb begin
    for (int i = 0; i < N; i++)
      pp[i] = (2*N)'(a & {N{b[i]}}) << i;
  end

endmodule
