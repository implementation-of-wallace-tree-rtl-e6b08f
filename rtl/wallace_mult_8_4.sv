// wallace_mult_8_4: unsigned N x N approximate Wallace tree multiplier with 8:4
// compressors (N = 12 by default).
//
// Four parts in a row, all combinational:
//   1. partial_product_gen forms the N shifted partial-product rows (an AND array).
//   2. pp_compress_stage replaces each group of eight bits in a column by the four
//      outputs of an AND-OR compressor_8_4, cutting the 12 rows of a 12x12 product
//      to 8. This is where the multiplier becomes approximate.
//   3. wallace_tree adds those rows with layers of 3:2 carry-save adders
//      (8 -> 6 -> 4 -> 3 -> 2 for N = 12) down to two rows.
//   4. cpa adds the last two rows into the 2N-bit product.
// The result never exceeds the exact product a * b; it equals it whenever no group
// of eight bits fed to a compressor holds more than four ones.
//
// Interface: a and b are applied, p is valid one combinational delay later; there
// is no clock and no reset. The structure (partial products, 8:4 compressors in
// place of the first adder layers, Wallace carry-save tree, carry-propagate adder)
// and the 12x12 size follow the design; compressing every column
// (APPROX_COLS = 2N) and the row grouping are this implementation's choices.
module wallace_mult_8_4
  import mult_pkg::*;
#(
  parameter  int N           = 12,   // operand width
  parameter  int APPROX_COLS = 2*N,  // least significant columns that get 8:4 compressors
  localparam int R           = max_cmp_height(N, APPROX_COLS)
) (
  input  logic [N-1:0]   a,  // multiplicand
  input  logic [N-1:0]   b,  // multiplier
  output logic [2*N-1:0] p   // approximate product
);

  logic [2*N-1:0] pp   [N];
  logic [2*N-1:0] rows [R];
  logic [2*N-1:0] sum_row, carry_row;

  partial_product_gen #(.N(N)) u_ppg (.a(a), .b(b), .pp(pp));

  pp_compress_stage #(.N(N), .APPROX_COLS(APPROX_COLS)) u_cmp (.pp(pp), .rows(rows));

  wallace_tree #(.W(2*N), .NUM_OPS(R)) u_tree (.ops(rows), .sum(sum_row), .carry(carry_row));

  cpa #(.W(2*N)) u_cpa (.x(sum_row), .y(carry_row), .s(p));

endmodule
