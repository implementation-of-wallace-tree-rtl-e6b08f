// pp_compress_stage: the 8:4 compression layer of the multiplier.
//
// Works column by column on the partial-product matrix. In each of the
// APPROX_COLS least significant columns, the bits are taken in row order and every
// complete group of eight goes through a compressor_8_4, which returns four bits of
// the same weight; the fewer than eight bits left over pass unchanged. Columns at or
// above APPROX_COLS pass unchanged. The surviving bits of each column are then
// packed from row 0 upwards (compressor outputs first, leftovers after them) into
// R = mult_pkg::max_cmp_height(N, APPROX_COLS) rows; positions above a column's new
// height are zero.
//
// For N = 12 and compression in all columns, columns 7 to 15 hold eight or more
// bits, and the tallest column (11, twelve bits) drops to eight, so eight rows go on
// to the carry-save tree instead of twelve. The result is approximate: a group of
// eight with more than four ones loses the excess at that column's weight, so the
// product is never too high. Replacing the adder stages with 8:4 compressors follows
// the design; the grouping, packing and the choice of columns are this
// implementation's. Purely combinational.
module pp_compress_stage
  import mult_pkg::*;
#(
  parameter  int N           = 12,   // operand width
  parameter  int APPROX_COLS = 2*N,  // columns 0 .. APPROX_COLS-1 are compressed
  localparam int R           = max_cmp_height(N, APPROX_COLS)
) (
  input  logic [2*N-1:0] pp   [N],   // partial-product rows (bits outside each row's band ignored)
  output logic [2*N-1:0] rows [R]    // compressed rows
);

  for (genvar c = 0; c < 2*N; c++) begin : g_col
    localparam int H  = pp_height(N, c);
    localparam int LO = pp_first_row(N, c);
    localparam int G  = comp_count(N, APPROX_COLS, c);
    localparam int HC = cmp_height(N, APPROX_COLS, c);

    logic [R-1:0] col;  // column c after compression, bit r goes to row r

    for (genvar g = 0; g < G; g++) begin : g_cmp
      logic [COMP_IN-1:0] grp;
      for (genvar k = 0; k < COMP_IN; k++) begin : g_bit
        assign grp[k] = pp[LO + COMP_IN*g + k][c];
      end
      compressor_8_4 u_cmp (.p(grp), .w(col[COMP_OUT*g +: COMP_OUT]));
    end

    for (genvar k = COMP_IN*G; k < H; k++) begin : g_left
      assign col[COMP_OUT*G + k - COMP_IN*G] = pp[LO + k][c];
    end

    for (genvar r = HC; r < R; r++) begin : g_empty
      assign col[r] = 1'b0;
    end

    for (genvar r = 0; r < R; r++) begin : g_row
      assign rows[r][c] = col[r];
    end
  end

endmodule
