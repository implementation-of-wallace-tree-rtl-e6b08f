// mult_pkg: shape of the partial-product matrix of the approximate 8:4-compressor
// Wallace tree multiplier, shared by its modules.
//
// All sizes of the multiplier follow from the operand width N and from how many of
// the least significant columns are compressed (APPROX_COLS). The functions below are
// evaluated at elaboration time to size arrays and to place compressors and
// carry-save adders; none of them becomes hardware.
//
// Column c of an unsigned N x N multiplication holds the bits a[c-i] & b[i] for the
// rows i = pp_first_row .. pp_first_row + pp_height - 1. An 8:4 compressor turns each
// group of eight bits of a column into four bits of the same column; the leftover
// bits (fewer than eight) pass unchanged. The carry-save tree then reduces a set of
// operands by a factor of about 1.5 per layer: three operands become two.
package mult_pkg;

  // Inputs and outputs of one 8:4 compressor.
  localparam int COMP_IN  = 8;
  localparam int COMP_OUT = 4;

  // Index of the first partial-product row that has a bit in column c.
  function automatic int pp_first_row(int n, int c);
    return (c - n + 1 > 0) ? c - n + 1 : 0;
  endfunction

  // Number of partial-product bits in column c (0 outside 0 .. 2n-2).
  function automatic int pp_height(int n, int c);
    int hi;
    if (c < 0 || c > 2 * n - 2) return 0;
    hi = (c < n - 1) ? c : n - 1;
    return hi - pp_first_row(n, c) + 1;
  endfunction

  // Number of 8:4 compressors placed in column c.
  function automatic int comp_count(int n, int approx_cols, int c);
    return (c < approx_cols) ? pp_height(n, c) / COMP_IN : 0;
  endfunction

  // Height of column c after the compression layer.
  function automatic int cmp_height(int n, int approx_cols, int c);
    return pp_height(n, c) - comp_count(n, approx_cols, c) * (COMP_IN - COMP_OUT);
  endfunction

  // Tallest column after compression: the number of rows fed to the Wallace tree.
  function automatic int max_cmp_height(int n, int approx_cols);
    int m = 1;
    for (int c = 0; c < 2 * n; c++)
      if (cmp_height(n, approx_cols, c) > m) m = cmp_height(n, approx_cols, c);
    return m;
  endfunction

  // Number of operands left after `stages` layers of 3:2 carry-save adders.
  function automatic int csa_ops_after(int n_ops, int stages);
    int n = n_ops;
    for (int s = 0; s < stages; s++) n = 2 * (n / 3) + n % 3;
    return n;
  endfunction

  // Number of carry-save layers needed to reach two operands.
  function automatic int csa_stages(int n_ops);
    int n = n_ops;
    int s = 0;
    while (n > 2) begin
      n = 2 * (n / 3) + n % 3;
      s++;
    end
    return s;
  endfunction

endpackage
