// compressor_8_4: approximate 8:4 compressor made only of AND and OR gates.
//
// Eight bits of one column weight go in, four bits of that same weight come out.
// The outputs are a thermometer code of the number of ones at the input, cut off at
// four: w[k] = 1 exactly when at least k+1 inputs are 1. Their sum is therefore
// min(popcount(p), 4): exact for up to four ones, too low by popcount-4 above that.
// Nothing is carried into the next column, so the cell needs no XOR gate and no
// carry chain; it only halves the height of a column.
//
// How it works: each half of the input is first sorted into a 4-bit thermometer by
// merging two sorted pairs. A pair (x, y) sorts to (x|y, x&y). Two sorted sequences
// A and B merge into the thermometer of their total by
//     t[k] = OR over i+j = k+1 of (A has >= i ones) AND (B has >= j ones),
// which is a sum of products of the sorted bits. The four-input stage is the sorted
// form of the 4:2 AND-OR cell, whose two outputs add up to min(popcount, 2); the
// eight-input cell does the same with twice the inputs and outputs.
//
// The AND-OR construction and the 8-in/4-out shape come from the design; the exact
// output function (a saturating count) is this implementation's reading of it.
// Purely combinational: no clock, no reset.
module compressor_8_4 (
  input  logic [7:0] p,  // eight bits of equal weight
  output logic [3:0] w   // four bits of the same weight, w[0] >= w[1] >= w[2] >= w[3]
);

  logic [1:0] pr [4];    // sorted pairs
  logic [3:0] qa, qb;    // sorted halves (thermometer codes)

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      pr[i][0] = p[2*i] | p[2*i+1];
      pr[i][1] = p[2*i] & p[2*i+1];
    end

    // merge pairs 0 and 1 into the lower half, 2 and 3 into the upper half
    qa[0] = pr[0][0] | pr[1][0];
    qa[1] = pr[0][1] | (pr[0][0] & pr[1][0]) | pr[1][1];
    qa[2] = (pr[0][1] & pr[1][0]) | (pr[0][0] & pr[1][1]);
    qa[3] = pr[0][1] & pr[1][1];

    qb[0] = pr[2][0] | pr[3][0];
    qb[1] = pr[2][1] | (pr[2][0] & pr[3][0]) | pr[3][1];
    qb[2] = (pr[2][1] & pr[3][0]) | (pr[2][0] & pr[3][1]);
    qb[3] = pr[2][1] & pr[3][1];

    // merge the halves, keeping only the four lowest thresholds
    w[0] = qa[0] | qb[0];
    w[1] = qa[1] | (qa[0] & qb[0]) | qb[1];
    w[2] = qa[2] | (qa[1] & qb[0]) | (qa[0] & qb[1]) | qb[2];
    w[3] = qa[3] | (qa[2] & qb[0]) | (qa[1] & qb[1]) | (qa[0] & qb[2]) | qb[3];
  end

endmodule
