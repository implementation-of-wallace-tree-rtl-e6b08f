// tb_wallace_mult_8_4: end-to-end test of the 12x12 approximate multiplier at its
// default parameters.
//
// Applies corner operands, then random operand pairs, a third of them dense (many
// ones, so that compressor groups overflow). The expected product is computed here
// from the definition of the approximation rather than from the circuit: for every
// column the partial-product bits are taken in row order, each complete group of
// eight contributes min(ones, 4) and every other bit contributes itself, all at the
// column's weight. Checks for each pair:
//   - the product equals that model,
//   - it never exceeds the exact product a * b,
//   - it equals a * b whenever no group of eight held more than four ones.
// Counts how often each mechanism happened and fails if one never did: a compressor
// group saturating (product below a * b), every group staying exact although
// compressors were in use, and a carry in the final adder rippling across 8 or more
// bit positions.
module tb_wallace_mult_8_4;
  localparam int N = 12;
  localparam int A = 2 * N;  // the top's default: every column compressed

  logic [N-1:0]   a, b;
  logic [2*N-1:0] p;
  int checks = 0, failures = 0;
  int n_saturated = 0, n_exact = 0, n_long_carry = 0;

  wallace_mult_8_4 dut (.a(a), .b(b), .p(p));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model of the approximate product; sat is set when a group overflowed
  function automatic longint model(logic [N-1:0] av, logic [N-1:0] bv, output bit sat);
    longint total = 0;
    sat = 1'b0;
    for (int c = 0; c < 2*N; c++) begin
      int colsum = 0, ones = 0, n = 0;
      for (int i = 0; i < N; i++)
        if (c - i >= 0 && c - i < N) begin
          int bitv;
          bitv = (av[c-i] & bv[i]) ? 1 : 0;
          ones += bitv;
          n++;
          if (n == 8 && c < A) begin
            if (ones > 4) sat = 1'b1;
            colsum += (ones > 4) ? 4 : ones;
            ones = 0;
            n = 0;
          end
        end
      colsum += ones;
      total += longint'(colsum) << c;
    end
    return total;
  endfunction

  // longest run of positions in which the final adder propagates a carry
  function automatic int longest_carry(logic [2*N-1:0] x, logic [2*N-1:0] y);
    int run = 0, best = 0;
    logic cy = 1'b0;
    for (int i = 0; i < 2*N; i++) begin
      cy = (x[i] & y[i]) | (cy & (x[i] ^ y[i]));
      run = cy ? run + 1 : 0;
      if (run > best) best = run;
    end
    return best;
  endfunction

  task automatic check_one(input logic [N-1:0] av, input logic [N-1:0] bv);
    longint e, exact;
    bit sat;
    a = av; b = bv;
    #1;
    e = model(av, bv, sat);
    exact = longint'(av) * longint'(bv);
    checks++;
    if (longint'(p) != e) begin
      failures++;
      if (failures < 10) $display("FAIL a=%0d b=%0d p=%0d expected %0d", av, bv, p, e);
    end
    checks++;
    if (longint'(p) > exact) failures++;
    checks++;
    if (!sat && longint'(p) != exact) failures++;
    if (sat) n_saturated++;
    else if (av != 0 && bv != 0 && N >= 8) n_exact++;
    if (longest_carry(dut.sum_row, dut.carry_row) >= 8) n_long_carry++;
  endtask

  initial begin
    check_one('0, '0);
    check_one('1, '1);
    check_one('1, 12'd1);
    check_one(12'd1, '1);
    check_one(12'h800, 12'h800);
    for (int t = 0; t < 100000; t++) begin
      logic [N-1:0] av, bv;
      av = N'($urandom());
      bv = N'($urandom());
      if (t % 3 == 0) begin
        av |= N'($urandom());
        bv |= N'($urandom());
      end
      check_one(av, bv);
    end
    $display("saturated=%0d exact=%0d long_carry=%0d", n_saturated, n_exact, n_long_carry);
    checks++;
    if (n_saturated == 0) begin
      failures++;
      $display("FAIL no compressor group ever saturated");
    end
    checks++;
    if (n_exact == 0) begin
      failures++;
      $display("FAIL no product was exact");
    end
    checks++;
    if (n_long_carry == 0) begin
      failures++;
      $display("FAIL no long carry chain in the final adder");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
