// tb_mult_accuracy: exhaustive accuracy run of the 12x12 approximate multiplier.
//
// Applies all 2^24 operand pairs to the default multiplier (every column
// compressed) and to a variant that compresses only the 12 least significant
// columns. Every product is checked against the counting model of the
// approximation (see tb_wallace_mult_8_4) and against the bound p <= a * b.
// Reports, per variant, the share of exact products, the mean and largest error
// distance, and the mean relative error distance (MRED) with the accuracy figure
// 100 * (1 - MRED) in percent.
module tb_mult_accuracy;
  localparam int N = 12;

  logic [N-1:0]   a, b;
  logic [2*N-1:0] p_all, p_low;
  int checks = 0, failures = 0;

  wallace_mult_8_4 dut_all (.a(a), .b(b), .p(p_all));
  wallace_mult_8_4 #(.APPROX_COLS(N)) dut_low (.a(a), .b(b), .p(p_low));

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint model(logic [N-1:0] av, logic [N-1:0] bv, int approx);
    longint total = 0;
    for (int c = 0; c < 2*N; c++) begin
      int colsum = 0, ones = 0, n = 0;
      for (int i = 0; i < N; i++)
        if (c - i >= 0 && c - i < N) begin
          ones += (av[c-i] & bv[i]) ? 1 : 0;
          n++;
          if (n == 8 && c < approx) begin
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

  typedef struct {
    longint n_exact;
    longint max_ed;
    real    sum_ed;
    real    sum_red;
  } stats_t;

  stats_t st_all, st_low;

  task automatic account(inout stats_t st, input longint got, input longint want,
                         input longint exact);
    longint ed;
    checks++;
    if (got != want || got > exact) begin
      failures++;
      if (failures < 10) $display("FAIL a=%0d b=%0d got %0d expected %0d", a, b, got, want);
    end
    ed = exact - got;
    if (ed == 0) st.n_exact++;
    if (ed > st.max_ed) st.max_ed = ed;
    st.sum_ed += real'(ed);
    if (exact != 0) st.sum_red += real'(ed) / real'(exact);
  endtask

  task automatic report(string name, stats_t st);
    real total, mred;
    total = real'(longint'(1) << (2*N));
    mred = st.sum_red / (total - real'(2 * (1 << N) - 1));
    $display("%s: exact %0.2f%%  mean error distance %0.2f  max error %0d  MRED %0.5f%%  accuracy %0.3f%%",
             name, 100.0 * real'(st.n_exact) / total, st.sum_ed / total, st.max_ed,
             100.0 * mred, 100.0 * (1.0 - mred));
  endtask

  initial begin
    st_all = '{0, 0, 0.0, 0.0};
    st_low = '{0, 0, 0.0, 0.0};
    for (int av = 0; av < (1 << N); av++)
      for (int bv = 0; bv < (1 << N); bv++) begin
        longint exact;
        a = N'(av);
        b = N'(bv);
        #1;
        exact = longint'(av) * longint'(bv);
        account(st_all, longint'(p_all), model(a, b, 2*N), exact);
        account(st_low, longint'(p_low), model(a, b, N), exact);
      end
    report("all columns compressed   ", st_all);
    report("low 12 columns compressed", st_low);
    checks++;
    if (st_all.n_exact == 0 || st_all.max_ed == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
