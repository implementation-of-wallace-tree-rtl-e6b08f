// tb_pp_compress_stage: checks the 8:4 compression layer bit by bit.
//
// Three instances of the 12x12 layer: compressing every column (the default),
// compressing only the lower 12 columns, and compressing none (pure repacking).
// Each gets random bits inside the partial-product band of every row and random
// junk outside it, which must be ignored. The expected output is built here
// column by column by counting: the band bits of the column are taken in row order,
// each complete group of eight becomes the thermometer code of min(ones, 4) in the
// next four rows, leftovers follow in order, and every row above is zero. Also
// checks the number of output rows (8, 11 and 12) and counts groups that saturated
// and groups that were exact, both of which must occur.
module tb_pp_compress_stage;
  localparam int N  = 12;
  localparam int RA = 8;   // rows left when all columns are compressed
  localparam int RL = 11;  // rows left when columns 0..11 are compressed
  localparam int RN = 12;  // rows left without compression

  logic [2*N-1:0] pp [N];
  logic [2*N-1:0] rows_a [RA];
  logic [2*N-1:0] rows_l [RL];
  logic [2*N-1:0] rows_n [RN];
  int checks = 0, failures = 0;
  int n_sat = 0, n_exact_grp = 0;

  pp_compress_stage #(.N(N))                  dut_a (.pp(pp), .rows(rows_a));
  pp_compress_stage #(.N(N), .APPROX_COLS(N)) dut_l (.pp(pp), .rows(rows_l));
  pp_compress_stage #(.N(N), .APPROX_COLS(0)) dut_n (.pp(pp), .rows(rows_n));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected content of column c after compressing when c < approx
  function automatic logic [RN-1:0] expect_col(int c, int approx, bit count_groups);
    logic [RN-1:0] col = '0;
    logic [RN-1:0] bits = '0;
    int h = 0, r = 0, k = 0;
    for (int i = 0; i < N; i++)
      if (c - i >= 0 && c - i < N) begin
        bits[h] = pp[i][c];
        h++;
      end
    if (c < approx) begin
      while (h - k >= 8) begin
        int ones = 0;
        for (int j = 0; j < 8; j++) ones += int'(bits[k+j]);
        if (count_groups) begin
          if (ones > 4) n_sat++; else n_exact_grp++;
        end
        for (int j = 0; j < 4; j++) col[r+j] = (j < ones);
        r += 4;
        k += 8;
      end
    end
    while (k < h) begin
      col[r] = bits[k];
      r++;
      k++;
    end
    return col;
  endfunction

  initial begin
    checks++;
    if ($size(rows_a) != mult_pkg::max_cmp_height(N, 2*N) ||
        $size(rows_l) != mult_pkg::max_cmp_height(N, N) ||
        $size(rows_n) != mult_pkg::max_cmp_height(N, 0)) failures++;

    for (int t = 0; t < 3000; t++) begin
      // dense patterns early on so that saturation is certain to occur
      for (int i = 0; i < N; i++) begin
        pp[i] = (2*N)'($urandom());
        if (t < 4)      pp[i] = '1;
        else if (t < 8) pp[i] |= (2*N)'($urandom());
      end
      #1;
      for (int c = 0; c < 2*N; c++) begin
        logic [RN-1:0] ea, el, en, ga, gl, gn;
        ea = expect_col(c, 2*N, 1'b1);
        el = expect_col(c, N, 1'b0);
        en = expect_col(c, 0, 1'b0);
        ga = '0; gl = '0; gn = '0;
        for (int r = 0; r < RA; r++) ga[r] = rows_a[r][c];
        for (int r = 0; r < RL; r++) gl[r] = rows_l[r][c];
        for (int r = 0; r < RN; r++) gn[r] = rows_n[r][c];
        checks += 3;
        if (ga !== ea) begin
          failures++;
          if (failures < 10) $display("FAIL all-columns col %0d got %b expected %b", c, ga, ea);
        end
        if (gl !== el) begin
          failures++;
          if (failures < 10) $display("FAIL low-columns col %0d got %b expected %b", c, gl, el);
        end
        if (gn !== en) begin
          failures++;
          if (failures < 10) $display("FAIL no-compression col %0d got %b expected %b", c, gn, en);
        end
      end
    end
    $display("groups saturated=%0d exact=%0d", n_sat, n_exact_grp);
    checks++;
    if (n_sat == 0 || n_exact_grp == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
