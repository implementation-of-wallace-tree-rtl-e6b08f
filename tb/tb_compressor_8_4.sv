// tb_compressor_8_4: exhaustive test of the 8:4 AND-OR compressor.
//
// Applies all 256 input patterns. For each, the expected output is the thermometer
// code of min(popcount, 4), worked out here by counting ones; the test also checks
// that the four outputs add up to the saturated count and are ordered w0 >= w1 >= ...
// Counts how many patterns are compressed exactly (<= 4 ones) and how many saturate.
module tb_compressor_8_4;
  logic [7:0] p;
  logic [3:0] w;
  int checks = 0, failures = 0;
  int n_exact = 0, n_sat = 0;

  compressor_8_4 dut (.p(p), .w(w));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      int ones, sat;
      logic [3:0] exp_w;
      p = 8'(v);
      #1;
      ones = 0;
      for (int k = 0; k < 8; k++) ones += v[k];
      sat = (ones > 4) ? 4 : ones;
      for (int k = 0; k < 4; k++) exp_w[k] = (k < sat);
      if (ones > 4) n_sat++; else n_exact++;
      checks++;
      if (w !== exp_w) begin
        failures++;
        $display("FAIL p=%08b w=%04b expected %04b", p, w, exp_w);
      end
      checks++;
      if (int'(w[0]) + int'(w[1]) + int'(w[2]) + int'(w[3]) != sat) failures++;
    end
    checks++;
    if (n_exact != 163 || n_sat != 93) failures++;  // 1+8+28+56+70 and 56+28+8+1
    $display("exact patterns=%0d saturating patterns=%0d", n_exact, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
