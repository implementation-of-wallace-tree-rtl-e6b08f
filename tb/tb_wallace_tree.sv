// tb_wallace_tree: checks the carry-save tree at three sizes.
//
// Instances with 8 operands (the count left in the 12x12 multiplier), 12 operands
// (an uncompressed 12x12 matrix, five layers) and 3 operands (one layer). For random
// operands the two output words must add up to the sum of all operands modulo 2^W.
// Also checks the layer count of each instance against ceil(log1.5(n/2)).
module tb_wallace_tree;
  localparam int W = 24;
  logic [W-1:0] ops8 [8];
  logic [W-1:0] ops12 [12];
  logic [W-1:0] ops3 [3];
  logic [W-1:0] s8, c8, s12, c12, s3, c3;
  int checks = 0, failures = 0;

  wallace_tree #(.W(W), .NUM_OPS(8))  dut8  (.ops(ops8),  .sum(s8),  .carry(c8));
  wallace_tree #(.W(W), .NUM_OPS(12)) dut12 (.ops(ops12), .sum(s12), .carry(c12));
  wallace_tree #(.W(W), .NUM_OPS(3))  dut3  (.ops(ops3),  .sum(s3),  .carry(c3));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ceil_log15(real x);
    int k = 0;
    real v = 1.0;
    while (v < x) begin
      v = v * 1.5;
      k++;
    end
    return k;
  endfunction

  initial begin
    checks++;
    if (mult_pkg::csa_stages(12) != 5 || ceil_log15(6.0) != 5) failures++;
    checks++;
    if (mult_pkg::csa_stages(8) != 4 || ceil_log15(4.0) != 4) failures++;
    checks++;
    if (mult_pkg::csa_stages(3) != 1) failures++;
    for (int t = 0; t < 3000; t++) begin
      longint e8, e12, e3;
      e8 = 0; e12 = 0; e3 = 0;
      for (int k = 0; k < 8; k++) begin
        ops8[k] = (t == 0) ? '1 : W'($urandom);
        e8 += longint'(ops8[k]);
      end
      for (int k = 0; k < 12; k++) begin
        ops12[k] = (t == 0) ? '1 : W'($urandom);
        e12 += longint'(ops12[k]);
      end
      for (int k = 0; k < 3; k++) begin
        ops3[k] = (t == 0) ? '1 : W'($urandom);
        e3 += longint'(ops3[k]);
      end
      #1;
      checks += 3;
      if (longint'(W'(s8 + c8)) != e8 % (longint'(1) << W)) begin
        failures++;
        $display("FAIL 8 operands: got %h expected %h", W'(s8 + c8), W'(e8));
      end
      if (longint'(W'(s12 + c12)) != e12 % (longint'(1) << W)) begin
        failures++;
        $display("FAIL 12 operands: got %h expected %h", W'(s12 + c12), W'(e12));
      end
      if (longint'(W'(s3 + c3)) != e3 % (longint'(1) << W)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
