// tb_partial_product_gen: checks the AND array of the 12x12 multiplier.
//
// Drives random operand pairs plus the corner values 0 and all ones. Each row must
// equal a * b[i] * 2^i (computed with the simulator's multiplier) and the rows must
// add up to a * b.
module tb_partial_product_gen;
  localparam int N = 12;
  logic [N-1:0]   a, b;
  logic [2*N-1:0] pp [N];
  int checks = 0, failures = 0;

  partial_product_gen #(.N(N)) dut (.a(a), .b(b), .pp(pp));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input logic [N-1:0] av, input logic [N-1:0] bv);
    longint total;
    a = av; b = bv;
    #1;
    total = 0;
    for (int i = 0; i < N; i++) begin
      longint exp_row;
      exp_row = longint'(av) * longint'(bv[i]) << i;
      checks++;
      if (longint'(pp[i]) != exp_row) begin
        failures++;
        $display("FAIL a=%0d b=%0d row %0d = %h expected %h", av, bv, i, pp[i], exp_row);
      end
      total += longint'(pp[i]);
    end
    checks++;
    if (total != longint'(av) * longint'(bv)) failures++;
  endtask

  initial begin
    check_one('0, '0);
    check_one('1, '1);
    check_one('1, 12'h001);
    check_one(12'h801, '1);
    for (int t = 0; t < 2000; t++) check_one(N'($urandom), N'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
