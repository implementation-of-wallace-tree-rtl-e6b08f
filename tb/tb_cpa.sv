// tb_cpa: checks the final carry-propagate adder, including the longest carry
// chain (all ones plus one) and the wrap-around of the carry out.
module tb_cpa;
  localparam int W = 24;
  logic [W-1:0] x, y, s;
  int checks = 0, failures = 0;

  cpa #(.W(W)) dut (.x(x), .y(y), .s(s));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input logic [W-1:0] xv, yv);
    longint e;
    x = xv; y = yv;
    #1;
    e = (longint'(xv) + longint'(yv)) % (longint'(1) << W);
    checks++;
    if (longint'(s) != e) begin
      failures++;
      $display("FAIL %h + %h = %h expected %h", xv, yv, s, e);
    end
  endtask

  initial begin
    check_one('1, 24'd1);
    check_one('1, '1);
    check_one('0, '0);
    check_one(24'h555555, 24'h2aaaab);
    for (int t = 0; t < 3000; t++) check_one(W'($urandom), W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
