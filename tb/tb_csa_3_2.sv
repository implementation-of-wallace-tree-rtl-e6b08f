// tb_csa_3_2: checks the carry-save adder on random and corner operands.
//
// The sum word must be the bitwise sum of the three inputs, the carry word the
// bitwise majority moved up one place, and sum + carry must equal x + y + z
// modulo 2^W.
module tb_csa_3_2;
  localparam int W = 24;
  logic [W-1:0] x, y, z, s, c;
  int checks = 0, failures = 0;

  csa_3_2 #(.W(W)) dut (.x(x), .y(y), .z(z), .s(s), .c(c));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input logic [W-1:0] xv, yv, zv);
    logic [W-1:0] es, ec;
    x = xv; y = yv; z = zv;
    #1;
    for (int i = 0; i < W; i++) begin
      logic [1:0] n;
      n = {1'b0, xv[i]} + {1'b0, yv[i]} + {1'b0, zv[i]};
      es[i] = n[0];
      if (i + 1 < W) ec[i+1] = n[1];
    end
    ec[0] = 1'b0;
    checks++;
    if (s !== es || c !== ec) begin
      failures++;
      $display("FAIL x=%h y=%h z=%h s=%h c=%h expected %h %h", xv, yv, zv, s, c, es, ec);
    end
    checks++;
    if (W'(s + c) !== W'(xv + yv + zv)) failures++;
  endtask

  initial begin
    check_one('0, '0, '0);
    check_one('1, '1, '1);
    check_one('1, '0, '1);
    for (int t = 0; t < 3000; t++) check_one(W'($urandom), W'($urandom), W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
