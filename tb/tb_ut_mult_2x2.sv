// Self-checking testbench for ut_mult_2x2: applies all 4x4 operand
// pairs and compares the product with integer multiplication.
module tb_ut_mult_2x2;
  logic [1:0] a, b;
  logic [3:0] q;
  int checks = 0, failures = 0;

  ut_mult_2x2 dut (.a(a), .b(b), .q(q));

  task automatic apply(input logic [1:0] x, input logic [1:0] y);
    a = x; b = y;
    #1;
    checks++;
    if (int'(q) != int'(x) * int'(y)) begin
      failures++;
      if (failures < 10) $display("FAIL %0d * %0d gave %0d", x, y, q);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 4; x++)
      for (int y = 0; y < 4; y++)
        apply(2'(x), 2'(y));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
