// Self-checking testbench for ut_mult_4x4: applies all 16x16 operand
// pairs and compares the product with integer multiplication. For the
// operand pair printed in the published waveform it also checks the internal
// partial products and first adder sum printed there.
module tb_ut_mult_4x4;
  logic [3:0] a, b;
  logic [7:0] m;
  int checks = 0, failures = 0;

  ut_mult_4x4 dut (.a(a), .b(b), .m(m));

  task automatic apply(input logic [3:0] x, input logic [3:0] y);
    a = x; b = y;
    #1;
    checks++;
    if (int'(m) != int'(x) * int'(y)) begin
      failures++;
      if (failures < 10) $display("FAIL %0d * %0d gave %0d", x, y, m);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 16; x++)
      for (int y = 0; y < 16; y++)
        apply(4'(x), 4'(y));
    // operands and product printed in the published 4x4 simulation waveform
    apply(4'b1111, 4'b1110);
    checks++;
    if (m !== 8'b11010010) begin failures++; $display("FAIL waveform vector"); end
    // internal values printed in the same waveform: the four 2x2 products and
    // the 5-bit result of the first 4-bit adder
    checks++;
    if (dut.q0 !== 4'b0110 || dut.q1 !== 4'b0110 || dut.q2 !== 4'b1001 ||
        dut.q3 !== 4'b1001 || dut.x !== 5'b00111) begin
      failures++;
      $display("FAIL waveform internals q0=%b q1=%b q2=%b q3=%b x=%b",
               dut.q0, dut.q1, dut.q2, dut.q3, dut.x);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
