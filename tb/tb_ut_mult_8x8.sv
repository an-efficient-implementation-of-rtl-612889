// Self-checking testbench for ut_mult_8x8: applies all 256x256 operand
// pairs and compares the product with integer multiplication. For the
// operand pair printed in the published waveform it also checks the internal
// partial products and first adder sum printed there.
module tb_ut_mult_8x8;
  logic [7:0] a, b;
  logic [15:0] m;
  int checks = 0, failures = 0;

  ut_mult_8x8 dut (.a(a), .b(b), .m(m));

  task automatic apply(input logic [7:0] x, input logic [7:0] y);
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
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++)
        apply(8'(x), 8'(y));
    // operands and product printed in the published 8x8 simulation waveform
    apply(8'b10100110, 8'b00011110);
    checks++;
    if (m !== 16'b0001001101110100) begin failures++; $display("FAIL waveform vector"); end
    // internal values printed in the same waveform: the four 4x4 products and
    // the 9-bit sum of the first 8-bit adder
    checks++;
    if (dut.q0 !== 8'b01010100 || dut.q1 !== 8'b10001100 || dut.q2 !== 8'b00000110 ||
        dut.q3 !== 8'b00001010 || dut.r !== 9'b010010010) begin
      failures++;
      $display("FAIL waveform internals q0=%b q1=%b q2=%b q3=%b r=%b",
               dut.q0, dut.q1, dut.q2, dut.q3, dut.r);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
