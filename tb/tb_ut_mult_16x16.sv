// End-to-end testbench for the 16x16 multiplier at its default parameters.
// Drives corner operands, the operand pair printed in the published 16x16
// waveform (with the internal partial products printed there), operand
// pairs that make both middle-adder carries 1, every multiplicand against
// 0xFFFF and 0xA5C3 (and 0xFFFF against every multiplier), and 4,000,000
// random pairs, and compares y with 64-bit integer multiplication.
// An independent model of the byte-wise decomposition predicts the two
// middle carries C1 (q1 + q2 overflows) and C2 (lower adder overflows) for
// every vector; the test counts how often each carry situation occurred
// (neither, C1 only, C2 only, both) and fails if any of them never did, so
// the carry merge into the top byte is exercised in every case.
module tb_ut_mult_16x16;
  logic [15:0] a, b;
  logic [31:0] y;
  int checks = 0, failures = 0;
  int seen_none = 0, seen_c1 = 0, seen_c2 = 0, seen_both = 0;

  ut_mult_16x16 dut (.a(a), .b(b), .y(y));

  task automatic apply(input logic [15:0] x, input logic [15:0] z);
    longint q0, q1, q2, q3, s1, s2, exp_v;
    bit c1, c2;
    a = x; b = z;
    #1;
    q0 = longint'(x[7:0])  * longint'(z[7:0]);
    q1 = longint'(x[7:0])  * longint'(z[15:8]);
    q2 = longint'(x[15:8]) * longint'(z[7:0]);
    q3 = longint'(x[15:8]) * longint'(z[15:8]);
    s1 = q1 + q2;
    c1 = s1 >= 65536;
    s2 = (s1 % 65536) + (q3 % 256) * 256 + q0 / 256;
    c2 = s2 >= 65536;
    case ({c1, c2})
      2'b00: seen_none++;
      2'b10: seen_c1++;
      2'b01: seen_c2++;
      2'b11: seen_both++;
    endcase
    exp_v = longint'(x) * longint'(z);
    checks++;
    if (longint'(y) != exp_v) begin
      failures++;
      if (failures < 10) $display("FAIL %h * %h gave %h, expected %h", x, z, y, exp_v);
    end
  endtask

  initial begin : watchdog
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply(16'h0000, 16'h0000);
    apply(16'hFFFF, 16'hFFFF);
    apply(16'hFFFF, 16'h0001);
    apply(16'h8000, 16'h8000);
    apply(16'h00FF, 16'hFF00);
    // operands printed in the published 16x16 waveform: 0x1000 * 0x1000
    apply(16'b0001000000000000, 16'b0001000000000000);
    checks++;
    if (y !== 32'h0100_0000) begin
      failures++;
      $display("FAIL waveform vector gave %h", y);
    end
    // internal values printed in the same waveform: q0..q2 and the upper
    // adder result {C1, qa} are zero, q3 = 0x0100
    checks++;
    if (dut.q0 !== 16'h0 || dut.q1 !== 16'h0 || dut.q2 !== 16'h0 ||
        dut.q3 !== 16'h0100 || {dut.c1, dut.qa} !== 17'h0) begin
      failures++;
      $display("FAIL waveform internals q3=%h", dut.q3);
    end
    // both middle carries set: here a single OR of C1 and C2 would be wrong
    apply(16'h14FC, 16'hF3FE);
    apply(16'hF3FE, 16'h14FC);
    // every multiplicand against the largest and a mixed multiplier
    for (int x = 0; x < 65536; x++) begin
      apply(16'(x), 16'hFFFF);
      apply(16'hFFFF, 16'(x));
      apply(16'(x), 16'hA5C3);
    end
    for (int n = 0; n < 4000000; n++)
      apply(16'($urandom), 16'($urandom));
    $display("carry cases: none=%0d C1only=%0d C2only=%0d both=%0d",
             seen_none, seen_c1, seen_c2, seen_both);
    if (seen_none == 0 || seen_c1 == 0 || seen_c2 == 0 || seen_both == 0) begin
      failures++;
      $display("FAIL a carry case never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
