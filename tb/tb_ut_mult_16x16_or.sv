// Testbench for the 16x16 multiplier built with the original single OR gate
// on the two middle-adder carries (PAPER_OR_MERGE = 1). That structure adds
// C1 | C2 instead of C1 + C2 into the top byte, so its output is the exact
// product except when both carries are 1, where it is 2^24 too small. The
// test checks the output against exactly that prediction, derived from an
// independent byte-wise model, and counts that the exact case and the
// short-by-2^24 case both occurred.
module tb_ut_mult_16x16_or;
  logic [15:0] a, b;
  logic [31:0] y;
  int checks = 0, failures = 0, exact = 0, short_by_one = 0;

  ut_mult_16x16 #(.PAPER_OR_MERGE(1'b1)) dut (.a(a), .b(b), .y(y));

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
    exp_v = longint'(x) * longint'(z);
    if (c1 && c2) begin
      exp_v = exp_v - 64'd16777216;
      short_by_one++;
    end else begin
      exact++;
    end
    checks++;
    if (longint'(y) != exp_v) begin
      failures++;
      if (failures < 10) $display("FAIL %h * %h gave %h, expected %h", x, z, y, exp_v);
    end
  endtask

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply(16'hFFFF, 16'hFFFF);
    apply(16'b0001000000000000, 16'b0001000000000000);
    apply(16'h14FC, 16'hF3FE);
    for (int n = 0; n < 100000; n++)
      apply(16'($urandom), 16'($urandom));
    $display("exact=%0d short_by_2^24=%0d", exact, short_by_one);
    if (exact == 0 || short_by_one == 0) begin
      failures++;
      $display("FAIL a case never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
