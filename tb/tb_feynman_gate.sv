// Self-checking testbench for feynman_gate: all 4 input combinations, checked
// against p = a and q = (a + b) mod 2.
module tb_feynman_gate;
  logic a, b, p, q;
  int checks = 0, failures = 0;

  feynman_gate dut (.a(a), .b(b), .p(p), .q(q));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks++;
      if (p !== 1'(i >> 1) || q !== 1'(((i >> 1) + (i & 1)) % 2)) begin
        failures++;
        $display("FAIL ab=%b p=%b q=%b", 2'(i), p, q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
