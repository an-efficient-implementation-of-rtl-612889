// Self-checking testbench for rev_or_gate: all 4 input combinations, y must
// be 1 exactly when a + b > 0.
module tb_rev_or_gate;
  logic a, b, y;
  logic [1:0] garbage;
  int checks = 0, failures = 0;

  rev_or_gate dut (.a(a), .b(b), .y(y), .garbage(garbage));

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
      if (y !== 1'(((i >> 1) + (i & 1)) > 0)) begin
        failures++;
        $display("FAIL ab=%b y=%b", 2'(i), y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
