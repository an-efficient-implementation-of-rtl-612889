// Self-checking testbench for rev_half_adder: all 4 input combinations,
// {carry, sum} must equal a + b, and garbage must be a copy of a.
module tb_rev_half_adder;
  logic a, b, sum, carry, garbage;
  int checks = 0, failures = 0;

  rev_half_adder dut (.a(a), .b(b), .sum(sum), .carry(carry), .garbage(garbage));

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
      if ({carry, sum} !== 2'((i >> 1) + (i & 1)) || garbage !== a) begin
        failures++;
        $display("FAIL ab=%b carry=%b sum=%b", 2'(i), carry, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
