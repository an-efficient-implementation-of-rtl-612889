// Self-checking testbench for peres_gate: applies all 8 input combinations
// and compares p, q, r against p = a, q = a ^ b, r = a&b ^ c worked out here
// with arithmetic on the input index.
module tb_peres_gate;
  logic a, b, c, p, q, r;
  int checks = 0, failures = 0;

  peres_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      int ea, eb, ec;
      ea = (i >> 2) & 1; eb = (i >> 1) & 1; ec = i & 1;
      {a, b, c} = 3'(i);
      #1;
      checks++;
      if (p !== 1'(ea) || q !== 1'((ea + eb) % 2) || r !== 1'(((ea * eb) + ec) % 2)) begin
        failures++;
        $display("FAIL abc=%0d%0d%0d p=%b q=%b r=%b", ea, eb, ec, p, q, r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
