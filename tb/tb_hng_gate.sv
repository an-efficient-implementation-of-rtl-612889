// Self-checking testbench for hng_gate: all 16 input combinations. p and q
// must pass a and b through, r must be (a+b+c) mod 2, and s must be the full
// adder carry (a+b+c >= 2) XOR d.
module tb_hng_gate;
  logic a, b, c, d, p, q, r, s;
  int checks = 0, failures = 0;

  hng_gate dut (.a(a), .b(b), .c(c), .d(d), .p(p), .q(q), .r(r), .s(s));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      int ea, eb, ec, ed, tot;
      ea = (i >> 3) & 1; eb = (i >> 2) & 1; ec = (i >> 1) & 1; ed = i & 1;
      tot = ea + eb + ec;
      {a, b, c, d} = 4'(i);
      #1;
      checks++;
      if (p !== 1'(ea) || q !== 1'(eb) || r !== 1'(tot % 2) ||
          s !== 1'(((tot >= 2) ? 1 : 0) ^ ed)) begin
        failures++;
        $display("FAIL abcd=%b pqrs=%b%b%b%b", 4'(i), p, q, r, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
