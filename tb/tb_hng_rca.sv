// Self-checking testbench for hng_rca at every width the multipliers use
// (4, 5, 8, 9) and at the default width (16). The 4- and 5-bit adders are
// checked exhaustively with both carry-in values, the wider ones with all
// extreme operands plus random ones. The reference is integer addition.
// Also counts that a full-length carry ripple (all ones plus carry in)
// occurred at each width.
module tb_hng_rca;
  int checks = 0, failures = 0, full_ripples = 0;

  logic [3:0]  a4, b4, s4;   logic c4, co4;
  logic [4:0]  a5, b5, s5;   logic c5, co5;
  logic [7:0]  a8, b8, s8;   logic c8, co8;
  logic [8:0]  a9, b9, s9;   logic c9, co9;
  logic [15:0] a16, b16, s16; logic c16, co16;

  hng_rca #(.WIDTH(4)) u4  (.a(a4),  .b(b4),  .cin(c4),  .sum(s4),  .cout(co4));
  hng_rca #(.WIDTH(5)) u5  (.a(a5),  .b(b5),  .cin(c5),  .sum(s5),  .cout(co5));
  hng_rca #(.WIDTH(8)) u8  (.a(a8),  .b(b8),  .cin(c8),  .sum(s8),  .cout(co8));
  hng_rca #(.WIDTH(9)) u9  (.a(a9),  .b(b9),  .cin(c9),  .sum(s9),  .cout(co9));
  hng_rca              u16 (.a(a16), .b(b16), .cin(c16), .sum(s16), .cout(co16));

  task automatic check(input int w, input longint x, input longint y, input int ci,
                       input longint got);
    longint exp_v;
    exp_v = x + y + ci;
    checks++;
    if (got != exp_v) begin
      failures++;
      $display("FAIL w=%0d %0d+%0d+%0d got %0d", w, x, y, ci, got);
    end
    if (x == (64'd1 << w) - 1 && ci == 1) full_ripples++;
  endtask

  task automatic apply(input longint x, input longint y, input int ci);
    a4 = 4'(x);  b4 = 4'(y);  c4 = 1'(ci);
    a5 = 5'(x);  b5 = 5'(y);  c5 = 1'(ci);
    a8 = 8'(x);  b8 = 8'(y);  c8 = 1'(ci);
    a9 = 9'(x);  b9 = 9'(y);  c9 = 1'(ci);
    a16 = 16'(x); b16 = 16'(y); c16 = 1'(ci);
    #1;
    check(4,  longint'(a4),  longint'(b4),  ci, longint'({co4, s4}));
    check(5,  longint'(a5),  longint'(b5),  ci, longint'({co5, s5}));
    check(8,  longint'(a8),  longint'(b8),  ci, longint'({co8, s8}));
    check(9,  longint'(a9),  longint'(b9),  ci, longint'({co9, s9}));
    check(16, longint'(a16), longint'(b16), ci, longint'({co16, s16}));
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // exhaustive over 5 bits (covers the 4- and 5-bit adders completely)
    for (int x = 0; x < 32; x++)
      for (int y = 0; y < 32; y++)
        for (int ci = 0; ci < 2; ci++)
          apply(x, y, ci);
    // extremes for the wide adders
    apply(64'hFFFF, 64'h0000, 1);
    apply(64'hFFFF, 64'hFFFF, 1);
    apply(64'h01FF, 64'h0000, 1);
    apply(64'h00FF, 64'h0000, 1);
    apply(64'h8000, 64'h8000, 0);
    for (int n = 0; n < 5000; n++)
      apply(longint'($urandom_range(65535)), longint'($urandom_range(65535)),
            int'($urandom_range(1)));
    if (full_ripples < 5) begin
      failures++;
      $display("FAIL full-length carry ripple seen only %0d times", full_ripples);
    end
    $display("full-length ripples: %0d", full_ripples);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
