// Reversible OR of two bits, built as a Peres gate followed by a Feynman gate.
// The Peres gate (c = 0) gives a ^ b and a & b; these two never are 1 at the
// same time, so the Feynman gate's XOR of them is a | b. The construction is
// this design's choice (the OR is only named as a reversible OR gate).
// garbage carries the two outputs that the OR does not need. Combinational.
module rev_or_gate (
  input  logic       a,
  input  logic       b,
  output logic       y,
  output logic [1:0] garbage
);
  logic x_xor, x_and;

  peres_gate   u_prg (.a(a), .b(b), .c(1'b0), .p(garbage[0]), .q(x_xor), .r(x_and));
  feynman_gate u_fg  (.a(x_and), .b(x_xor), .p(garbage[1]), .q(y));
endmodule
