// Feynman gate, also called CNOT: a 2-input, 2-output reversible gate.
//   p = a, q = a ^ b
// Used for fan-out (b = 0 copies a) and, in the 2x2 multiplier, to fold the
// carry of the middle column into the upper product bits. Purely
// combinational.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);
  always_comb begin
    p = a;
    q = a ^ b;
  end
endmodule
