// Peres gate (PRG): a 3-input, 3-output reversible gate.
//   p = a, q = a ^ b, r = (a & b) ^ c
// With c tied to 0 it yields the AND of two bits on r and their XOR on q,
// which is how this multiplier library forms partial products and half
// adders. The equations are the standard Peres gate; the gate is purely
// combinational.
module peres_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  always_comb begin
    p = a;
    q = a ^ b;
    r = (a & b) ^ c;
  end
endmodule
