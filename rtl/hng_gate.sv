// HNG gate: a 4-input, 4-output reversible gate.
//   p = a, q = b, r = a ^ b ^ c, s = ((a ^ b) & c) ^ (a & b) ^ d
// With d tied to 0, a and b as operands and c as carry in, r is the sum and
// s the carry out of a full adder; every ripple-carry adder in this design is
// a chain of these gates. Purely combinational.
module hng_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);
  always_comb begin
    p = a;
    q = b;
    r = a ^ b ^ c;
    s = ((a ^ b) & c) ^ (a & b) ^ d;
  end
endmodule
