// Reversible half adder: one Peres gate with its third input tied to 0.
//   sum = a ^ b (Peres q), carry = a & b (Peres r), garbage = a (Peres p)
// Eight of these form the top byte of the 16x16 multiplier. Using a Peres
// gate here is this design's choice; combinational.
module rev_half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry,
  output logic garbage
);
  peres_gate u_prg (.a(a), .b(b), .c(1'b0), .p(garbage), .q(sum), .r(carry));
endmodule
