// 2x2 Urdhva Tiryagbhyam ("vertically and crosswise") multiplier from five
// Peres gates and one Feynman gate.
//   vertical:   a0b0 -> q0,  a1b1
//   crosswise:  a1b0 ^ a0b1 -> q1 (the second crosswise Peres gate takes the
//               first one's AND on its c input)
//   upper bits: a third Peres gate ANDs a0b0 with a1b1 (the carry of the
//               crosswise column, since a0b1 & a1b0 = a0a1b0b1) and a Feynman
//               gate gives q3 = that carry, q2 = a1b1 ^ carry.
// The gate network follows the published 2x2 schematic; the pin order of the
// middle Peres gate (a = a0b0, b = a1b1, c = 0) is the one that makes the
// product right. Combinational; q = a * b.
module ut_mult_2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] q
);
  logic p00, p11, p10, c_mid;
  logic [8:0] g;

  // vertical products
  peres_gate u_p00 (.a(a[0]), .b(b[0]), .c(1'b0), .p(g[0]), .q(g[1]), .r(p00));
  peres_gate u_p11 (.a(a[1]), .b(b[1]), .c(1'b0), .p(g[2]), .q(g[3]), .r(p11));
  // crosswise products, XORed through the c input of the second gate
  peres_gate u_p10 (.a(a[1]), .b(b[0]), .c(1'b0), .p(g[4]), .q(g[5]), .r(p10));
  peres_gate u_p01 (.a(a[0]), .b(b[1]), .c(p10),  .p(g[6]), .q(g[7]), .r(q[1]));
  // upper bits: carry of the crosswise column and its sum with a1b1
  peres_gate   u_mid (.a(p00), .b(p11), .c(1'b0), .p(q[0]), .q(g[8]), .r(c_mid));
  feynman_gate u_cn  (.a(c_mid), .b(p11), .p(q[3]), .q(q[2]));

endmodule
