// 4x4 Urdhva Tiryagbhyam multiplier from four 2x2 multipliers and three HNG
// ripple-carry adders.
//   q0 = a[1:0]*b[1:0]   gives m[1:0] directly
//   q1 = a[3:2]*b[1:0],  q2 = a[1:0]*b[3:2]   (the crosswise terms)
//   q3 = a[3:2]*b[3:2]
//   4-bit adder: x = q1 + {2'b00, q0[3:2]}         (5-bit result with carry)
//   5-bit adder: t = {1'b0, q2} + x                (6-bit result with carry)
//   m[3:2] = t[1:0]
//   4-bit adder: m[7:4] = q3 + t[5:2]
// This is the published block diagram, including its third adder for the
// upper bits. Combinational; m = a * b.
module ut_mult_4x4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] m
);
  logic [3:0] q0, q1, q2, q3;
  logic [4:0] x;
  logic [5:0] t;
  logic [3:0] u;
  logic       u_co;

  ut_mult_2x2 u_m0 (.a(a[1:0]), .b(b[1:0]), .q(q0));
  ut_mult_2x2 u_m1 (.a(a[3:2]), .b(b[1:0]), .q(q1));
  ut_mult_2x2 u_m2 (.a(a[1:0]), .b(b[3:2]), .q(q2));
  ut_mult_2x2 u_m3 (.a(a[3:2]), .b(b[3:2]), .q(q3));

  hng_rca #(.WIDTH(4)) u_add4a (.a(q1), .b({2'b00, q0[3:2]}), .cin(1'b0),
                                .sum(x[3:0]), .cout(x[4]));
  hng_rca #(.WIDTH(5)) u_add5  (.a({1'b0, q2}), .b(x), .cin(1'b0),
                                .sum(t[4:0]), .cout(t[5]));
  hng_rca #(.WIDTH(4)) u_add4b (.a(q3), .b(t[5:2]), .cin(1'b0),
                                .sum(u), .cout(u_co));

  // u_co is always 0: the product of two 4-bit numbers fits in 8 bits.
  assign m = {u, t[1:0], q0[1:0]};
endmodule
