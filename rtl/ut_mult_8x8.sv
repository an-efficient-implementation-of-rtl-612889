// 8x8 Urdhva Tiryagbhyam multiplier from four 4x4 multipliers and three HNG
// ripple-carry adders.
//   q0 = a[3:0]*b[3:0]   gives m[3:0] directly
//   q1 = a[7:4]*b[3:0],  q2 = a[3:0]*b[7:4]   (the crosswise terms)
//   q3 = a[7:4]*b[7:4]
//   8-bit adder: r[8:0] = q1 + q2
//   9-bit adder: p[8:0] = r + {5'b00000, q0[7:4]}
//   m[7:4]  = p[3:0]
//   8-bit adder: m[15:8] = q3 + {3'b000, p[8:4]}
// This follows the published block diagram. Combinational; m = a * b.
module ut_mult_8x8 (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] m
);
  logic [7:0] q0, q1, q2, q3;
  logic [8:0] r, p;
  logic [7:0] y;
  logic       p_co, y_co;

  ut_mult_4x4 u_m0 (.a(a[3:0]), .b(b[3:0]), .m(q0));
  ut_mult_4x4 u_m1 (.a(a[7:4]), .b(b[3:0]), .m(q1));
  ut_mult_4x4 u_m2 (.a(a[3:0]), .b(b[7:4]), .m(q2));
  ut_mult_4x4 u_m3 (.a(a[7:4]), .b(b[7:4]), .m(q3));

  hng_rca #(.WIDTH(8)) u_add8a (.a(q1), .b(q2), .cin(1'b0),
                                .sum(r[7:0]), .cout(r[8]));
  hng_rca #(.WIDTH(9)) u_add9  (.a(r), .b({5'b00000, q0[7:4]}), .cin(1'b0),
                                .sum(p), .cout(p_co));
  hng_rca #(.WIDTH(8)) u_add8b (.a(q3), .b({3'b000, p[8:4]}), .cin(1'b0),
                                .sum(y), .cout(y_co));

  // p_co and y_co are always 0: the sums cannot exceed their widths.
  assign m = {y, p[3:0], q0[3:0]};
endmodule
