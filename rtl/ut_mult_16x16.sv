// 16x16 reversible Urdhva Tiryagbhyam multiplier (top level).
//
// Four 8x8 multipliers form the partial products of the byte halves:
//   q0 = a[7:0]*b[7:0]    q1 = a[7:0]*b[15:8]
//   q2 = a[15:8]*b[7:0]   q3 = a[15:8]*b[15:8]
// and y = q0 + ((q1 + q2) << 8) + (q3 << 16) is put together as
//   y[7:0]   = q0[7:0]
//   upper 16-bit HNG adder:  {C1, qa}     = q1 + q2
//   lower 16-bit HNG adder:  {C2, y[23:8]} = qa + {q3[7:0], q0[15:8]}
//   y[31:24] = q3[15:8] + C1 + C2, through a chain of reversible adders.
//
// Carry merge. The published structure ORs C1 and C2 and ripples that one
// bit through eight Peres half adders. C1 and C2 can both be 1 (for
// 49,604,974 of the 2^32 operand pairs, e.g. a = 0x14FC, b = 0xF3FE), and the
// OR then loses one carry, so y[31:24] comes out one too small.
//   PAPER_OR_MERGE = 0 (default): bit 24 is an HNG full adder on q3[8], C1
//     and C2, and bits 25..31 are seven half adders. The product is exact.
//   PAPER_OR_MERGE = 1: the published reversible OR gate followed by eight
//     half adders, kept for comparison with the original structure.
// The final carry out of bit 31 is always 0 in the default mode and is
// dropped. The whole multiplier is combinational: no clock, no registers.
module ut_mult_16x16 #(
  parameter bit PAPER_OR_MERGE = 1'b0
) (
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic [31:0] y
);
  logic [15:0] q0, q1, q2, q3;
  logic [15:0] qa;
  logic        c1, c2;
  logic [8:0]  hc;   // carry chain of the top byte, hc[0] enters bit 24
  logic [7:0]  hg;   // half-adder garbage outputs

  ut_mult_8x8 u_m0 (.a(a[7:0]),  .b(b[7:0]),  .m(q0));
  ut_mult_8x8 u_m1 (.a(a[7:0]),  .b(b[15:8]), .m(q1));
  ut_mult_8x8 u_m2 (.a(a[15:8]), .b(b[7:0]),  .m(q2));
  ut_mult_8x8 u_m3 (.a(a[15:8]), .b(b[15:8]), .m(q3));

  hng_rca #(.WIDTH(16)) u_add_upper (.a(q1), .b(q2), .cin(1'b0),
                                     .sum(qa), .cout(c1));
  hng_rca #(.WIDTH(16)) u_add_lower (.a(qa), .b({q3[7:0], q0[15:8]}), .cin(1'b0),
                                     .sum(y[23:8]), .cout(c2));

  assign y[7:0] = q0[7:0];

  if (PAPER_OR_MERGE) begin : g_or_merge
    logic [1:0] or_g;
    rev_or_gate u_or (.a(c1), .b(c2), .y(hc[0]), .garbage(or_g));
    for (genvar i = 0; i < 8; i++) begin : g_ha
      rev_half_adder u_ha (.a(q3[8+i]), .b(hc[i]), .sum(y[24+i]),
                           .carry(hc[i+1]), .garbage(hg[i]));
    end
  end else begin : g_add_merge
    logic [1:0] fa_g;
    // bit 24 adds both carries; hc[0] is unused in this mode
    assign hc[0] = 1'b0;
    assign hg[0] = 1'b0;
    hng_gate u_fa (.a(q3[8]), .b(c1), .c(c2), .d(1'b0),
                   .p(fa_g[0]), .q(fa_g[1]), .r(y[24]), .s(hc[1]));
    for (genvar i = 1; i < 8; i++) begin : g_ha
      rev_half_adder u_ha (.a(q3[8+i]), .b(hc[i]), .sum(y[24+i]),
                           .carry(hc[i+1]), .garbage(hg[i]));
    end
  end
endmodule
