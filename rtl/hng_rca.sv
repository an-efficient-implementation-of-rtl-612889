// Reversible ripple-carry adder of WIDTH bits: WIDTH HNG gates, each a full
// adder with its d input tied to 0. Bit i adds a[i], b[i] and the carry of
// bit i-1 (cin for bit 0); the carry ripples from LSB to MSB and leaves as
// cout. Each gate passes a[i] and b[i] through as two garbage outputs, so the
// adder has 2*WIDTH garbage bits and a quantum cost of 6*WIDTH.
// The multipliers use it at widths 4, 5, 8, 9 and 16; the default is the
// 16-bit adder. Combinational; delay grows linearly with WIDTH.
module hng_rca #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  logic [WIDTH:0]   carry;
  logic [WIDTH-1:0] g_a, g_b;

  assign carry[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    hng_gate u_hng (
      .a(a[i]), .b(b[i]), .c(carry[i]), .d(1'b0),
      .p(g_a[i]), .q(g_b[i]), .r(sum[i]), .s(carry[i+1])
    );
  end

  assign cout = carry[WIDTH];
endmodule
