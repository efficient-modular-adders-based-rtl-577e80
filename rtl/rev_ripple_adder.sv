// Reversible ripple-carry adder row (helper).
//
// WIDTH HNG gates in a chain, each used as a full adder (d input tied to 0):
// bit i adds a[i], b[i] and the carry of bit i-1; the first carry is cin.
// sum is the WIDTH-bit sum and cout the carry out of the top bit. The a and
// b copies an HNG gate passes through are garbage outputs and stay unused.
// This is the full-adder row of the modular ripple-carry adders; the row
// itself is plain binary addition. Purely combinational, no clock.
module rev_ripple_adder #(
  parameter int WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  logic [WIDTH:0]   carry;
  logic [WIDTH-1:0] g_a, g_b;  // garbage outputs of the HNG gates

  assign carry[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_fa
    hng_gate u_fa (
      .a(a[i]), .b(b[i]), .c(carry[i]), .d(1'b0),
      .p(g_a[i]), .q(g_b[i]), .r(sum[i]), .s(carry[i+1])
    );
  end

  assign cout = carry[WIDTH];
endmodule
