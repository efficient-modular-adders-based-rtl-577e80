// Reversible half-adder incrementer row (helper).
//
// WIDTH Peres gates in a chain, each used as a half adder (c input tied to
// 0): bit i adds x[i] and the carry of bit i-1, the first carry being inc.
// y = x + inc (WIDTH bits) and cout is the carry out of the top bit. This is
// the row that adds the end-around carry in the modular ripple-carry
// adders. Purely combinational, no clock.
module rev_ha_incrementer #(
  parameter int WIDTH = 8
) (
  input  logic [WIDTH-1:0] x,
  input  logic             inc,
  output logic [WIDTH-1:0] y,
  output logic             cout
);
  logic [WIDTH:0]   carry;
  logic [WIDTH-1:0] g_x;  // garbage outputs of the Peres gates

  assign carry[0] = inc;

  for (genvar i = 0; i < WIDTH; i++) begin : g_ha
    peres_gate u_ha (
      .a(x[i]), .b(carry[i]), .c(1'b0),
      .p(g_x[i]), .q(y[i]), .r(carry[i+1])
    );
  end

  assign cout = carry[WIDTH];
endmodule
