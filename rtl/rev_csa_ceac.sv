// Modulo 2^WIDTH+1 carry-save adder with complemented end-around carry (CEAC).
//
// A row of WIDTH independent HNG full adders (d tied to 0) compresses three
// WIDTH-bit operands into a sum vector s and a carry vector cv. The carry
// out of the top bit has weight 2^WIDTH, which is -1 modulo 2^WIDTH+1; as
// -c = (1-c) - 1 it enters cv[0] inverted and leaves a constant of -1:
//   s + cv - 1 = a + b + c (mod 2^WIDTH+1).
// Whoever uses the block accounts for that -1 (the forward converter folds
// it into its constant operand). The block's name and place in the forward
// converter are given; its gate-level form here, by analogy with the EAC
// version, is this design's own. Purely combinational, no clock.
module rev_csa_ceac #(
  parameter int WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [WIDTH-1:0] c,
  output logic [WIDTH-1:0] s,
  output logic [WIDTH-1:0] cv
);
  logic [WIDTH-1:0] co;        // carry out of each bit position
  logic [WIDTH-1:0] g_a, g_b;  // garbage outputs of the HNG gates

  for (genvar i = 0; i < WIDTH; i++) begin : g_fa
    hng_gate u_fa (
      .a(a[i]), .b(b[i]), .c(c[i]), .d(1'b0),
      .p(g_a[i]), .q(g_b[i]), .r(s[i]), .s(co[i])
    );
  end

  // Complemented end-around carry (a NOT gate is itself reversible).
  assign cv = {co[WIDTH-2:0], ~co[WIDTH-1]};
endmodule
