// Modulo 2^WIDTH-1 carry-save adder with end-around carry (EAC).
//
// A row of WIDTH independent HNG full adders (d tied to 0) compresses three
// WIDTH-bit operands into a sum vector s and a carry vector cv. Bit i of the
// carry vector is the carry produced at bit i-1; the carry out of the top
// bit has weight 2^WIDTH, which is 1 modulo 2^WIDTH-1, so it is wrapped
// around into cv[0]. Hence s + cv = a + b + c (mod 2^WIDTH-1). No carry
// ripples: the delay is one full adder whatever WIDTH is. The structure
// (HNG full adders, wrapped top carry) is the one of the reversible CSA
// with EAC; WIDTH is a parameter. Purely combinational, no clock.
module rev_csa_eac #(
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

  // End-around carry: the carry vector is the bit carries rotated left by one.
  assign cv = {co[WIDTH-2:0], co[WIDTH-1]};
endmodule
