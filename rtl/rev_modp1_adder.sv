// Modulo 2^WIDTH+1 adder closing a CEAC carry-save tree, from reversible gates.
//
// Computes y = (a + b + 1) mod (2^WIDTH+1) for WIDTH-bit a and b, with a
// (WIDTH+1)-bit result in 0 .. 2^WIDTH. The "+1" cancels the -1 left by a
// carry-save adder with complemented end-around carry, so s and cv of such
// a CSA can be fed in directly. Two rows, like the modulo 2^WIDTH-1 adder:
// HNG full adders form a + b with carry out co; Peres half adders then add
// the complemented carry ~co. If co = 1 the result is a + b - 2^WIDTH,
// which equals a + b + 1 - (2^WIDTH+1). If co = 0 it is a + b + 1, and the
// half-adder row's carry out becomes bit WIDTH of y exactly when that value
// is 2^WIDTH. The document names this adder but does not give its insides;
// this structure is this design's own. Purely combinational, no clock.
module rev_modp1_adder #(
  parameter int WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH:0]   y
);
  logic [WIDTH-1:0] sum;
  logic             co;

  rev_ripple_adder #(.WIDTH(WIDTH)) u_fa_row (
    .a(a), .b(b), .cin(1'b0), .sum(sum), .cout(co)
  );

  rev_ha_incrementer #(.WIDTH(WIDTH)) u_ha_row (
    .x(sum), .inc(~co), .y(y[WIDTH-1:0]), .cout(y[WIDTH])
  );

  // The result never exceeds 2^WIDTH: bit WIDTH is set only with all lower bits 0.
  always_comb assert (!(y[WIDTH] && |y[WIDTH-1:0])) else $error("rev_modp1_adder: result above 2^WIDTH");
endmodule
