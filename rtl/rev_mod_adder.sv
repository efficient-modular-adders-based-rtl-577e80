// Modulo 2^WIDTH-1 adder built from reversible gates (ripple-carry with EAC).
//
// Two rows: a row of HNG full adders adds a and b (carry in 0) and gives a
// WIDTH-bit sum and a carry out of weight 2^WIDTH = 1 (mod 2^WIDTH-1); a
// row of Peres half adders then adds that carry back in at bit 0 (the
// end-around carry). The result y satisfies y = a + b (mod 2^WIDTH-1).
// Like every adder of this kind, zero has two codes: y is all ones, not 0,
// when a + b = 2^WIDTH-1 (for instance a = 2^WIDTH-1, b = 0). Inputs may use
// either code for zero. The HNG and Peres rows follow the reversible
// modulo adder structure; the tied-off first carry is this design's choice.
// Purely combinational, no clock; the delay is two WIDTH-bit carry ripples.
module rev_mod_adder #(
  parameter int WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] y
);
  logic [WIDTH-1:0] sum;
  logic             eac;
  logic             inc_cout;  // always 0: a + b <= 2^(WIDTH+1)-2

  rev_ripple_adder #(.WIDTH(WIDTH)) u_fa_row (
    .a(a), .b(b), .cin(1'b0), .sum(sum), .cout(eac)
  );

  rev_ha_incrementer #(.WIDTH(WIDTH)) u_ha_row (
    .x(sum), .inc(eac), .y(y), .cout(inc_cout)
  );

  // The end-around carry can never ripple out of the top of the second row.
  always_comb assert (!inc_cout) else $error("rev_mod_adder: increment row overflowed");
endmodule
