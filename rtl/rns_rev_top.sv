// RNS adder on the moduli {2^N-1, 2^(N+K), 2^N+1}, built from reversible gates.
//
// Two binary operands a and b (3N+K bits) are each converted to residues by
// a forward converter. The three channels are then added independently, with
// no carry passing between them: channel 1 with the modulo 2^N-1 reversible
// ripple-carry adder (HNG full adders plus Peres end-around-carry row),
// channel 2 with an (N+K)-bit HNG ripple-carry adder whose carry out is
// dropped (modulo 2^(N+K)), channel 3 with a modulo 2^N+1 adder. A reverse
// converter turns the sum residues back into binary, so
//   sum = (a + b) mod M,  M = (2^N-1) * 2^(N+K) * (2^N+1).
// The residues of a, b and of the sum are brought out as well. Every full
// adder in the design is an HNG gate, every half adder a Peres gate and
// every fan-out a Feynman gate. The converters follow the published block
// diagrams; the channel adders as a datapath between them are this
// design's reading of "arithmetic in a channel requires modulo adders".
// A residue of channel 1 may be 2^N-1 for zero; channel 3 residues are
// N+1 bits. Purely combinational, no clock, no reset.
// Defaults: N = 8, K = 2 (M = 255 * 1024 * 257), 26-bit operands.
module rns_rev_top #(
  parameter int N = 8,
  parameter int K = 2
) (
  input  logic [3*N+K-1:0] a,
  input  logic [3*N+K-1:0] b,
  output logic [N-1:0]     a_r1,
  output logic [N+K-1:0]   a_r2,
  output logic [N:0]       a_r3,
  output logic [N-1:0]     b_r1,
  output logic [N+K-1:0]   b_r2,
  output logic [N:0]       b_r3,
  output logic [N-1:0]     s_r1,
  output logic [N+K-1:0]   s_r2,
  output logic [N:0]       s_r3,
  output logic [3*N+K-1:0] sum
);
  logic c2_unused;  // carry out of the modulo 2^(N+K) channel, dropped

  rns_forward_converter #(.N(N), .K(K)) u_fwd_a (
    .x(a), .x1(a_r1), .x2(a_r2), .x3(a_r3)
  );
  rns_forward_converter #(.N(N), .K(K)) u_fwd_b (
    .x(b), .x1(b_r1), .x2(b_r2), .x3(b_r3)
  );

  rev_mod_adder #(.WIDTH(N)) u_ch1 (.a(a_r1), .b(b_r1), .y(s_r1));

  rev_ripple_adder #(.WIDTH(N+K)) u_ch2 (
    .a(a_r2), .b(b_r2), .cin(1'b0), .sum(s_r2), .cout(c2_unused)
  );

  rev_modp1_channel_adder #(.N(N)) u_ch3 (.a(a_r3), .b(b_r3), .y(s_r3));

  rns_reverse_converter #(.N(N), .K(K)) u_rev (
    .x1(s_r1), .x2(s_r2), .x3(s_r3), .x(sum)
  );
endmodule
