// Forward (binary to residue) converter for the moduli {2^N-1, 2^(N+K), 2^N+1}.
//
// x (3N+K bits) is split into four N-bit chunks c0..c3 (c3 holds the top K
// bits, zero-extended; with K < 0 it is empty). Since 2^N = 1 modulo
// 2^N-1 and 2^N = -1 modulo 2^N+1:
//   x1 = c0 + c1 + c2 + c3                      (mod 2^N-1)
//   x2 = x[N+K-1:0]                             (mod 2^(N+K), just wiring)
//   x3 = c0 - c1 + c2 - c3 = c0 + ~c1 + c2 + ~c3 + 4   (mod 2^N+1)
// where ~c is the N-bit complement (-c = ~c + 2 modulo 2^N+1).
// Channel 1 reduces its four operands with two CSAs with end-around carry
// and a modulo 2^N-1 adder. Channel 3 reduces five operands (the four
// chunks and a constant) with three CSAs with complemented end-around carry
// and a modulo 2^N+1 adder. The three CEAC CSAs each leave -1 and the
// closing adder computes s + cv + 1, so the tree as a whole adds
// 3 + 1 = 4, which is exactly the +4 the two negations need: the fifth
// (correction-constant) operand works out to zero in this arrangement.
// It is kept as an explicit operand, so the tree keeps the three-CSA shape
// of the block diagram and another constant can be folded in if the
// conventions of the adders are changed.
// Every input bit is fanned out through Feynman gates (second input 0), as
// a reversible netlist cannot branch a wire.
// The channel structure (operand counts, CSA kinds, final adders) follows
// the forward-converter block diagram; the chunking, the constant and the
// Feynman fan-out are this design's own working-out of "operand
// preparation". x1 may come out as 2^N-1 where the residue is 0 (the other
// code for zero modulo 2^N-1); x3 is N+1 bits wide and lies in 0 .. 2^N.
// Purely combinational, no clock. Needs N >= 2 and -1 <= K <= N.
module rns_forward_converter #(
  parameter int N = 8,
  parameter int K = 2
) (
  input  logic [3*N+K-1:0] x,
  output logic [N-1:0]     x1,
  output logic [N+K-1:0]   x2,
  output logic [N:0]       x3
);
  localparam int XW = 3*N + K;
  localparam int W2 = N + K;
  // correction constant: needed +4, minus the +4 the CSA tree adds
  localparam logic [N-1:0] KCONST = N'((4 - 4) % ((1 << N) + 1));

  if (N < 2 || K < -1 || K > N) begin : g_bad_params
    $error("rns_forward_converter: needs N >= 2 and -1 <= K <= N");
  end

  // ---- operand preparation: Feynman fan-out of every input bit ----------
  logic [XW-1:0] to_ch1, to_ch3, branch;
  logic [W2-1:0] to_x2;

  for (genvar i = 0; i < XW; i++) begin : g_fan
    feynman_gate u_copy (.a(x[i]), .b(1'b0), .p(to_ch1[i]), .q(branch[i]));
    if (i < W2) begin : g_x2
      feynman_gate u_copy2 (.a(branch[i]), .b(1'b0), .p(to_ch3[i]), .q(to_x2[i]));
    end else begin : g_nox2
      assign to_ch3[i] = branch[i];
    end
  end

  assign x2 = to_x2;

  // chunks, zero-extended to 4N bits
  logic [4*N-1:0] w1, w3;
  assign w1 = (4*N)'(to_ch1);
  assign w3 = (4*N)'(to_ch3);

  // ---- channel 1: modulo 2^N-1 ------------------------------------------
  logic [N-1:0] s1a, c1a, s1b, c1b;

  rev_csa_eac #(.WIDTH(N)) u_ch1_csa0 (
    .a(w1[0 +: N]), .b(w1[N +: N]), .c(w1[2*N +: N]), .s(s1a), .cv(c1a)
  );
  rev_csa_eac #(.WIDTH(N)) u_ch1_csa1 (
    .a(s1a), .b(c1a), .c(w1[3*N +: N]), .s(s1b), .cv(c1b)
  );
  rev_mod_adder #(.WIDTH(N)) u_ch1_add (.a(s1b), .b(c1b), .y(x1));

  // ---- channel 3: modulo 2^N+1 ------------------------------------------
  logic [N-1:0] s3a, c3a, s3b, c3b, s3c, c3c;

  rev_csa_ceac #(.WIDTH(N)) u_ch3_csa0 (
    .a(w3[0 +: N]), .b(~w3[N +: N]), .c(w3[2*N +: N]), .s(s3a), .cv(c3a)
  );
  rev_csa_ceac #(.WIDTH(N)) u_ch3_csa1 (
    .a(s3a), .b(c3a), .c(~w3[3*N +: N]), .s(s3b), .cv(c3b)
  );
  rev_csa_ceac #(.WIDTH(N)) u_ch3_csa2 (
    .a(s3b), .b(c3b), .c(KCONST), .s(s3c), .cv(c3c)
  );
  rev_modp1_adder #(.WIDTH(N)) u_ch3_add (.a(s3c), .b(c3c), .y(x3));
endmodule
