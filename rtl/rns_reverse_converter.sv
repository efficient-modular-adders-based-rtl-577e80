// Reverse (residue to binary) converter for the moduli {2^N-1, 2^(N+K), 2^N+1}.
//
// With M' = 2^(2N)-1 = (2^N-1)(2^N+1), the number is x = Y * 2^(N+K) + x2,
// so its low N+K bits are x2 and only Y (2N bits) has to be computed:
//   Y = 2^-(N+K) * (Z - x2)                                   (mod M')
//   Z = 2^(N-1)(2^N+1) * x1 + 2^(N-1)(2^N-1) * x3             (mod M')
// (Z is x modulo M', by the Chinese remainder theorem on 2^N-1 and 2^N+1).
// Modulo M' a factor 2^-j is a rotation right by j bits and a negation is a
// bit-wise complement, so Y is the modulo-M' sum of four 2N-bit operands:
//   ror_{K+1}({x1, x1}) + ror_{K+1}(x3 * 2^N) + ror_{K+1}(~x3) + ror_{N+K}(~x2)
// which two CSAs with end-around carry and one modulo 2^(2N)-1 adder
// reduce, as in the reverse-converter block diagram. The operand equations
// are this design's own working-out of its "operand preparation". The
// all-ones code for zero that the modulo adder can produce is mapped to 0,
// so x is exact for every valid input (Y < 2^(2N)-1 always holds).
// Inputs: x1 in 0 .. 2^N-1 (2^N-1 read as 0), x2 any N+K-bit value, x3 in
// 0 .. 2^N. Output x in 0 .. (2^(2N)-1) * 2^(N+K) - 1.
// Purely combinational, no clock. Needs N >= 2 and -1 <= K <= N.
module rns_reverse_converter #(
  parameter int N = 8,
  parameter int K = 2
) (
  input  logic [N-1:0]     x1,
  input  logic [N+K-1:0]   x2,
  input  logic [N:0]       x3,
  output logic [3*N+K-1:0] x
);
  localparam int W  = 2*N;
  localparam int W2 = N + K;
  localparam int R1 = (K + 1) % W;   // rotation for the x1 and x3 terms
  localparam int R2 = W2 % W;        // rotation for the x2 term

  if (N < 2 || K < -1 || K > N) begin : g_bad_params
    $error("rns_reverse_converter: needs N >= 2 and -1 <= K <= N");
  end

  function automatic logic [W-1:0] ror(input logic [W-1:0] v, input int r);
    return (r == 0) ? v : ((v >> r) | (v << (W - r)));
  endfunction

  // ---- operand preparation (wiring and inverters only) --------------------
  logic [W-1:0] op_x1, op_x3hi, op_x3neg, op_x2neg;

  // x3 * 2^N modulo 2^(2N)-1: bit N of x3 (set only for x3 = 2^N) wraps to bit 0
  assign op_x1    = ror({x1, x1}, R1);
  assign op_x3hi  = ror({x3[N-1:0], {(N-1){1'b0}}, x3[N]}, R1);
  assign op_x3neg = ror(~W'(x3), R1);
  assign op_x2neg = ror(~W'(x2), R2);

  // ---- reduction ------------------------------------------------------------
  logic [W-1:0] s_a, c_a, s_b, c_b, y_raw, y;

  rev_csa_eac #(.WIDTH(W)) u_csa0 (
    .a(op_x1), .b(op_x3hi), .c(op_x3neg), .s(s_a), .cv(c_a)
  );
  rev_csa_eac #(.WIDTH(W)) u_csa1 (
    .a(s_a), .b(c_a), .c(op_x2neg), .s(s_b), .cv(c_b)
  );
  rev_mod_adder #(.WIDTH(W)) u_add (.a(s_b), .b(c_b), .y(y_raw));

  assign y = (&y_raw) ? '0 : y_raw;
  assign x = {y, x2};
endmodule
