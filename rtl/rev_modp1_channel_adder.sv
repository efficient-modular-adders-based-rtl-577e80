// Modulo 2^N+1 channel adder for residues in 0 .. 2^N (helper).
//
// Adds two (N+1)-bit residues a, b (each 0 .. 2^N) and returns
// y = (a + b) mod (2^N+1) in 0 .. 2^N. Bit N of a residue is set only for
// the value 2^N = -1, so a = a_lo - a_hi with a_lo = a[N-1:0], a_hi = a[N].
// One CSA with complemented end-around carry adds a_lo, b_lo and the N-bit
// constant ~t, t = a_hi + b_hi, which stands for -2 - t; it leaves -1,
// and the closing modulo 2^N+1 adder adds +1, so the sum is
// a_lo + b_lo - t. This arrangement is this design's own; it reuses the two
// mod 2^N+1 blocks of the forward converter. Purely combinational.
module rev_modp1_channel_adder #(
  parameter int N = 8
) (
  input  logic [N:0] a,
  input  logic [N:0] b,
  output logic [N:0] y
);
  logic [N-1:0] corr, s, cv;

  // ~t with t = a_hi + b_hi in 0 .. 2
  assign corr = ~N'({a[N] & b[N], a[N] ^ b[N]});

  rev_csa_ceac #(.WIDTH(N)) u_csa (
    .a(a[N-1:0]), .b(b[N-1:0]), .c(corr), .s(s), .cv(cv)
  );
  rev_modp1_adder #(.WIDTH(N)) u_add (.a(s), .b(cv), .y(y));
endmodule
