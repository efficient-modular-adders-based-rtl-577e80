// Small-moduli runs of rns_rev_top, including the published example.
// With N=2, K=-1 the moduli set {2^N-1, 2^(N+K), 2^N+1} is {3, 2, 5}
// (M = 30, 5-bit operands): the number 29 has residues 2, 1 and 4, and
// every operand pair below 32 is checked against (a + b) mod 30.
// With N=4, K=4 ({15, 256, 17}, M = 65280, 16-bit operands) 50000 random
// pairs are checked. Residues are compared with the % operator, channel 1
// accepting 2^N-1 as the second code for zero.
module tb_rns_small_sets;
  int checks = 0, failures = 0;

  logic [4:0]  a5, b5, s5;
  logic [1:0]  a5_r1, b5_r1, s5_r1;
  logic [0:0]  a5_r2, b5_r2, s5_r2;
  logic [2:0]  a5_r3, b5_r3, s5_r3;
  rns_rev_top #(.N(2), .K(-1)) u_small (
    .a(a5), .b(b5),
    .a_r1(a5_r1), .a_r2(a5_r2), .a_r3(a5_r3),
    .b_r1(b5_r1), .b_r2(b5_r2), .b_r3(b5_r3),
    .s_r1(s5_r1), .s_r2(s5_r2), .s_r3(s5_r3),
    .sum(s5)
  );

  logic [15:0] a16, b16, s16;
  logic [3:0]  a16_r1, b16_r1, s16_r1;
  logic [7:0]  a16_r2, b16_r2, s16_r2;
  logic [4:0]  a16_r3, b16_r3, s16_r3;
  rns_rev_top #(.N(4), .K(4)) u_mid (
    .a(a16), .b(b16),
    .a_r1(a16_r1), .a_r2(a16_r2), .a_r3(a16_r3),
    .b_r1(b16_r1), .b_r2(b16_r2), .b_r3(b16_r3),
    .s_r1(s16_r1), .s_r2(s16_r2), .s_r3(s16_r3),
    .sum(s16)
  );

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit r1_ok(longint r, longint x, longint m1);
    return (r == x % m1) || (r == m1 && x % m1 == 0);
  endfunction

  initial begin
    // published example: 29 -> residues 2 (mod 3), 1 (mod 2), 4 (mod 5)
    a5 = 5'd29; b5 = 5'd0;
    #1;
    checks++;
    if (a5_r1 != 2'd2 || a5_r2 != 1'd1 || a5_r3 != 3'd4 || s5 != 5'd29) begin
      failures++;
      $display("FAIL example 29 -> %0d %0d %0d, sum %0d", a5_r1, a5_r2, a5_r3, s5);
    end
    for (int v = 0; v < 1024; v++) begin
      {a5, b5} = 10'(v);
      #1;
      checks++;
      if (!r1_ok(a5_r1, a5, 3) || a5_r2 != a5 % 2 || a5_r3 != a5 % 5 ||
          !r1_ok(s5_r1, int'(a5) + int'(b5), 3) || int'(s5_r2) != (int'(a5) + int'(b5)) % 2 ||
          int'(s5_r3) != (int'(a5) + int'(b5)) % 5 || int'(s5) != (int'(a5) + int'(b5)) % 30) begin
        failures++;
        $display("FAIL n2 a=%0d b=%0d -> sum %0d", a5, b5, s5);
      end
    end
    for (int i = 0; i < 50000; i++) begin
      a16 = 16'($urandom); b16 = 16'($urandom);
      #1;
      checks++;
      if (!r1_ok(s16_r1, longint'(a16) + longint'(b16), 15) ||
          s16_r2 != 8'(a16 + b16) ||
          int'(s16_r3) != (int'(a16) + int'(b16)) % 17 ||
          int'(s16) != (int'(a16) + int'(b16)) % 65280) begin
        failures++;
        $display("FAIL n4 a=%0d b=%0d -> sum %0d", a16, b16, s16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
