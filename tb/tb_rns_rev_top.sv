// End-to-end testbench for rns_rev_top at its default size (N=8, K=2:
// moduli 255, 1024, 257; M = 67107840; 26-bit operands).
// Drives 40000 random operand pairs plus directed corners. For each pair
// the residues of a, b and of the sum are compared with the % operator
// (2^N-1 accepted as the second code for zero in channel 1) and the binary
// sum with (a + b) mod M. It also counts how often each mechanism of the
// datapath fired and fails a mechanism that never did:
//   ch1_eac    end-around carry of the channel-1 modulo 2^N-1 adder
//   ch1_zero2  channel-1 sum coming out as the all-ones code for zero
//   ch2_wrap   carry dropped by the modulo 2^(N+K) channel adder
//   ch3_carry  carry out of the channel-3 adder's full-adder row
//   ch3_top    channel-3 sum equal to 2^N
//   rev_zero   reverse-converter adder giving all ones, mapped to 0
module tb_rns_rev_top;
  localparam int N = 8, K = 2;
  localparam longint M1 = (longint'(1) << N) - 1;
  localparam longint M2 = longint'(1) << (N + K);
  localparam longint M3 = (longint'(1) << N) + 1;
  localparam longint M  = M1 * M2 * M3;

  logic [3*N+K-1:0] a, b, sum;
  logic [N-1:0]     a_r1, b_r1, s_r1;
  logic [N+K-1:0]   a_r2, b_r2, s_r2;
  logic [N:0]       a_r3, b_r3, s_r3;

  int checks = 0, failures = 0;
  int ch1_eac = 0, ch1_zero2 = 0, ch2_wrap = 0, ch3_carry = 0, ch3_top = 0, rev_zero = 0;

  rns_rev_top dut (
    .a(a), .b(b),
    .a_r1(a_r1), .a_r2(a_r2), .a_r3(a_r3),
    .b_r1(b_r1), .b_r2(b_r2), .b_r3(b_r3),
    .s_r1(s_r1), .s_r2(s_r2), .s_r3(s_r3),
    .sum(sum)
  );

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit r1_ok(longint r, longint x);
    return (r == x % M1) || (r == M1 && x % M1 == 0);
  endfunction

  task automatic apply(longint av, longint bv);
    longint s;
    a = (3*N+K)'(av);
    b = (3*N+K)'(bv);
    #1;
    s = longint'(a) + longint'(b);
    checks++;
    if (!r1_ok(a_r1, a) || a_r2 != a % M2 || a_r3 != a % M3 ||
        !r1_ok(b_r1, b) || b_r2 != b % M2 || b_r3 != b % M3) begin
      failures++;
      $display("FAIL residues a=%0d b=%0d", a, b);
    end
    checks++;
    if (!r1_ok(s_r1, s) || s_r2 != s % M2 || s_r3 != s % M3) begin
      failures++;
      $display("FAIL channel sums a=%0d b=%0d -> %0d %0d %0d", a, b, s_r1, s_r2, s_r3);
    end
    checks++;
    if (longint'(sum) != s % M) begin
      failures++;
      $display("FAIL sum a=%0d b=%0d -> %0d, want %0d", a, b, sum, s % M);
    end
    if (dut.u_ch1.eac) ch1_eac++;
    if (s_r1 == N'(M1)) ch1_zero2++;
    if (dut.c2_unused) ch2_wrap++;
    if (dut.u_ch3.u_add.co) ch3_carry++;
    if (s_r3[N]) ch3_top++;
    if (&dut.u_rev.y_raw) rev_zero++;
  endtask

  initial begin
    apply(0, 0);
    apply(M - 1, 1);
    apply(M - 1, M - 1);
    apply(M1, M1 * 1024);
    apply(256, 0);
    apply(M3 - 1, M3 * 7);
    for (longint i = 0; i < 1100; i++) apply(i, 3 * i);
    for (int i = 0; i < 40000; i++)
      apply(longint'($urandom) % M, longint'($urandom) % M);
    for (int i = 0; i < 1000; i++)
      apply(longint'($urandom) & ((longint'(1) << (3*N+K)) - 1),
            longint'($urandom) & ((longint'(1) << (3*N+K)) - 1));
    $display("ch1_eac=%0d ch1_zero2=%0d ch2_wrap=%0d ch3_carry=%0d ch3_top=%0d rev_zero=%0d",
             ch1_eac, ch1_zero2, ch2_wrap, ch3_carry, ch3_top, rev_zero);
    if (ch1_eac == 0)   begin failures++; $display("FAIL ch1_eac never happened"); end
    if (ch1_zero2 == 0) begin failures++; $display("FAIL ch1_zero2 never happened"); end
    if (ch2_wrap == 0)  begin failures++; $display("FAIL ch2_wrap never happened"); end
    if (ch3_carry == 0) begin failures++; $display("FAIL ch3_carry never happened"); end
    if (ch3_top == 0)   begin failures++; $display("FAIL ch3_top never happened"); end
    if (rev_zero == 0)  begin failures++; $display("FAIL rev_zero never happened"); end
    checks += 6;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
