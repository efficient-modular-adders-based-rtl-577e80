// Self-checking testbench for hng_gate.
// Applies all sixteen inputs and compares with p = a, q = b,
// r = (a + b + c) mod 2 and s = [a + b + c >= 2] xor d, worked out
// arithmetically; checks that the outputs form a permutation
// (reversibility) and that with d = 0 the gate is a full adder
// (2s + r = a + b + c). Includes the published example a, b, c, d =
// 0, 1, 0, 1 giving p, q, r, s = 0, 1, 1, 1.
module tb_hng_gate;
  logic a, b, c, d, p, q, r, s;
  int   checks = 0, failures = 0;
  bit [15:0] seen;

  hng_gate dut (.a(a), .b(b), .c(c), .d(d), .p(p), .q(q), .r(r), .s(s));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int total;
    seen = '0;
    for (int v = 0; v < 16; v++) begin
      {a, b, c, d} = 4'(v);
      #1;
      total = int'(a) + int'(b) + int'(c);
      checks++;
      if (p !== a || q !== b || int'(r) != total % 2 ||
          int'(s) != ((total >= 2 ? 1 : 0) + int'(d)) % 2) begin
        failures++;
        $display("FAIL abcd=%0d%0d%0d%0d -> %0d%0d%0d%0d", a, b, c, d, p, q, r, s);
      end
      if (d == 1'b0) begin
        checks++;
        if (2 * int'(s) + int'(r) != total) begin
          failures++;
          $display("FAIL full adder abc=%0d%0d%0d", a, b, c);
        end
      end
      seen[{p, q, r, s}] = 1'b1;
    end
    checks++;
    if (seen != 16'hffff) begin
      failures++;
      $display("FAIL outputs are not a permutation of the inputs");
    end
    {a, b, c, d} = 4'b0101;
    #1;
    checks++;
    if ({p, q, r, s} != 4'b0111) begin
      failures++;
      $display("FAIL example 0101 -> %0d%0d%0d%0d", p, q, r, s);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
