// Self-checking testbench for peres_gate.
// Applies all eight inputs and compares with p = a, q = (a + b) mod 2,
// r = (a * b + c) mod 2; checks that the outputs form a permutation
// (reversibility) and that with c = 0 the gate adds a + b as a half adder
// (2r + q = a + b). Includes the published example a = b = c = 1 giving
// p, q, r = 1, 0, 0.
module tb_peres_gate;
  logic a, b, c, p, q, r;
  int   checks = 0, failures = 0;
  bit [7:0] seen;

  peres_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if (p !== a || int'(q) != (int'(a) + int'(b)) % 2 ||
          int'(r) != (int'(a) * int'(b) + int'(c)) % 2) begin
        failures++;
        $display("FAIL a=%0d b=%0d c=%0d -> %0d%0d%0d", a, b, c, p, q, r);
      end
      if (c == 1'b0) begin
        checks++;
        if (2 * int'(r) + int'(q) != int'(a) + int'(b)) begin
          failures++;
          $display("FAIL half adder a=%0d b=%0d", a, b);
        end
      end
      seen[{p, q, r}] = 1'b1;
    end
    checks++;
    if (seen != 8'hff) begin
      failures++;
      $display("FAIL outputs are not a permutation of the inputs");
    end
    {a, b, c} = 3'b111;
    #1;
    checks++;
    if ({p, q, r} != 3'b100) begin
      failures++;
      $display("FAIL example 111 -> %0d%0d%0d", p, q, r);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
