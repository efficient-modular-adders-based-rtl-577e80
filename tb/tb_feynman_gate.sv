// Self-checking testbench for feynman_gate.
// Applies all four input pairs and compares p, q with p = a and
// q = (a + b) mod 2. Also checks that the four output pairs are all
// different, i.e. that the gate is reversible.
module tb_feynman_gate;
  logic a, b, p, q;
  int   checks = 0, failures = 0;
  bit [3:0] seen;

  feynman_gate dut (.a(a), .b(b), .p(p), .q(q));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if (p !== a || int'(q) != (int'(a) + int'(b)) % 2) begin
        failures++;
        $display("FAIL a=%0d b=%0d -> p=%0d q=%0d", a, b, p, q);
      end
      seen[{p, q}] = 1'b1;
    end
    checks++;
    if (seen != 4'hf) begin
      failures++;
      $display("FAIL outputs are not a permutation of the inputs");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
