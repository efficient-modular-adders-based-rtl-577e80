// Self-checking testbench for rev_modp1_adder.
// Instance u8 (default width 8) is checked exhaustively over all 65536
// operand pairs and u3 (width 3) exhaustively as well. Expected:
// y = (a + b + 1) mod (2^W+1), worked out with integer arithmetic; this
// includes the value 2^W, which needs bit W of y. Counts how often the
// full-adder row carried out (complemented carry 0) and how often the
// result was 2^W; both must happen.
module tb_rev_modp1_adder;
  logic [7:0] a8, b8;
  logic [8:0] y8;
  logic [2:0] a3, b3;
  logic [3:0] y3;
  int checks = 0, failures = 0, carry_seen = 0, top_seen = 0;

  rev_modp1_adder u8 (.a(a8), .b(b8), .y(y8));
  rev_modp1_adder #(.WIDTH(3)) u3 (.a(a3), .b(b3), .y(y3));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v++) begin
      {a8, b8} = 16'(v);
      #1;
      checks++;
      if (int'(y8) != (int'(a8) + int'(b8) + 1) % 257) begin
        failures++;
        $display("FAIL w8 a=%0d b=%0d -> y=%0d", a8, b8, y8);
      end
      if (int'(a8) + int'(b8) >= 256) carry_seen++;
      if (y8 == 9'd256) top_seen++;
    end
    for (int v = 0; v < 64; v++) begin
      {a3, b3} = 6'(v);
      #1;
      checks++;
      if (int'(y3) != (int'(a3) + int'(b3) + 1) % 9) begin
        failures++;
        $display("FAIL w3 a=%0d b=%0d -> y=%0d", a3, b3, y3);
      end
    end
    checks++;
    if (carry_seen == 0 || top_seen == 0) begin
      failures++;
      $display("FAIL carry-out or 2^W result never exercised");
    end
    $display("carries: %0d, results of 2^W: %0d", carry_seen, top_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
