// Self-checking testbench for the modulo 2^N+1 channel adder helper.
// Both operands run over every residue 0 .. 2^N (including 2^N, which
// needs bit N) for N = 8 (default) and N = 3; the result must equal
// (a + b) mod (2^N+1), worked out with integer arithmetic.
module tb_rev_modp1_channel_adder;
  logic [8:0] a8, b8, y8;
  logic [3:0] a3, b3, y3;
  int checks = 0, failures = 0;

  rev_modp1_channel_adder u8 (.a(a8), .b(b8), .y(y8));
  rev_modp1_channel_adder #(.N(3)) u3 (.a(a3), .b(b3), .y(y3));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x <= 256; x++) begin
      for (int z = 0; z <= 256; z++) begin
        a8 = 9'(x); b8 = 9'(z);
        #1;
        checks++;
        if (int'(y8) != (x + z) % 257) begin
          failures++;
          $display("FAIL n8 %0d + %0d -> %0d", x, z, y8);
        end
      end
    end
    for (int x = 0; x <= 8; x++) begin
      for (int z = 0; z <= 8; z++) begin
        a3 = 4'(x); b3 = 4'(z);
        #1;
        checks++;
        if (int'(y3) != (x + z) % 9) begin
          failures++;
          $display("FAIL n3 %0d + %0d -> %0d", x, z, y3);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
