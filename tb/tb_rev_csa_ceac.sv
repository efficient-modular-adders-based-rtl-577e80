// Self-checking testbench for rev_csa_ceac.
// Instance u8 has the default width (8), checked on 20000 random operand
// triples plus the all-ones corners; instance u4 (width 4) is checked
// exhaustively. For every triple: s must equal a ^ b ^ c, and
// s + cv must equal a + b + c modulo 2^W-1 (reference worked out with
// integer arithmetic), which fails if the complemented end-around carry is lost.
module tb_rev_csa_ceac;
  logic [7:0] a8, b8, c8, s8, cv8;
  logic [3:0] a4, b4, c4, s4, cv4;
  int checks = 0, failures = 0, eac_seen = 0;

  rev_csa_ceac u8 (.a(a8), .b(b8), .c(c8), .s(s8), .cv(cv8));
  rev_csa_ceac #(.WIDTH(4)) u4 (.a(a4), .b(b4), .c(c4), .s(s4), .cv(cv4));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check8();
    longint m = 257;
    #1;
    checks++;
    if (s8 != (a8 ^ b8 ^ c8) ||
        (longint'(s8) + longint'(cv8) - 1 + m) % m != (longint'(a8) + longint'(b8) + longint'(c8)) % m) begin
      failures++;
      $display("FAIL w8 a=%0d b=%0d c=%0d -> s=%0d cv=%0d", a8, b8, c8, s8, cv8);
    end
    if (!cv8[0]) eac_seen++;
  endtask

  initial begin
    for (int i = 0; i < 20000; i++) begin
      a8 = 8'($urandom); b8 = 8'($urandom); c8 = 8'($urandom);
      check8();
    end
    a8 = '1; b8 = '1; c8 = '1; check8();
    a8 = 8'h80; b8 = 8'h80; c8 = 8'h00; check8();
    for (int v = 0; v < 4096; v++) begin
      {a4, b4, c4} = 12'(v);
      #1;
      checks++;
      if (s4 != (a4 ^ b4 ^ c4) ||
          (int'(s4) + int'(cv4) - 1 + 17) % 17 != (int'(a4) + int'(b4) + int'(c4)) % 17) begin
        failures++;
        $display("FAIL w4 a=%0d b=%0d c=%0d -> s=%0d cv=%0d", a4, b4, c4, s4, cv4);
      end
    end
    checks++;
    if (eac_seen == 0) begin
      failures++;
      $display("FAIL complemented end-around carry never exercised");
    end
    $display("top carries seen: %0d", eac_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
