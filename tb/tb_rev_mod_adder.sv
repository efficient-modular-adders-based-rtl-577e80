// Self-checking testbench for rev_mod_adder.
// Instance u8 (default width 8) is checked exhaustively over all 65536
// operand pairs, u16 (width 16, as used in the reverse converter) on 20000
// random pairs plus corners. The exact expected output is worked out with
// integer arithmetic: t = a + b, y = t - 2^W + 1 if t >= 2^W, else y = t.
// That is a + b modulo 2^W-1 with all ones standing for zero when
// a + b = 2^W-1. Also runs the published 8-bit example: residues 4 and 2
// summed give 6, then adding residue 1 gives 7.
module tb_rev_mod_adder;
  logic [7:0]  a8, b8, y8;
  logic [15:0] a16, b16, y16;
  int checks = 0, failures = 0, eac_seen = 0, allones_zero_seen = 0;

  rev_mod_adder u8 (.a(a8), .b(b8), .y(y8));
  rev_mod_adder #(.WIDTH(16)) u16 (.a(a16), .b(b16), .y(y16));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint expect_y(longint a, longint b, int w);
    longint t = a + b;
    return (t >= (longint'(1) << w)) ? t - (longint'(1) << w) + 1 : t;
  endfunction

  task automatic check16();
    #1;
    checks++;
    if (longint'(y16) != expect_y(a16, b16, 16)) begin
      failures++;
      $display("FAIL w16 a=%0d b=%0d -> y=%0d", a16, b16, y16);
    end
  endtask

  initial begin
    for (int v = 0; v < 65536; v++) begin
      {a8, b8} = 16'(v);
      #1;
      checks++;
      if (longint'(y8) != expect_y(a8, b8, 8)) begin
        failures++;
        $display("FAIL w8 a=%0d b=%0d -> y=%0d", a8, b8, y8);
      end
      if (int'(a8) + int'(b8) >= 256) eac_seen++;
      if (y8 == 8'hff && (int'(a8) + int'(b8)) % 255 == 0) allones_zero_seen++;
    end
    for (int i = 0; i < 20000; i++) begin
      a16 = 16'($urandom); b16 = 16'($urandom);
      check16();
    end
    a16 = '1; b16 = '1; check16();
    a16 = 16'h8000; b16 = 16'h7fff; check16();
    a16 = 16'h8000; b16 = 16'h8000; check16();
    // published example: 4 + 2 = 6, 6 + 1 = 7
    a8 = 8'd4; b8 = 8'd2; #1;
    checks++;
    if (y8 != 8'd6) begin failures++; $display("FAIL 4+2 -> %0d", y8); end
    a8 = y8; b8 = 8'd1; #1;
    checks++;
    if (y8 != 8'd7) begin failures++; $display("FAIL 6+1 -> %0d", y8); end
    checks++;
    if (eac_seen == 0 || allones_zero_seen == 0) begin
      failures++;
      $display("FAIL end-around carry or all-ones zero never exercised");
    end
    $display("end-around carries: %0d, all-ones zeros: %0d", eac_seen, allones_zero_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
