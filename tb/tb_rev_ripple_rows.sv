// Self-checking testbench for the two ripple rows the modular adders are
// made of: rev_ripple_adder (HNG full-adder row) and rev_ha_incrementer
// (Peres half-adder row), both at the default width 8 and checked
// exhaustively. Expected: {cout, sum} = a + b + cin and {cout, y} = x + inc,
// worked out with integer arithmetic.
module tb_rev_ripple_rows;
  logic [7:0] a, b, sum, x, y;
  logic       cin, cout, inc, icout;
  int checks = 0, failures = 0;

  rev_ripple_adder   u_add (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));
  rev_ha_incrementer u_inc (.x(x), .inc(inc), .y(y), .cout(icout));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 131072; v++) begin
      {cin, a, b} = 17'(v);
      x = a; inc = cin;
      #1;
      checks++;
      if (int'({cout, sum}) != int'(a) + int'(b) + int'(cin)) begin
        failures++;
        $display("FAIL add %0d + %0d + %0d -> %0d", a, b, cin, {cout, sum});
      end
      if (b == 8'd0) begin
        checks++;
        if (int'({icout, y}) != int'(x) + int'(inc)) begin
          failures++;
          $display("FAIL inc %0d + %0d -> %0d", x, inc, {icout, y});
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
