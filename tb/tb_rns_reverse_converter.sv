// Self-checking testbench for rns_reverse_converter.
// Residues of a number X are worked out with the % operator and fed in;
// the output must be X itself. The default instance (N=8, K=2,
// M = 255*1024*257) gets 30000 random X below M plus corners; N=2/K=-1
// (M = 30), N=3/K=1 (M = 1008) and N=4/K=4 (M = 65280) are checked for
// every X below M. Wherever x mod (2^N-1) is 0 the second zero code 2^N-1
// is fed in as well. Includes the published example: residues 2 (mod 3),
// 1 (mod 2), 4 (mod 5) give back 29.
module tb_rns_reverse_converter;
  int checks = 0, failures = 0, alt_zero_checked = 0;

  logic [7:0] d1;  logic [9:0] d2;  logic [8:0] d3;  logic [25:0] xd;
  rns_reverse_converter ud (.x1(d1), .x2(d2), .x3(d3), .x(xd));
  logic [1:0] a1;  logic [0:0] a2;  logic [2:0] a3;  logic [4:0]  xa;
  rns_reverse_converter #(.N(2), .K(-1)) ua (.x1(a1), .x2(a2), .x3(a3), .x(xa));
  logic [2:0] b1;  logic [3:0] b2;  logic [3:0] b3;  logic [9:0]  xb;
  rns_reverse_converter #(.N(3), .K(1)) ub (.x1(b1), .x2(b2), .x3(b3), .x(xb));
  logic [3:0] c1;  logic [7:0] c2;  logic [4:0] c3;  logic [15:0] xc;
  rns_reverse_converter #(.N(4), .K(4)) uc (.x1(c1), .x2(c2), .x3(c3), .x(xc));

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint modulus(int n, int k);
    return ((longint'(1) << n) - 1) * (longint'(1) << (n + k)) * ((longint'(1) << n) + 1);
  endfunction

  // drives the residues of x (r1 replaced by 2^N-1 when alt is set and r1 = 0)
  // into the instance selected by sel, then compares its output with x
  task automatic run(int sel, int n, int k, longint x, bit alt);
    longint r1 = x % ((longint'(1) << n) - 1);
    longint r2 = x % (longint'(1) << (n + k));
    longint r3 = x % ((longint'(1) << n) + 1);
    longint got;
    if (alt && r1 == 0) r1 = (longint'(1) << n) - 1;
    case (sel)
      0: begin d1 = 8'(r1); d2 = 10'(r2); d3 = 9'(r3); end
      1: begin a1 = 2'(r1); a2 = 1'(r2); a3 = 3'(r3); end
      2: begin b1 = 3'(r1); b2 = 4'(r2); b3 = 4'(r3); end
      default: begin c1 = 4'(r1); c2 = 8'(r2); c3 = 5'(r3); end
    endcase
    #1;
    case (sel)
      0: got = xd;
      1: got = xa;
      2: got = xb;
      default: got = xc;
    endcase
    checks++;
    if (got != x) begin
      failures++;
      $display("FAIL n=%0d k=%0d x=%0d alt=%0d -> %0d", n, k, x, alt, got);
    end
  endtask

  initial begin
    longint m;
    m = modulus(8, 2);
    for (int i = 0; i < 30000; i++) run(0, 8, 2, longint'($urandom) % m, 1'b0);
    run(0, 8, 2, 0, 1'b0);
    run(0, 8, 2, 0, 1'b1);
    run(0, 8, 2, m - 1, 1'b0);
    run(0, 8, 2, 255 * 1000, 1'b1);
    for (longint x = 0; x < modulus(2, -1); x++) begin
      run(1, 2, -1, x, 1'b0);
      if (x % 3 == 0) begin run(1, 2, -1, x, 1'b1); alt_zero_checked++; end
    end
    for (longint x = 0; x < modulus(3, 1); x++) begin
      run(2, 3, 1, x, 1'b0);
      if (x % 7 == 0) begin run(2, 3, 1, x, 1'b1); alt_zero_checked++; end
    end
    for (longint x = 0; x < modulus(4, 4); x++) begin
      run(3, 4, 4, x, 1'b0);
      if (x % 15 == 0) begin run(3, 4, 4, x, 1'b1); alt_zero_checked++; end
    end
    // published example
    a1 = 2'd2; a2 = 1'd1; a3 = 3'd4;
    #1;
    checks++;
    if (xa != 5'd29) begin failures++; $display("FAIL example -> %0d", xa); end
    $display("second zero code checked %0d times", alt_zero_checked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
