// Self-checking testbench for rns_forward_converter.
// Four instances: the default (N=8, K=2: moduli 255, 1024, 257) on 30000
// random inputs plus corners, and N=2/K=-1 (moduli 3, 2, 5; 5-bit input),
// N=3/K=1 (7, 16, 9; 10 bits) and N=4/K=4 (15, 256, 17; 16 bits), each
// checked exhaustively. Expected residues come from the % operator:
// x1 must be x mod (2^N-1) (2^N-1 accepted as the second code for zero),
// x2 = x mod 2^(N+K), x3 = x mod (2^N+1). The N=2/K=-1 set also runs
// the published example x = 29 with residues 2 (mod 3), 1 (mod 2) and
// 4 (mod 5).
module tb_rns_forward_converter;
  int checks = 0, failures = 0, zero_code_seen = 0, top_x3_seen = 0;

  // default size
  logic [25:0] xd;  logic [7:0] d1;  logic [9:0] d2;  logic [8:0] d3;
  rns_forward_converter ud (.x(xd), .x1(d1), .x2(d2), .x3(d3));
  // N=2, K=-1
  logic [4:0]  xa;  logic [1:0] a1;  logic [0:0] a2;  logic [2:0] a3;
  rns_forward_converter #(.N(2), .K(-1)) ua (.x(xa), .x1(a1), .x2(a2), .x3(a3));
  // N=3, K=1
  logic [9:0]  xb;  logic [2:0] b1;  logic [3:0] b2;  logic [3:0] b3;
  rns_forward_converter #(.N(3), .K(1)) ub (.x(xb), .x1(b1), .x2(b2), .x3(b3));
  // N=4, K=4
  logic [15:0] xc;  logic [3:0] c1;  logic [7:0] c2;  logic [4:0] c3;
  rns_forward_converter #(.N(4), .K(4)) uc (.x(xc), .x1(c1), .x2(c2), .x3(c3));

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // compares one set of residues against the reference
  task automatic cmp(string tag, longint x, int n, int k,
                     longint r1, longint r2, longint r3);
    longint m1 = (longint'(1) << n) - 1;
    longint m2 = longint'(1) << (n + k);
    longint m3 = (longint'(1) << n) + 1;
    checks++;
    if (!((r1 == x % m1) || (r1 == m1 && x % m1 == 0)) ||
        r2 != x % m2 || r3 != x % m3) begin
      failures++;
      $display("FAIL %s x=%0d -> %0d %0d %0d (want %0d %0d %0d)",
               tag, x, r1, r2, r3, x % m1, x % m2, x % m3);
    end
    if (r1 == m1) zero_code_seen++;
    if (r3 == m3 - 1) top_x3_seen++;
  endtask

  initial begin
    for (int i = 0; i < 30000; i++) begin
      xd = 26'($urandom);
      #1 cmp("n8k2", xd, 8, 2, d1, d2, d3);
    end
    xd = '0; #1 cmp("n8k2", xd, 8, 2, d1, d2, d3);
    xd = '1; #1 cmp("n8k2", xd, 8, 2, d1, d2, d3);
    for (int v = 0; v < 32; v++) begin
      xa = 5'(v);
      #1 cmp("n2k-1", xa, 2, -1, a1, a2, a3);
    end
    for (int v = 0; v < 1024; v++) begin
      xb = 10'(v);
      #1 cmp("n3k1", xb, 3, 1, b1, b2, b3);
    end
    for (int v = 0; v < 65536; v++) begin
      xc = 16'(v);
      #1 cmp("n4k4", xc, 4, 4, c1, c2, c3);
    end
    // published example
    xa = 5'd29;
    #1;
    checks++;
    if (a1 != 2'd2 || a2 != 1'd1 || a3 != 3'd4) begin
      failures++;
      $display("FAIL x=29 -> %0d %0d %0d", a1, a2, a3);
    end
    checks++;
    if (top_x3_seen == 0) begin
      failures++;
      $display("FAIL residue 2^N never produced");
    end
    $display("zero as 2^N-1: %0d, x3 = 2^N: %0d", zero_code_seen, top_x3_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
