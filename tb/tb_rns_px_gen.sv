// Exhaustive test of the Px generator at n = 2, 4 and 8. Every value X in
// [0, (2^n-1)(2^n+1)) is turned into its residues x2 = X mod 2^n-1 and
// x3 = X mod 2^n+1 with the % operator; the generator's two vectors must
// satisfy (f + g) mod (2^2n - 1) = X. At n = 2 the worked example
// x2 = 0, x3 = 0 must give f = 1111 and g = 0000 exactly. At n = 4 the
// second zero code x2 = 2^n - 1 is applied as well.
module tb_rns_px_gen;
  import tb_rns_ref_pkg::*;

  logic [1:0]  x2_2;  logic [2:0]  x3_2;  logic [3:0]  f2,  g2;
  logic [3:0]  x2_4;  logic [4:0]  x3_4;  logic [7:0]  f4,  g4;
  logic [7:0]  x2_8;  logic [8:0]  x3_8;  logic [15:0] f8,  g8;
  int checks = 0, failures = 0;
  int top_case = 0;   // how often x3 = 2^n (the x3[n] = 1 branch) was applied

  rns_px_gen #(.N(2)) dut2 (.x2(x2_2), .x3(x3_2), .f(f2), .g(g2));
  rns_px_gen          dut4 (.x2(x2_4), .x3(x3_4), .f(f4), .g(g4));
  rns_px_gen #(.N(8)) dut8 (.x2(x2_8), .x3(x3_8), .f(f8), .g(g8));

  task automatic check(int n, big_t x, big_t f, big_t g);
    big_t d;
    d = m2(n) * m3(n);
    checks++;
    if ((f + g) % d != x) begin
      failures++;
      $display("n=%0d X=%0d: f=%0h g=%0h give %0d", n, x, f, g, (f + g) % d);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // worked example, n = 2: X = 660 has x2 = 0, x3 = 0
    x2_2 = 2'd0; x3_2 = 3'd0;
    #1;
    checks++;
    if (f2 != 4'b1111 || g2 != 4'b0000) begin
      failures++;
      $display("example: f=%b g=%b, want 1111 0000", f2, g2);
    end
    for (int x = 0; x < 15; x++) begin
      x2_2 = 2'(x % 3); x3_2 = 3'(x % 5);
      #1;
      check(2, big_t'(x), big_t'(f2), big_t'(g2));
    end
    for (int x = 0; x < 255; x++) begin
      x2_4 = 4'(x % 15); x3_4 = 5'(x % 17);
      if (x3_4 == 5'd16) top_case++;
      #1;
      check(4, big_t'(x), big_t'(f4), big_t'(g4));
    end
    // x2 = 2^n - 1 is the second code of zero modulo 2^n - 1
    for (int x = 0; x < 255; x += 15) begin
      x2_4 = 4'd15; x3_4 = 5'(x % 17);
      #1;
      check(4, big_t'(x), big_t'(f4), big_t'(g4));
    end
    for (int x = 0; x < 65535; x++) begin
      x2_8 = 8'(x % 255); x3_8 = 9'(x % 257);
      if (x3_8 == 9'd256) top_case++;
      #1;
      check(8, big_t'(x), big_t'(f8), big_t'(g8));
    end
    if (top_case == 0) begin
      failures++;
      $display("x3 = 2^n never applied");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
