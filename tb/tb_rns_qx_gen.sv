// Test of the Qx generator at n = 4 (random) and n = 2 (worked example,
// including its carry-save outputs sum = 0100, carry = 0111).
// For arbitrary 2n-bit f, g and x1 the output must be
// Qx = ((f + g - x1) mod (2^2n - 1)) * 2^2n + x1, computed with integer
// arithmetic. Corner inputs make f + g - x1 a multiple of 2^2n - 1 so that
// the zero fold of the modular adder is exercised.
module tb_rns_qx_gen;
  import tb_rns_ref_pkg::*;

  logic [7:0]  f4, g4, x1_4;  logic [15:0] qx4;
  logic [3:0]  f2, g2, x1_2;  logic [7:0]  qx2;
  int checks = 0, failures = 0;

  rns_qx_gen          dut4 (.f(f4), .g(g4), .x1(x1_4), .qx(qx4));
  rns_qx_gen #(.N(2)) dut2 (.f(f2), .g(g2), .x1(x1_2), .qx(qx2));

  task automatic check4();
    big_t d, z, want;
    d = 255;
    z = (big_t'(f4) + big_t'(g4) + d * 2 - big_t'(x1_4)) % d;
    want = z * 256 + big_t'(x1_4);
    checks++;
    if (big_t'(qx4) != want) begin
      failures++;
      $display("n=4 f=%0d g=%0d x1=%0d: qx=%0d want %0d", f4, g4, x1_4, qx4, want);
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
    // worked example: f = 1111, g = 0000, x1 = 0100 gives Qx = 10110100 = 180
    f2 = 4'b1111; g2 = 4'b0000; x1_2 = 4'b0100;
    #1;
    checks++;
    if (qx2 != 8'd180) begin
      failures++;
      $display("example: qx=%0d want 180", qx2);
    end
    // intermediate CSA vectors of the example: 0100 + 0111 = 11 (mod 15)
    checks++;
    if (dut2.csa_s != 4'b0100 || dut2.csa_c != 4'b0111) begin
      failures++;
      $display("example: csa sum=%b carry=%b, want 0100 0111", dut2.csa_s, dut2.csa_c);
    end
    // corners: result zero from several codes
    for (int i = 0; i < 256; i++) begin
      f4 = 8'(i); g4 = 8'(255 - i); x1_4 = 8'd0;     #1; check4();
      f4 = 8'(i); g4 = 8'd0;        x1_4 = 8'(i);    #1; check4();
      f4 = 8'(i); g4 = 8'hff;       x1_4 = 8'(i);    #1; check4();
    end
    for (int i = 0; i < 50000; i++) begin
      f4 = 8'($urandom); g4 = 8'($urandom); x1_4 = 8'($urandom);
      #1;
      check4();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
