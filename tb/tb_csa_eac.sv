// Random test of the carry-save adder with end-around carry at W = 8 and
// W = 40: sum must be the bitwise sum, and sum + carry must equal a + b + c
// modulo 2^W - 1.
module tb_csa_eac;
  import tb_rns_ref_pkg::*;
  localparam int WA = 8, WB = 40;

  logic [WA-1:0] a8, b8, c8, s8, k8;
  logic [WB-1:0] a40, b40, c40, s40, k40;
  int checks = 0, failures = 0;

  csa_eac #(.W(WA)) dut8  (.a(a8),  .b(b8),  .c(c8),  .sum(s8),  .carry(k8));
  csa_eac #(.W(WB)) dut40 (.a(a40), .b(b40), .c(c40), .sum(s40), .carry(k40));

  task automatic check(int w, big_t a, big_t b, big_t c, big_t s, big_t k);
    big_t d;
    d = (big_t'(1) << w) - 1;
    checks++;
    if ((s + k) % d != (a + b + c) % d || s != (a ^ b ^ c)) begin
      failures++;
      $display("W=%0d mismatch a=%0h b=%0h c=%0h sum=%0h carry=%0h", w, a, b, c, s, k);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // corner operands, then random ones
    a8 = '1; b8 = '1; c8 = '1;
    a40 = '1; b40 = '1; c40 = '1;
    #1;
    check(WA, big_t'(a8), big_t'(b8), big_t'(c8), big_t'(s8), big_t'(k8));
    check(WB, big_t'(a40), big_t'(b40), big_t'(c40), big_t'(s40), big_t'(k40));
    for (int i = 0; i < 20000; i++) begin
      a8 = WA'($urandom); b8 = WA'($urandom); c8 = WA'($urandom);
      a40 = {$urandom, $urandom}; b40 = {$urandom, $urandom}; c40 = {$urandom, $urandom};
      #1;
      check(WA, big_t'(a8), big_t'(b8), big_t'(c8), big_t'(s8), big_t'(k8));
      check(WB, big_t'(a40), big_t'(b40), big_t'(c40), big_t'(s40), big_t'(k40));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
