// Test of the modulo 2^W - 1 adder: exhaustive at W = 8 (all 65536 operand
// pairs, including the all-ones code), random at W = 40. The result must be
// (a + b) mod (2^W - 1), always below 2^W - 1.
module tb_mod_adder;
  import tb_rns_ref_pkg::*;
  localparam int WA = 8, WB = 40;

  logic [WA-1:0] a8, b8, s8;
  logic [WB-1:0] a40, b40, s40;
  int checks = 0, failures = 0;

  mod_adder #(.W(WA)) dut8  (.a(a8),  .b(b8),  .s(s8));
  mod_adder #(.W(WB)) dut40 (.a(a40), .b(b40), .s(s40));

  task automatic check(int w, big_t a, big_t b, big_t s);
    big_t d;
    d = (big_t'(1) << w) - 1;
    checks++;
    if (s != (a + b) % d) begin
      failures++;
      $display("W=%0d mismatch a=%0h b=%0h s=%0h want %0h", w, a, b, s, (a + b) % d);
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
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        a8 = WA'(i); b8 = WA'(j);
        #1;
        check(WA, big_t'(a8), big_t'(b8), big_t'(s8));
      end
    for (int i = 0; i < 20000; i++) begin
      a40 = (i < 4) ? WB'(i == 0 ? 0 : i == 1 ? 40'hff_ffff_ffff : 40'hff_ffff_fffe)
                    : {$urandom, $urandom};
      b40 = (i < 4) ? WB'(i == 3 ? 1 : 0) : {$urandom, $urandom};
      #1;
      check(WB, big_t'(a40), big_t'(b40), big_t'(s40));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
