// Exhaustive test of the modified full adder: for all eight input patterns
// the two half adders must give s1 + 2*c1 = x2_i + x3_i + 1 and
// s2 + 2*c2 = x2_i + (~x3_i & ~x3_n), compared as integers.
module tb_rns_mfa;
  logic x2_i, x3_i, x3_n, s1, c1, s2, c2;
  int checks = 0, failures = 0;

  rns_mfa dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int e1, e2;
      {x3_n, x3_i, x2_i} = 3'(v);
      #1;
      e1 = int'(x2_i) + int'(x3_i) + 1;
      e2 = int'(x2_i) + ((x3_i == 1'b0 && x3_n == 1'b0) ? 1 : 0);
      checks++;
      if (int'(s1) + 2 * int'(c1) != e1) begin
        failures++;
        $display("MHA1 mismatch x2=%0b x3=%0b: got %0d want %0d", x2_i, x3_i, int'(s1) + 2 * int'(c1), e1);
      end
      checks++;
      if (int'(s2) + 2 * int'(c2) != e2) begin
        failures++;
        $display("MHA2 mismatch x2=%0b x3=%0b x3n=%0b: got %0d want %0d", x2_i, x3_i, x3_n, int'(s2) + 2 * int'(c2), e2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
