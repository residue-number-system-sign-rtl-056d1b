// Exhaustive test of the sign decision at n = 4 and n = 2: every Qx in
// [0, S) must give sign = (Qx >= S/2). Also counts how many of the values in
// [S/2, 2^(4n-1)), whose top bit is still 0, were seen negative.
module tb_rns_sign_unit;
  import tb_rns_ref_pkg::*;

  logic [15:0] qx4; logic sign4;
  logic [7:0]  qx2; logic sign2;
  int checks = 0, failures = 0, low_negatives = 0;

  rns_sign_unit          dut4 (.qx(qx4), .sign(sign4));
  rns_sign_unit #(.N(2)) dut2 (.qx(qx2), .sign(sign2));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int q = 0; q < int'(s_of(4)); q++) begin
      qx4 = 16'(q);
      #1;
      checks++;
      if (sign4 != (big_t'(q) >= s_of(4) / 2)) begin
        failures++;
        $display("n=4 qx=%0d sign=%0b", q, sign4);
      end
      if (sign4 && !qx4[15]) low_negatives++;
    end
    for (int q = 0; q < int'(s_of(2)); q++) begin
      qx2 = 8'(q);
      #1;
      checks++;
      if (sign2 != (big_t'(q) >= s_of(2) / 2)) begin
        failures++;
        $display("n=2 qx=%0d sign=%0b", q, sign2);
      end
    end
    checks++;
    if (low_negatives != 128) begin
      failures++;
      $display("negatives below 2^15: %0d, want 128", low_negatives);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
