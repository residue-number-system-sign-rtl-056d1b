// Runs the sign detector at every size of the published evaluation,
// n = 4, 8, 10, 12, 16 and 20 (dynamic ranges of about 5n bits, up to 100
// bits), and at n = 2, the size of the worked example. Each size has its own
// instance, driven by a tb_rns_sd_size checker with random and block-edge
// values; the counts of all sizes are summed.
module tb_rns_workloads;
  localparam int NS = 7;
  localparam int SIZES [NS] = '{2, 4, 8, 10, 12, 16, 20};

  logic [NS-1:0] done;
  int chk [NS];
  int fail [NS];
  int checks, failures;

  for (genvar k = 0; k < NS; k++) begin : g_size
    tb_rns_sd_size #(.N(SIZES[k]), .TRIALS(5000)) u_size (
      .done (done[k]), .checks (chk[k]), .failures (fail[k]));
  end

  initial begin
    #10000000;
    $display("watchdog expired");
    checks = 0; failures = 1;
    for (int k = 0; k < NS; k++) begin checks += chk[k]; failures += fail[k]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (&done);
    checks = 0; failures = 0;
    for (int k = 0; k < NS; k++) begin
      $display("n=%0d: %0d checks, %0d failures", SIZES[k], chk[k], fail[k]);
      checks += chk[k];
      failures += fail[k];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
