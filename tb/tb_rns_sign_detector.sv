// End-to-end test of the sign detector at its default size (n = 4).
//
// Every Qx position in [0, S) is visited once, in a random block Rx of the
// dynamic range: X = Rx * S + Q. The residues x1, x2, x3 are taken from X with
// the % operator, and the outputs must be Qx = X mod S and
// sign = (X mod S >= S/2). The test also counts how often each mechanism of
// the datapath was used and fails if one never was:
//   the x3 = 2^n branch of the Px equation, the end-around carry of the MFA
//   array and of the carry-save adder, the end-around carry and the zero fold
//   of the modulo adder, positive and negative results, and negative results
//   whose Qx top bit is 0.
module tb_rns_sign_detector;
  import tb_rns_ref_pkg::*;
  localparam int N = rns_sd_pkg::N_DEFAULT;

  logic [2*N-1:0] x1;
  logic [N-1:0]   x2;
  logic [N:0]     x3;
  logic [4*N-1:0] qx;
  logic           sign;
  int checks = 0, failures = 0;

  typedef enum int {
    EV_X3_TOP, EV_PX_EAC, EV_CSA_EAC, EV_MADD_EAC, EV_MADD_FOLD,
    EV_POS, EV_NEG, EV_NEG_LOW, EV_COUNT
  } event_e;
  int events [EV_COUNT];

  rns_sign_detector dut (.*);

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    big_t s, x, rx;
    s = s_of(N);
    foreach (events[e]) events[e] = 0;
    for (big_t q = 0; q < s; q++) begin
      rx = rand_below(m4(N));
      x  = rx * s + q;
      x1 = (2*N)'(x % m1(N));
      x2 = N'(x % m2(N));
      x3 = (N+1)'(x % m3(N));
      #1;
      checks++;
      if (big_t'(qx) != x % s || sign != sign_of(N, x)) begin
        failures++;
        if (failures < 10)
          $display("X=%0d (x1=%0d x2=%0d x3=%0d): qx=%0d sign=%0b, want %0d %0b",
                   x, x1, x2, x3, qx, sign, x % s, sign_of(N, x));
      end
      if (x3[N])                          events[EV_X3_TOP]++;
      if (dut.u_px.g[0])                  events[EV_PX_EAC]++;
      if (dut.u_qx.csa_c[0])              events[EV_CSA_EAC]++;
      if (dut.u_qx.u_madd.raw[2*N])       events[EV_MADD_EAC]++;
      if (&dut.u_qx.u_madd.eac)           events[EV_MADD_FOLD]++;
      if (sign)                           events[EV_POS + 1]++;
      else                                events[EV_POS]++;
      if (sign && !qx[4*N-1])             events[EV_NEG_LOW]++;
    end
    for (int e = 0; e < EV_COUNT; e++) begin
      event_e ev;
      ev = event_e'(e);
      $display("%-14s %0d", ev.name(), events[e]);
      checks++;
      if (events[e] == 0) begin
        failures++;
        $display("mechanism %s never happened", ev.name());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
