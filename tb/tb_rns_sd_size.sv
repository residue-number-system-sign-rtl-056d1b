// Checker for one size n of the sign detector, used by tb_rns_workloads.
//
// Drives its own rns_sign_detector instance with X values spread over the
// whole dynamic range M = 2^2n (2^n-1)(2^n+1)(2^(n+1)-1): the block edges Q = 0, S/2 - 1, S/2,
// 2^(4n-1) - 1, 2^(4n-1), S - 1 in random blocks, then TRIALS random X. The
// residues come from X with %, and Qx and the sign are compared with
// X mod S and (X mod S >= S/2). At n = 2 it also replays the worked example
// X = 660 (the code of -300): x1 = 4, x2 = 0, x3 = 0, Qx = 180, negative.
// Raises done when finished; checks and failures count the comparisons.
module tb_rns_sd_size #(
  parameter int N      = 4,
  parameter int TRIALS = 2000
) (
  output logic done,
  output int   checks,
  output int   failures
);
  import tb_rns_ref_pkg::*;

  logic [2*N-1:0] x1;
  logic [N-1:0]   x2;
  logic [N:0]     x3;
  logic [4*N-1:0] qx;
  logic           sign;

  rns_sign_detector #(.N(N)) dut (.*);

  task automatic apply(big_t x);
    big_t s;
    s  = s_of(N);
    x1 = (2*N)'(x % m1(N));
    x2 = N'(x % m2(N));
    x3 = (N+1)'(x % m3(N));
    #1;
    checks++;
    if (big_t'(qx) != x % s || sign != sign_of(N, x)) begin
      failures++;
      $display("n=%0d X=%0d: qx=%0d sign=%0b, want %0d %0b", N, x, qx, sign, x % s, sign_of(N, x));
    end
  endtask

  initial begin
    big_t s, edges [6];
    done = 1'b0;
    checks = 0;
    failures = 0;
    s = s_of(N);
    edges = '{0, s/2 - 1, s/2, (big_t'(1) << (4*N-1)) - 1, big_t'(1) << (4*N-1), s - 1};
    if (N == 2) begin
      apply(660);
      checks++;
      if (x1 != 4 || x2 != 0 || x3 != 0 || qx != (4*N)'(180) || !sign) begin
        failures++;
        $display("worked example X=660 failed: qx=%0d sign=%0b", qx, sign);
      end
    end
    foreach (edges[i]) apply(rand_below(m4(N)) * s + edges[i]);
    for (int t = 0; t < TRIALS; t++) apply(rand_below(m_of(N)));
    done = 1'b1;
  end
endmodule
