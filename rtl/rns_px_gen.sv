// Px generator: two-vector form of Px = |X| mod (2^n-1)(2^n+1) = |X| mod (2^2n-1).
//
// By the CRT on the pair (2^n-1, 2^n+1), whose mutual inverses are both
// 2^(n-1),
//   Px = | 2^(n-1)(2^n+1) x2 + 2^(n-1)(2^n-1) x3 |  mod 2^2n-1
//      = | K1 + K2 |,  K1 = 2^(2n-1) x2 + 2^(n-1) x2,  K2 = 2^(2n-1) x3 - 2^(n-1) x3.
// Multiplying by a power of two modulo 2^2n-1 is a rotation and negation is
// a bit inversion, so every term is a rewired copy of x2 or x3:
//   A  = {x2[0], n zeros, x2[n-1:1]}                    (x2 rotated right by 1)
//   B  = {0, x2[n-1:0], n-1 zeros}                       (x2 rotated left by n-1)
//   K3 = {x3[0], ~x3[n-1:0] & ~x3[n], x3[n-1:1]}
//   L  = {1, n zeros, n-1 ones} = 2^(2n-1) + 2^(n-1) - 1  (constant)
// with K1 = A + B and K2 = K3 + L for both x3[n] = 0 and x3 = 2^n (where the
// gating makes K3 zero). The four vectors never have more than three bits in
// one column and L's ones land where A and K3 meet, so n modified full
// adders (rns_mfa) reduce A + B + K3 + L to a sum vector f and a carry
// vector g. The carry out of bit 2n-1 has weight 2^2n = 1 (mod 2^2n-1) and is
// wired to g[0] (end-around carry).
//
// Column map, for MFA i (0 <= i < n):
//   MHA1 (x2[i] + x3[i] + 1) sits in column i-1, and column 2n-1 for i = 0;
//   MHA2 (x2[i] + gated ~x3[i]) sits in column n-1+i.
// The equations, the constant L and the MFA structure follow the published
// method; the exact column wiring is derived here from those equations.
//
// Ports: x2 (n bits), x3 (n+1 bits, value 0..2^n), f and g (2n bits), with
// |f + g| mod (2^2n - 1) = |X| mod (2^2n - 1). f + g may equal 2^2n - 1, the
// second code of zero; the following Qx generator accepts that.
// Purely combinational, no clock. N must be at least 2.
module rns_px_gen #(
  parameter int unsigned N = rns_sd_pkg::N_DEFAULT
) (
  input  logic [N-1:0]   x2,
  input  logic [N:0]     x3,
  output logic [2*N-1:0] f,
  output logic [2*N-1:0] g
);

  logic [N-1:0] s1, c1, s2, c2;

  for (genvar i = 0; i < N; i++) begin : g_mfa
    rns_mfa u_mfa (
      .x2_i (x2[i]),
      .x3_i (x3[i]),
      .x3_n (x3[N]),
      .s1   (s1[i]),
      .c1   (c1[i]),
      .s2   (s2[i]),
      .c2   (c2[i])
    );
  end

  // Bit rewiring of the MFA outputs into the sum and carry vectors
  always_comb begin
    f[2*N-1]     = s1[0];
    f[N-2:0]     = s1[N-1:1];
    f[2*N-2:N-1] = s2;
    g[0]         = c1[0];          // end-around carry from column 2n-1
    g[N-1:1]     = c1[N-1:1];
    g[2*N-1:N]   = c2;
  end

endmodule
