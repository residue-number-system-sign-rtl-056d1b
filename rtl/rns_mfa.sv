// Modified full adder (MFA) of the Px generator.
//
// One MFA serves one bit position i of the residues x2 (mod 2^n-1) and
// x3 (mod 2^n+1). It holds two modified half adders:
//   MHA1 adds x2_i + x3_i + 1. The third input is a constant one taken from
//        the correction constant L, so the cell reduces to
//        sum = XNOR(x2_i, x3_i), carry = OR(x2_i, x3_i).
//   MHA2 adds x2_i + (~x3_i & ~x3_n). The inverted x3 bit is forced to zero
//        when x3 = 2^n (top bit x3_n set), which folds the two cases of the
//        Px equation into one sum.
// The split into MHA1/MHA2 and their inputs follow the published MFA; the
// gate-level form of each half adder is this design's choice.
// Purely combinational, no clock.
module rns_mfa (
  input  logic x2_i,
  input  logic x3_i,
  input  logic x3_n,
  output logic s1,   // MHA1 sum
  output logic c1,   // MHA1 carry
  output logic s2,   // MHA2 sum
  output logic c2    // MHA2 carry
);

  logic x3_gated_n;

  always_comb begin
    // MHA1: full adder with its carry-in tied to 1
    s1 = ~(x2_i ^ x3_i);
    c1 = x2_i | x3_i;
    // MHA2: half adder on x2_i and the gated complement of x3_i
    x3_gated_n = ~x3_i & ~x3_n;
    s2 = x2_i ^ x3_gated_n;
    c2 = x2_i & x3_gated_n;
  end

endmodule
