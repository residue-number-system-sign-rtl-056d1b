// Qx generator: position of X inside its partition of size S = m1 m2 m3.
//
// With m1 = 2^2n, DR2 = m2 m3 = 2^2n - 1 and |m1^-1| mod DR2 = 1, the CRT-II
// step on the pairs (Px, x1) and (DR2, m1) gives
//   Qx = x1 + 2^2n * Z,   Z = | f + g - x1 |  mod 2^2n-1,
// and -x1 modulo 2^2n - 1 is the bit complement ~x1. A 2n-bit carry-save
// adder with end-around carry (csa_eac) reduces f, g and ~x1 to two vectors,
// a modulo 2^2n - 1 adder (mod_adder) produces the canonical Z, and Qx is the
// concatenation {Z, x1}: no adder is needed for the multiplication by 2^2n.
// This structure follows the published Qx generator.
//
// Ports: f, g from rns_px_gen (2n bits each), x1 the residue mod 2^2n
// (2n bits), qx (4n bits, value 0 .. S-1).
// Purely combinational, no clock.
module rns_qx_gen #(
  parameter int unsigned N = rns_sd_pkg::N_DEFAULT
) (
  input  logic [2*N-1:0] f,
  input  logic [2*N-1:0] g,
  input  logic [2*N-1:0] x1,
  output logic [4*N-1:0] qx
);

  logic [2*N-1:0] x1_n, csa_s, csa_c, z;

  assign x1_n = ~x1;

  csa_eac #(.W(2*N)) u_csa (
    .a     (f),
    .b     (g),
    .c     (x1_n),
    .sum   (csa_s),
    .carry (csa_c)
  );

  mod_adder #(.W(2*N)) u_madd (
    .a (csa_s),
    .b (csa_c),
    .s (z)
  );

  assign qx = {z, x1};

endmodule
