// Sign detector for the residue number system {2^2n, 2^n-1, 2^n+1, 2^(n+1)-1}
// with a partitioned dynamic range.
//
// The dynamic range M = m1 m2 m3 m4 is cut into m4 = 2^(n+1) - 1 blocks of
// S = m1 m2 m3 = 2^2n (2^2n - 1) values; inside every block the lower half is
// positive and the upper half negative. Writing X = Rx * S + Qx, the sign
// depends on Qx alone, and Qx is the reverse conversion of the first three
// residues only: x4 is never needed.
//   1. rns_px_gen  : x2, x3  -> f, g with f + g = X (mod 2^2n - 1)   (n MFAs)
//   2. rns_qx_gen  : f, g, x1 -> Qx = {Z, x1}, Z = |f + g - x1| mod 2^2n-1
//   3. rns_sign_unit: sign = Qx >= S/2
// The three-stage split and the equations follow the published architecture.
//
// Ports: x1 (2n bits, residue mod 2^2n), x2 (n bits, mod 2^n-1), x3 (n+1
// bits, mod 2^n+1, value 0 .. 2^n); qx (4n bits) and sign (1 = negative).
// Fully combinational: outputs follow the inputs after the logic delay,
// there is no clock, register or handshake. N must be at least 2.
module rns_sign_detector #(
  parameter int unsigned N = rns_sd_pkg::N_DEFAULT
) (
  input  logic [2*N-1:0] x1,
  input  logic [N-1:0]   x2,
  input  logic [N:0]     x3,
  output logic [4*N-1:0] qx,
  output logic           sign
);

  logic [2*N-1:0] f, g;

  rns_px_gen #(.N(N)) u_px (
    .x2 (x2),
    .x3 (x3),
    .f  (f),
    .g  (g)
  );

  rns_qx_gen #(.N(N)) u_qx (
    .f  (f),
    .g  (g),
    .x1 (x1),
    .qx (qx)
  );

  rns_sign_unit #(.N(N)) u_sign (
    .qx   (qx),
    .sign (sign)
  );

endmodule
