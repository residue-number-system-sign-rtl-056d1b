// Sign decision on Qx: sign = 1 (negative) when Qx >= S/2.
//
// In the partitioned dynamic range each block of S = 2^2n (2^2n - 1)
// consecutive values holds positive numbers in its lower half and negative
// numbers in its upper half, so the sign needs only Qx = X mod S.
// S/2 = 2^(4n-1) - 2^(2n-1) is 0 followed by ones in bits 4n-2 .. 2n-1 and
// zeros below, so
//   Qx >= S/2  <=>  Qx[4n-1]  OR  (Qx[4n-2:2n-1] all ones).
// The second term covers Qx in [S/2, 2^(4n-1)); testing the top bit alone
// would call those values positive. The rule Qx >= S/2 is the published
// one; its reduction to one OR and one AND tree is this design's own.
//
// Ports: qx (4n bits, 0 .. S-1), sign. Purely combinational, no clock.
module rns_sign_unit #(
  parameter int unsigned N = rns_sd_pkg::N_DEFAULT
) (
  input  logic [4*N-1:0] qx,
  output logic           sign
);

  assign sign = qx[4*N-1] | (&qx[4*N-2:2*N-1]);

endmodule
