// Shared constants for the residue-number-system sign detector on the
// moduli set {2^2n, 2^n-1, 2^n+1, 2^(n+1)-1}.
//
// N_DEFAULT is the default value of n for every module of the detector. The
// value 4 is the smallest n of the published area/delay evaluation
// (n = 4, 8, 10, 12, 16, 20); nothing in the method prefers one n, and every
// module takes n as the parameter N. The widths that follow from n:
// residues x1, x2, x3 are 2n, n and n+1 bits wide, the
// partition size S = 2^2n * (2^2n - 1) needs 4n bits.
package rns_sd_pkg;

  parameter int unsigned N_DEFAULT = 4;

endpackage
