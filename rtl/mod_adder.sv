// Modulo 2^W - 1 adder with a canonical result.
//
// Adds two W-bit operands, each any code 0 .. 2^W - 1, and returns
// |a + b| mod (2^W - 1) in the range 0 .. 2^W - 2. The raw sum is formed once
// with W+1 bits; its carry out (weight 2^W = 1) is added back at bit 0, and a
// result of all ones (the second code of zero) is folded to zero. Since
// a + b <= 2^(W+1) - 2, the end-around step never carries again.
// In the sign detector W = 2n and the result is the factor Z of Qx; Z must
// be canonical because Qx = {Z, x1} has to stay below S = 2^2n (2^2n - 1).
// The published design names a modulo 2^2n - 1 adder; this architecture is
// this design's choice. Purely combinational, no clock.
module mod_adder #(
  parameter int unsigned W = 2 * rns_sd_pkg::N_DEFAULT
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] s
);

  logic [W:0]   raw;
  logic [W-1:0] eac;

  always_comb begin
    raw = {1'b0, a} + {1'b0, b};
    eac = raw[W-1:0] + W'(raw[W]);
    s   = (&eac) ? '0 : eac;
  end

endmodule
