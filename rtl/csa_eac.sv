// Carry-save adder with end-around carry (EAC), W bits.
//
// Reduces three W-bit operands to a sum vector and a carry vector whose
// total is congruent to a + b + c modulo 2^W - 1. Each column is a full
// adder; the column carries move one place up, and the carry out of the top
// column, of weight 2^W = 1 (mod 2^W - 1), re-enters at bit 0.
// In the sign detector W = 2n and the three operands are f, g and ~x1.
// The function follows the published Qx generator; the full-adder row is the
// standard construction. Purely combinational, no clock.
module csa_eac #(
  parameter int unsigned W = 2 * rns_sd_pkg::N_DEFAULT
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);

  logic [W-1:0] maj;

  always_comb begin
    sum   = a ^ b ^ c;
    maj   = (a & b) | (a & c) | (b & c);
    carry = {maj[W-2:0], maj[W-1]};
  end

endmodule
