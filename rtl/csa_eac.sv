// Carry-save adder modulo 2^K-1 with end-around carry.
//
// Reduces three K-bit residues to a sum vector and a carry vector with
// a + b + c == sum + carry (mod 2^K-1). Because 2^K == 1 (mod 2^K-1), the
// carry leaving the top column re-enters at the bottom: the carry vector is the
// column majority rotated left by one bit. This keeps every level of the tree
// K bits wide (K full adders per level). Purely combinational.
module csa_eac #(
  parameter int unsigned K = 4
) (
  input  logic [K-1:0] a,
  input  logic [K-1:0] b,
  input  logic [K-1:0] c,
  output logic [K-1:0] sum,
  output logic [K-1:0] carry
);
  logic [K-1:0] maj;

  always_comb begin
    sum   = a ^ b ^ c;
    maj   = (a & b) | (a & c) | (b & c);
    carry = {maj[K-2:0], maj[K-1]};
  end

  initial assert (K >= 2) else $error("csa_eac: K must be at least 2");
endmodule
