// Overflow Detection Unit (ODU).
//
// Overflow = z4 XOR LSB(Z), where z4 is the redundant modulus-2 residue of the
// RNS sum and Z is the value that the three-modulus part (z1, z2, z3) of the
// same sum represents. If X+Y >= M that part holds X+Y-M, and since M is odd
// its parity then disagrees with z4.
// LSB(Z) is taken from the mixed-radix digits (ez1, ez2, ez3) of the RNS sum:
// Z = ez1 + ez2*m1 + ez3*m1*m2 with m1 and m2 odd, so the parity of Z is the
// XOR of the three digits' least significant bits. The document's ODU is the
// final two-input XOR; the three-input parity that supplies LSB(Z) is this
// design's way of obtaining LSB(Z). Combinational.
module odu (
  input  logic z4,
  input  logic ez1_lsb,
  input  logic ez2_lsb,
  input  logic ez3_lsb,
  output logic lsb_z,
  output logic overflow
);
  always_comb begin
    lsb_z    = ez1_lsb ^ ez2_lsb ^ ez3_lsb;
    overflow = z4 ^ lsb_z;
  end
endmodule
