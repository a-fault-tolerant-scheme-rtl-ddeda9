// Shared constants and width helpers for the RNS overflow detection and
// correction datapath on the moduli set {2^(2n+1)-1, 2^n+1, 2^n-1} with the
// redundant modulus 2.
//
// N_DEFAULT = 2 is the moduli set {31, 5, 3, 2} used in the worked examples of
// the scheme. The width functions give, for a given n, the bit widths of the
// residues, of the mixed-radix digits (MRDs), of the MRD sums and of the
// corrected binary sum. Every module takes n as its parameter N; n >= 2 is
// required (n = 1 makes 2^n-1 = 1, which is not a usable modulus).
package rns_ovf_pkg;

  parameter int unsigned N_DEFAULT = 2;

  // Residue / MRD widths: x1,e1 -> 2n+1 bits, x2,e2 -> n+1 bits, x3,e3 -> n bits
  function automatic int unsigned w1(int unsigned n);
    return 2 * n + 1;
  endfunction

  function automatic int unsigned w2(int unsigned n);
    return n + 1;
  endfunction

  function automatic int unsigned w3(int unsigned n);
    return n;
  endfunction

  // Corrected sum Z = X + Y < 2M < 2^(4n+2)
  function automatic int unsigned wz(int unsigned n);
    return 4 * n + 2;
  endfunction

endpackage
