// Carry-propagate adder modulo 2^K-1 with canonical output.
//
// Adds two K-bit values (each may be the redundant all-ones form of zero) and
// returns the residue in [0, 2^K-2]. The K+1-bit binary sum has its carry fed
// back in at the bottom (end-around carry, since 2^K == 1); an all-ones result
// is then mapped to zero so that the digit can be used as a weight in the
// mixed-radix sum. Purely combinational.
module cpa_mod_2k_minus1 #(
  parameter int unsigned K = 4
) (
  input  logic [K-1:0] a,
  input  logic [K-1:0] b,
  output logic [K-1:0] r
);
  logic [K:0]   t;
  logic [K-1:0] u;

  always_comb begin
    t = {1'b0, a} + {1'b0, b};
    u = t[K-1:0] + K'(t[K]);
    r = (&u) ? '0 : u;
  end

  initial assert (K >= 2) else $error("cpa_mod_2k_minus1: K must be at least 2");
endmodule
