// Channel-wise RNS adder of the residue processor.
//
// Adds two numbers in the extended representation (x1, x2, x3, x4) on the
// moduli {2^(2n+1)-1, 2^n+1, 2^n-1, 2}, each channel on its own with no carry
// between channels:
//   z1 = |x1+y1|_(2^(2n+1)-1), z2 = |x2+y2|_(2^n+1), z3 = |x3+y3|_(2^n-1),
//   z4 = |x4+y4|_2 = x4 XOR y4.
// When X+Y >= M the three-modulus part (z1, z2, z3) silently wraps to
// X+Y-M; the redundant bit z4 does not wrap, and that disagreement is what the
// overflow detector looks for. The document states what this adder computes;
// the adders themselves (end-around-carry adders for 2^k-1, a compare-and-
// subtract reduction for 2^n+1) are this design's choice. Canonical inputs
// give canonical outputs. Combinational.
module rns_channel_adder #(
  parameter int unsigned N = rns_ovf_pkg::N_DEFAULT
) (
  input  logic [2*N:0] x1,
  input  logic [N:0]   x2,
  input  logic [N-1:0] x3,
  input  logic         x4,
  input  logic [2*N:0] y1,
  input  logic [N:0]   y2,
  input  logic [N-1:0] y3,
  input  logic         y4,
  output logic [2*N:0] z1,
  output logic [N:0]   z2,
  output logic [N-1:0] z3,
  output logic         z4
);
  cpa_mod_2k_minus1 #(.K(2*N+1)) u_add1 (.a(x1), .b(y1), .r(z1));
  cpa_mod_2n_plus1  #(.N(N))     u_add2 (.a({2'b00, x2}), .b({2'b00, y2}), .r(z2));
  cpa_mod_2k_minus1 #(.K(N))     u_add3 (.a(x3), .b(y3), .r(z3));

  assign z4 = x4 ^ y4;
endmodule
