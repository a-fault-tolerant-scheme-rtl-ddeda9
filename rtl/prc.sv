// Partial Reverse Converter (PRC): mixed-radix digits of one RNS operand.
//
// For X = (x1, x2, x3) on the moduli m1 = 2^(2n+1)-1, m2 = 2^n+1,
// m3 = 2^n-1 it returns the MRDs with X = e1 + e2*m1 + e3*m1*m2:
//   e1 = x1
//   e2 = |x2 - x1|_(2^n+1)                      (|m1^-1|_m2 = 1)
//   e3 = |2^(n-1)*(x3 - x1) - 2^(n-1)*e2|_(2^n-1) (|m1^-1|_m3 = 1,
//                                                 |m2^-1|_m3 = 2^(n-1))
// Structure, as in the document: OPU 1 prepares the operands; CSA 1 (three
// OPU operands) and CSA 3 (adds x2) feed CPA 1, a modulo 2^n+1 adder, giving
// e2. A multiplexer on the MSB of e2 picks C = 2^(n-1)*(-e2) mod 2^n-1: the
// rotated complement of e2's low n bits, or 0 1...1 when e2 = 2^n. Three
// levels of end-around-carry CSAs (CSA 2, CSA 4, CSA 5) add b1..b4 and C, and
// CPA 2, a modulo 2^n-1 adder, gives e3.
// This design's choices: the e2 tree is plain binary on n+3 bits, with the
// "+2" of the complemented low field entering through the two free carry-in
// positions, and CPA 1 does the whole modulo 2^n+1 reduction. Inputs must be
// canonical residues (x1 < m1, x2 <= 2^n, x3 < m3); outputs are canonical.
// Purely combinational, no clock.
module prc #(
  parameter int unsigned N = rns_ovf_pkg::N_DEFAULT
) (
  input  logic [2*N:0] x1,
  input  logic [N:0]   x2,
  input  logic [N-1:0] x3,
  output logic [2*N:0] e1,
  output logic [N:0]   e2,
  output logic [N-1:0] e3
);
  logic [N+2:0] a_h, a_m, a_l;
  logic [N-1:0] b1, b2, b3, b4;

  prc_opu #(.N(N)) u_opu (
    .x1, .x3, .a_h, .a_m, .a_l, .b1, .b2, .b3, .b4
  );

  // e2 path: CSA 1 -> CSA 3 -> CPA 1 (mod 2^n+1)
  logic [N+2:0] s1, c1, s3, c3;

  csa_bin #(.W(N+3)) u_csa1 (.a(a_h), .b(a_m), .c(a_l), .cin(1'b1), .sum(s1), .carry(c1));
  csa_bin #(.W(N+3)) u_csa3 (.a(s1), .b(c1), .c({2'b00, x2}), .cin(1'b1), .sum(s3), .carry(c3));
  cpa_mod_2n_plus1 #(.N(N)) u_cpa1 (.a(s3), .b(c3), .r(e2));

  // Multiplexer: C = |-2^(n-1) * e2|_(2^n-1)
  logic [N-1:0] c_op;

  always_comb begin
    if (e2[N]) c_op = {1'b0, {(N-1){1'b1}}};
    else       c_op = {~e2[0], ~e2[N-1:1]};
  end

  // e3 path: CSA 2 -> CSA 4 -> CSA 5 -> CPA 2 (mod 2^n-1)
  logic [N-1:0] s2, c2, s4, c4, s5, c5;

  csa_eac #(.K(N)) u_csa2 (.a(b1), .b(b2), .c(b3), .sum(s2), .carry(c2));
  csa_eac #(.K(N)) u_csa4 (.a(s2), .b(c2), .c(b4), .sum(s4), .carry(c4));
  csa_eac #(.K(N)) u_csa5 (.a(s4), .b(c4), .c(c_op), .sum(s5), .carry(c5));
  cpa_mod_2k_minus1 #(.K(N)) u_cpa2 (.a(s5), .b(c5), .r(e3));

  assign e1 = x1;
endmodule
