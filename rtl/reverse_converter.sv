// Reverse Converter (RC): corrected binary sum of two addends from their MRDs.
//
// With X = g1 + g2*m1 + g3*m1*m2 and Y = w1 + w2*m1 + w3*m1*m2 (g = gamma,
// w = omega, the MRDs from the two PRCs), the digit sums
//   p1 = g1 + w1 (CPA 3, 2n+2 bits), p2 = g2 + w2 (CPA 4, n+2 bits),
//   p3 = g3 + w3 (CPA 5, n+1 bits)
// are kept unreduced, so Z = p1 + p2*m1 + p3*m1*m2 = X + Y exactly, on
// 4n+2 bits: one bit more than the dynamic range M = m1*m2*m3 needs, which
// is the range extension that the redundant modulus 2 stands for. Z is the
// correct sum whether or not the RNS addition overflowed.
// Expanding m1 = 2^(2n+1)-1 and m1*m2 = 2^(3n+1)+2^(2n+1)-2^n-1:
//   Z = p1 + 2^(2n+1)p3 + 2^(3n+1)p3 + 2^(2n+1)p2 - p2 - p3 - 2^n p3.
// The positive terms are formed by concatenation only (no adders):
//   ta = {p3 at bit 3n+1, p1[2n+1] at bit 2n+1}, tb = {p3 at 2n+1, p1[2n:0]},
//   tc = p2 at bit 2n+1.
// Each negative term is the one's complement over 4n+2 bits, its "+1" entering
// through a free CSA carry-in position. Four binary CSAs in three levels and
// CPA 6 give Z. The document draws five operands and three cascaded CSAs, with
// the digit sums one bit narrower; the extra carry bit of each digit sum makes
// its concatenations overlap, hence the six operands here. Combinational.
module reverse_converter #(
  parameter int unsigned N = rns_ovf_pkg::N_DEFAULT
) (
  input  logic [2*N:0]   g1,
  input  logic [N:0]     g2,
  input  logic [N-1:0]   g3,
  input  logic [2*N:0]   w1,
  input  logic [N:0]     w2,
  input  logic [N-1:0]   w3,
  output logic [4*N+1:0] z
);
  localparam int unsigned W = 4 * N + 2;

  logic [2*N+1:0] p1;
  logic [N+1:0]   p2;
  logic [N:0]     p3;

  // CPA 3, CPA 4, CPA 5: digit-wise sums of the two addends' MRDs
  always_comb begin
    p1 = {1'b0, g1} + {1'b0, w1};
    p2 = {1'b0, g2} + {1'b0, w2};
    p3 = {1'b0, g3} + {1'b0, w3};
  end

  // Operand preparation
  logic [W-1:0] ta, tb, tc, n2, n3, n6;

  always_comb begin
    ta = '0;
    ta[4*N+1:3*N+1] = p3;
    ta[2*N+1]       = p1[2*N+1];
    tb = '0;
    tb[3*N+1:2*N+1] = p3;
    tb[2*N:0]       = p1[2*N:0];
    tc = '0;
    tc[3*N+2:2*N+1] = p2;
    n2 = ~W'(p2);                 // -p2 - 1
    n3 = ~W'(p3);                 // -p3 - 1
    n6 = ~(W'(p3) << N);          // -2^n*p3 - 1
  end

  // CSA tree: level 1 (two CSAs), level 2, level 3; three carry-ins = +3
  logic [W-1:0] sa, ca, sb, cb, sc, cc, sd, cd;

  csa_bin #(.W(W)) u_csa_l1a (.a(ta), .b(tb), .c(tc), .cin(1'b1), .sum(sa), .carry(ca));
  csa_bin #(.W(W)) u_csa_l1b (.a(n2), .b(n3), .c(n6), .cin(1'b1), .sum(sb), .carry(cb));
  csa_bin #(.W(W)) u_csa_l2  (.a(sa), .b(ca), .c(sb), .cin(1'b1), .sum(sc), .carry(cc));
  csa_bin #(.W(W)) u_csa_l3  (.a(sc), .b(cc), .c(cb), .cin(1'b0), .sum(sd), .carry(cd));

  // CPA 6
  assign z = sd + cd;
endmodule
