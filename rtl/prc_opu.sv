// Operand Preparation Unit (OPU 1) of the Partial Reverse Converter.
//
// Pure bit routing and inversion, no adders. The residue x1 (2n+1 bits) is
// split into its top bit H = x1[2n], middle field M = x1[2n-1:n] and low field
// L = x1[n-1:0], so x1 = H*2^(2n) + M*2^n + L.
//
// e2 operands (modulo 2^n+1, where 2^n == -1 and 2^(2n) == 1), presented on
// n+3 bits for the binary CSA tree of the e2 path:
//   a_h = H*2^n    (== -H)
//   a_m = M        (== -M*2^n)
//   a_l = ~L       (== -L - 2; the +2 is injected as two CSA carry-ins)
// so a_h + a_m + a_l + 2 == -x1 (mod 2^n+1).
//
// e3 operands (modulo 2^n-1, where 2^n == 1, multiplying by 2^(n-1) is a
// right rotation by one bit and negation is the one's complement), n bits:
//   b1 = rotr1(x3)                 == 2^(n-1)*x3
//   b2 = {~H, 1...1}               == -2^(n-1)*H
//   b3 = rotr1(~M)                 == -2^(n-1)*M
//   b4 = rotr1(~L)                 == -2^(n-1)*L
// so b1 + b2 + b3 + b4 == 2^(n-1)*(x3 - x1) (mod 2^n-1).
// The e3 operands follow the document's bit patterns; the e2 operands are
// this design's reading of the -x1 (mod 2^n+1) decomposition. Combinational.
module prc_opu #(
  parameter int unsigned N = rns_ovf_pkg::N_DEFAULT
) (
  input  logic [2*N:0] x1,
  input  logic [N-1:0] x3,
  output logic [N+2:0] a_h,
  output logic [N+2:0] a_m,
  output logic [N+2:0] a_l,
  output logic [N-1:0] b1,
  output logic [N-1:0] b2,
  output logic [N-1:0] b3,
  output logic [N-1:0] b4
);
  logic         h;
  logic [N-1:0] m, l;

  always_comb begin
    h   = x1[2*N];
    m   = x1[2*N-1:N];
    l   = x1[N-1:0];
    a_h = {2'b00, h, {N{1'b0}}};
    a_m = {3'b000, m};
    a_l = {3'b000, ~l};
    b1  = {x3[0], x3[N-1:1]};
    b2  = {~h, {(N-1){1'b1}}};
    b3  = {~m[0], ~m[N-1:1]};
    b4  = {~l[0], ~l[N-1:1]};
  end

  initial assert (N >= 2) else $error("prc_opu: N must be at least 2");
endmodule
