// Additive overflow detection and correction for RNS {2^(2n+1)-1, 2^n+1,
// 2^n-1} extended with the redundant modulus 2.
//
// Inputs are two operands X, Y in [0, M-1], M = (2^(2n+1)-1)(2^n+1)(2^n-1),
// as canonical residues plus their parity bit x4 = |X|_2, y4 = |Y|_2.
// Outputs, all combinational from the inputs (no clock, no reset):
//   z1..z4    the RNS sum from the channel adders (wraps modulo M);
//   sum       the corrected binary sum X+Y on 4n+2 bits, from two Partial
//             Reverse Converters (one per addend) and the Reverse Converter;
//   overflow  1 when X+Y >= M, from the ODU: z4 XOR LSB of the wrapped sum.
// The PRCs, the RC and the ODU's XOR follow the document. The channel adder
// and the third PRC, which converts the RNS sum to mixed-radix digits so that
// the ODU can read the parity of the wrapped sum, are this design's choices.
module rns_ovf_top #(
  parameter int unsigned N = rns_ovf_pkg::N_DEFAULT
) (
  input  logic [2*N:0]   x1,
  input  logic [N:0]     x2,
  input  logic [N-1:0]   x3,
  input  logic           x4,
  input  logic [2*N:0]   y1,
  input  logic [N:0]     y2,
  input  logic [N-1:0]   y3,
  input  logic           y4,
  output logic [2*N:0]   z1,
  output logic [N:0]     z2,
  output logic [N-1:0]   z3,
  output logic           z4,
  output logic [4*N+1:0] sum,
  output logic           overflow
);
  // RNS addition
  rns_channel_adder #(.N(N)) u_add (
    .x1, .x2, .x3, .x4, .y1, .y2, .y3, .y4, .z1, .z2, .z3, .z4
  );

  // Partial reverse conversion of both addends
  logic [2*N:0] g1, w1, ez1;
  logic [N:0]   g2, w2, ez2;
  logic [N-1:0] g3, w3, ez3;

  prc #(.N(N)) u_prc_x (.x1(x1), .x2(x2), .x3(x3), .e1(g1), .e2(g2), .e3(g3));
  prc #(.N(N)) u_prc_y (.x1(y1), .x2(y2), .x3(y3), .e1(w1), .e2(w2), .e3(w3));

  // Corrected sum
  reverse_converter #(.N(N)) u_rc (
    .g1, .g2, .g3, .w1, .w2, .w3, .z(sum)
  );

  // Mixed-radix digits of the (possibly wrapped) RNS sum, for LSB(Z)
  prc #(.N(N)) u_prc_z (.x1(z1), .x2(z2), .x3(z3), .e1(ez1), .e2(ez2), .e3(ez3));

  logic lsb_z;

  odu u_odu (
    .z4, .ez1_lsb(ez1[0]), .ez2_lsb(ez2[0]), .ez3_lsb(ez3[0]), .lsb_z, .overflow
  );
endmodule
