// Plain binary carry-save adder (a row of W full adders).
//
// Reduces three W-bit operands to a sum vector and a carry vector with
// a + b + c + cin == sum + carry (mod 2^W). The carry vector is the majority
// of each bit column shifted one place left; its vacant least significant
// position takes cin, which is how the datapath injects the "+1" constants of
// its two's-complement and one's-complement corrections without an extra
// operand. The carry out of the top column is dropped (arithmetic mod 2^W).
// Purely combinational.
module csa_bin #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);
  logic [W-1:0] maj;

  always_comb begin
    sum   = a ^ b ^ c;
    maj   = (a & b) | (a & c) | (b & c);
    carry = {maj[W-2:0], cin};
  end

  initial assert (W >= 2) else $error("csa_bin: W must be at least 2");
endmodule
