// Carry-propagate adder modulo 2^n+1 with canonical output.
//
// Adds the sum and carry vectors (n+3 bits each) of a binary carry-save tree
// whose operands total at most 2^(n+2), and returns the residue in [0, 2^n]
// on n+1 bits. With S = Sh*2^n + Sl and 2^n == -1 (mod 2^n+1), S == Sl - Sh;
// a negative difference is brought back into range by adding 2^n+1. Sh is at
// most 4, which is below 2^n+1 for every n >= 2. Purely combinational.
module cpa_mod_2n_plus1 #(
  parameter int unsigned N = rns_ovf_pkg::N_DEFAULT
) (
  input  logic [N+2:0] a,
  input  logic [N+2:0] b,
  output logic [N:0]   r
);
  logic [N+2:0] s;
  logic [N+1:0] sl, sh, d;

  always_comb begin
    s  = a + b;
    sl = (N+2)'(s[N-1:0]);
    sh = (N+2)'(s[N+2:N]);
    d  = sl - sh;
    if (sl < sh) d = d + ((N+2)'(1) << N) + (N+2)'(1);
    r  = d[N:0];
  end

  initial assert (N >= 2) else $error("cpa_mod_2n_plus1: N must be at least 2");
endmodule
