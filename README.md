# Overflow detection and correction for RNS addition on {2^(2n+1)-1, 2^n+1, 2^n-1}

A residue number system (RNS) adds two numbers channel by channel, with no
carries between channels, but the result is only known modulo the dynamic
range M = m1·m2·m3. When X + Y ≥ M the residues silently describe X + Y − M.
This design detects that case and at the same time delivers the true sum
X + Y in binary.

The moduli are m1 = 2^(2n+1) − 1, m2 = 2^n + 1, m3 = 2^n − 1, extended with
a **redundant modulus 2**: every operand also carries its parity
x4 = X mod 2. The three main channels wrap modulo M, which is odd, so an
overflow flips the parity of the value they represent. The redundant channel
does not wrap. Overflow is therefore

    overflow = z4 XOR LSB(Z)

where z4 = x4 XOR y4 and Z is the value that the wrapped residues
(z1, z2, z3) stand for.

The correction uses the mixed-radix form of each operand,
X = e1 + e2·m1 + e3·m1·m2. The two operands' digits are added digit by digit
*without* reducing them. Weighting those digit sums gives X + Y exactly on
4n + 2 bits, one bit more than M needs, whether or not the RNS sum
overflowed.

Everything is combinational: there is no clock, no reset and no register.
The default is n = 2, giving the moduli {31, 5, 3} + 2 and M = 465. The
parameter `N` sets n, and any n ≥ 2 works. n = 512 has been simulated.

## Data path

```
 X=(x1,x2,x3,x4) ─┬─► PRC (X) ── γ1,γ2,γ3 ─┐
 Y=(y1,y2,y3,y4) ─┼─► PRC (Y) ── ω1,ω2,ω3 ─┴─► Reverse Converter ─► sum = X+Y (4n+2 bits)
                  └─► channel adder ─► z1,z2,z3,z4 (RNS sum, wraps mod M)
                                       │
                          (z1,z2,z3) ─► PRC (Z) ─► LSB parity ─┐
                                  z4 ─────────────────────────┴─► ODU ─► overflow
```

| module | role |
|---|---|
| `rns_ovf_top` | the complete scheme (ports listed below) |
| `rns_channel_adder` | z1 = (x1+y1) mod m1, z2 mod m2, z3 mod m3, z4 = x4^y4 |
| `prc` | Partial Reverse Converter: the mixed-radix digits e1, e2, e3 of one operand |
| `prc_opu` | operand preparation inside the PRC: bit routing, complements and rotations only |
| `reverse_converter` | digit sums and the weighted sum that gives X+Y |
| `odu` | overflow detection: the parity of the three digit LSBs, XORed with z4 |
| `csa_bin`, `csa_eac` | carry-save adders: plain binary, and modulo 2^K−1 with end-around carry |
| `cpa_mod_2k_minus1`, `cpa_mod_2n_plus1` | carry-propagate adders with canonical modular output |
| `rns_ovf_pkg` | default n and width helpers |

## The Partial Reverse Converter (PRC)

The modular inverses in this moduli set are simple:

- |m1⁻¹| mod m2 = 1
- |m1⁻¹| mod m3 = 1
- |m2⁻¹| mod m3 = 2^(n−1)

So the mixed-radix digits are:

    e1 = x1
    e2 = |x2 − x1|  mod 2^n+1
    e3 = |2^(n−1)(x3 − x1) − 2^(n−1)·e2|  mod 2^n−1

Split x1 into its top bit H, a middle n-bit field M and a low n-bit field L,
so that x1 = H·2^(2n) + M·2^n + L. Both digits can then be computed with
wiring plus adders.

**e2 (mod 2^n+1, where 2^n ≡ −1).** −x1 ≡ −H + M − L. The operand unit
`prc_opu` supplies these three operands:

- H·2^n, which is ≡ −H
- M, uncomplemented
- ~L, which is ≡ −L − 2

The missing +2 enters as the carry-in of the two carry-save stages. CSA 1
adds the three operands and CSA 3 adds x2. These are plain binary CSAs on
n+3 bits. CPA 1 (`cpa_mod_2n_plus1`) then adds the sum and carry vectors and
reduces the result once: for S = Sh·2^n + Sl it takes Sl − Sh, adding
2^n + 1 if the difference is negative. The result e2 lies in [0, 2^n].

**e3 (mod 2^n−1, where 2^n ≡ 1).** Here multiplying by 2^(n−1) is a
one-bit right rotation and negation is the bitwise complement. The operands
are therefore pure wiring:

- rotr1(x3)
- {~H, 1…1}
- rotr1(~M)
- rotr1(~L)
- C, chosen by a multiplexer on the MSB of e2:
  - rotr1(~e2[n−1:0]) when e2 < 2^n
  - the constant 0 1…1 when e2 = 2^n

Three levels of end-around-carry CSAs (CSA 2, 4, 5) add the five operands
and stay n bits wide. CPA 2 is an end-around-carry adder that maps the
all-ones form of zero to 0. Every digit must be canonical
(0 ≤ e_i < m_i), because the digits are used as weights afterwards.

## The Reverse Converter and the correction

The converter first forms the digit sums ψ1 = γ1+ω1, ψ2 = γ2+ω2 and
ψ3 = γ3+ω3. These are 2n+2, n+2 and n+1 bits wide: each keeps its carry.
Expanding the weights m1 = 2^(2n+1) − 1 and
m1·m2 = 2^(3n+1) + 2^(2n+1) − 2^n − 1 gives

    X+Y = ψ1 + 2^(2n+1)ψ3 + 2^(3n+1)ψ3 + 2^(2n+1)ψ2 − ψ2 − ψ3 − 2^n ψ3 .

The three positive terms are packed into three words by concatenation, with
no logic:

- {ψ3 at bit 3n+1, ψ1[2n+1] at bit 2n+1}
- {ψ3 at bit 2n+1, ψ1[2n:0]}
- ψ2 at bit 2n+1

Each negative term is the one's complement over 4n+2 bits, and its +1
enters as a CSA carry-in. Four binary CSAs in three levels reduce the six
words to two, and CPA 6 adds those. The result `sum` is X + Y and is exact
up to 2M − 2.

## Where LSB(Z) comes from

The parity test needs the parity of the *wrapped* sum. The parity of the
corrected sum always equals z4, so it cannot be used. A third PRC converts
(z1, z2, z3) to its digits. Because m1 and m2 are odd,
LSB(Z) = e1[0] ^ e2[0] ^ e3[0]. The ODU XORs that parity with z4.

## Ports of `rns_ovf_top`

| port | dir | width | meaning |
|---|---|---|---|
| x1, y1 | in | 2N+1 | residues mod 2^(2N+1)−1, canonical (< m1) |
| x2, y2 | in | N+1 | residues mod 2^N+1, 0 … 2^N |
| x3, y3 | in | N | residues mod 2^N−1, canonical (< m3) |
| x4, y4 | in | 1 | parity of X, Y (redundant residue) |
| z1 … z4 | out | as inputs | RNS sum, each channel modulo its modulus |
| sum | out | 4N+2 | X + Y in binary, correct with or without overflow |
| overflow | out | 1 | 1 when X + Y ≥ M |

The inputs are trusted. The redundant all-ones form of zero on x1 or x3 is
not accepted. x4 and y4 must be the true parities of X and Y: a wrong
parity bit shows up as a wrong `overflow`.

## Where this design departs from the original scheme

- **e2 operands.** The published operand list for −x1 mod 2^n+1 complements
  all three fields of x1. Since 2^n ≡ −1, the middle field belongs in
  uncomplemented, and this design routes it that way. The e3 operands follow
  the published bit patterns exactly.
- **Modulo 2^n+1 arithmetic.** The e2 path is binary on n+3 bits, with one
  reduction in CPA 1. The original does not say how the wrap is handled
  inside its CSAs.
- **Digit sums and the converter's tree.** The digit sums are one bit wider
  than in the original, which packs five operands into three cascaded CSAs
  by concatenation. With the extra carry bits those concatenations would
  overlap. This design therefore uses six operands and four CSAs in three
  levels.
- **Extra hardware.** The channel adder and the third PRC are part of this
  design. The original's cost budget (2 PRCs + converter + one XOR,
  (34n+10) full adders, (16n+11) full-adder delays) counts neither, and it
  does not say where LSB(Z) comes from.
- **Area.** Counting each modular adder as its adders, this design comes to
  roughly 61n + 62 full-adder equivalents. Without the channel adder and the
  third PRC it is about 44n + 41. No timing is claimed: the design is
  combinational and has not been synthesised for a target.

## Verification

Each testbench in `tb/` is self-checking. It compares the outputs against
plain integer arithmetic: residues by `%`, mixed-radix digits by division,
and X + Y with X + Y ≥ M for overflow. Each ends with a
`TB_RESULT checks=… failures=…` line.

| testbench | covers |
|---|---|
| `tb_rns_ovf_top` | default n = 2: the three worked cases, then every one of the 465 × 465 operand pairs. It counts overflow with equal parity, overflow with different parity, no overflow, and the e2 = 2^n multiplexer branch in the addend and sum converters, and fails if any never happens |
| `tb_rns_ovf_top_sweep` | n = 3, 4, 8, 16, 24: random pairs plus pairs summing to exactly M−1 and M |
| `tb_rns_ovf_top_table2` | n = 32 … 512: the same with 2112-bit reference arithmetic |
| `tb_prc`, `tb_prc_opu`, `tb_reverse_converter`, `tb_rns_channel_adder`, `tb_odu` | the individual units at several n |

The three worked cases on {31, 5, 3, 2} (M = 465) are:

- 225 + 275 = 500: overflow, operands of equal parity
- 225 + 322 = 547: overflow, operands of different parity
- 225 + 35 = 260: no overflow. The testbench uses the correct residues of
  35, which are (4, 0, 2, 1).

To run one testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/rns_ovf_pkg.sv \
    tb/tb_rns_ref_pkg.sv tb/tb_rns_ovf_top.sv --top-module tb_rns_ovf_top
./obj_dir/Vtb_rns_ovf_top
```

To build the top at another size, override `N`, for example
`rns_ovf_top #(.N(16))`. All widths follow from `N`.
