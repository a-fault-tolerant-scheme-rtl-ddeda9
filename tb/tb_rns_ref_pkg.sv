// Reference arithmetic for the testbenches: moduli, dynamic range and random
// operands for the RNS {2^(2n+1)-1, 2^n+1, 2^n-1} (+ redundant 2), computed
// with plain 128-bit integer arithmetic, independently of the design. Valid
// for n <= 30.
package tb_rns_ref_pkg;

  typedef logic [127:0] u128_t;

  function automatic u128_t mod1(int unsigned n);
    return (u128_t'(1) << (2 * n + 1)) - 1;
  endfunction

  function automatic u128_t mod2(int unsigned n);
    return (u128_t'(1) << n) + 1;
  endfunction

  function automatic u128_t mod3(int unsigned n);
    return (u128_t'(1) << n) - 1;
  endfunction

  function automatic u128_t dyn_range(int unsigned n);
    return mod1(n) * mod2(n) * mod3(n);
  endfunction

  // Uniform-ish random value in [0, lim-1]
  function automatic u128_t rand_below(u128_t lim);
    u128_t r;
    r = {$urandom, $urandom, $urandom, $urandom};
    return r % lim;
  endfunction

endpackage
