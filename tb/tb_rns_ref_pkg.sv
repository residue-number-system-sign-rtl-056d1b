// Reference arithmetic for the sign-detector testbenches.
//
// Works on plain integers (up to 128 bits) with % and comparisons, never on
// the bit-level tricks of the design: residues of X, Qx = X mod S and the
// sign rule Qx >= S/2, for any n from 2 to 20.
package tb_rns_ref_pkg;

  typedef logic [127:0] big_t;

  function automatic big_t m1(int n);  return big_t'(1) << (2*n);         endfunction
  function automatic big_t m2(int n);  return (big_t'(1) << n) - 1;       endfunction
  function automatic big_t m3(int n);  return (big_t'(1) << n) + 1;       endfunction
  function automatic big_t m4(int n);  return (big_t'(1) << (n+1)) - 1;   endfunction
  function automatic big_t s_of(int n); return m1(n) * m2(n) * m3(n);     endfunction
  function automatic big_t m_of(int n); return s_of(n) * m4(n);           endfunction

  // Uniform-ish random value in [0, lim) from 32-bit draws
  function automatic big_t rand_below(big_t lim);
    big_t r;
    r = {$urandom, $urandom, $urandom, $urandom};
    return r % lim;
  endfunction

  // Expected sign: 1 when X mod S lies in the upper half of its block
  function automatic logic sign_of(int n, big_t x);
    return (x % s_of(n)) >= (s_of(n) / 2);
  endfunction

endpackage
