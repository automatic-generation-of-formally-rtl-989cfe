// gf_ref_pkg: reference GF(2^m) arithmetic for the testbenches.
//
// gf_mul forms the full carry-less product of a and b (up to 2m-1 bits) and
// then reduces it from the top bit down by the irreducible polynomial.  This
// is a different computation order from the Mastrovito multiplier under
// test, which reduces a * beta^i column by column before adding.
// Elements are held in 256-bit vectors; bits at and above m must be zero,
// and ip holds the polynomial without its x^m term.
package gf_ref_pkg;

  typedef logic [255:0] fe_t;

  function automatic fe_t gf_mul(fe_t a, fe_t b, int unsigned m, fe_t ip);
    logic [511:0] prod;
    prod = '0;
    for (int unsigned i = 0; i < m; i++) begin
      if (b[i]) prod ^= {256'b0, a} << i;
    end
    for (int i = 2 * int'(m) - 2; i >= int'(m); i--) begin
      if (prod[i]) begin
        prod[i] = 1'b0;
        prod ^= {256'b0, ip} << (i - int'(m));
      end
    end
    return prod[255:0];
  endfunction

  // Random element of GF(2^m).
  function automatic fe_t rand_fe(int unsigned m);
    fe_t v;
    for (int unsigned w = 0; w < 8; w++) v[w*32 +: 32] = $urandom;
    if (m < 256) v &= (fe_t'(1) << m) - 1;
    return v;
  endfunction

endpackage
