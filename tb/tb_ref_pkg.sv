// tb_ref_pkg -- reference polynomial arithmetic over GF(2) for the testbenches.
//
// Plain long division on bit vectors, written independently of the matrix construction in the
// design: bit j of a vector is the coefficient of x^j, and g excludes its leading x^k term.
package tb_ref_pkg;

  typedef logic [255:0] poly_t;

  // Remainder of p (n coefficients) divided by x^k + g.
  function automatic poly_t poly_rem(poly_t p, int n, poly_t g, int k);
    poly_t r = p;
    poly_t full = g | (poly_t'(1) << k);
    for (int i = n - 1; i >= k; i--)
      if (r[i]) r ^= full << (i - k);
    return r;
  endfunction

  // Quotient of the same division.
  function automatic poly_t poly_quot(poly_t p, int n, poly_t g, int k);
    poly_t r = p;
    poly_t q = '0;
    poly_t full = g | (poly_t'(1) << k);
    for (int i = n - 1; i >= k; i--)
      if (r[i]) begin
        r ^= full << (i - k);
        q[i-k] = 1'b1;
      end
    return q;
  endfunction

  function automatic poly_t rand_poly(int n);
    poly_t p = '0;
    for (int i = 0; i < n; i++) p[i] = 1'($urandom_range(0, 1));
    return p;
  endfunction

endpackage
