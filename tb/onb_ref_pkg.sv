// onb_ref_pkg: reference arithmetic for testbenches, independent of the
// lambda matrix used by the hardware.
//
// For an optimal normal basis the basis elements are powers of a root of
// unity gamma of order p (Type I: p = m+1, beta^(2^i) = gamma^(2^i);
// Type II: p = 2m+1, beta^(2^i) = gamma^(2^i) + gamma^(-2^i)). An element is
// mapped to a polynomial modulo x^p - 1, the polynomials are multiplied by
// cyclic convolution, and the normal-basis coefficients are read back:
// c_k = P[2^k mod p] xor P[0], because 1 = sum of all basis elements.
// Vectors are MAXM bits wide; only the low m bits are used.
package onb_ref_pkg;

  localparam int MAXM = 520;
  localparam int MAXP = 2 * MAXM + 2;

  typedef logic [MAXM-1:0] elem_t;

  function automatic int ref_p(input int m, input int onb_type);
    return (onb_type == 1) ? m + 1 : 2 * m + 1;
  endfunction

  function automatic elem_t ref_mul(input elem_t a, input elem_t b,
                                    input int m, input int onb_type);
    bit pa [MAXP];
    bit pb [MAXP];
    int p, e, k;
    bit acc, c0;
    elem_t c;
    p = ref_p(m, onb_type);
    for (int t = 0; t < MAXP; t++) begin
      pa[t] = 1'b0;
      pb[t] = 1'b0;
    end
    e = 1;
    for (int i = 0; i < m; i++) begin
      if (a[i]) begin
        pa[e] ^= 1'b1;
        if (onb_type == 2) pa[p-e] ^= 1'b1;
      end
      if (b[i]) begin
        pb[e] ^= 1'b1;
        if (onb_type == 2) pb[p-e] ^= 1'b1;
      end
      e = (2 * e) % p;
    end
    // Coefficient of x^0 of the product.
    c0 = 1'b0;
    for (int u = 0; u < p; u++) c0 ^= pa[u] & pb[(p - u) % p];
    c = '0;
    e = 1;
    for (int i = 0; i < m; i++) begin
      acc = 1'b0;
      for (int u = 0; u < p; u++) begin
        k = e - u;
        if (k < 0) k += p;
        acc ^= pa[u] & pb[k];
      end
      c[i] = acc ^ c0;
      e = (2 * e) % p;
    end
    return c;
  endfunction

  // The field's one: every normal-basis coefficient set.
  function automatic elem_t ref_one(input int m);
    elem_t v;
    v = '0;
    for (int i = 0; i < m; i++) v[i] = 1'b1;
    return v;
  endfunction

  function automatic elem_t ref_rotl(input elem_t a, input int m, input int n);
    elem_t r;
    r = '0;
    for (int i = 0; i < m; i++) r[(i + n) % m] = a[i];
    return r;
  endfunction

  function automatic elem_t ref_rand(input int m);
    elem_t v;
    v = '0;
    for (int i = 0; i < m; i++) v[i] = 1'($urandom);
    return v;
  endfunction

  // a^(2^m - 2) = prod_{k=1}^{m-1} a^(2^k), by the reference multiplier.
  function automatic elem_t ref_inv(input elem_t a, input int m, input int onb_type);
    elem_t acc;
    acc = ref_one(m);
    for (int k = 1; k < m; k++) acc = ref_mul(acc, ref_rotl(a, m, k), m, onb_type);
    return acc;
  endfunction

endpackage
