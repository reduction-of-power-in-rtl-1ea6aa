// tb_gf_ref_pkg: reference arithmetic in GF(2^m) for the testbenches.
//
// Written independently of the RTL structure: field elements are held in
// 256-bit vectors, the field size m and the low terms of f(x) are passed as
// arguments, and multiplication is the textbook bit-serial shift-and-add
// (Horner) method, one bit of a at a time from the top.
package tb_gf_ref_pkg;

  typedef logic [255:0] fe_t;

  function automatic fe_t mask(int m);
    return (fe_t'(1) << m) - 1;
  endfunction

  // a * x mod f
  function automatic fe_t mulx(fe_t a, fe_t poly, int m);
    fe_t r;
    r = (a << 1) & mask(m);
    if (a[m-1]) r = r ^ poly;
    return r;
  endfunction

  // a * x^n mod f
  function automatic fe_t mulx_n(fe_t a, fe_t poly, int m, int n);
    fe_t r = a;
    for (int i = 0; i < n; i++) r = mulx(r, poly, m);
    return r;
  endfunction

  // a * b mod f, a given with up to abits bits (abits may be below m)
  function automatic fe_t mul(fe_t a, fe_t b, fe_t poly, int m, int abits);
    fe_t r = '0;
    for (int i = abits - 1; i >= 0; i--) begin
      r = mulx(r, poly, m);
      if (a[i]) r = r ^ b;
    end
    return r;
  endfunction

  // uniformly random m-bit value
  function automatic fe_t rand_fe(int m);
    fe_t r;
    for (int w = 0; w < 8; w++) r[w*32 +: 32] = $urandom;
    return r & mask(m);
  endfunction

endpackage
