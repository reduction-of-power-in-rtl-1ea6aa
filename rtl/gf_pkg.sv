// gf_pkg: field size, digit size and reduction polynomial shared by the
// digit-serial GF(2^m) multiplier.
//
// The field is GF(2^233) in polynomial basis, as evaluated for the design.
// The reduction polynomial is f(x) = x^233 + x^74 + 1, the standard
// trinomial for this field size (an assumption of this implementation: only
// m = 233 is fixed by the design). POLY_233 holds the terms of f(x) below
// x^m, bit i being the coefficient of x^i.
//
// The digit size k is not fixed by the design either; K_DEFAULT = 8 is even,
// so the NAND substitution in the partial-product network applies.
package gf_pkg;

  localparam int unsigned M_DEFAULT = 233;
  localparam int unsigned K_DEFAULT = 8;

  localparam logic [M_DEFAULT-1:0] POLY_233 =
      (M_DEFAULT'(1) << 74) | M_DEFAULT'(1);

  // number of k-bit digits an m-bit operand is split into
  function automatic int unsigned num_digits(int unsigned m, int unsigned k);
    return (m + k - 1) / k;
  endfunction

  // bits needed to count digits 0 .. d-1 (at least one)
  function automatic int unsigned cnt_width(int unsigned d);
    return (d > 1) ? $clog2(d) : 1;
  endfunction

endpackage
