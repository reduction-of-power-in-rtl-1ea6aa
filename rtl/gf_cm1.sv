// gf_cm1: constant multiplier by x in GF(2^m) (the "CM1" module).
//
// y = x * a mod f(x). The operand is shifted up by one position; if the bit
// shifted out (coefficient of x^(m-1)) was set, the low terms of f(x) are
// added back. For a trinomial this costs one XOR gate, for a pentanomial
// three. Purely combinational.
//
// Ports: a (m-bit field element), y (m-bit result).
// POLY holds the terms of f(x) below x^m (bit i = coefficient of x^i).
module gf_cm1 #(
  parameter int unsigned          M    = gf_pkg::M_DEFAULT,
  parameter logic [M-1:0]         POLY = M'(gf_pkg::POLY_233)
) (
  input  logic [M-1:0] a,
  output logic [M-1:0] y
);

  always_comb begin
    y = {a[M-2:0], 1'b0};
    if (a[M-1]) y = y ^ POLY;
  end

endmodule
