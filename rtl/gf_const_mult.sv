// gf_const_mult: constant multiplier y = c * x^k mod f(x).
//
// Moves the accumulated partial result up by one digit position each
// iteration. Written as k successive multiplications by x (shift, then fold
// the bit shifted out back in with the low terms of f); all coefficients are
// constants, so synthesis reduces it to wiring plus XOR gates. For the
// trinomial x^233 + x^74 + 1 and k <= 233-74 the k folded bits land at
// positions 0..k-1 (plain wires) and 74..74+k-1 (one XOR each): k XOR gates,
// the cost the design quotes for this module.
//
// Ports: c (m bits), y (m bits). Combinational.
module gf_const_mult #(
  parameter int unsigned  M    = gf_pkg::M_DEFAULT,
  parameter int unsigned  K    = gf_pkg::K_DEFAULT,
  parameter logic [M-1:0] POLY = M'(gf_pkg::POLY_233)
) (
  input  logic [M-1:0] c,
  output logic [M-1:0] y
);

  always_comb begin
    logic [M-1:0] t;
    t = c;
    for (int unsigned s = 0; s < K; s++) begin
      if (t[M-1]) t = {t[M-2:0], 1'b0} ^ POLY;
      else        t = {t[M-2:0], 1'b0};
    end
    y = t;
  end

endmodule
