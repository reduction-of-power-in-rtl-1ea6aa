// gf_kxm_mult: k x m digit multiplier, y = A_j * B mod f(x).
//
// Uses the factored form A_j * B = sum_i a_j[i] * (B x^i mod f): the shifted,
// already reduced copies of B come from XOR network 1 (k-1 CM1 modules) and
// depend only on B; the gate network forms the k*m partial-product bits with
// the digit; XOR network 2 adds them per bit position. The result therefore
// needs no separate reduction step, and the only logic that follows the
// fast-changing digit is the gate network and the XOR trees behind it.
// With even k the gate network uses NAND gates (see gf_nand_net).
//
// Ports: digit (k bits), b (m bits), y (m bits). Combinational.
module gf_kxm_mult #(
  parameter int unsigned  M    = gf_pkg::M_DEFAULT,
  parameter int unsigned  K    = gf_pkg::K_DEFAULT,
  parameter logic [M-1:0] POLY = M'(gf_pkg::POLY_233)
) (
  input  logic [K-1:0] digit,
  input  logic [M-1:0] b,
  output logic [M-1:0] y
);

  logic [K-1:0][M-1:0] bx;
  logic [K-1:0][M-1:0] pp;

  gf_xor_net1 #(.M(M), .K(K), .POLY(POLY)) u_xn1 (.b(b), .bx(bx));
  gf_nand_net #(.M(M), .K(K))              u_nn  (.digit(digit), .bx(bx), .pp(pp));
  gf_xor_net2 #(.M(M), .K(K))              u_xn2 (.pp(pp), .y(y));

endmodule
