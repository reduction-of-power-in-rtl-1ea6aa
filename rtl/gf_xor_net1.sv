// gf_xor_net1: "XOR network 1" of the k x m multiplier.
//
// Produces the k shifted copies of operand B that the factored digit product
// needs: bx[i] = B * x^i mod f(x), i = 0 .. k-1. bx[0] is B itself and each
// further copy comes from the previous one through one CM1 module, so the
// network is a chain of k-1 CM1 modules, as the design prescribes. Because it
// depends on B alone, it does not toggle while B is held during a
// multiplication; only the gates fed by the fast-changing digit A_j switch.
//
// Ports: b (m bits), bx (k x m bits). Combinational.
module gf_xor_net1 #(
  parameter int unsigned  M    = gf_pkg::M_DEFAULT,
  parameter int unsigned  K    = gf_pkg::K_DEFAULT,
  parameter logic [M-1:0] POLY = M'(gf_pkg::POLY_233)
) (
  input  logic [M-1:0]        b,
  output logic [K-1:0][M-1:0] bx
);

  assign bx[0] = b;

  for (genvar i = 1; i < K; i++) begin : g_cm1
    gf_cm1 #(.M(M), .POLY(POLY)) u_cm1 (.a(bx[i-1]), .y(bx[i]));
  end

endmodule
