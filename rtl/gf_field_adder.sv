// gf_field_adder: addition in GF(2^m), y = a + b, which in polynomial basis
// is the bitwise XOR of the coefficients (m XOR gates, no carries).
// It adds the new digit product A_j*B to the shifted partial result.
//
// Ports: a, b, y (m bits each). Combinational.
module gf_field_adder #(
  parameter int unsigned M = gf_pkg::M_DEFAULT
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  output logic [M-1:0] y
);

  assign y = a ^ b;

endmodule
