// gf_nand_net: partial-product gate network of the k x m multiplier.
//
// Gates every bit of each shifted operand copy bx[i] = B x^i mod f with digit
// bit a_j[i]: k*m two-input gates in all. With an even digit size k the
// design substitutes NAND gates for the AND gates (lower internal power):
// every output bit of XOR network 2 then sums an even number of inverted
// terms, so the inversions cancel and the product is unchanged. With odd k
// plain AND gates are used. The choice is made at elaboration from K.
//
// Ports: digit (k bits, A_j), bx (k x m), pp (k x m partial products;
// inverted when K is even). Combinational.
module gf_nand_net #(
  parameter int unsigned M = gf_pkg::M_DEFAULT,
  parameter int unsigned K = gf_pkg::K_DEFAULT
) (
  input  logic [K-1:0]        digit,
  input  logic [K-1:0][M-1:0] bx,
  output logic [K-1:0][M-1:0] pp
);

  localparam bit USE_NAND = (K % 2) == 0;

  always_comb begin
    for (int i = 0; i < K; i++) begin
      for (int n = 0; n < M; n++) begin
        if (USE_NAND) pp[i][n] = ~(digit[i] & bx[i][n]);
        else          pp[i][n] =   digit[i] & bx[i][n];
      end
    end
  end

endmodule
