// gf_acc_reg: the m D flip-flops that hold the partial product C.
//
// On each rising clock edge: clr empties the register (start of a new
// multiplication), otherwise en loads d, otherwise it holds. clr has
// priority over en. rst_n is an active-low asynchronous reset to zero.
// The design names only "m D FFs"; the clear and enable controls and the
// reset are this implementation's choices, so a result stays readable after
// the last iteration.
//
// Ports: clk, rst_n, clr, en, d (m bits), q (m bits).
module gf_acc_reg #(
  parameter int unsigned M = gf_pkg::M_DEFAULT
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         en,
  input  logic [M-1:0] d,
  output logic [M-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   q <= '0;
    else if (clr) q <= '0;
    else if (en)  q <= d;
  end

endmodule
