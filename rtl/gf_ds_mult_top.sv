// gf_ds_mult_top: low-power digit-serial polynomial-basis multiplier in
// GF(2^m), C = A * B mod f(x).
//
// Datapath (most significant digit first), one iteration per clock:
//     C <= (C * x^k mod f) + (A_j * B mod f),   j = D-1 .. 0,  D = ceil(m/k)
// built from the k x m multiplier (factored: B x^i mod f precomputed by a
// chain of CM1 modules, gated by the digit bits through NAND gates for even
// k, summed by per-bit XOR trees), the constant multiplier by x^k, the field
// adder and an m-bit register. The digit sequencer steps through A.
//
// Interface: pulse start for one cycle with a and b valid while busy is low;
// hold a and b until done. done is high for one cycle, D cycles after the
// start edge, and c then holds the product until the next start (D+1 cycles
// per multiplication including the start cycle; 31 cycles for m=233, k=8).
// m = 233 follows the design; k = 8, f(x) = x^233 + x^74 + 1 and the
// start/busy/done handshake are this implementation's choices.
module gf_ds_mult_top #(
  parameter int unsigned  M    = gf_pkg::M_DEFAULT,
  parameter int unsigned  K    = gf_pkg::K_DEFAULT,
  parameter logic [M-1:0] POLY = M'(gf_pkg::POLY_233)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  output logic         busy,
  output logic         done,
  output logic [M-1:0] c
);

  logic         acc_clr, acc_en;
  logic [K-1:0] digit;
  logic [M-1:0] ab, cx, sum;

  gf_digit_ctrl #(.M(M), .K(K)) u_ctrl (
    .clk, .rst_n, .start, .a, .busy, .done,
    .acc_clr, .acc_en, .digit
  );

  gf_kxm_mult #(.M(M), .K(K), .POLY(POLY)) u_kxm (.digit(digit), .b(b), .y(ab));

  gf_const_mult #(.M(M), .K(K), .POLY(POLY)) u_cm (.c(c), .y(cx));

  gf_field_adder #(.M(M)) u_add (.a(cx), .b(ab), .y(sum));

  gf_acc_reg #(.M(M)) u_reg (
    .clk, .rst_n, .clr(acc_clr), .en(acc_en), .d(sum), .q(c)
  );

endmodule
