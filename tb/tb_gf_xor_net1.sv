// tb_gf_xor_net1: checks every output bx[i] = b*x^i mod f of XOR network 1
// (m = 233, k = 8) against repeated reference multiplication by x.
module tb_gf_xor_net1;
  import tb_gf_ref_pkg::*;

  localparam int M = 233;
  localparam int K = 8;
  localparam logic [M-1:0] POLY = gf_pkg::POLY_233;

  logic [M-1:0]        b;
  logic [K-1:0][M-1:0] bx;
  int checks = 0, failures = 0;

  gf_xor_net1 #(.M(M), .K(K), .POLY(POLY)) dut (.b(b), .bx(bx));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      b = M'(rand_fe(M));
      if (t % 3 == 0) b[M-1 -: K] = '1;   // every CM1 stage reduces
      #1;
      for (int i = 0; i < K; i++) begin
        checks++;
        if (fe_t'(bx[i]) !== mulx_n(fe_t'(b), fe_t'(POLY), M, i)) begin
          failures++;
          $display("FAIL i=%0d b=%h bx=%h", i, b, bx[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
