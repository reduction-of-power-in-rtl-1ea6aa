// tb_gf_const_mult: checks y = c * x^k mod f for m = 233 with k = 8 and for
// GF(2^7) (f = x^7 + x + 1) with k = 3, against repeated reference
// multiplication by x; includes operands whose top k bits are all set.
module tb_gf_const_mult;
  import tb_gf_ref_pkg::*;

  localparam int M = 233;
  localparam int K = 8;
  localparam logic [M-1:0] POLY = gf_pkg::POLY_233;
  localparam int MS = 7;
  localparam int KS = 3;
  localparam logic [MS-1:0] POLYS = 7'h03;

  logic [M-1:0]  c, y;
  logic [MS-1:0] cs, ys;
  int checks = 0, failures = 0;

  gf_const_mult #(.M(M),  .K(K),  .POLY(POLY))  dut   (.c(c),  .y(y));
  gf_const_mult #(.M(MS), .K(KS), .POLY(POLYS)) dut_s (.c(cs), .y(ys));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      c  = M'(rand_fe(M));
      cs = MS'(rand_fe(MS));
      if (t % 2 == 0) begin c[M-1 -: K] = '1; cs[MS-1 -: KS] = '1; end
      #1;
      checks++;
      if (fe_t'(y) !== mulx_n(fe_t'(c), fe_t'(POLY), M, K)) begin
        failures++;
        $display("FAIL m=233 c=%h y=%h", c, y);
      end
      checks++;
      if (fe_t'(ys) !== mulx_n(fe_t'(cs), fe_t'(POLYS), MS, KS)) begin
        failures++;
        $display("FAIL m=7 c=%h y=%h", cs, ys);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
