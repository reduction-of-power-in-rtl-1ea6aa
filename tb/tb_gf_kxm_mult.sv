// tb_gf_kxm_mult: checks y = digit * b mod f for the k x m multiplier with
// m = 233, k = 8 (NAND network) and with m = 233, k = 7 (AND network)
// against the bit-serial reference multiplication.
module tb_gf_kxm_mult;
  import tb_gf_ref_pkg::*;

  localparam int M  = 233;
  localparam int KE = 8;
  localparam int KO = 7;
  localparam logic [M-1:0] POLY = gf_pkg::POLY_233;

  logic [KE-1:0] de;
  logic [KO-1:0] dox;
  logic [M-1:0]  b, ye, yo;
  int checks = 0, failures = 0;

  gf_kxm_mult #(.M(M), .K(KE), .POLY(POLY)) dut_e (.digit(de),  .b(b), .y(ye));
  gf_kxm_mult #(.M(M), .K(KO), .POLY(POLY)) dut_o (.digit(dox), .b(b), .y(yo));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      de  = KE'($urandom);
      dox = KO'($urandom);
      b   = M'(rand_fe(M));
      if (t % 4 == 0) b[M-1 -: KE] = '1;
      if (t == 0) begin de = '0; dox = '0; end
      #1;
      checks++;
      if (fe_t'(ye) !== mul(fe_t'(de), fe_t'(b), fe_t'(POLY), M, KE)) begin
        failures++;
        $display("FAIL k=8 digit=%h b=%h y=%h", de, b, ye);
      end
      checks++;
      if (fe_t'(yo) !== mul(fe_t'(dox), fe_t'(b), fe_t'(POLY), M, KO)) begin
        failures++;
        $display("FAIL k=7 digit=%h b=%h y=%h", dox, b, yo);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
