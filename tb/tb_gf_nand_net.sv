// tb_gf_nand_net: checks the partial-product gate network. With even k (8)
// every output must be the NAND of digit bit and operand bit; with odd k (5)
// the AND. Random operands, plus all-zero and all-one digits.
module tb_gf_nand_net;
  localparam int M  = 233;
  localparam int KE = 8;
  localparam int KO = 5;

  logic [KE-1:0]         de;
  logic [KE-1:0][M-1:0]  bxe, ppe;
  logic [KO-1:0]         dox;
  logic [KO-1:0][M-1:0]  bxo, ppo;
  int checks = 0, failures = 0;

  gf_nand_net #(.M(M), .K(KE)) dut_e (.digit(de),  .bx(bxe), .pp(ppe));
  gf_nand_net #(.M(M), .K(KO)) dut_o (.digit(dox), .bx(bxo), .pp(ppo));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      de  = KE'($urandom);
      dox = KO'($urandom);
      if (t == 0) begin de = '0; dox = '0; end
      if (t == 1) begin de = '1; dox = '1; end
      for (int i = 0; i < KE; i++)
        for (int w = 0; w < M; w += 32) bxe[i][w +: 32] = $urandom;
      for (int i = 0; i < KO; i++)
        for (int w = 0; w < M; w += 32) bxo[i][w +: 32] = $urandom;
      #1;
      for (int i = 0; i < KE; i++) begin
        checks++;
        if (ppe[i] !== ~({M{de[i]}} & bxe[i])) begin
          failures++;
          $display("FAIL even k, row %0d", i);
        end
      end
      for (int i = 0; i < KO; i++) begin
        checks++;
        if (ppo[i] !== ({M{dox[i]}} & bxo[i])) begin
          failures++;
          $display("FAIL odd k, row %0d", i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
