// tb_gf_xor_net2: checks that each output bit is the XOR of the k input rows
// at that position, for k = 8 (power of two) and k = 5 (uneven tree).
module tb_gf_xor_net2;
  localparam int M  = 233;
  localparam int KA = 8;
  localparam int KB = 5;

  logic [KA-1:0][M-1:0] ppa;
  logic [KB-1:0][M-1:0] ppb;
  logic [M-1:0]         ya, yb, ea, eb;
  int checks = 0, failures = 0;

  gf_xor_net2 #(.M(M), .K(KA)) dut_a (.pp(ppa), .y(ya));
  gf_xor_net2 #(.M(M), .K(KB)) dut_b (.pp(ppb), .y(yb));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      for (int i = 0; i < KA; i++)
        for (int w = 0; w < M; w += 32) ppa[i][w +: 32] = $urandom;
      for (int i = 0; i < KB; i++)
        for (int w = 0; w < M; w += 32) ppb[i][w +: 32] = $urandom;
      // one-hot rows: a single row alone must reach the output
      if (t < KA) begin ppa = '0; ppa[t] = '1; end
      if (t < KB) begin ppb = '0; ppb[t] = '1; end
      ea = '0; eb = '0;
      for (int i = 0; i < KA; i++) ea ^= ppa[i];
      for (int i = 0; i < KB; i++) eb ^= ppb[i];
      #1;
      checks++;
      if (ya !== ea) begin failures++; $display("FAIL k=8 t=%0d", t); end
      checks++;
      if (yb !== eb) begin failures++; $display("FAIL k=5 t=%0d", t); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
