// tb_gf_acc_reg: checks reset to zero, load on en, hold without en, and clear
// with priority over en, against a model register kept in the testbench.
module tb_gf_acc_reg;
  import tb_gf_ref_pkg::*;

  localparam int M = 233;

  logic         clk = 1'b0, rst_n = 1'b0, clr = 1'b0, en = 1'b0;
  logic [M-1:0] d, q, model;
  int checks = 0, failures = 0, n_clr = 0, n_load = 0, n_hold = 0;

  gf_acc_reg #(.M(M)) dut (.clk, .rst_n, .clr, .en, .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '1;
    #12;
    checks++;
    if (q !== '0) begin failures++; $display("FAIL reset"); end
    rst_n = 1'b1;
    model = '0;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      d   = M'(rand_fe(M));
      clr = ($urandom % 5) == 0;
      en  = ($urandom % 2) == 0;
      if (clr)     begin model = '0; n_clr++;  end
      else if (en) begin model = d;  n_load++; end
      else                           n_hold++;
      @(posedge clk);
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL t=%0d clr=%b en=%b q=%h exp=%h", t, clr, en, q, model);
      end
    end
    if (n_clr == 0 || n_load == 0 || n_hold == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
