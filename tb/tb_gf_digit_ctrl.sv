// tb_gf_digit_ctrl: checks the digit sequencer for m = 233, k = 8 (30 digits,
// top digit zero-padded): acc_clr only on an
// accepted start, digits presented most significant first with acc_en,
// done exactly D cycles after the start edge, starts while busy ignored.
module tb_gf_digit_ctrl;
  import tb_gf_ref_pkg::*;

  localparam int M = 233;
  localparam int K = 8;
  localparam int D = (M + K - 1) / K;

  logic         clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [M-1:0] a;
  logic         busy, done, acc_clr, acc_en;
  logic [K-1:0] digit;
  logic [D*K-1:0] a_pad;
  int checks = 0, failures = 0, ignored = 0;

  gf_digit_ctrl #(.M(M), .K(K)) dut (
    .clk, .rst_n, .start, .a, .busy, .done, .acc_clr, .acc_en, .digit
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '0;
    #22 rst_n = 1'b1;
    for (int op = 0; op < 40; op++) begin
      @(negedge clk);
      check(!busy && !acc_en, "idle");
      a = M'(rand_fe(M));
      a_pad = (D*K)'(a);
      start = 1'b1;
      #1 check(acc_clr, "acc_clr with start");
      @(negedge clk);
      start = (op % 2 == 1);   // start held high while busy must be ignored
      for (int j = D - 1; j >= 0; j--) begin
        #1;
        check(busy && acc_en && !acc_clr, "busy/acc_en");
        check(digit == a_pad[j*K +: K], $sformatf("digit %0d", j));
        check(!done, "done early");
        if (start) ignored++;
        @(negedge clk);
      end
      start = 1'b0;
      #1;
      check(done && !busy && !acc_en, "done after D cycles");
      @(negedge clk);
      check(!done, "done one cycle");
    end
    if (ignored == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
