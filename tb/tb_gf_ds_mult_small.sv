// tb_gf_ds_mult_small: the digit-serial multiplier at other sizes.
//   - GF(2^7), f = x^7 + x + 1, k = 3 (odd: AND network, 3 digits, top digit
//     padded): all 128 x 128 operand pairs.
//   - GF(2^233), f = x^233 + x^74 + 1, k = 7 (odd: AND network, 34 digits):
//     300 random operand pairs.
// Each product is compared with the bit-serial reference and the latency
// (done D cycles after the start edge) is checked.
module tb_gf_ds_mult_small;
  import tb_gf_ref_pkg::*;

  localparam int MS = 7;
  localparam int KS = 3;
  localparam int DS = (MS + KS - 1) / KS;
  localparam logic [MS-1:0] POLYS = 7'h03;
  localparam int ML = 233;
  localparam int KL = 7;
  localparam int DL = (ML + KL - 1) / KL;
  localparam logic [ML-1:0] POLYL = gf_pkg::POLY_233;

  logic clk = 1'b0, rst_n = 1'b0, start_s = 1'b0, start_l = 1'b0;
  logic [MS-1:0] as, bs, cs;
  logic [ML-1:0] al, bl, cl;
  logic busy_s, done_s, busy_l, done_l;
  int checks = 0, failures = 0;
  int cyc = 0;

  gf_ds_mult_top #(.M(MS), .K(KS), .POLY(POLYS)) dut_s (
    .clk, .rst_n, .start(start_s), .a(as), .b(bs), .busy(busy_s), .done(done_s), .c(cs));
  gf_ds_mult_top #(.M(ML), .K(KL), .POLY(POLYL)) dut_l (
    .clk, .rst_n, .start(start_l), .a(al), .b(bl), .busy(busy_l), .done(done_l), .c(cl));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (128 * 128 * (DS + 2) + 300 * (DL + 2) + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int t0;

  initial begin
    as = '0; bs = '0; al = '0; bl = '0;
    #22 rst_n = 1'b1;
    for (int x = 0; x < 128; x++) begin
      for (int y = 0; y < 128; y++) begin
        @(negedge clk);
        as = MS'(x); bs = MS'(y);
        start_s = 1'b1;
        @(posedge clk);
        t0 = cyc + 1;
        @(negedge clk);
        start_s = 1'b0;
        while (!done_s && cyc - t0 <= DS + 2) @(negedge clk);
        check(done_s && cyc - t0 == DS, "m=7 latency");
        check(fe_t'(cs) === mul(fe_t'(as), fe_t'(bs), fe_t'(POLYS), MS, MS),
              $sformatf("m=7 %h*%h=%h", as, bs, cs));
      end
    end
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      al = ML'(rand_fe(ML)); bl = ML'(rand_fe(ML));
      start_l = 1'b1;
      @(posedge clk);
      t0 = cyc + 1;
      @(negedge clk);
      start_l = 1'b0;
      while (!done_l && cyc - t0 <= DL + 2) @(negedge clk);
      check(done_l && cyc - t0 == DL, "m=233 k=7 latency");
      check(fe_t'(cl) === mul(fe_t'(al), fe_t'(bl), fe_t'(POLYL), ML, ML), "m=233 k=7 product");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
