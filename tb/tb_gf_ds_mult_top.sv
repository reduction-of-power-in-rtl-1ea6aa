// tb_gf_ds_mult_top: end-to-end test of the digit-serial multiplier at its
// default size (GF(2^233), k = 8, f = x^233 + x^74 + 1).
//
// Runs 1000 multiplications of random operand pairs, plus corner operands
// (0, 1, x^232, all ones), and compares each product with the bit-serial
// reference. It checks the latency (done exactly D = 30 cycles after the
// start edge, D+1 cycles per multiplication) and that the result is held
// after done. It counts the mechanisms of the design and fails if one never
// happened: a start accepted on the cycle done is high (back-to-back), a
// start ignored while busy, an iteration in which the constant multiplier
// had to reduce (top k bits of C non-zero), and a non-zero padded top digit.
module tb_gf_ds_mult_top;
  import tb_gf_ref_pkg::*;

  localparam int M = gf_pkg::M_DEFAULT;
  localparam int K = gf_pkg::K_DEFAULT;
  localparam int D = (M + K - 1) / K;
  localparam logic [M-1:0] POLY = gf_pkg::POLY_233;
  localparam int NOPS = 1000;

  logic         clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [M-1:0] a, b, c;
  logic         busy, done;
  int checks = 0, failures = 0;
  int n_b2b = 0, n_ignored = 0, n_reduce = 0, n_topdigit = 0;
  int cyc = 0;

  gf_ds_mult_top dut (.clk, .rst_n, .start, .a, .b, .busy, .done, .c);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // the constant multiplier folds bits back whenever C's top k bits are set
  always @(posedge clk) if (busy && c[M-1 -: K] != '0) n_reduce++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat ((NOPS + 20) * (D + 4)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  fe_t expc;
  int  t0;
  bit  b2b;

  initial begin
    b2b = 1'b0;
    a = '0; b = '0;
    #22 rst_n = 1'b1;
    for (int op = 0; op < NOPS + 6; op++) begin
      case (op)
        0: begin a = '0;              b = M'(rand_fe(M)); end
        1: begin a = M'(1);           b = M'(rand_fe(M)); end
        2: begin a = M'(rand_fe(M));  b = M'(1);          end
        3: begin a = '1;              b = '1;             end
        4: begin a = M'(1) << (M-1);  b = M'(1) << (M-1); end
        5: begin a = '1;              b = M'(rand_fe(M)); end
        default: begin a = M'(rand_fe(M)); b = M'(rand_fe(M)); end
      endcase
      if (a[M-1 -: (M - (D-1)*K)] != '0) n_topdigit++;
      expc = mul(fe_t'(a), fe_t'(b), fe_t'(POLY), M, M);
      if (!b2b) @(negedge clk);
      check(!busy, "idle before start");
      start = 1'b1;
      @(posedge clk);
      t0 = cyc + 1;   // cyc itself is updated by this same edge
      if (b2b) n_b2b++;
      @(negedge clk);
      // every third operation holds start high for a few busy cycles
      if (op % 3 == 1) begin
        repeat (3) begin
          check(busy, "busy");
          n_ignored++;
          @(negedge clk);
        end
      end
      start = 1'b0;
      while (!done) begin
        @(negedge clk);
        if (cyc - t0 > D + 2) break;
      end
      check(done, "done seen");
      check(cyc - t0 == D, $sformatf("latency %0d cycles, expected %0d", cyc - t0, D));
      check(fe_t'(c) === expc, $sformatf("product op %0d", op));
      if (fe_t'(c) !== expc) $display("  a=%h\n  b=%h\n  c=%h\n  e=%h", a, b, c, expc[M-1:0]);
      // alternate: start the next multiplication in the done cycle, or wait
      // a cycle and check the result is held
      b2b = (op % 2 == 0);
      if (!b2b) begin
        @(negedge clk);
        check(!done && fe_t'(c) === expc, "result held after done");
      end
    end
    check(n_b2b > 0,      "back-to-back start happened");
    check(n_ignored > 0,  "start while busy happened");
    check(n_reduce > 0,   "constant-multiplier reduction happened");
    check(n_topdigit > 0, "non-zero padded top digit happened");
    $display("mechanisms: back_to_back=%0d ignored_start=%0d reduce_cycles=%0d top_digit=%0d",
             n_b2b, n_ignored, n_reduce, n_topdigit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
