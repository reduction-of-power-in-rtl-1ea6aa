// tb_gf_cm1: checks y = a*x mod f for GF(2^233) (f = x^233 + x^74 + 1) and
// for GF(2^7) (f = x^7 + x + 1) against the reference package, on random
// operands and on operands with the top bit forced to 1 (reduction path).
module tb_gf_cm1;
  import tb_gf_ref_pkg::*;

  localparam int M = 233;
  localparam logic [M-1:0] POLY = gf_pkg::POLY_233;
  localparam int MS = 7;
  localparam logic [MS-1:0] POLYS = 7'h03;

  logic [M-1:0]  a, y;
  logic [MS-1:0] as, ys;
  int checks = 0, failures = 0, reduced = 0;

  gf_cm1 #(.M(M),  .POLY(POLY))  dut   (.a(a),  .y(y));
  gf_cm1 #(.M(MS), .POLY(POLYS)) dut_s (.a(as), .y(ys));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      a  = M'(rand_fe(M));
      as = MS'(rand_fe(MS));
      if (t % 2 == 0) begin a[M-1] = 1'b1; as[MS-1] = 1'b1; end
      #1;
      if (a[M-1]) reduced++;
      checks++;
      if (fe_t'(y) !== mulx(fe_t'(a), fe_t'(POLY), M)) begin
        failures++;
        $display("FAIL m=233 a=%h y=%h", a, y);
      end
      checks++;
      if (fe_t'(ys) !== mulx(fe_t'(as), fe_t'(POLYS), MS)) begin
        failures++;
        $display("FAIL m=7 a=%h y=%h", as, ys);
      end
    end
    if (reduced == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
