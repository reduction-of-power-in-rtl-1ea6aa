// tb_gf_field_adder: checks the GF(2^233) adder on random operands, on
// x + x = 0 and on a + 0 = a.
module tb_gf_field_adder;
  import tb_gf_ref_pkg::*;

  localparam int M = 233;

  logic [M-1:0] a, b, y;
  int checks = 0, failures = 0;

  gf_field_adder #(.M(M)) dut (.a(a), .b(b), .y(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      a = M'(rand_fe(M));
      b = (t % 3 == 0) ? a : (t % 3 == 1) ? '0 : M'(rand_fe(M));
      #1;
      checks++;
      // coefficient-wise sum modulo 2, computed bit by bit
      for (int i = 0; i < M; i++) begin
        if (y[i] !== ((a[i] + b[i]) % 2 == 1)) begin
          failures++;
          $display("FAIL bit %0d a=%h b=%h y=%h", i, a, b, y);
          break;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
