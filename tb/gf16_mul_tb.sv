// gf16_mul_tb: exhaustive check of the GF(16) multiplier against a
// logarithm-table reference (all 256 operand pairs).
module gf16_mul_tb;
  import tb_ref_pkg::*;
  logic [3:0] a, b, p;
  int checks = 0, failures = 0;

  gf16_mul dut (.a(a), .b(b), .p(p));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        a = 4'(i); b = 4'(j);
        #1;
        checks++;
        if (p !== rmul(a, b)) begin
          failures++;
          $display("FAIL %0d*%0d = %0d, expected %0d", a, b, p, rmul(a, b));
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
