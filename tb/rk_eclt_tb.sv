// rk_eclt_tb: the generated ECLTs of the (19,16,3) and (23,16,5) codes must
// contain every published row (normalised column, location i, factor g_i),
// and no other vector may match any row: every vector with a leading 1 is
// presented and must hit exactly the published rows.
module rk_eclt_tb;
  import tb_ref_pkg::*;
  logic [2:0][3:0] s_hat;
  logic            hit3, hit5;
  logic [4:0]      loc3, loc5;
  logic [3:0]      g3, g5;
  int checks = 0, failures = 0;

  rk_eclt #(.K(16), .D(3)) dut3 (.s_hat(s_hat), .hit(hit3), .loc(loc3), .g(g3));
  rk_eclt #(.K(16), .D(5)) dut5 (.s_hat(s_hat), .hit(hit5), .loc(loc5), .g(g5));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int row3, row5;
    for (int v = 0; v < 4096; v++) begin
      s_hat = 12'(v);
      #1;
      row3 = -1; row5 = -1;
      for (int i = 0; i < 19; i++) begin
        if ({T1_H[i][2], T1_H[i][1], T1_H[i][0]} == s_hat) row3 = i;
        if ({T2_H[i][2], T2_H[i][1], T2_H[i][0]} == s_hat) row5 = i;
      end
      checks++;
      if (hit3 !== (row3 >= 0) || (row3 >= 0 && (loc3 !== 5'(row3) || g3 !== T1_G[row3]))) begin
        failures++;
        $display("FAIL d3 s_hat=%h hit=%0d loc=%0d g=%0d expected row %0d", v, hit3, loc3, g3, row3);
      end
      checks++;
      if (hit5 !== (row5 >= 0) || (row5 >= 0 && (loc5 !== 5'(row5) || g5 !== T2_G[row5]))) begin
        failures++;
        $display("FAIL d5 s_hat=%h hit=%0d loc=%0d g=%0d expected row %0d", v, hit5, loc5, g5, row5);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
