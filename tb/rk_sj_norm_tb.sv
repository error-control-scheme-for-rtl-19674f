// rk_sj_norm_tb: exhaustive check of the syndrome normaliser over all 4096
// three-symbol partial syndromes: s_j is the first nonzero symbol and
// s_hat * s_j must give back the syndrome, with s_hat's leading symbol 1.
module rk_sj_norm_tb;
  import tb_ref_pkg::*;
  logic [2:0][3:0] s_part, s_hat;
  logic [3:0]      s_j;
  logic            any_nz;
  int checks = 0, failures = 0;

  rk_sj_norm dut (.s_part(s_part), .s_j(s_j), .s_hat(s_hat), .any_nz(any_nz));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] lead;
    for (int v = 0; v < 4096; v++) begin
      s_part = 12'(v);
      #1;
      lead = (s_part[0] != 0) ? s_part[0] : (s_part[1] != 0) ? s_part[1] : s_part[2];
      checks++;
      if (s_j !== lead || any_nz !== (lead != 0)) begin
        failures++;
        $display("FAIL s=%h: s_j=%0d any=%0d expected %0d", v, s_j, any_nz, lead);
      end
      if (lead != 0) begin
        for (int t = 0; t < 3; t++) begin
          checks++;
          if (s_hat[t] !== rmul(s_part[t], rinv(lead))) begin
            failures++;
            $display("FAIL s=%h: s_hat[%0d]=%0d", v, t, s_hat[t]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
