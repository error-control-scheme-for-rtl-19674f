// rk_amul_tb: the elaboration-time matrix A of rk_amul, for K = 16 at
// distance 3 and 5, must act exactly like the published A_3 (rebuilt from
// the published ECLT) and A_5. Unit vectors expose every matrix entry; random
// words check the XOR accumulation.
module rk_amul_tb;
  import tb_ref_pkg::*;
  logic [15:0][3:0] y;
  logic [2:0][3:0]  w3;
  logic [6:0][3:0]  w5;
  int checks = 0, failures = 0;

  rk_amul #(.K(16), .D(3)) dut3 (.y(y), .w(w3));
  rk_amul #(.K(16), .D(5)) dut5 (.y(y), .w(w5));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_word();
    logic [3:0] e;
    #1;
    for (int r = 0; r < 3; r++) begin
      e = '0;
      for (int j = 0; j < 16; j++) e = e ^ rmul(a_entry(3, r, j), y[j]);
      checks++;
      if (w3[r] !== e) begin failures++; $display("FAIL d3 row %0d: %0d vs %0d", r, w3[r], e); end
    end
    for (int r = 0; r < 7; r++) begin
      e = '0;
      for (int j = 0; j < 16; j++) e = e ^ rmul(a_entry(5, r, j), y[j]);
      checks++;
      if (w5[r] !== e) begin failures++; $display("FAIL d5 row %0d: %0d vs %0d", r, w5[r], e); end
    end
  endtask

  initial begin
    for (int j = 0; j < 16; j++) begin
      y = '0; y[j] = 4'd1;
      check_word();
    end
    for (int n = 0; n < 200; n++) begin
      for (int j = 0; j < 16; j++) y[j] = 4'($urandom);
      check_word();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
