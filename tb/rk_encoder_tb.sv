// rk_encoder_tb: RK redundancy of the two published worked examples
// (distance 3: w = 0,8,10; distance 5: w = 15,14,4,11,3,13,8), then random
// words against the reference encoder w = A * x^-1 built on the published
// matrices.
module rk_encoder_tb;
  import tb_ref_pkg::*;
  logic [15:0][3:0] x;
  logic [2:0][3:0]  w3;
  logic [6:0][3:0]  w5;
  int checks = 0, failures = 0;

  rk_encoder #(.K(16), .D(3)) dut3 (.x(x), .w(w3));
  rk_encoder #(.K(16), .D(5)) dut5 (.x(x), .w(w5));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load(input int unsigned v[16]);
    for (int j = 0; j < 16; j++) x[j] = 4'(v[j]);
  endtask

  task automatic check_vs(input int d, input int unsigned exp_w[7]);
    #1;
    for (int r = 0; r < ((d == 3) ? 3 : 7); r++) begin
      logic [3:0] got;
      got = (d == 3) ? w3[r] : w5[r];
      checks++;
      if (got !== 4'(exp_w[r])) begin
        failures++;
        $display("FAIL d=%0d w[%0d] = %0d, expected %0d", d, r, got, exp_w[r]);
      end
    end
  endtask

  initial begin
    int unsigned ex[7];
    logic [6:0][3:0] rw;
    load('{9,11,9,3,11,14,2,2,12,7,1,13,1,9,3,5});
    check_vs(3, '{0,8,10,0,0,0,0});
    load('{5,5,0,2,13,12,1,2,10,12,11,13,14,13,12,4});
    check_vs(5, '{15,14,4,11,3,13,8});
    for (int n = 0; n < 300; n++) begin
      for (int j = 0; j < 16; j++) x[j] = 4'($urandom);
      rw = ref_encode(3, x);
      for (int r = 0; r < 7; r++) ex[r] = int'(rw[r]);
      check_vs(3, ex);
      rw = ref_encode(5, x);
      for (int r = 0; r < 7; r++) ex[r] = int'(rw[r]);
      check_vs(5, ex);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
