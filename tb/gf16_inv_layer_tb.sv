// gf16_inv_layer_tb: checks the symbol-wise GF(16) inverter. Every value is
// presented at every position (a*a^-1 = 1, 0 -> 0), then the published
// example word is inverted: 9,11,9,3,11,3,... must give 2,5,2,14,5,14,...
module gf16_inv_layer_tb;
  import tb_ref_pkg::*;
  localparam int N = 16;
  logic [N-1:0][3:0] x, y;
  int checks = 0, failures = 0;

  gf16_inv_layer #(.N(N)) dut (.x(x), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_word(input logic [N-1:0][3:0] exp_y);
    #1;
    for (int i = 0; i < N; i++) begin
      checks++;
      if (y[i] !== exp_y[i]) begin
        failures++;
        $display("FAIL pos %0d: inv(%0d) = %0d, expected %0d", i, x[i], y[i], exp_y[i]);
      end
    end
  endtask

  initial begin
    logic [N-1:0][3:0] e;
    for (int rot = 0; rot < N; rot++) begin
      for (int i = 0; i < N; i++) begin
        x[i] = 4'((i + rot) % 16);
        e[i] = rinv(x[i]);
      end
      expect_word(e);
      for (int i = 0; i < N; i++) begin
        checks++;
        if (x[i] != 0 && rmul(x[i], y[i]) != 4'd1) begin
          failures++;
          $display("FAIL %0d * %0d != 1", x[i], y[i]);
        end
      end
    end
    // Received word of the distance-3 worked example (index 0 first).
    x = '0; e = '0;
    begin
      automatic int unsigned xv[16] = '{9,11,9,3,11,3,2,2,12,7,1,13,1,9,3,5};
      automatic int unsigned yv[16] = '{2,5,2,14,5,14,9,9,10,6,1,4,1,2,14,11};
      for (int i = 0; i < N; i++) begin x[i] = 4'(xv[i]); e[i] = 4'(yv[i]); end
    end
    expect_word(e);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
