// rk_decoder_tb: RK decoder at K = 16 for distance 3 and 5.
//  * the two published worked examples (syndromes 3,1,15 and
//    5,1,6,0,7,11,0; corrected words restored);
//  * every single-symbol error (all 19 / 23 positions, random value) on
//    random codewords must be corrected to the original word;
//  * random 2-symbol errors (and 3-, 4-symbol errors for distance 5) must be
//    detected; at distance 5 they must never be "corrected";
//  * the error-free word passes with all flags low.
// Codewords come from the reference encoder on the published matrices.
module rk_decoder_tb;
  import tb_ref_pkg::*;
  logic [15:0][3:0] zx3, zx5, xc3, xc5;
  logic [2:0][3:0]  zw3, wc3, syn3, res3;
  logic [6:0][3:0]  zw5, wc5, syn5, res5;
  logic err3, cor3, sus3, err5, cor5, sus5;
  int checks = 0, failures = 0;
  int n_single = 0, n_multi = 0;

  rk_decoder #(.K(16), .D(3)) dut3 (.zx(zx3), .zw(zw3), .x_corr(xc3), .w_corr(wc3),
    .syndrome(syn3), .err(err3), .corrected(cor3), .suspicious(sus3), .s_residual(res3));
  rk_decoder #(.K(16), .D(5)) dut5 (.zx(zx5), .zw(zw5), .x_corr(xc5), .w_corr(wc5),
    .syndrome(syn5), .err(err5), .corrected(cor5), .suspicious(sus5), .s_residual(res5));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Add error value ev at code position pos of a (x, w) word.
  task automatic add_err3(inout logic [15:0][3:0] x, inout logic [2:0][3:0] w,
                          input int pos, input logic [3:0] ev);
    if (pos < 16) x[pos] = x[pos] ^ ev; else w[pos-16] = w[pos-16] ^ ev;
  endtask
  task automatic add_err5(inout logic [15:0][3:0] x, inout logic [6:0][3:0] w,
                          input int pos, input logic [3:0] ev);
    if (pos < 16) x[pos] = x[pos] ^ ev; else w[pos-16] = w[pos-16] ^ ev;
  endtask

  initial begin
    logic [15:0][3:0] x;
    logic [6:0][3:0]  w;
    int p1, p2, p3, p4, nerr;
    // ---- worked examples
    begin
      automatic int unsigned xa[16] = '{9,11,9,3,11,3,2,2,12,7,1,13,1,9,3,5};
      automatic int unsigned xb[16] = '{5,5,0,6,13,12,1,2,10,12,11,13,14,13,12,4};
      automatic int unsigned sb[7]  = '{5,1,6,0,7,11,0};
      automatic int unsigned wb[7]  = '{15,14,4,11,3,13,8};
      for (int j = 0; j < 16; j++) begin zx3[j] = 4'(xa[j]); zx5[j] = 4'(xb[j]); end
      zw3 = '{4'd10, 4'd8, 4'd0};
      for (int r = 0; r < 7; r++) zw5[r] = 4'(wb[r]);
      #1;
      chk(syn3 == '{4'd15, 4'd1, 4'd3}, "example 1 syndrome");
      chk(cor3 && !sus3 && xc3[5] == 4'd14 && res3 == '0, "example 1 correction");
      for (int r = 0; r < 7; r++) chk(syn5[r] == 4'(sb[r]), "example 3 syndrome");
      chk(cor5 && !sus5 && xc5[3] == 4'd2, "example 3 correction");
    end
    // ---- random codewords
    for (int n = 0; n < 400; n++) begin
      for (int j = 0; j < 16; j++) x[j] = 4'($urandom);
      // error free
      zx3 = x; zx5 = x; w = ref_encode(3, x); zw3 = w[2:0]; zw5 = ref_encode(5, x);
      #1;
      chk(!err3 && !cor3 && !sus3 && xc3 == x, "clean d3");
      chk(!err5 && !cor5 && !sus5 && xc5 == x, "clean d5");
      // single error at every position
      p1 = n % 23;
      zx3 = x; w = ref_encode(3, x); zw3 = w[2:0];
      zx5 = x; zw5 = ref_encode(5, x);
      if (p1 < 19) add_err3(zx3, zw3, p1, 4'($urandom_range(1, 15)));
      add_err5(zx5, zw5, p1, 4'($urandom_range(1, 15)));
      #1;
      if (p1 < 19) begin
        w = ref_encode(3, x);
        chk(err3 && cor3 && !sus3 && xc3 == x && wc3 == w[2:0], $sformatf("d3 single pos %0d", p1));
      end
      chk(err5 && cor5 && !sus5 && xc5 == x && wc5 == ref_encode(5, x),
          $sformatf("d5 single pos %0d", p1));
      n_single++;
      // multi-symbol errors: 2 for distance 3; 2..4 for distance 5
      p1 = $urandom_range(0, 18);
      p2 = (p1 + $urandom_range(1, 18)) % 19;
      zx3 = x; w = ref_encode(3, x); zw3 = w[2:0];
      add_err3(zx3, zw3, p1, 4'($urandom_range(1, 15)));
      add_err3(zx3, zw3, p2, 4'($urandom_range(1, 15)));
      nerr = 2 + n % 3;
      p1 = $urandom_range(0, 22);
      p2 = (p1 + 1 + $urandom_range(0, 6)) % 23;
      p3 = (p2 + 1 + $urandom_range(0, 6)) % 23;
      p4 = (p3 + 1 + $urandom_range(0, 6)) % 23;
      zx5 = x; zw5 = ref_encode(5, x);
      add_err5(zx5, zw5, p1, 4'($urandom_range(1, 15)));
      add_err5(zx5, zw5, p2, 4'($urandom_range(1, 15)));
      if (nerr > 2) add_err5(zx5, zw5, p3, 4'($urandom_range(1, 15)));
      if (nerr > 3) add_err5(zx5, zw5, p4, 4'($urandom_range(1, 15)));
      #1;
      chk(err3 && (cor3 != sus3), "d3 double detected");
      chk(err5 && sus5 && !cor5, $sformatf("d5 %0d-symbol error flagged", nerr));
      n_multi++;
    end
    $display("single-symbol cases %0d, multi-symbol cases %0d", n_single, n_multi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
