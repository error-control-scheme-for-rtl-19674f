// rk_syn_update_tb: for every position i and error value e of the (19,16,3)
// and (23,16,5) codes, the syndrome e*h_i (h_i rebuilt from the published
// matrices) must vanish when loc = i and remain when loc is wrong. Includes
// the distance-3 worked example s = (3,1,15), loc 5, e = 13.
module rk_syn_update_tb;
  import tb_ref_pkg::*;
  logic [2:0][3:0] s3, st3;
  logic [6:0][3:0] s5, st5;
  logic [4:0]      loc;
  logic [3:0]      e;
  logic            single3, single5;
  int checks = 0, failures = 0;

  rk_syn_update #(.K(16), .D(3)) dut3 (.s(s3), .loc(loc), .e(e), .s_tilde(st3), .single(single3));
  rk_syn_update #(.K(16), .D(5)) dut5 (.s(s5), .loc(loc), .e(e), .s_tilde(st5), .single(single5));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [3:0] h(input int d, input int r, input int i);
    if (i < 16) return a_entry(d, r, i);
    return (i - 16 == r) ? 4'd1 : 4'd0;
  endfunction

  initial begin
    s3 = '{4'd15, 4'd1, 4'd3}; s5 = '0; loc = 5'd5; e = 4'd13;
    #1;
    checks++;
    if (!single3 || st3 != '0) begin failures++; $display("FAIL worked example"); end
    for (int i = 0; i < 23; i++)
      for (int ev = 1; ev < 16; ev++) begin
        e = 4'(ev);
        for (int r = 0; r < 7; r++) begin
          s5[r] = rmul(e, h(5, r, i));
          if (r < 3) s3[r] = rmul(e, h(3, r, i));
        end
        loc = 5'(i);
        #1;
        checks++;
        if (!single5) begin failures++; $display("FAIL d5 i=%0d e=%0d", i, ev); end
        if (i < 19) begin
          checks++;
          if (!single3) begin failures++; $display("FAIL d3 i=%0d e=%0d", i, ev); end
        end
        loc = 5'((i + 1) % 19);
        #1;
        checks++;
        if (single5) begin failures++; $display("FAIL d5 wrong loc i=%0d e=%0d", i, ev); end
        if (i < 19) begin
          checks++;
          if (single3 || st3 == '0) begin failures++; $display("FAIL d3 wrong loc i=%0d", i); end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
