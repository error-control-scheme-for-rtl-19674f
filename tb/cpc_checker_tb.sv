// cpc_checker_tb: ok must be 1 exactly when the redundancy equals the
// reference CPC of the data (64 data bits, RO = 4). Tests correct words,
// every nonzero redundancy error, and random data errors, whose expected
// verdict comes from the reference (a data error is missed only when the
// code value happens to match).
module cpc_checker_tb;
  import tb_ref_pkg::*;
  logic [63:0] x;
  logic [3:0]  o;
  logic        ok;
  int checks = 0, failures = 0;
  int missed = 0;

  cpc_checker #(.KBITS(64), .RO(4)) dut (.x(x), .o(o), .ok(ok));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [3:0] ref_cpc(input logic [63:0] v);
    logic [3:0] e, b[16];
    for (int i = 0; i < 16; i++) b[i] = v[4*i +: 4];
    e = rmul(rmul(b[15], b[15]), b[15]) ^ rmul(b[14], b[15]);
    for (int i = 0; i < 14; i += 2) e = e ^ rmul(b[i], b[i+1]);
    return e;
  endfunction

  initial begin
    logic [63:0] xo;
    for (int n = 0; n < 300; n++) begin
      xo = {$urandom, $urandom};
      x = xo; o = ref_cpc(xo);
      #1;
      checks++;
      if (!ok) begin failures++; $display("FAIL correct word rejected"); end
      o = ref_cpc(xo) ^ 4'($urandom_range(1, 15));
      #1;
      checks++;
      if (ok) begin failures++; $display("FAIL redundancy error missed"); end
      x = xo ^ {$urandom, $urandom};
      o = ref_cpc(xo);
      #1;
      checks++;
      if (ok !== (ref_cpc(x) == o)) begin failures++; $display("FAIL data error verdict"); end
      if (ok && x != xo) missed++;
    end
    $display("random data errors masked: %0d of 300", missed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
