// cpc_encoder_tb: outer-code redundancy for a 64-bit word with RO = 4
// (16 nibble blocks: cube of block 15, pair products (0,1)..(12,13), block 14
// times block 15) and for a single 8-bit block with RO = 8 (pure cube), both
// against an independent reference (GF(16) log tables; a bit-serial GF(256)
// multiply written here).
module cpc_encoder_tb;
  import tb_ref_pkg::*;
  logic [63:0] x64;
  logic [3:0]  o4;
  logic [7:0]  x8, o8;
  int checks = 0, failures = 0;

  cpc_encoder #(.KBITS(64), .RO(4)) dut4 (.x(x64), .o(o4));
  cpc_encoder #(.KBITS(8),  .RO(8)) dut8 (.x(x8),  .o(o8));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] m256(input logic [7:0] a, input logic [7:0] b);
    logic [15:0] p;
    p = '0;
    for (int i = 0; i < 8; i++) if (b[i]) p = p ^ (16'(a) << i);
    for (int i = 15; i >= 8; i--) if (p[i]) p = p ^ (16'h11B << (i - 8));
    return p[7:0];
  endfunction

  initial begin
    logic [3:0] e4, b[16];
    for (int n = 0; n < 500; n++) begin
      x64 = {$urandom, $urandom};
      x8  = 8'($urandom);
      if (n == 0) begin x64 = '0; x8 = '0; end
      if (n == 1) begin x64 = 64'h1; x8 = 8'h2; end
      #1;
      for (int i = 0; i < 16; i++) b[i] = x64[4*i +: 4];
      e4 = rmul(rmul(b[15], b[15]), b[15]) ^ rmul(b[14], b[15]);
      for (int i = 0; i < 14; i += 2) e4 = e4 ^ rmul(b[i], b[i+1]);
      checks++;
      if (o4 !== e4) begin failures++; $display("FAIL RO=4 x=%h o=%h exp %h", x64, o4, e4); end
      checks++;
      if (o8 !== m256(m256(x8, x8), x8)) begin
        failures++; $display("FAIL RO=8 x=%h o=%h", x8, o8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
