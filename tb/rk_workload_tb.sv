// rk_workload_tb: fault-injection campaigns on the configurations evaluated
// for the scheme, each as its own rk_cpc_top instance, run in parallel:
//   64-bit state (small-scale AES, LED-64, PRESENT): distance 3 and 5,
//     one decoder, CPC of 4 bits; distance 3 also with CPCs of 8, 12, 16 bits
//   128-bit state (AES): distance 3 with one decoder, distance 3 and 5 with
//     two decoders (lower / upper nibble of every byte), CPC of 4 bits
// Errors are random symmetric bit flips with probability 1/4 per data bit.
// Printed per configuration: the share of the events in classes C1..C4 and
// how many of the critical ones (C1 + C4) the CPC catches (S1) or misses (S2).
// Checks beyond the per-event ones in rk_campaign, on the trends the
// published measurements show:
//   distance 5: no erroneous word is ever released (S2 = 0)
//   distance 3: miscorrections (C4) occur, and the CPC catches most of them
//   a larger CPC misses fewer critical events than the 4-bit one
module rk_workload_tb;
  localparam int N = 100000;
  localparam int NCFG = 8;

  logic clk = 0, start = 0;
  logic [NCFG-1:0] done;
  int chk_c [NCFG], fail_c [NCFG];
  int cnt [NCFG][6];
  int checks = 0, failures = 0, cycles = 0;
  string name [NCFG] = '{"k=64  d=3 1dec ro=4 ", "k=64  d=5 1dec ro=4 ", "k=64  d=3 1dec ro=8 ",
                         "k=64  d=3 1dec ro=12", "k=64  d=3 1dec ro=16", "k=128 d=3 1dec ro=4 ",
                         "k=128 d=3 2dec ro=4 ", "k=128 d=5 2dec ro=4 "};
  int dmin [NCFG] = '{3, 5, 3, 3, 3, 3, 3, 5};

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  rk_campaign #(.K_NIB(16), .D(3), .RO(4),  .NDEC(1), .N_EVENTS(N)) c0 (clk, start, done[0], chk_c[0], fail_c[0], cnt[0]);
  rk_campaign #(.K_NIB(16), .D(5), .RO(4),  .NDEC(1), .N_EVENTS(N)) c1 (clk, start, done[1], chk_c[1], fail_c[1], cnt[1]);
  rk_campaign #(.K_NIB(16), .D(3), .RO(8),  .NDEC(1), .N_EVENTS(N)) c2 (clk, start, done[2], chk_c[2], fail_c[2], cnt[2]);
  rk_campaign #(.K_NIB(16), .D(3), .RO(12), .NDEC(1), .N_EVENTS(N)) c3 (clk, start, done[3], chk_c[3], fail_c[3], cnt[3]);
  rk_campaign #(.K_NIB(16), .D(3), .RO(16), .NDEC(1), .N_EVENTS(N)) c4 (clk, start, done[4], chk_c[4], fail_c[4], cnt[4]);
  rk_campaign #(.K_NIB(32), .D(3), .RO(4),  .NDEC(1), .N_EVENTS(N)) c5 (clk, start, done[5], chk_c[5], fail_c[5], cnt[5]);
  rk_campaign #(.K_NIB(32), .D(3), .RO(4),  .NDEC(2), .N_EVENTS(N)) c6 (clk, start, done[6], chk_c[6], fail_c[6], cnt[6]);
  rk_campaign #(.K_NIB(32), .D(5), .RO(4),  .NDEC(2), .N_EVENTS(N)) c7 (clk, start, done[7], chk_c[7], fail_c[7], cnt[7]);

  initial begin
    wait (cycles == 10 * N);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real pct(input int a, input int b);
    return (b == 0) ? 0.0 : 100.0 * real'(a) / real'(b);
  endfunction

  initial begin
    #20 start = 1;
    wait (&done);
    for (int c = 0; c < NCFG; c++) begin
      checks += chk_c[c];
      failures += fail_c[c];
      $display("%s  C1 %7.4f%%  C2 %7.4f%%  C3 %8.4f%%  C4 %7.4f%%  S1 %6d (%5.1f%%)  S2 %5d (%5.1f%%)",
               name[c], pct(cnt[c][0], N), pct(cnt[c][1], N), pct(cnt[c][2], N), pct(cnt[c][3], N),
               cnt[c][4], pct(cnt[c][4], cnt[c][0] + cnt[c][3]),
               cnt[c][5], pct(cnt[c][5], cnt[c][0] + cnt[c][3]));
      checks++;
      if (cnt[c][0] + cnt[c][1] + cnt[c][2] + cnt[c][3] != N ||
          cnt[c][4] + cnt[c][5] != cnt[c][0] + cnt[c][3]) begin
        failures++; $display("FAIL %s: class counts do not add up", name[c]);
      end
      checks++;
      if (dmin[c] == 5 && cnt[c][5] != 0) begin
        failures++; $display("FAIL %s: erroneous words released", name[c]);
      end
      checks++;
      if (dmin[c] == 3 && (cnt[c][3] == 0 || cnt[c][4] <= cnt[c][5])) begin
        failures++; $display("FAIL %s: expected miscorrections mostly caught by the CPC", name[c]);
      end
    end
    checks++;
    if (cnt[4][5] >= cnt[0][5]) begin
      failures++; $display("FAIL 16-bit CPC misses no fewer events than the 4-bit CPC");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
