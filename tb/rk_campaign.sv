// rk_campaign: testbench helper that runs one fault-injection campaign on an
// rk_cpc_top of a given configuration. It first checks a directed single
// data-nibble error and a single RK redundancy error per decoder (both must
// be corrected), then presents N_EVENTS words whose data bits each flip with
// probability 1/4 and sorts each fault event into C1 (RK syndrome zero),
// C2 (correctly corrected), C3 (flagged suspicious by RK), C4 (corrected to
// a wrong word), and C1/C4 further into S1 (caught by the CPC) and S2 (not
// caught). Every released word that differs from the fault-free value must
// be an S2 event; every C3 event must raise alarm.
module rk_campaign
  import rk_pkg::*;
#(
  parameter int unsigned K_NIB    = 16,
  parameter int unsigned D        = 3,
  parameter int unsigned RO       = 4,
  parameter int unsigned NDEC     = 1,
  parameter int unsigned N_EVENTS = 1000
) (
  input  logic clk,
  input  logic start,
  output logic done,
  output int   checks,
  output int   failures,
  output int   cnt [6]            // C1, C2, C3, C4, S1, S2
);
  localparam int unsigned KBITS = 4 * K_NIB;
  localparam int unsigned R     = 1 + 2 * (D - 2);

  logic rst_n = 0, in_valid = 0;
  logic [KBITS-1:0]    comp_x, pred_x, out_data;
  logic [4*R*NDEC-1:0] inj_w;
  logic [RO-1:0]       inj_o;
  logic out_valid, alarm, rk_err;
  event_t ev;
  logic [4*R*NDEC-1:0] syn;
  logic [15:0] n_cor, n_alarm;

  rk_cpc_top #(.K_NIB(K_NIB), .D(D), .RO(RO), .NDEC(NDEC)) dut (
    .clk, .rst_n, .in_valid, .comp_x, .pred_x, .inj_w, .inj_o,
    .tamper(1'b0), .anomaly(1'b0), .consistency_err(1'b0),
    .out_valid, .out_data, .alarm, .event_class(ev), .rk_err, .rk_syndrome(syn),
    .n_corrected(n_cor), .n_alarm
  );

  function automatic logic [KBITS-1:0] rnd();
    logic [KBITS-1:0] v;
    for (int i = 0; i < KBITS; i += 32) v[i +: 32] = $urandom;
    return v;
  endfunction

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL [K_NIB=%0d D=%0d RO=%0d NDEC=%0d] %s",
                                        K_NIB, D, RO, NDEC, what); end
  endtask

  initial begin
    logic [KBITS-1:0] x, e;
    done = 0; checks = 0; failures = 0;
    for (int c = 0; c < 6; c++) cnt[c] = 0;
    comp_x = '0; pred_x = '0; inj_w = '0; inj_o = '0;
    wait (start);
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 2 * K_NIB; n++) begin
      x = rnd();
      e = '0; e[4*(n % K_NIB) +: 4] = 4'($urandom_range(1, 15));
      comp_x = x ^ e; pred_x = x; inj_w = '0; in_valid = 1;
      @(posedge clk); #1;
      chk(out_valid && ev == EV_CORRECTED && out_data == x && !alarm, "single data nibble");
      comp_x = x;
      inj_w = (4*R*NDEC)'($urandom_range(1, 15)) << (4 * (n % (R * NDEC)));
      @(posedge clk); #1;
      chk(out_valid && ev == EV_CORRECTED && out_data == x, "single redundancy symbol");
    end
    inj_w = '0;
    for (int n = 0; n < N_EVENTS; n++) begin
      x = rnd();
      e = rnd() & rnd();
      if (e == '0) e[0] = 1'b1;
      comp_x = x ^ e; pred_x = x;
      @(posedge clk); #1;
      case (ev)
        EV_CLEAN:      begin cnt[0]++; cnt[5]++; end
        EV_CORRECTED:  if (out_data == x) cnt[1]++; else begin cnt[3]++; cnt[5]++; end
        EV_SUSPICIOUS: begin cnt[2]++; chk(alarm && out_data == '0, "suspicious word alarmed"); end
        EV_CPC_FAIL:   begin if (rk_err) cnt[3]++; else cnt[0]++; cnt[4]++;
                             chk(alarm && out_data == '0, "CPC failure alarmed"); end
        default:       chk(1'b0, "unexpected verdict");
      endcase
    end
    in_valid = 0;
    done = 1;
  end
endmodule
