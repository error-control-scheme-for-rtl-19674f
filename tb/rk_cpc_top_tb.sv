// rk_cpc_top_tb: end-to-end test of the protected subsystem at its default
// size (16 data nibbles, distance-5 RK code, 4-bit CPC; the RK information
// word is 17 symbols, its redundancy 7 symbols).
//
// Words are streamed back to back, one per clock; every result is checked
// one clock after its input (the stated latency). Directed words make each
// mechanism happen and are counted:
//   clean word, single data-symbol error, single CPC-symbol error, single RK
//   redundancy error inside and beyond the ECLT, multi-symbol error
//   (suspicious), an error that maps onto another RK codeword (undetected by
//   the RK code, caught by the CPC), a forced RK miscorrection (caught by the
//   CPC), each system-level input, and saturation of the alarm counter.
// A random campaign then flips each data bit with probability 1/4 (the
// measured crossover probability of clock-glitch faults) and sorts every
// fault event into the classes C1..C4 (RK level) and S1/S2 (after the CPC),
// using the fault-free value as the reference.
module rk_cpc_top_tb;
  import rk_pkg::*;

  localparam int K_NIB = 16, R = 7, RO = 4, K = 17;
  localparam int N_RANDOM = 1000000;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [63:0]    comp_x, pred_x;
  logic [4*R-1:0] inj_w;
  logic [RO-1:0]  inj_o;
  logic tamper = 0, anomaly = 0, cons = 0;
  logic out_valid, alarm, rk_err;
  logic [63:0]    out_data;
  event_t         ev;
  logic [4*R-1:0] syn;
  logic [15:0]    n_cor, n_alarm;

  rk_cpc_top dut (
    .clk, .rst_n, .in_valid, .comp_x, .pred_x, .inj_w, .inj_o,
    .tamper, .anomaly, .consistency_err(cons),
    .out_valid, .out_data, .alarm, .event_class(ev), .rk_err, .rk_syndrome(syn),
    .n_corrected(n_cor), .n_alarm
  );

  // Helpers that build stimuli: the redundancy a codeword of another data
  // word would carry, and that word's CPC value.
  logic [63:0]     alt_x;
  logic [RO-1:0]   o_pred, o_alt;
  nib_t [R-1:0]    w_a, w_b;
  cpc_encoder #(.KBITS(64), .RO(RO)) h_cpc_p (.x(pred_x), .o(o_pred));
  cpc_encoder #(.KBITS(64), .RO(RO)) h_cpc_a (.x(alt_x), .o(o_alt));
  rk_encoder  #(.K(K), .D(5)) h_enc_a (.x({o_pred, pred_x}), .w(w_a));
  rk_encoder  #(.K(K), .D(5)) h_enc_b (.x({o_pred, alt_x}),  .w(w_b));

  int checks = 0, failures = 0, cycles = 0;
  typedef enum int {M_CLEAN, M_DATA1, M_CPC1, M_RED_TAB, M_RED_TAIL, M_MULTI,
                    M_RK_UNDET, M_MISCORR, M_TAMPER, M_ANOMALY, M_CONSIST, M_NUM} mech_t;
  int mech [M_NUM];
  int c1 = 0, c2 = 0, c3 = 0, c4 = 0, s1 = 0, s2 = 0, n_events = 0, n_clean_rand = 0;
  int exp_cor = 0, exp_alarm = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 2000000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected result of the word being presented.
  logic        pend = 0;
  logic [63:0] pend_ref;
  int          pend_ev;      // -1: do not check the class
  int          pend_mech;    // -1: random campaign word
  logic        pend_faulty;

  task automatic check_prev();
    logic exp_al;
    if (!pend) return;
    checks++;
    if (!out_valid) begin failures++; $display("FAIL no out_valid one cycle after input"); end
    if (pend_mech >= 0) begin
      exp_al = (pend_ev >= 2);
      checks++;
      if (int'(ev) != pend_ev || alarm != exp_al || out_data != (exp_al ? 64'd0 : pend_ref)) begin
        failures++;
        $display("FAIL mechanism %0d: ev %0d (exp %0d) alarm %0d data %h ref %h",
                 pend_mech, ev, pend_ev, alarm, out_data, pend_ref);
      end else mech[pend_mech]++;
    end else if (pend_faulty) begin
      // Random campaign: classify the fault event.
      n_events++;
      case (ev)
        EV_CLEAN:      begin c1++; s2++; end                   // RK and CPC both blind
        EV_CORRECTED:  if (out_data == pend_ref) c2++; else begin c4++; s2++; end
        EV_SUSPICIOUS: c3++;
        EV_CPC_FAIL:   begin if (rk_err) c4++; else c1++; s1++; end
        default:       begin failures++; $display("FAIL unexpected verdict %0d", ev); end
      endcase
      checks++;
      if (ev == EV_CORRECTED && out_data != pend_ref && alarm) begin
        failures++; $display("FAIL alarm on a released word");
      end
    end else begin
      n_clean_rand++;
      checks++;
      if (ev != EV_CLEAN || out_data != pend_ref) begin failures++; $display("FAIL clean random word"); end
    end
    if (int'(ev) == 1) exp_cor++;
    if (alarm) exp_alarm++;
  endtask

  // Drive one word for one clock and check its result right after the next
  // clock edge; the next word follows immediately, so words stream back to
  // back.
  task automatic drive(input logic [63:0] cx, input logic [63:0] px,
                       input logic [4*R-1:0] iw, input logic [RO-1:0] io,
                       input logic [2:0] sys, input int exp_ev, input int m,
                       input logic [63:0] refx);
    comp_x = cx; pred_x = px; inj_w = iw; inj_o = io;
    {cons, anomaly, tamper} = sys;
    in_valid = 1;
    pend = 1; pend_ref = refx; pend_ev = exp_ev; pend_mech = m; pend_faulty = (cx != px);
    @(posedge clk);
    #1;
    check_prev();
  endtask

  function automatic logic [63:0] rnd64();
    return {$urandom, $urandom};
  endfunction

  initial begin
    logic [63:0] x, e;
    int p1, p2;
    comp_x = '0; pred_x = '0; inj_w = '0; inj_o = '0; alt_x = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 40; n++) begin
      x = rnd64();
      drive(x, x, '0, '0, 3'b000, int'(EV_CLEAN), M_CLEAN, x);
      // one wrong data nibble
      e = '0; e[4*(n % 16) +: 4] = 4'($urandom_range(1, 15));
      drive(x ^ e, x, '0, '0, 3'b000, int'(EV_CORRECTED), M_DATA1, x);
      // wrong CPC nibble
      drive(x, x, '0, 4'($urandom_range(1, 15)), 3'b000, int'(EV_CORRECTED), M_CPC1, x);
      // wrong RK redundancy symbol covered by the table (0..2) or beyond it (3..6)
      p1 = n % 7;
      drive(x, x, (4*R)'($urandom_range(1, 15)) << (4 * p1), '0, 3'b000, int'(EV_CORRECTED),
            (p1 < 3) ? M_RED_TAB : M_RED_TAIL, x);
      // two wrong data nibbles: distance 5 never corrects them
      p2 = (n + 1 + n % 15) % 16;
      e = '0; e[4*(n % 16) +: 4] = 4'($urandom_range(1, 15));
      e[4*p2 +: 4] = 4'($urandom_range(1, 15));
      drive(x ^ e, x, '0, '0, 3'b000, int'(EV_SUSPICIOUS), M_MULTI, x);
      // error that lands on another RK codeword: data replaced and redundancy
      // adjusted to match. The CPC catches it unless the CPC values agree.
      pred_x = x; alt_x = rnd64(); #1;
      drive(alt_x, x, w_a ^ w_b, '0, 3'b000, (o_alt == o_pred) ? int'(EV_CLEAN) : int'(EV_CPC_FAIL),
            (o_alt == o_pred) ? M_CLEAN : M_RK_UNDET, (o_alt == o_pred) ? alt_x : x);
      // the same plus one wrong redundancy symbol: RK "corrects" towards the
      // wrong codeword
      pred_x = x; #1;
      drive(alt_x, x, w_a ^ w_b ^ ((4*R)'($urandom_range(1, 15)) << (4 * (n % 7))), '0, 3'b000,
            (o_alt == o_pred) ? int'(EV_CORRECTED) : int'(EV_CPC_FAIL),
            (o_alt == o_pred) ? M_CLEAN : M_MISCORR, (o_alt == o_pred) ? alt_x : x);
      // system-level indications on an otherwise clean word
      drive(x, x, '0, '0, 3'b001, int'(EV_SYSTEM), M_TAMPER, x);
      drive(x, x, '0, '0, 3'b010, int'(EV_SYSTEM), M_ANOMALY, x);
      drive(x, x, '0, '0, 3'b100, int'(EV_SYSTEM), M_CONSIST, x);
    end
    // Random fault campaign: symmetric bit flips, p = 1/4 per data bit.
    for (int n = 0; n < N_RANDOM; n++) begin
      x = rnd64();
      e = rnd64() & rnd64();
      drive(x ^ e, x, '0, '0, 3'b000, -1, -1, x);
    end
    in_valid = 0;
    pend = 0;
    @(posedge clk); #1;
    checks++;
    if (out_valid) begin failures++; $display("FAIL out_valid without input"); end
    checks++;
    // The counters saturate at 16'hFFFF; the campaign alone raises more
    // alarms than that, so the alarm counter must have stopped there.
    if (n_cor != 16'((exp_cor > 65535) ? 65535 : exp_cor) ||
        n_alarm != 16'((exp_alarm > 65535) ? 65535 : exp_alarm)) begin
      failures++; $display("FAIL counters %0d %0d vs %0d %0d", n_cor, n_alarm, exp_cor, exp_alarm);
    end
    checks++;
    if (exp_alarm <= 65535) begin failures++; $display("FAIL alarm counter never saturated"); end
    for (int m = 0; m < M_NUM; m++) begin
      checks++;
      if (mech[m] == 0) begin failures++; $display("FAIL mechanism %0d never happened", m); end
    end
    $display("mechanisms: clean %0d data1 %0d cpc1 %0d red_table %0d red_tail %0d multi %0d",
             mech[M_CLEAN], mech[M_DATA1], mech[M_CPC1], mech[M_RED_TAB], mech[M_RED_TAIL], mech[M_MULTI]);
    $display("            rk_undetected %0d miscorrection %0d tamper %0d anomaly %0d consistency %0d",
             mech[M_RK_UNDET], mech[M_MISCORR], mech[M_TAMPER], mech[M_ANOMALY], mech[M_CONSIST]);
    $display("campaign: events %0d  C1 %0d  C2 %0d  C3 %0d  C4 %0d  S1 %0d  S2 %0d",
             n_events, c1, c2, c3, c4, s1, s2);
    // With a distance-5 inner code a random multi-bit error is essentially
    // never accepted by both codes.
    checks++;
    if (s2 != 0) begin failures++; $display("FAIL unrecognised erroneous words: %0d", s2); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
