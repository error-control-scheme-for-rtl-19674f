// fault_manager: system-level fault manager with outer CPC validation.
//
// Takes the RK decoder's verdict on one word (err, corrected, suspicious),
// the corrected data and the corrected CPC redundancy, and the three
// system-level indications (tamper detector, anomaly monitor, consistency
// check). The CPC checker re-validates the word the RK decoder accepted.
// Verdict, by priority:
//   EV_SUSPICIOUS  RK found a multi-symbol error it could not correct
//   EV_CPC_FAIL    RK accepted (clean or corrected) but the CPC disagrees:
//                  an RK miscorrection or an RK-undetected error
//   EV_SYSTEM      codes quiet, but a system-level input is raised
//   EV_CORRECTED   one symbol corrected and the CPC agrees
//   EV_CLEAN       nothing to report
// alarm is raised for the first three. The output word is withheld (driven
// to zero) when alarm is set, so a fault-affected result never leaves the
// module; corrected words are released. Two saturating counters record the
// corrected and the alarmed words, since a corrected event may still need to
// be logged. The verdict policy, the output suppression and the counters are
// this design's own choices.
// Timing: one register stage. A word presented with in_valid appears with
// out_valid on the next clock edge. Active-low synchronous reset.
module fault_manager
  import rk_pkg::*;
#(
  parameter int unsigned KBITS = 64,
  parameter int unsigned RO    = 4,
  parameter int unsigned CW    = 16      // event counter width
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [KBITS-1:0] data,
  input  logic [RO-1:0]    cpc,
  input  logic             rk_err,
  input  logic             rk_corrected,
  input  logic             rk_suspicious,
  input  logic             tamper,
  input  logic             anomaly,
  input  logic             consistency_err,
  output logic             out_valid,
  output logic [KBITS-1:0] out_data,
  output logic             alarm,
  output event_t           event_class,
  output logic [CW-1:0]    n_corrected,
  output logic [CW-1:0]    n_alarm
);
  logic   cpc_ok;
  event_t ev;
  logic   ev_alarm;

  cpc_checker #(.KBITS(KBITS), .RO(RO)) u_chk (.x(data), .o(cpc), .ok(cpc_ok));

  always_comb begin
    if (rk_suspicious)                        ev = EV_SUSPICIOUS;
    else if (!cpc_ok)                         ev = EV_CPC_FAIL;
    else if (tamper || anomaly || consistency_err) ev = EV_SYSTEM;
    else if (rk_corrected)                    ev = EV_CORRECTED;
    else                                      ev = EV_CLEAN;
    ev_alarm = (ev == EV_SUSPICIOUS) || (ev == EV_CPC_FAIL) || (ev == EV_SYSTEM);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid   <= 1'b0;
      out_data    <= '0;
      alarm       <= 1'b0;
      event_class <= EV_CLEAN;
      n_corrected <= '0;
      n_alarm     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_data    <= ev_alarm ? '0 : data;
        alarm       <= ev_alarm;
        event_class <= ev;
        if (ev == EV_CORRECTED && n_corrected != '1) n_corrected <= n_corrected + 1'b1;
        if (ev_alarm && n_alarm != '1)                n_alarm     <= n_alarm + 1'b1;
      end
    end
  end

  // rk_err is implied by corrected/suspicious; kept on the interface so the
  // syndrome-level verdict is visible at system level.
  property p_flags_consistent;
    @(posedge clk) disable iff (!rst_n) in_valid |-> !(rk_corrected && rk_suspicious) &&
                                              ((rk_corrected || rk_suspicious) == rk_err);
  endproperty
  a_flags_consistent: assert property (p_flags_consistent);
endmodule
