// rk_cpc_top: protected subsystem with an inner Rabii-Keren code and an outer
// Compact Protection Code, followed by the system-level fault manager.
//
// The protected component itself (a cipher round) is outside this module.
// Its output enters on comp_x; the predictors work from pred_x, the value the
// prediction side computes for the same operation (in a fault-free cycle
// comp_x == pred_x). Structure:
//   CPC predictor : o  = CPC(pred_x), RO bits = RO/4 nibbles
//   RK predictor  : w  = RK redundancy of the information word (pred_x, o)
//   RK decoder    : checks and corrects (comp_x, o ^ inj_o) against w ^ inj_w
//   fault manager : validates the corrected word with the CPC, merges the
//                   system-level inputs, releases the word or raises alarm
// Nibble j of a data word is bits [4j+3:4j]. With NDEC = 1 one RK code covers
// all K_NIB data nibbles plus the RO/4 CPC nibbles. With NDEC = 2 (for
// byte-oriented ciphers) two independent RK codes run side by side: decoder 0
// takes the lower nibble of every byte (even j) plus the CPC nibbles,
// decoder 1 the upper nibble of every byte (odd j). Their verdicts merge as:
// any suspicious -> suspicious; otherwise any correction -> corrected, which
// the CPC then validates (a masked error in one half next to a correction in
// the other shows up as a CPC failure).
// inj_w and inj_o are error masks XORed onto the redundancy words (additive
// errors e_w, decoder g's R symbols at bits [4*R*g +: 4*R]); tie them to zero
// in normal use.
// Timing: combinational up to the fault manager's register, so a word given
// with in_valid is returned with out_valid one clock later, one word per
// clock. Active-low synchronous reset.
// The split into predictor, RK decoder and CPC-validating fault manager
// follows the published inner-outer architecture; port names, the fault
// masks, the placement of the CPC nibbles and the verdict merge are choices
// of this design.
module rk_cpc_top
  import rk_pkg::*;
#(
  parameter int unsigned K_NIB = 16,     // data nibbles (64-bit state)
  parameter int unsigned D     = 5,      // RK code distance, 3 or 5
  parameter int unsigned RO    = 4,      // CPC redundancy bits, multiple of 4
  parameter int unsigned NDEC  = 1,      // RK decoders, 1 or 2
  parameter int unsigned CW    = 16,     // event counter width
  localparam int unsigned KBITS = 4 * K_NIB,
  localparam int unsigned RON   = RO / 4,
  localparam int unsigned KD    = K_NIB / NDEC,
  localparam int unsigned R     = 1 + 2 * (D - 2)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic [KBITS-1:0]      comp_x,
  input  logic [KBITS-1:0]      pred_x,
  input  logic [4*R*NDEC-1:0]   inj_w,
  input  logic [RO-1:0]         inj_o,
  input  logic                  tamper,
  input  logic                  anomaly,
  input  logic                  consistency_err,
  output logic                  out_valid,
  output logic [KBITS-1:0]      out_data,
  output logic                  alarm,
  output event_t                event_class,
  output logic                  rk_err,
  output logic [4*R*NDEC-1:0]   rk_syndrome,
  output logic [CW-1:0]         n_corrected,
  output logic [CW-1:0]         n_alarm
);
  logic [RO-1:0]    o_pred;
  nib_t [K_NIB-1:0] comp_n, pred_n, data_corr;
  nib_t [RON-1:0]   cpc_corr;
  logic [NDEC-1:0]  err_d, cor_d, sus_d;
  logic             corrected, suspicious;

  assign comp_n = comp_x;
  assign pred_n = pred_x;

  cpc_encoder #(.KBITS(KBITS), .RO(RO)) u_cpc_pred (.x(pred_x), .o(o_pred));

  for (genvar g = 0; g < NDEC; g++) begin : g_dec
    localparam int unsigned KG = KD + ((g == 0) ? RON : 0);
    nib_t [KG-1:0] info_pred, info_rx, info_corr;
    nib_t [R-1:0]  w_pred, w_rx, syn;

    for (genvar i = 0; i < KD; i++) begin : g_sym
      assign info_pred[i] = pred_n[NDEC*i + g];
      assign info_rx[i]   = comp_n[NDEC*i + g];
      assign data_corr[NDEC*i + g] = info_corr[i];
    end
    if (g == 0) begin : g_cpc
      assign info_pred[KG-1:KD] = o_pred;
      assign info_rx[KG-1:KD]   = o_pred ^ inj_o;
      assign cpc_corr           = info_corr[KG-1:KD];
    end

    rk_encoder #(.K(KG), .D(D)) u_rk_pred (.x(info_pred), .w(w_pred));
    assign w_rx = w_pred ^ inj_w[4*R*g +: 4*R];

    // The corrected redundancy and residual syndrome are not needed downstream.
    rk_decoder #(.K(KG), .D(D)) u_rk_dec (
      .zx(info_rx), .zw(w_rx), .x_corr(info_corr), .w_corr(),
      .syndrome(syn), .err(err_d[g]), .corrected(cor_d[g]), .suspicious(sus_d[g]),
      .s_residual()
    );
    assign rk_syndrome[4*R*g +: 4*R] = syn;
  end

  assign rk_err     = |err_d;
  assign suspicious = |sus_d;
  assign corrected  = (|cor_d) & ~suspicious;

  fault_manager #(.KBITS(KBITS), .RO(RO), .CW(CW)) u_fm (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid),
    .data(data_corr), .cpc(cpc_corr),
    .rk_err(rk_err), .rk_corrected(corrected), .rk_suspicious(suspicious),
    .tamper(tamper), .anomaly(anomaly), .consistency_err(consistency_err),
    .out_valid(out_valid), .out_data(out_data), .alarm(alarm),
    .event_class(event_class), .n_corrected(n_corrected), .n_alarm(n_alarm)
  );
endmodule
