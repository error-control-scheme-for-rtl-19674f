// rk_decoder: nonlinear RK checker and single-symbol corrector (ECLT decoder).
//
// Input is a possibly distorted word z = (zx, zw): K information symbols and
// R redundancy symbols of a distance-D Rabii-Keren code. The datapath:
//   1. y = zx^-1 (inverter), w' = A*y, syndrome s = w' + zw.
//   2. rk_sj_norm picks s_j, the first nonzero of s[0..2], and normalises.
//   3. rk_eclt finds location i and factor g_i; e = s_j * g_i.
//   4. rk_syn_update checks that s - e*h_i = 0 (exactly one symbol wrong).
//   5. If so, y_i (or zw_i for a redundancy position) is corrected by e and
//      the information part is inverted back.
// When s[0..2] is zero but s is not (possible only for D = 5), the error can
// only sit in one of the last R-3 redundancy symbols, whose columns of H are
// unit vectors there; that case is resolved without the table (a choice of
// this design, so that every single-symbol error is corrected).
// Flags: err = syndrome nonzero; corrected = single error located and
// removed; suspicious = err and not corrected (no table match or a residual
// syndrome). s_residual is the syndrome left after removing the located
// error. On a suspicious word the received word is passed unchanged.
// Entirely combinational: the whole check and correction fits in one cycle.
module rk_decoder
  import rk_pkg::*;
#(
  parameter int unsigned K = 16,
  parameter int unsigned D = 3,
  localparam int unsigned R  = 1 + 2 * (D - 2),
  localparam int unsigned N  = K + R,
  localparam int unsigned LW = $clog2(N)
) (
  input  nib_t [K-1:0] zx,
  input  nib_t [R-1:0] zw,
  output nib_t [K-1:0] x_corr,
  output nib_t [R-1:0] w_corr,
  output nib_t [R-1:0] syndrome,
  output logic         err,
  output logic         corrected,
  output logic         suspicious,
  output nib_t [R-1:0] s_residual
);
  nib_t [K-1:0]     y, y_fix;
  nib_t [R-1:0]     w_pred;
  nib_t             s_j, g_i, e_tab, e_val;
  nib_t [NPART-1:0] s_hat;
  logic             part_nz, hit_tab, hit;
  logic [LW-1:0]    loc_tab, loc;
  logic             single;

  gf16_inv_layer #(.N(K)) u_inv_in (.x(zx), .y(y));
  rk_amul #(.K(K), .D(D)) u_amul (.y(y), .w(w_pred));

  assign syndrome = w_pred ^ zw;
  assign err      = (syndrome != '0);

  rk_sj_norm u_norm (.s_part(syndrome[NPART-1:0]), .s_j(s_j), .s_hat(s_hat), .any_nz(part_nz));
  rk_eclt #(.K(K), .D(D)) u_eclt (.s_hat(s_hat), .hit(hit_tab), .loc(loc_tab), .g(g_i));
  gf16_mul u_emul (.a(s_j), .b(g_i), .p(e_tab));

  // Location and value: from the table, or from the tail of the syndrome
  // when its first three symbols are zero.
  always_comb begin
    hit   = part_nz & hit_tab;
    loc   = loc_tab;
    e_val = e_tab;
    if (!part_nz) begin
      hit   = 1'b0;
      loc   = '0;
      e_val = '0;
      for (int r = R - 1; r >= NPART; r--)
        if (syndrome[r] != 0) begin
          hit   = 1'b1;
          loc   = LW'(K + r);
          e_val = syndrome[r];
        end
    end
  end

  rk_syn_update #(.K(K), .D(D)) u_upd (
    .s(syndrome), .loc(loc), .e(e_val), .s_tilde(s_residual), .single(single)
  );

  assign corrected  = err & hit & single;
  assign suspicious = err & ~corrected;

  always_comb begin
    y_fix  = y;
    w_corr = zw;
    if (corrected) begin
      for (int i = 0; i < K; i++)
        if (LW'(i) == loc) y_fix[i] = y[i] ^ e_val;
      for (int r = 0; r < R; r++)
        if (LW'(K + r) == loc) w_corr[r] = zw[r] ^ e_val;
    end
  end

  gf16_inv_layer #(.N(K)) u_inv_out (.x(y_fix), .y(x_corr));
endmodule
