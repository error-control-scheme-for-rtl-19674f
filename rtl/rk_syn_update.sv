// rk_syn_update: the "syndrome update" box of the ECLT decoder (steps 5-7 of
// the single-error correction). Given the full syndrome s, the located
// position loc and the error value e, it removes the contribution of that
// single error, s_tilde = s - e * h_loc (h_loc is column loc of H = (A | I)),
// and reports single = 1 when s_tilde is zero, i.e. the syndrome is fully
// explained by one erroneous symbol. A nonzero s_tilde means more than one
// symbol was in error. Combinational.
module rk_syn_update
  import rk_pkg::*;
#(
  parameter int unsigned K = 16,
  parameter int unsigned D = 3,
  localparam int unsigned R  = 1 + 2 * (D - 2),
  localparam int unsigned N  = K + R,
  localparam int unsigned LW = $clog2(N)
) (
  input  nib_t [R-1:0]  s,
  input  logic [LW-1:0] loc,
  input  nib_t          e,
  output nib_t [R-1:0]  s_tilde,
  output logic          single
);
  localparam a_mat_t A = rk_gen_a(K, D);

  nib_t [R-1:0] h_col;

  always_comb begin
    h_col = '0;
    for (int i = 0; i < N; i++)
      if (LW'(i) == loc)
        for (int r = 0; r < R; r++) h_col[r] = h_entry(A, K, r, i);
    for (int r = 0; r < R; r++) s_tilde[r] = s[r] ^ gf16_mul(e, h_col[r]);
    single = (s_tilde == '0);
  end
endmodule
