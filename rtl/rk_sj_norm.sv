// rk_sj_norm: the "s_j" box of the ECLT decoder (step 2 of the single-error
// correction). Looks at the first three syndrome symbols (1 + m with m = 2),
// picks the first nonzero one, s_j, and divides all three by it, so the
// normalised partial syndrome s_hat has 1 as its first nonzero symbol.
// any_nz is 0 when the three symbols are all zero (s_j and s_hat are then 0).
// Combinational.
module rk_sj_norm
  import rk_pkg::*;
(
  input  nib_t [NPART-1:0] s_part,
  output nib_t             s_j,
  output nib_t [NPART-1:0] s_hat,
  output logic             any_nz
);
  nib_t inv_sj;

  always_comb begin
    s_j = '0;
    for (int t = NPART - 1; t >= 0; t--)
      if (s_part[t] != 0) s_j = s_part[t];
    any_nz = (s_j != 0);
    inv_sj = gf16_inv(s_j);
    for (int t = 0; t < NPART; t++) s_hat[t] = gf16_mul(s_part[t], inv_sj);
  end
endmodule
