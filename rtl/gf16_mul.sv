// gf16_mul: GF(16) multiplier, the multiplier of the ECLT decoder that forms
// the error value e_i = s_j * g_i from the leading syndrome symbol s_j and the
// table coefficient g_i. Field polynomial x^4 + x + 1. Combinational.
module gf16_mul
  import rk_pkg::*;
(
  input  nib_t a,
  input  nib_t b,
  output nib_t p
);
  assign p = rk_pkg::gf16_mul(a, b);
endmodule
