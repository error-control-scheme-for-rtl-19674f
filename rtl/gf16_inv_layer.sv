// gf16_inv_layer: the "()^-1" box of the RK encoder and decoder.
//
// Every 4-bit symbol of an N-symbol word is replaced by its multiplicative
// inverse in GF(16) (polynomial x^4 + x + 1), with 0 mapped to 0. This is
// the nonlinear map f(x) = x^-1 of the Rabii-Keren code; because f is its own
// inverse the same block serves both directions (into the linear domain before
// the matrix A, and back after the correction). Purely combinational: each
// output symbol depends only on the input symbol at the same index.
module gf16_inv_layer
  import rk_pkg::*;
#(
  parameter int unsigned N = 16          // symbols per word
) (
  input  nib_t [N-1:0] x,
  output nib_t [N-1:0] y
);
  always_comb
    for (int i = 0; i < N; i++) y[i] = gf16_inv(x[i]);
endmodule
