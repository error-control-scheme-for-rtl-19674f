// rk_encoder: nonlinear RK encoder (the RK predictor of the protected
// subsystem). Computes the redundancy w = A * f^-1(x) of the K-symbol
// information word x, f^-1(x) = x^-1 symbol by symbol, so that (x, w) is a
// codeword of the (K+R, 16^K, D) Rabii-Keren code. Combinational.
// Example (K = 16, D = 3): x = 9,11,9,3,11,14,2,2,12,7,1,13,1,9,3,5 gives
// w = 0,8,10.
module rk_encoder
  import rk_pkg::*;
#(
  parameter int unsigned K = 16,
  parameter int unsigned D = 3,
  localparam int unsigned R = 1 + 2 * (D - 2)
) (
  input  nib_t [K-1:0] x,
  output nib_t [R-1:0] w
);
  nib_t [K-1:0] y;

  gf16_inv_layer #(.N(K)) u_inv (.x(x), .y(y));
  rk_amul #(.K(K), .D(D)) u_amul (.y(y), .w(w));
endmodule
