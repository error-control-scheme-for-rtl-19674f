// rk_amul: the "A" box of the RK code, w = A * y over GF(16).
//
// y is the word of K symbols already passed through the inverter, w the R
// redundancy symbols (R = 3 for distance 3, R = 7 for distance 5). The matrix
// A is computed at elaboration from the code construction in rk_pkg
// (rk_gen_a), so any dimension K up to rk_pkg::MAX_K works; for K = 16 it
// equals the published A_3 and A_5. Each output symbol is an XOR of constant
// multiples of the inputs. Combinational.
module rk_amul
  import rk_pkg::*;
#(
  parameter int unsigned K = 16,         // data symbols
  parameter int unsigned D = 3,          // code distance, 3 or 5
  localparam int unsigned R = 1 + 2 * (D - 2)
) (
  input  nib_t [K-1:0] y,
  output nib_t [R-1:0] w
);
  localparam a_mat_t A = rk_gen_a(K, D);

  always_comb
    for (int r = 0; r < R; r++) begin
      w[r] = '0;
      for (int j = 0; j < K; j++) w[r] = w[r] ^ gf16_mul(A[r][j], y[j]);
    end
endmodule
