// cpc_encoder: predictor of the outer Compact Protection Code (CPC).
//
// Adds RO redundancy bits to a KBITS-bit word. The word is cut into
// T = ceil(KBITS/RO) blocks b_0 .. b_(T-1) of RO bits (the last one zero
// padded), read as elements of GF(2^RO). The redundancy is
//     o = b_(T-1)^3  +  b_0*b_1 + b_2*b_3 + ...
// a punctured-cubic ground term on the last block plus quadratic (QS-style)
// products of the remaining blocks taken in pairs; if an odd block b_(T-2)
// is left over it is multiplied by b_(T-1). For T = 1 this is the cubic code
// o = b_0^3 with error masking probability 2^(1-RO). RO may be 4, 8, 12 or
// 16. The exact CPC construction is this design's own: only the use of a
// cubic ground code and the redundancy sizes are given. Combinational.
module cpc_encoder
  import rk_pkg::*;
#(
  parameter int unsigned KBITS = 64,
  parameter int unsigned RO    = 4,
  localparam int unsigned T    = (KBITS + RO - 1) / RO
) (
  input  logic [KBITS-1:0] x,
  output logic [RO-1:0]    o
);
  logic [T*RO-1:0] xp;
  logic [15:0]     blk [T];
  logic [15:0]     acc, cube;

  assign xp = (T*RO)'(x);

  always_comb begin
    for (int i = 0; i < T; i++) blk[i] = 16'(xp[i*RO +: RO]);
    cube = gf2n_mul(gf2n_mul(blk[T-1], blk[T-1], RO), blk[T-1], RO);
    acc  = cube;
    for (int i = 0; i + 2 < T; i += 2) acc = acc ^ gf2n_mul(blk[i], blk[i+1], RO);
    if (T > 1 && ((T - 1) % 2 == 1)) acc = acc ^ gf2n_mul(blk[T-2], blk[T-1], RO);
    o = acc[RO-1:0];
  end
endmodule
