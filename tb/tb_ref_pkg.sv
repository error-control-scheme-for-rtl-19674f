// tb_ref_pkg: reference values for the testbenches, computed independently
// of the RTL. GF(16) arithmetic uses exponent/logarithm tables generated from
// the primitive element 2 (polynomial x^4 + x + 1) instead of the RTL's
// shift-and-reduce multiplier. The RK matrices A_3 and A_5 and the two
// error coefficient and location tables are the published ones for the
// (19,16,3) and (23,16,5) codes, entered by hand.
package tb_ref_pkg;

  function automatic int unsigned exp16(input int unsigned i);
    int unsigned v;
    v = 1;
    for (int unsigned t = 0; t < i % 15; t++) begin
      v = v << 1;
      if ((v & 16) != 0) v = v ^ 19;
    end
    return v;
  endfunction

  function automatic int unsigned log16(input logic [3:0] a);
    for (int unsigned i = 0; i < 15; i++)
      if (exp16(i) == 32'(a)) return i;
    return 0;
  endfunction

  function automatic logic [3:0] rmul(input logic [3:0] a, input logic [3:0] b);
    if (a == 0 || b == 0) return 4'd0;
    return 4'(exp16(log16(a) + log16(b)));
  endfunction

  function automatic logic [3:0] rinv(input logic [3:0] a);
    if (a == 0) return 4'd0;
    return 4'(exp16(15 - log16(a)));
  endfunction

  // Published A_5 (7 x 16), row by row.
  localparam logic [3:0] A5 [7][16] = '{
    '{1,12,0,15,0,14,13,6,15,12,3,9,15,10,0,15},
    '{11,12,12,3,15,8,8,2,5,2,2,15,10,13,10,3},
    '{5,2,12,10,3,12,4,5,4,12,13,9,9,14,13,12},
    '{10,4,2,0,10,5,7,13,9,5,1,8,5,1,14,1},
    '{7,8,4,9,0,6,0,6,6,11,12,11,3,6,1,5},
    '{15,15,8,14,9,5,1,4,12,14,9,2,1,15,6,11},
    '{12,0,15,0,14,13,6,15,12,3,9,15,10,0,15,14}};

  // Published ECLT of the (19,16,3) code: h_hat[3], g for i = 0..18.
  localparam logic [3:0] T1_H [19][3] = '{
    '{1,10,12},'{1,9,1},'{1,13,6},'{1,12,4},'{1,15,5},'{1,14,5},'{1,14,1},'{1,13,0},
    '{0,1,13},'{1,10,3},'{1,6,13},'{1,5,8},'{1,1,13},'{1,5,3},'{1,6,5},'{1,14,7},
    '{1,0,0},'{0,1,0},'{0,0,1}};
  localparam logic [3:0] T1_G [19] = '{7,9,10,9,11,10,14,12,12,8,10,12,13,7,2,8,1,1,1};

  // Published ECLT of the (23,16,5) code, i = 0..18.
  localparam logic [3:0] T2_H [19][3] = '{
    '{1,11,5},'{1,1,7},'{0,1,1},'{1,11,15},'{0,1,11},'{1,11,7},'{1,6,3},'{1,14,8},
    '{1,14,6},'{1,7,1},'{1,15,10},'{1,13,1},'{1,15,4},'{1,3,4},'{0,1,3},'{1,11,10},
    '{1,0,0},'{0,1,0},'{0,0,1}};
  localparam logic [3:0] T2_G [19] = '{1,10,10,8,8,3,4,7,8,10,14,2,8,12,12,8,1,1,1};

  // Entry (r, j) of A_3, rebuilt from the published table: column j of A_3
  // is h_hat_j / g_j.
  function automatic logic [3:0] a3(input int unsigned r, input int unsigned j);
    return rmul(T1_H[j][r], rinv(T1_G[j]));
  endfunction

  function automatic logic [3:0] a_entry(input int unsigned d, input int unsigned r,
                                         input int unsigned j);
    return (d == 3) ? a3(r, j) : A5[r][j];
  endfunction

  // Reference RK redundancy of a 16-symbol word: w = A * x^-1.
  function automatic logic [6:0][3:0] ref_encode(input int unsigned d, input logic [15:0][3:0] x);
    logic [6:0][3:0] w;
    w = '0;
    for (int unsigned r = 0; r < ((d == 3) ? 3 : 7); r++)
      for (int unsigned j = 0; j < 16; j++)
        w[r] = w[r] ^ rmul(a_entry(d, r, j), rinv(x[j]));
    return w;
  endfunction

endpackage
