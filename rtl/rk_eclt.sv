// rk_eclt: Error Coefficient and Location Table of the RK decoder.
//
// The table has one row per code position i = 0 .. K+R-1: the normalised
// first three symbols h_hat_i of column i of H = (A | I), and the factor g_i
// (inverse of the first nonzero symbol of that column part). Rows are
// computed at elaboration (rk_pkg::rk_eclt_entry); for K = 16 they are the
// published tables of the (19,16,3) and (23,16,5) codes. The normalised
// syndrome s_hat is compared with every row in parallel, like a small CAM,
// and the matching row gives the error location loc and g. Columns whose
// first three symbols are all zero (the last four redundancy positions of a
// distance-5 code) have no row. hit is 0 when nothing matches.
// Combinational; a table of K+R rows of 12 + 4 bits plus the row index.
// Rows are unique for every size the scheme is used at (K up to 17 at
// distance 5, up to 33 at distance 3). They are not unique for every K: at
// distance 5 with K = 33, positions 14 and 27 share a row. The last matching
// row wins, and the syndrome update then rejects a wrong guess, so a single
// error at such a position is reported as suspicious, never miscorrected.
module rk_eclt
  import rk_pkg::*;
#(
  parameter int unsigned K = 16,
  parameter int unsigned D = 3,
  localparam int unsigned R  = 1 + 2 * (D - 2),
  localparam int unsigned N  = K + R,
  localparam int unsigned LW = $clog2(N)
) (
  input  nib_t [NPART-1:0] s_hat,
  output logic             hit,
  output logic [LW-1:0]    loc,
  output nib_t             g
);
  localparam a_mat_t A = rk_gen_a(K, D);

  function automatic eclt_entry_t [N-1:0] build_table();
    eclt_entry_t [N-1:0] t;
    for (int unsigned i = 0; i < N; i++) t[i] = rk_eclt_entry(A, K, i);
    return t;
  endfunction

  localparam eclt_entry_t [N-1:0] TABLE = build_table();

  always_comb begin
    hit = 1'b0;
    loc = '0;
    g   = '0;
    for (int i = 0; i < N; i++)
      if (TABLE[i].valid && TABLE[i].h_hat == s_hat) begin
        hit = 1'b1;
        loc = LW'(i);
        g   = TABLE[i].g;
      end
  end
endmodule
