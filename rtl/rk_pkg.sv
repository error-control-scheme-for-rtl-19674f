// rk_pkg: shared arithmetic, code construction and types for the
// Rabii-Keren (RK) inner code and the Compact Protection Code (CPC) outer code.
//
// Symbols of the RK code are nibbles, elements of GF(16) built on the
// polynomial x^4 + x + 1 (this choice reproduces every worked example of the
// scheme: 9^-1 = 2, 11^-1 = 5, 3^-1 = 14). The nonlinear map of the code is
// f(x) = x^-1 with 0 mapped to 0; it is its own inverse.
//
// The check matrix H = (A | I) of an RK code of dimension K and distance D is
// not stored: rk_gen_a() derives A at elaboration time from the shortened
// BCH check matrix of the construction. The BCH roots alpha^0 .. alpha^(D-2)
// live in GF(256), written as pairs (c0, c1) = c0 + c1*beta over GF(16) with
// beta^2 = 4*beta + 2 and alpha = 11 + 7*beta. Column j of the BCH matrix is
// (alpha^(e*j)) for each root exponent e; the root alpha^0 contributes one
// GF(16) row, every other root two rows, so R = 1 + 2*(D-2). The first R
// columns are the redundancy part H_r and the next K columns the data part
// H_l; A = H_r^-1 * H_l. With K = 16 this gives exactly the published A
// matrices of the (19,16,3) and (23,16,5) codes.
//
// rk_eclt_entry() derives one row of the Error Coefficient and Location Table
// (ECLT) from column i of H: the first three syndrome symbols of that column,
// normalised so their first nonzero symbol is 1, and the factor g_i, the
// inverse of that first nonzero symbol, so that a single error of value e at
// position i gives syndrome symbol s_j with e = s_j * g_i.
package rk_pkg;

  typedef logic [3:0] nib_t;

  // Largest sizes the constant tables are dimensioned for.
  localparam int unsigned MAX_R = 7;     // distance 5: 1 + 2*3
  localparam int unsigned MAX_K = 64;    // data symbols, incl. CPC symbols
  localparam int unsigned NPART = 3;     // 1 + m syndrome symbols used by the ECLT, m = 2

  typedef nib_t [MAX_K-1:0] a_row_t;
  typedef a_row_t [MAX_R-1:0] a_mat_t;

  // RK redundancy length for a distance (3 -> 3, 5 -> 7).
  function automatic int unsigned rk_r(input int unsigned d);
    return 1 + 2 * (d - 2);
  endfunction

  // ---------------------------------------------------------------- GF(16)
  function automatic nib_t gf16_mul(input nib_t a, input nib_t b);
    logic [6:0] p;
    p = '0;
    for (int i = 0; i < 4; i++)
      if (b[i]) p = p ^ (7'(a) << i);
    // reduce modulo x^4 + x + 1
    for (int i = 6; i >= 4; i--)
      if (p[i]) p = p ^ (7'b0010011 << (i - 4));
    return p[3:0];
  endfunction

  // Multiplicative inverse, 0 -> 0 (a^-1 = a^14).
  function automatic nib_t gf16_inv(input nib_t a);
    nib_t a2, a4, a8;
    a2 = gf16_mul(a, a);
    a4 = gf16_mul(a2, a2);
    a8 = gf16_mul(a4, a4);
    return gf16_mul(gf16_mul(a8, a4), a2);
  endfunction

  // ---------------------------------------------- GF(256) over GF(16) pairs
  typedef nib_t [1:0] e2_t;   // [0] = c0, [1] = c1 of c0 + c1*beta

  function automatic e2_t e2_mul(input e2_t u, input e2_t v);
    nib_t a0, a1, a2;
    e2_t  r;
    a0 = gf16_mul(u[0], v[0]);
    a1 = gf16_mul(u[0], v[1]) ^ gf16_mul(u[1], v[0]);
    a2 = gf16_mul(u[1], v[1]);
    // beta^2 = 4*beta + 2
    r[0] = a0 ^ gf16_mul(a2, 4'd2);
    r[1] = a1 ^ gf16_mul(a2, 4'd4);
    return r;
  endfunction

  // Entry (row, col) of the GF(16) expansion of the shortened BCH matrix.
  function automatic nib_t bch_entry(input int unsigned row, input int unsigned col);
    e2_t base, pw;
    int unsigned e;
    if (row == 0) return 4'd1;
    e = (row + 1) / 2;                  // root exponent of this row pair
    base = {4'd0, 4'd1};
    for (int unsigned t = 0; t < e; t++) base = e2_mul(base, {4'd7, 4'd11});
    pw = {4'd0, 4'd1};
    for (int unsigned t = 0; t < col; t++) pw = e2_mul(pw, base);
    return (row % 2 == 1) ? pw[0] : pw[1];
  endfunction

  // A = H_r^-1 * H_l by Gauss-Jordan elimination of (H_r | H_l).
  function automatic a_mat_t rk_gen_a(input int unsigned k, input int unsigned d);
    localparam int unsigned W = MAX_R + MAX_K;   // row stride of the work matrix
    nib_t m [MAX_R * W];
    a_mat_t a;
    int unsigned r;
    int unsigned piv;
    nib_t f, tmp;
    r = rk_r(d);
    for (int unsigned i = 0; i < MAX_R; i++)
      for (int unsigned j = 0; j < W; j++)
        m[i*W + j] = (i < r && j < r + k) ? bch_entry(i, j) : 4'd0;
    for (int unsigned c = 0; c < r; c++) begin
      piv = c;
      for (int unsigned t = r; t > c; t--)
        if (m[(t-1)*W + c] != 0) piv = t - 1;
      for (int unsigned j = 0; j < r + k; j++) begin
        tmp = m[c*W + j]; m[c*W + j] = m[piv*W + j]; m[piv*W + j] = tmp;
      end
      f = gf16_inv(m[c*W + c]);
      for (int unsigned j = 0; j < r + k; j++) m[c*W + j] = gf16_mul(f, m[c*W + j]);
      for (int unsigned i = 0; i < r; i++)
        if (i != c && m[i*W + c] != 0) begin
          f = m[i*W + c];
          for (int unsigned j = 0; j < r + k; j++)
            m[i*W + j] = m[i*W + j] ^ gf16_mul(f, m[c*W + j]);
        end
    end
    a = '0;
    for (int unsigned i = 0; i < r; i++)
      for (int unsigned j = 0; j < k; j++)
        a[i][j] = m[i*W + r + j];
    return a;
  endfunction

  // Column i of H = (A | I): data columns i < k, identity columns after.
  function automatic nib_t h_entry(input a_mat_t a, input int unsigned k,
                                   input int unsigned row, input int unsigned i);
    if (i < k) return a[row][i];
    return (i - k == row) ? 4'd1 : 4'd0;
  endfunction

  // One ECLT row: normalised partial column, factor g_i, and whether the
  // first NPART symbols of the column are nonzero at all.
  typedef struct packed {
    logic                     valid;
    nib_t [NPART-1:0]         h_hat;
    nib_t                     g;
  } eclt_entry_t;

  function automatic eclt_entry_t rk_eclt_entry(input a_mat_t a, input int unsigned k,
                                               input int unsigned i);
    eclt_entry_t en;
    nib_t lead;
    en = '0;
    lead = 4'd0;
    for (int unsigned t = NPART; t > 0; t--)
      if (h_entry(a, k, t - 1, i) != 0) lead = h_entry(a, k, t - 1, i);
    if (lead != 0) begin
      en.valid = 1'b1;
      en.g = gf16_inv(lead);
      for (int unsigned t = 0; t < NPART; t++)
        en.h_hat[t] = gf16_mul(h_entry(a, k, t, i), en.g);
    end
    return en;
  endfunction

  // --------------------------------------------------- GF(2^n) for the CPC
  // Field polynomial (without the x^n term) for the supported widths.
  function automatic logic [15:0] gf2n_poly(input int unsigned n);
    case (n)
      4:       return 16'h0003;   // x^4 + x + 1
      8:       return 16'h001B;   // x^8 + x^4 + x^3 + x + 1
      12:      return 16'h0053;   // x^12 + x^6 + x^4 + x + 1
      default: return 16'h100B;   // x^16 + x^12 + x^3 + x + 1
    endcase
  endfunction

  function automatic logic [15:0] gf2n_mul(input logic [15:0] a, input logic [15:0] b,
                                           input int unsigned n);
    logic [15:0] p, aa, poly, msk;
    poly = gf2n_poly(n);
    msk  = 16'((32'd1 << n) - 1);
    p  = '0;
    aa = a & msk;
    for (int unsigned i = 0; i < n; i++) begin
      if (b[i]) p = p ^ aa;
      if (aa[n-1]) aa = ((aa << 1) ^ poly) & msk;
      else         aa = (aa << 1) & msk;
    end
    return p;
  endfunction

  // Fault-manager verdict for one word.
  typedef enum logic [2:0] {
    EV_CLEAN      = 3'd0,   // zero RK syndrome, CPC consistent
    EV_CORRECTED  = 3'd1,   // single symbol corrected, CPC consistent
    EV_SUSPICIOUS = 3'd2,   // RK: no ECLT match or residual syndrome
    EV_CPC_FAIL   = 3'd3,   // RK accepted the word, CPC check failed
    EV_SYSTEM     = 3'd4    // RK/CPC quiet, a system-level input flagged
  } event_t;

endpackage
