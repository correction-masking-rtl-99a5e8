// cm_pkg: codes and parity check matrices shared by the correction masking
// decoder.
//
// A code is described by its parity check matrix H, stored column by column:
// column j is the syndrome that a single error on codeword bit j produces.
// Codeword bits are ordered parity first, data after: bits 0..R-1 are the
// check bits p_1..p_r, bits R..R+K-1 are the data bits d_1..d_k. The check bit
// columns are the unit vectors (systematic code), so a syndrome with a single
// one always points at a check bit and never at a data bit; the masking
// argument of the decoder relies on this.
//
// Five code families are provided, the ones the decoder was evaluated with:
//   CODE_SEC_DED  odd-weight-column SEC-DED: data columns are all weight-3
//                 vectors in increasing order, then weight-5 ones.
//   CODE_SEC_DAEC single errors and double adjacent errors (bursts <= 2).
//   CODE_BURST3   every error confined to 3 adjacent bits.
//   CODE_BURST4   every error confined to 4 adjacent bits.
//   CODE_BCH_DEC  shortened binary BCH code correcting any 1 or 2 errors,
//                 column j = x^j mod g(x), g(x) = m1(x)*m3(x).
// The burst and DAEC matrices are built by a greedy search: each new data
// column takes the smallest value whose bursts ending at that column give
// syndromes not used before. The exact matrices of the published codes are
// not reproduced; these are equivalent in what they correct. The number of
// check bits per code and word size is the smallest with which the
// construction succeeds (checked exhaustively by the testbenches).
package cm_pkg;

  typedef enum logic [2:0] {
    CODE_SEC_DED  = 3'd0,
    CODE_SEC_DAEC = 3'd1,
    CODE_BURST3   = 3'd2,
    CODE_BURST4   = 3'd3,
    CODE_BCH_DEC  = 3'd4
  } code_e;

  // Largest codeword and check-bit count any supported configuration needs
  // (BCH with k = 64: n = 78, r = 14).
  localparam int unsigned NMAX = 80;
  localparam int unsigned RMAX = 14;

  // The greedy search keeps a bitmap of used syndromes; the burst codes
  // need at most 11 check bits.
  localparam int unsigned UMAX = 11;

  typedef logic [RMAX-1:0] col_t;
  typedef col_t [NMAX-1:0] hmat_t;

  // Number of check bits r for a code and a data width k (k = 16, 32 or 64;
  // other widths up to 64 use the next supported size's value).
  function automatic int unsigned check_bits(code_e code, int unsigned k);
    int unsigned sz;
    sz = (k <= 16) ? 0 : (k <= 32) ? 1 : 2;
    case (code)
      CODE_SEC_DED:  return (sz == 0) ? 6  : (sz == 1) ? 7  : 8;
      CODE_SEC_DAEC: return (sz == 0) ? 6  : (sz == 1) ? 7  : 8;
      CODE_BURST3:   return (sz == 0) ? 7  : 9;
      CODE_BURST4:   return (sz == 0) ? 9  : (sz == 1) ? 10 : 11;
      default:       return (sz == 0) ? 10 : (sz == 1) ? 12 : 14;
    endcase
  endfunction

  // Longest burst a code corrects; 0 for the BCH code, which corrects any
  // one or two errors wherever they are.
  function automatic int unsigned burst_len(code_e code);
    case (code)
      CODE_SEC_DED:  return 1;
      CODE_SEC_DAEC: return 2;
      CODE_BURST3:   return 3;
      CODE_BURST4:   return 4;
      default:       return 0;
    endcase
  endfunction

  // BCH generator polynomial g(x) = m1(x) m3(x) over GF(2^m), m = r/2, with
  // primitive polynomials x^5+x^2+1, x^6+x+1 and x^7+x^3+1.
  function automatic logic [RMAX:0] bch_gen(int unsigned r);
    case (r)
      10:      return 15'h0769;
      12:      return 15'h1539;
      default: return 15'h4377;
    endcase
  endfunction

  // x^j mod g(x), as an r-bit vector.
  function automatic col_t bch_col(int unsigned r, int unsigned j);
    logic [RMAX:0] g;
    logic [RMAX:0] v;
    g = bch_gen(r);
    v = '0;
    v[0] = 1'b1;
    for (int unsigned t = 0; t < j; t++) begin
      v = v << 1;
      if (v[r]) v = v ^ g;
    end
    return col_t'(v[RMAX-1:0]);
  endfunction

  function automatic int unsigned popcount(col_t v);
    int unsigned c;
    c = 0;
    for (int unsigned i = 0; i < RMAX; i++) c += int'(v[i]);
    return c;
  endfunction

  // Syndrome of a burst whose last bit is codeword bit j; bit t of mask sets
  // codeword bit j-1-t as well. Bits below 0 are ignored.
  function automatic col_t burst_syn(hmat_t h, int unsigned j, int unsigned mask);
    col_t s;
    s = h[j];
    for (int unsigned t = 0; t < 3; t++)
      if (mask[t] && (j >= t + 1)) s = s ^ h[j-1-t];
    return s;
  endfunction

  // Build the parity check matrix of a code for k data bits; columns at and
  // above k + r are zero.
  function automatic hmat_t build_h(code_e code, int unsigned k);
    hmat_t h;
    int unsigned r;
    int unsigned n;
    int unsigned b;
    logic [(1 << UMAX)-1:0] used;
    int unsigned j;
    int unsigned w;
    int unsigned v;
    bit ok;
    bit found;
    h = '0;
    r = check_bits(code, k);
    n = k + r;
    b = burst_len(code);
    for (int unsigned i = 0; i < r; i++) h[i][i] = 1'b1;
    if (code == CODE_BCH_DEC) begin
      for (int unsigned i = r; i < n; i++) h[i] = bch_col(r, i);
    end else if (code == CODE_SEC_DED) begin
      j = r;
      w = 3;
      while (j < n) begin
        for (v = 0; v < (1 << r); v++)
          if (j < n && popcount(col_t'(v)) == w) begin
            h[j] = col_t'(v);
            j++;
          end
        w += 2;
      end
    end else begin
      used = '0;
      used[0] = 1'b1;
      // syndromes of the bursts that lie within the check bits
      for (int unsigned i = 0; i < r; i++)
        for (int unsigned m = 0; m < (1 << (b - 1)); m++)
          if (i >= m_top(m)) used[UMAX'(burst_syn(h, i, m))] = 1'b1;
      for (int unsigned i = r; i < n; i++) begin
        found = 1'b0;
        for (v = 1; v < (1 << r) && !found; v++) begin
          h[i] = col_t'(v);
          ok = 1'b1;
          for (int unsigned m = 0; m < (1 << (b - 1)); m++)
            if (used[UMAX'(burst_syn(h, i, m))]) ok = 1'b0;
          if (ok) found = 1'b1;
        end
        for (int unsigned m = 0; m < (1 << (b - 1)); m++)
          used[UMAX'(burst_syn(h, i, m))] = 1'b1;
      end
    end
    return h;
  endfunction

  // Number of bits below the last one that a burst mask reaches.
  function automatic int unsigned m_top(int unsigned m);
    return (m >= 4) ? 3 : (m >= 2) ? 2 : (m >= 1) ? 1 : 0;
  endfunction

endpackage
