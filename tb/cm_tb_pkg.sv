// cm_tb_pkg: reference helpers for the correction masking testbenches.
//
// Works from the code definition in cm_pkg (the columns of H) but not from
// any decoder module: it encodes data, computes syndromes column by column
// and lists every correctable error pattern of a code by its own rule
// (bursts by start bit and shape, BCH errors as all singles and pairs).
package cm_tb_pkg;
  import cm_pkg::*;

  typedef logic [NMAX-1:0] pat_t;

  // Syndrome of an error (or codeword) vector: XOR of the columns it selects.
  function automatic col_t syn_of(hmat_t h, pat_t v, int unsigned n);
    col_t s;
    s = '0;
    for (int unsigned j = 0; j < n; j++) if (v[j]) s ^= h[j];
    return s;
  endfunction

  // Check bits of a data word: the check bits have unit columns, so p is the
  // syndrome of the data part alone.
  function automatic col_t encode(hmat_t h, logic [63:0] data, int unsigned k, int unsigned r);
    pat_t v;
    v = '0;
    for (int unsigned i = 0; i < k; i++) v[r+i] = data[i];
    return syn_of(h, v, k + r);
  endfunction

  // Every error pattern the code corrects, over an n-bit codeword.
  function automatic void all_patterns(code_e code, int unsigned n, ref pat_t q[$]);
    int unsigned b;
    pat_t p;
    q.delete();
    b = burst_len(code);
    if (b == 0) begin
      for (int unsigned a = 0; a < n; a++) begin
        p = '0; p[a] = 1'b1; q.push_back(p);
        for (int unsigned c = a + 1; c < n; c++) begin
          p = '0; p[a] = 1'b1; p[c] = 1'b1; q.push_back(p);
        end
      end
    end else begin
      // shape v: bit 0 is the first erroneous bit of the burst
      for (int unsigned st = 0; st < n; st++)
        for (int unsigned v = 1; v < (1 << b); v += 2) begin
          p = '0;
          for (int unsigned t = 0; t < b; t++) if (((v >> t) & 1) != 0) p[st+t] = 1'b1;
          if ((p >> n) == '0) q.push_back(p);
        end
    end
  endfunction
endpackage
