// ps_ref_pkg: reference parity-sharing encoder for the testbenches, built on
// the reference RS encoder: K2 rows RS(N1,K1); the last N1-M symbols of each
// row codeword are the data of N1-M column codewords RS(N2,K2). The
// transmitted stream is the first M symbols of every row, then the shared
// parities, for each parity degree column 0 first.
package ps_ref_pkg;
  import rs_ref_pkg::*;

  typedef struct {
    bq_t msg  [];   // K2 data rows
    bq_t row  [];   // K2 row codewords
    bq_t col  [];   // N1-M column codewords
    bq_t tx;        // transmitted symbols
  } ps_word_t;

  function automatic ps_word_t ps_encode(int n1, int k1, int n2, int k2, int m);
    ps_word_t w;
    bq_t c;
    w.msg = new[k2];
    w.row = new[k2];
    w.col = new[n1 - m];
    w.tx  = {};
    for (int r = 0; r < k2; r++) begin
      w.msg[r] = {};
      for (int i = 0; i < k1; i++) w.msg[r].push_back(8'($urandom));
      w.row[r] = ref_encode(w.msg[r], n1, k1);
      for (int j = 0; j < m; j++) w.tx.push_back(w.row[r][j]);
    end
    for (int ch = 0; ch < n1 - m; ch++) begin
      c = {};
      for (int r = 0; r < k2; r++) c.push_back(w.row[r][m + ch]);
      w.col[ch] = ref_encode(c, n2, k2);
    end
    for (int p = 0; p < n2 - k2; p++)
      for (int ch = 0; ch < n1 - m; ch++) w.tx.push_back(w.col[ch][k2 + p]);
    return w;
  endfunction
endpackage
