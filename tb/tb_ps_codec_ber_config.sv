// tb_ps_codec_ber_config: runs the codec in the configuration used for the
// word-failure-rate study, PS(32,26,32,26,M) with M = 28, 29 and 30 (six row
// check symbols instead of four), end to end. Each PS codeword carries, per
// row, as many random errors and erasures as step 1 can still correct
// (2e + s <= N1-K1-(N1-M)), and four rows with N1-K1-(N1-M)+1 erasures that
// fail step 1 and must be recovered through the columns. Every data symbol
// is checked, no row may be flagged as failed, and the step-1 failures and
// their recovery are counted.
module tb_ps_codec_ber_config;
  import rs_ref_pkg::*;
  import ps_ref_pkg::*;
  localparam int N1 = 32, K1 = 26, N2 = 32, K2 = 26, NW = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [5:0] enc_m_sel = 28, dec_m_sel = 28;
  logic enc_in_valid = 0, enc_rfd, enc_out_valid, enc_out_dv, enc_out_sof, enc_out_eof;
  logic [7:0] enc_in_data = 0, enc_out_data;
  logic dec_in_valid = 0, dec_in_era = 0, dec_in_ready, dec_out_valid, dec_out_fail;
  logic dec_out_sof, dec_out_eof, dec_evt_row_fail, dec_evt_col_fail;
  logic [7:0] dec_in_data = 0, dec_out_data;

  ps_codec_top #(.N1(N1), .K1(K1), .N2(N2), .K2(K2)) dut (.*);

  int checks = 0, failures = 0, n_row_fail = 0, n_col_fail = 0;
  ps_word_t words[NW];
  int       mval[NW];
  bq_t      rx_q[$];
  bit       era_q[$][$];
  bq_t      tx_got;
  int       enc_words = 0;

  initial begin
    for (int t = 0; t < NW; t++) begin
      mval[t]  = 28 + (t % 3);
      words[t] = ps_encode(N1, K1, N2, K2, mval[t]);
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int t = 0; t < NW; t++) begin
      enc_m_sel = 6'(mval[t]);
      for (int r = 0; r < K2; r++)
        for (int i = 0; i < K1; i++) begin
          while (!enc_rfd) begin enc_in_valid = 0; @(negedge clk); end
          enc_in_valid = 1; enc_in_data = words[t].msg[r][i];
          @(negedge clk);
        end
      enc_in_valid = 0;
    end
  end

  always @(posedge clk) if (rst_n) begin
    if (enc_out_valid && enc_out_dv) tx_got.push_back(enc_out_data);
    if (enc_out_valid && enc_out_eof) begin
      bq_t rx;
      bit  er[$];
      int  t, m, base, pos, budget, ne, ns;
      t = enc_words;
      m = mval[t];
      budget = (N1 - K1) - (N1 - m);
      checks++;
      if (tx_got != words[t].tx) begin failures++; $display("codeword %0d: encoder output differs", t); end
      rx = tx_got;
      er = {};
      foreach (rx[i]) er.push_back(1'b0);
      for (int r = 0; r < K2; r++) begin
        base = r * m;
        if (r % 6 == 5) begin ns = budget + 1; ne = 0; end
        else begin ns = $urandom_range(0, budget); ne = (budget - ns) / 2; end
        for (int e = 0; e < ns; e++) begin
          do pos = $urandom_range(0, m - 1); while (er[base + pos]);
          er[base + pos] = 1; rx[base + pos] = 8'($urandom);
        end
        for (int e = 0; e < ne; e++) begin
          do pos = $urandom_range(0, m - 1); while (er[base + pos] || rx[base + pos] != tx_got[base + pos]);
          rx[base + pos] ^= 8'($urandom_range(1, 255));
        end
      end
      rx_q.push_back(rx);
      era_q.push_back(er);
      tx_got = {};
      enc_words++;
    end
  end

  initial begin
    bq_t rx;
    bit  er[$];
    @(posedge rst_n);
    for (int t = 0; t < NW; t++) begin
      wait (rx_q.size() > 0);
      @(negedge clk);
      rx = rx_q.pop_front();
      er = era_q.pop_front();
      dec_m_sel = 6'(mval[t]);
      foreach (rx[i]) begin
        dec_in_valid = 1; dec_in_data = rx[i]; dec_in_era = er[i];
        @(posedge clk);
        while (!dec_in_ready) @(posedge clk);
        #1;
      end
      dec_in_valid = 0; dec_in_era = 0;
    end
  end

  bq_t got;
  int  nrows = 0;
  always @(posedge clk) if (rst_n) begin
    if (dec_evt_row_fail) n_row_fail++;
    if (dec_evt_col_fail) n_col_fail++;
    if (dec_out_valid) begin
      got.push_back(dec_out_data);
      if (got.size() == K1) begin
        checks += 2;
        if (dec_out_fail) begin failures++; $display("word %0d row %0d flagged", nrows / K2, nrows % K2); end
        if (got != words[nrows / K2].msg[nrows % K2]) begin
          failures++; $display("word %0d row %0d: data wrong", nrows / K2, nrows % K2);
        end
        got = {};
        nrows++;
      end
    end
  end

  initial begin
    wait (nrows == NW * K2);
    repeat (5) @(negedge clk);
    checks += 2;
    if (n_row_fail != 4 * NW) begin failures++; $display("step-1 row failures %0d", n_row_fail); end
    if (n_col_fail != 0)      begin failures++; $display("column failures %0d", n_col_fail); end
    $display("step-1 row failures %0d (all recovered), column failures %0d", n_row_fail, n_col_fail);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
