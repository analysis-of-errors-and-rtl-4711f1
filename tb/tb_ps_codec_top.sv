// tb_ps_codec_top: end-to-end test of the PS(32,28,32,26,M) codec at its
// default parameters. Eight PS codewords, with M cycling through 30, 30, 29
// and 31, are encoded; the transmitted symbols are checked against the
// reference encoder, pass through a channel model that adds errors and
// erasures, and are decoded. Every data symbol and every row's fail flag is
// checked. Channel patterns per codeword (t mod 4):
//   0  one random error in every third row (corrected in step 1)
//   1  five rows with three erasures: they fail step 1 and are recovered
//      through the columns in step 3
//   2  (M = 29) seven rows with two erasures: the columns get seven erasures
//      and fail, so those rows stay uncorrectable
//   3  (M = 31) one random error per row and two errors in the shared parities
// The test counts each mechanism (encoder RFD pause for the shared parities,
// change of M, step-1 row failure, column failure, recovery in step 3, final
// failure) and fails if one never happens. The decoder must keep up with the
// encoder's stream: its input may stall only for the N1-M filler cycles of
// each row.
module tb_ps_codec_top;
  import rs_ref_pkg::*;
  import ps_ref_pkg::*;
  localparam int N1 = 32, K1 = 28, N2 = 32, K2 = 26, NW = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [5:0] enc_m_sel = 30, dec_m_sel = 30;
  logic enc_in_valid = 0, enc_rfd, enc_out_valid, enc_out_dv, enc_out_sof, enc_out_eof;
  logic [7:0] enc_in_data = 0, enc_out_data;
  logic dec_in_valid = 0, dec_in_era = 0, dec_in_ready, dec_out_valid, dec_out_fail;
  logic dec_out_sof, dec_out_eof, dec_evt_row_fail, dec_evt_col_fail;
  logic [7:0] dec_in_data = 0, dec_out_data;

  ps_codec_top dut (.*);

  int checks = 0, failures = 0;
  int n_rfd_pause = 0, n_row_fail = 0, n_col_fail = 0, n_fin_fail = 0, n_dec_stall = 0;
  int n_m_change = 0, n_err_fixed = 0;   // n_err_fixed: rows recovered in step 3

  ps_word_t words[NW];
  int       mval[NW];
  bq_t      rx_q[$];            // received words (symbols), filled by the channel
  bit       era_q[$][$];
  bq_t      tx_got;
  int       enc_words = 0;
  int       rfd_low = 0;

  function automatic int m_of(int t);
    return (t % 4 == 2) ? 29 : (t % 4 == 3) ? 31 : 30;
  endfunction

  // encoder side: feed data rows
  initial begin
    for (int t = 0; t < NW; t++) begin
      mval[t]  = m_of(t);
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

  // channel: collect the transmitted symbols of each PS codeword, compare
  // them with the reference and add the codeword's error pattern
  always @(posedge clk) if (rst_n) begin
    if (enc_out_valid && enc_out_dv) tx_got.push_back(enc_out_data);
    // RFD low for longer than a row's check symbols: shared-parity pause
    if (!enc_rfd) rfd_low++;
    else begin
      if (rfd_low > N1 - K1) n_rfd_pause++;
      rfd_low = 0;
    end
    if (enc_out_valid && enc_out_eof) begin
      bq_t rx;
      bit  er[$];
      int  t, m, base, pos;
      t = enc_words;
      m = mval[t];
      checks++;
      if (tx_got != words[t].tx) begin failures++; $display("codeword %0d: encoder output differs", t); end
      rx = tx_got;
      er = {};
      foreach (rx[i]) er.push_back(1'b0);
      for (int r = 0; r < K2; r++) begin
        base = r * m;
        case (t % 4)
          0: if (r % 3 == 0) begin pos = $urandom_range(0, m - 1); rx[base + pos] ^= 8'($urandom_range(1, 255)); end
          1: if (r >= 10 && r < 15) for (int e = 0; e < 3; e++) begin
               er[base + 7 * e + 1] = 1; rx[base + 7 * e + 1] = 8'h00;
             end
          2: if (r < 7) begin er[base + 2] = 1; er[base + 20] = 1; rx[base + 2] ^= 8'h5A; end
          default: begin pos = $urandom_range(0, m - 1); rx[base + pos] ^= 8'($urandom_range(1, 255)); end
        endcase
      end
      if (t % 4 == 3) begin
        base = K2 * m;
        rx[base] ^= 8'h81; rx[base + 3] ^= 8'h18;
      end
      rx_q.push_back(rx);
      era_q.push_back(er);
      tx_got = {};
      enc_words++;
    end
  end

  // decoder input side
  initial begin
    bq_t rx;
    bit  er[$];
    @(posedge rst_n);
    for (int t = 0; t < NW; t++) begin
      wait (rx_q.size() > 0);
      @(negedge clk);
      rx = rx_q.pop_front();
      er = era_q.pop_front();
      if (t > 0 && mval[t] != mval[t-1]) n_m_change++;
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

  // decoder output check
  bq_t got;
  int  nrows = 0;
  always @(posedge clk) if (rst_n) begin
    if (dec_evt_row_fail) n_row_fail++;
    if (dec_evt_col_fail) n_col_fail++;
    if (dec_in_valid && !dec_in_ready) n_dec_stall++;
    if (dec_out_valid) begin
      got.push_back(dec_out_data);
      if (got.size() == K1) begin
        int  t, r;
        bit  expf;
        t = nrows / K2;
        r = nrows % K2;
        expf = (t % 4 == 2) && (r < 7);
        checks += 2;
        if (dec_out_fail != expf) begin failures++; $display("word %0d row %0d: fail %0b", t, r, dec_out_fail); end
        if (!expf && got != words[t].msg[r]) begin failures++; $display("word %0d row %0d: data wrong", t, r); end
        if (dec_out_eof != (r == K2 - 1)) begin failures++; $display("eof wrong"); end
        if (dec_out_fail) n_fin_fail++;
        got = {};
        nrows++;
      end
    end
  end

  longint t0;
  int     exp_stall;
  initial begin
    wait (rst_n);
    t0 = $time;
    wait (nrows == NW * K2);
    repeat (5) @(negedge clk);
    n_err_fixed = n_row_fail - n_fin_fail;   // every final failure also failed step 1
    checks += 6;
    if (n_rfd_pause == 0) begin failures++; $display("encoder never paused for shared parities"); end
    if (n_m_change == 0)  begin failures++; $display("M never changed"); end
    if (n_row_fail != 2 * (5 + 7)) begin failures++; $display("step-1 row failures %0d", n_row_fail); end
    if (n_col_fail != 2 * 3) begin failures++; $display("column failures %0d", n_col_fail); end
    if (n_err_fixed != 2 * 5) begin failures++; $display("rows recovered in step 3: %0d", n_err_fixed); end
    // the decoder may hold the stream only for the N1-M filler erasures of
    // each row; any other stall means it does not keep up with the channel
    exp_stall = 0;
    for (int t = 0; t < NW; t++) exp_stall += K2 * (N1 - mval[t]);
    if (n_dec_stall != exp_stall) begin
      failures++; $display("decoder stall cycles %0d, expected %0d", n_dec_stall, exp_stall);
    end
    $display("encoder RFD pauses %0d, M changes %0d, step-1 row failures %0d, column failures %0d",
             n_rfd_pause, n_m_change, n_row_fail, n_col_fail);
    $display("rows recovered in step 3 %0d, uncorrectable rows %0d, decoder stall cycles %0d, %0d cycles",
             n_err_fixed, n_fin_fail, n_dec_stall, ($time - t0) / 10);
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
