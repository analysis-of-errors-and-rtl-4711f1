// tb_ps_decoder: sends PS(32,28,32,26,M) codewords with error and erasure
// patterns whose outcome is fixed by the code's bounds, and checks every
// decoded data symbol and every row's fail flag:
//   w0  clean, M = 30
//   w1  M = 30, one random error in some rows, two erasures in others, and
//       two errors plus one erasure in the shared parities (all corrected in
//       step 1 or 2)
//   w2  M = 30, five rows with three erasures (5 > 4: they fail step 1), the
//       columns recover their check symbols and step 3 corrects them
//   w3  M = 29, seven rows with two erasures fail step 1, the columns then
//       have seven erasures and fail (7 > 6), and those rows stay
//       uncorrectable (out_fail); the other rows decode
//   w4  M = 31, one random error in every row
//   w5  M = 30, one row failing step 1 and two errors in a column's shared
//       parities
// It also counts step-1 row failures, column failures and input stalls, and
// requires each to happen.
module tb_ps_decoder;
  import rs_ref_pkg::*;
  import ps_ref_pkg::*;
  localparam int N1 = 32, K1 = 28, N2 = 32, K2 = 26, P2 = N2 - K2;
  localparam int NW = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [5:0] m_sel = 30;
  logic in_valid = 0, in_era = 0, in_ready;
  logic [7:0] in_data = 0;
  logic out_valid, out_fail, out_sof, out_eof, evt_row_fail, evt_col_fail;
  logic [7:0] out_data;
  int checks = 0, failures = 0;
  int n_row_fail = 0, n_col_fail = 0, n_stall = 0, n_out_fail = 0;

  ps_decoder #(.N1(N1), .K1(K1), .N2(N2), .K2(K2)) dut (.clk, .rst_n, .m_sel, .in_valid, .in_data,
    .in_era, .in_ready, .out_valid, .out_data, .out_fail, .out_sof, .out_eof, .evt_row_fail, .evt_col_fail);

  // expected output: data and fail flag per row
  bq_t exp_row[$];
  bit  exp_fail[$];
  bq_t got;
  int  nrows_out = 0;
  int  exp_rowfail[NW];
  int  exp_colfail[NW];

  always @(posedge clk) if (rst_n) begin
    if (evt_row_fail) n_row_fail++;
    if (evt_col_fail) n_col_fail++;
    if (in_valid && !in_ready) n_stall++;
    if (out_valid) begin
      got.push_back(out_data);
      if (got.size() == 1) begin
        checks++;
        if (out_sof != (nrows_out % K2 == 0)) begin failures++; $display("sof wrong at row %0d", nrows_out); end
      end
      if (got.size() == K1) begin
        checks += 2;
        if (out_eof != (nrows_out % K2 == K2 - 1)) begin failures++; $display("eof wrong"); end
        if (out_fail) n_out_fail++;
        if (out_fail != exp_fail[0]) begin
          failures++; $display("row %0d: fail %0b expected %0b", nrows_out, out_fail, exp_fail[0]);
        end else if (!exp_fail[0] && got != exp_row[0]) begin
          failures++; $display("row %0d: data mismatch", nrows_out);
        end
        void'(exp_row.pop_front());
        void'(exp_fail.pop_front());
        got = {};
        nrows_out++;
      end
    end
  end

  task automatic send(ps_word_t w, bit era[$], int m);
    m_sel = 6'(m);
    foreach (w.tx[i]) begin
      in_valid = 1; in_data = w.tx[i]; in_era = era[i];
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      #1;
    end
    in_valid = 0; in_era = 0;
  endtask

  initial begin
    ps_word_t w;
    bit era[$];
    int m, pos, base;
    bit rf [K2];
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int t = 0; t < NW; t++) begin
      m = (t == 3) ? 29 : (t == 4) ? 31 : 30;
      w = ps_encode(N1, K1, N2, K2, m);
      era = {};
      foreach (w.tx[i]) era.push_back(1'b0);
      for (int r = 0; r < K2; r++) rf[r] = 0;
      for (int r = 0; r < K2; r++) begin
        base = r * m;
        case (t)
          1: if (r % 4 == 1) begin
               pos = $urandom_range(0, m - 1); w.tx[base + pos] ^= 8'($urandom_range(1, 255));
             end else if (r % 4 == 2) begin
               era[base + 3] = 1; w.tx[base + 3] = 8'h00; era[base + 17] = 1;
             end
          2: if (r < 5) for (int e = 0; e < 3; e++) begin
               era[base + 4 * e + r] = 1; w.tx[base + 4 * e + r] = 8'($urandom);
             end else begin
               pos = $urandom_range(0, m - 1); w.tx[base + pos] ^= 8'($urandom_range(1, 255));
             end
          3: if (r < 7) begin
               era[base + r] = 1; era[base + m - 1] = 1; w.tx[base + r] ^= 8'h33;
               rf[r] = 1;
             end
          4: begin
               pos = $urandom_range(0, m - 1); w.tx[base + pos] ^= 8'($urandom_range(1, 255));
             end
          5: if (r == 9) for (int e = 0; e < 3; e++) begin
               era[base + 5 + e] = 1; w.tx[base + 5 + e] = 8'h00;
             end
          default: ;
        endcase
      end
      base = K2 * m;          // shared parities: index p*(N1-M) + ch
      if (t == 1) begin
        w.tx[base + 0] ^= 8'h11; w.tx[base + 2 * (N1 - m)] ^= 8'h22; era[base + 1] = 1;
      end
      if (t == 5) for (int p = 0; p < 2; p++) w.tx[base + p * (N1 - m) + 1] ^= 8'($urandom_range(1, 255));
      for (int r = 0; r < K2; r++) begin
        exp_row.push_back(w.msg[r]);
        exp_fail.push_back(rf[r]);
      end
      send(w, era, m);
      if (t == 2) repeat (100) @(negedge clk);
    end
    wait (nrows_out == NW * K2);
    repeat (5) @(negedge clk);
    checks += 4;
    if (n_row_fail != 5 + 7 + 1) begin failures++; $display("step-1 row failures %0d", n_row_fail); end
    if (n_col_fail != 3)         begin failures++; $display("column failures %0d", n_col_fail); end
    if (n_out_fail != 7)         begin failures++; $display("final row failures %0d", n_out_fail); end
    if (n_stall == 0)            begin failures++; $display("input never stalled"); end
    $display("step-1 row failures %0d, column failures %0d, final failures %0d, stall cycles %0d",
             n_row_fail, n_col_fail, n_out_fail, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
