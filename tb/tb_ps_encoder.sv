// tb_ps_encoder: encodes PS(32,28,32,26,M) codewords for M = 29, 30 and 31,
// back to back and with random input gaps, and compares every output slot
// (DV flag and symbol, transmitted or not) with a reference built from the
// reference row and column encoders. Also checks the framing (sof/eof), the
// number of slots per PS codeword and the number of cycles RFD stays low.
module tb_ps_encoder;
  import rs_ref_pkg::*;
  localparam int N1 = 32, K1 = 28, N2 = 32, K2 = 26, P2 = N2 - K2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [5:0] m_sel = 30;
  logic in_valid = 0, rfd, out_valid, out_dv, out_sof, out_eof;
  logic [7:0] in_data = 0, out_data;
  int checks = 0, failures = 0;

  ps_encoder #(.N1(N1), .K1(K1), .N2(N2), .K2(K2)) dut (.clk, .rst_n, .m_sel, .in_valid,
    .in_data, .rfd, .out_valid, .out_dv, .out_data, .out_sof, .out_eof);

  typedef struct { bit dv; logic [7:0] d; bit sof; bit eof; } slot_t;
  slot_t exp_q[$];
  int    nslots = 0, nwords = 0;

  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("unexpected slot"); end
    else begin
      if (out_dv != exp_q[0].dv || out_data != exp_q[0].d ||
          out_sof != exp_q[0].sof || out_eof != exp_q[0].eof) begin
        failures++;
        if (failures < 10)
          $display("slot %0d: got dv=%0b d=%h sof=%0b eof=%0b, exp dv=%0b d=%h sof=%0b eof=%0b", nslots,
                   out_dv, out_data, out_sof, out_eof, exp_q[0].dv, exp_q[0].d, exp_q[0].sof, exp_q[0].eof);
      end
      void'(exp_q.pop_front());
    end
    nslots++;
    if (out_eof) nwords++;
  end

  initial begin
    bq_t msg [K2];
    bq_t cw  [K2];
    bq_t col, ccw;
    bq_t colp [N1];
    int  m, c;
    slot_t s;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int w = 0; w < 6; w++) begin
      m = 29 + (w % 3);
      c = N1 - m;
      for (int r = 0; r < K2; r++) begin
        msg[r] = {};
        for (int i = 0; i < K1; i++) msg[r].push_back(8'($urandom));
        cw[r] = ref_encode(msg[r], N1, K1);
        for (int j = 0; j < N1; j++) begin
          s.dv = (j < m); s.d = cw[r][j]; s.sof = (r == 0 && j == 0); s.eof = 0;
          exp_q.push_back(s);
        end
      end
      for (int ch = 0; ch < c; ch++) begin
        col = {};
        for (int r = 0; r < K2; r++) col.push_back(cw[r][m + ch]);
        colp[ch] = ref_encode(col, N2, K2);
      end
      for (int p = 0; p < P2; p++)
        for (int ch = 0; ch < c; ch++) begin
          s.dv = 1; s.d = colp[ch][K2 + p]; s.sof = 0; s.eof = (p == P2 - 1 && ch == c - 1);
          exp_q.push_back(s);
        end
      m_sel = 6'(m);
      for (int r = 0; r < K2; r++)
        for (int i = 0; i < K1; i++) begin
          if (w % 2 == 1 && $urandom_range(0, 5) == 0) begin in_valid = 0; @(negedge clk); end
          while (!rfd) begin in_valid = 0; @(negedge clk); end
          in_valid = 1; in_data = msg[r][i];
          @(negedge clk);
        end
      in_valid = 0;
    end
    wait (exp_q.size() == 0);
    repeat (3) @(negedge clk);
    checks++;
    if (nwords != 6) begin failures++; $display("%0d PS codewords framed", nwords); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
