// tb_ps_enc_ctrl: drives the encoder FSM with a modelled row encoder (K1 data
// steps when in_valid, then N1-K1 automatic parity steps) and counts, for
// each PS codeword and M = 29, 30, 31: DV-high row slots (K2*M), En pulses
// (K2*(N1-M)), H/V cycles ((N2-K2)*(N1-M)), that RFD is low during H/V, and
// the position of sof and eof.
module tb_ps_enc_ctrl;
  localparam int N1 = 32, K1 = 28, N2 = 32, K2 = 26;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [5:0] m_sel = 30;
  logic row_step, row_in_ready, hv, en, dv, rfd, vshift, sof, eof;
  logic [1:0] num_ch;
  int checks = 0, failures = 0;
  int rcnt = 0;         // model of the row encoder's symbol counter

  ps_enc_ctrl #(.N1(N1), .K1(K1), .N2(N2), .K2(K2)) dut (.clk, .rst_n, .m_sel, .row_step,
    .row_in_ready, .hv, .en, .dv, .rfd, .vshift, .num_ch, .sof, .eof);

  logic feed = 0;
  assign row_in_ready = (rcnt < K1);
  assign row_step     = (rcnt < K1) ? (feed && rfd) : 1'b1;
  always @(posedge clk) if (rst_n && row_step) rcnt <= (rcnt == N1 - 1) ? 0 : rcnt + 1;

  int ndv, nen, nhv, nsof, cyc;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (row_step && !hv && dv) ndv++;
    if (en) nen++;
    if (hv) begin
      nhv++;
      if (rfd) begin checks++; failures++; $display("rfd high during H/V"); end
      if (!vshift) begin checks++; failures++; end
    end
    if (sof) nsof++;
  end

  initial begin
    int m;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int w = 0; w < 6; w++) begin
      m = 29 + (w % 3);
      m_sel = 6'(m);
      ndv = 0; nen = 0; nhv = 0; nsof = 0;
      feed = 1;
      @(posedge clk);
      while (!eof) @(posedge clk);
      @(negedge clk);
      feed = 0;
      checks += 5;
      if (ndv != K2 * m)                begin failures++; $display("M=%0d dv %0d", m, ndv); end
      if (nen != K2 * (N1 - m))         begin failures++; $display("M=%0d en %0d", m, nen); end
      if (nhv != (N2 - K2) * (N1 - m))  begin failures++; $display("M=%0d hv %0d", m, nhv); end
      if (nsof != 1)                    begin failures++; $display("sof %0d", nsof); end
      if (int'(num_ch) != N1 - m)       begin failures++; $display("num_ch %0d", num_ch); end
      repeat (w) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
