// tb_rs_lfsr_encoder: checks the RS(32,28) row encoder against the reference
// long-division encoder: data pass through unchanged, the four check symbols
// follow immediately (in_ready low for exactly N-K cycles), out_last marks
// the final symbol, and input gaps during the data phase are tolerated.
module tb_rs_lfsr_encoder;
  import rs_ref_pkg::*;
  localparam int N = 32, K = 28;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, in_ready, out_valid, out_last;
  logic [7:0] in_data = 0, out_data;
  int checks = 0, failures = 0;

  rs_lfsr_encoder #(.N(N), .K(K)) dut (.clk, .rst_n, .in_valid, .in_data, .in_ready,
                                        .out_valid, .out_data, .out_last);

  bq_t exp_q[$];
  bq_t got;
  int  nwords = 0;

  always @(posedge clk) if (rst_n && out_valid) begin
    got.push_back(out_data);
    if (got.size() == N) begin
      checks += 2;
      if (!out_last) begin failures++; $display("out_last missing"); end
      if (got != exp_q[0]) begin failures++; $display("word %0d mismatch", nwords); end
      void'(exp_q.pop_front());
      got = {};
      nwords++;
    end else if (out_last) begin
      checks++; failures++; $display("early out_last");
    end
  end

  initial begin
    bq_t msg;
    int  busy;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int w = 0; w < 20; w++) begin
      msg = {};
      for (int i = 0; i < K; i++) msg.push_back(8'($urandom));
      exp_q.push_back(ref_encode(msg, N, K));
      for (int i = 0; i < K; i++) begin
        if (w % 3 == 1 && $urandom_range(0, 3) == 0) begin
          in_valid = 0; @(negedge clk);
        end
        checks++;
        if (!in_ready) begin failures++; $display("in_ready low in data phase"); end
        in_valid = 1; in_data = msg[i];
        @(negedge clk);
      end
      in_valid = 0;
      busy = 0;
      while (!in_ready) begin busy++; @(negedge clk); end
      checks++;
      if (busy != N - K) begin failures++; $display("parity phase %0d cycles", busy); end
    end
    repeat (3) @(negedge clk);
    checks++;
    if (nwords != 20) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
