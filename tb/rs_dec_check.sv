// rs_dec_check: drives one rs_ee_decoder instance with random codewords that
// carry random errors and erasures and compares every decoded codeword with
// the reference. Patterns inside the correction bound (2e + s <= N-K) must be
// corrected exactly; patterns with more than N-K erasures must be flagged as
// failures and passed through unchanged. It also checks the latency
// N + PD + 7 and that back-to-back codewords start max(N, PD) cycles apart.
module rs_dec_check #(
  parameter int N      = 32,
  parameter int K      = 28,
  parameter int NWORDS = 40
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  import rs_ref_pkg::*;
  localparam int P   = N - K;
  localparam int PD  = P * (P + 2) + 3;
  localparam int PER = (PD > N) ? PD : N;

  logic ready, in_valid, in_era, out_valid, out_sop, out_eop, out_fail;
  logic [7:0] in_data, out_data;

  rs_ee_decoder #(.N(N), .K(K)) dut (
    .clk, .rst_n, .ready, .in_valid, .in_data, .in_era,
    .out_valid, .out_data, .out_sop, .out_eop, .out_fail
  );

  bq_t exp_q[$];        // expected output words
  bit  exp_fail[$];
  longint start_cyc[$];
  longint cyc = 0;
  longint last_start;
  int     nout;
  bq_t    got;
  bit     got_fail;

  always_ff @(posedge clk) cyc <= cyc + 1;

  initial begin
    bq_t msg, cw, rx;
    bit  era[$];
    int  ne, ns, pos;
    bit  overload;
    checks = 0; failures = 0; done = 0; nout = 0; last_start = -1;
    in_valid = 0; in_data = 0; in_era = 0;
    @(posedge rst_n);
    for (int w = 0; w < NWORDS; w++) begin
      msg = {};
      for (int i = 0; i < K; i++) msg.push_back(8'($urandom));
      cw = ref_encode(msg, N, K);
      checks++;
      if (!ref_is_codeword(cw, P)) begin failures++; $display("ref encoder broken"); end
      rx = cw;
      era = {};
      for (int i = 0; i < N; i++) era.push_back(1'b0);
      overload = (w % 8 == 7);
      if (overload) begin ns = P + 1; ne = 0; end
      else begin
        ns = $urandom_range(0, P);
        ne = (P - ns) / 2;
        if (w % 3 == 0) ne = $urandom_range(0, ne);
      end
      for (int i = 0; i < ns; i++) begin
        do pos = $urandom_range(0, N - 1); while (era[pos]);
        era[pos] = 1'b1;
        rx[pos] = (w % 2) ? 8'($urandom) : 8'h00;
      end
      for (int i = 0; i < ne; i++) begin
        do pos = $urandom_range(0, N - 1); while (era[pos] || rx[pos] != cw[pos]);
        rx[pos] = cw[pos] ^ 8'($urandom_range(1, 255));
      end
      exp_q.push_back(overload ? rx : cw);
      exp_fail.push_back(overload);
      // wait for ready, then send N consecutive symbols
      if (w == 0) @(negedge clk);
      while (!ready) @(negedge clk);
      if (last_start >= 0 && w % 5 != 4) begin
        checks++;
        if (cyc - last_start != PER) begin
          failures++;
          $display("N=%0d K=%0d: codeword start spacing %0d, expected %0d", N, K, cyc - last_start, PER);
        end
      end
      last_start = cyc;
      start_cyc.push_back(cyc);
      for (int i = 0; i < N; i++) begin
        in_valid = 1; in_data = rx[i]; in_era = era[i];
        @(negedge clk);
      end
      in_valid = 0; in_era = 0; in_data = 0;
      if ((w % 5) == 3) repeat ($urandom_range(1, 40)) @(negedge clk);
    end
    wait (nout == NWORDS);
    done = 1;
  end

  always @(posedge clk) begin
    if (out_valid) begin
      if (out_sop) begin
        got = {};
        got_fail = out_fail;
        checks++;
        if (start_cyc.size() == 0 || cyc - start_cyc[0] != N + PD + 7) begin
          failures++;
          $display("N=%0d K=%0d: latency %0d, expected %0d", N, K,
                   start_cyc.size() ? cyc - start_cyc[0] : -1, N + PD + 7);
        end
        if (start_cyc.size()) void'(start_cyc.pop_front());
      end
      got.push_back(out_data);
      if (out_eop) begin
        checks++;
        if (exp_q.size() == 0) begin
          failures++; $display("unexpected output word");
        end else begin
          if (got != exp_q[0] || got_fail != exp_fail[0]) begin
            failures++;
            $display("N=%0d K=%0d word %0d: mismatch (fail got %0b exp %0b)", N, K, nout, got_fail, exp_fail[0]);
          end
          void'(exp_q.pop_front());
          void'(exp_fail.pop_front());
        end
        nout++;
      end
    end
  end
endmodule
