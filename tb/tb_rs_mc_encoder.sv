// tb_rs_mc_encoder: checks the interleaved RS(32,26) column encoder for every
// chain length (1, 2 and 3 channels). Each channel's six parities must equal
// the reference encoding of that channel's 26 data symbols, output highest
// degree first with channels interleaved.
module tb_rs_mc_encoder;
  import rs_ref_pkg::*;
  localparam int N = 32, K = 26, CH_MAX = 3, P = N - K;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [1:0] num_ch = 1;
  logic clear = 0, in_valid = 0, shift_out = 0;
  logic [7:0] in_data = 0, out_data;
  int checks = 0, failures = 0;

  rs_mc_encoder #(.N(N), .K(K), .CH_MAX(CH_MAX)) dut (.clk, .rst_n, .num_ch, .clear,
    .in_valid, .in_data, .shift_out, .out_data);

  initial begin
    bq_t msg [CH_MAX];
    bq_t cw  [CH_MAX];
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 9; rep++) begin
      num_ch = 2'((rep % CH_MAX) + 1);
      for (int c = 0; c < int'(num_ch); c++) begin
        msg[c] = {};
        for (int i = 0; i < K; i++) msg[c].push_back(8'($urandom));
        cw[c] = ref_encode(msg[c], N, K);
      end
      for (int i = 0; i < K; i++)
        for (int c = 0; c < int'(num_ch); c++) begin
          in_valid = 1; in_data = msg[c][i];
          @(negedge clk);
          if ($urandom_range(0, 4) == 0) begin in_valid = 0; @(negedge clk); end
        end
      in_valid = 0;
      for (int p = 0; p < P; p++)
        for (int c = 0; c < int'(num_ch); c++) begin
          shift_out = 1;
          #1;
          checks++;
          if (out_data !== cw[c][K + p]) begin
            failures++;
            $display("ch=%0d/%0d parity %0d: got %h exp %h", c, num_ch, p, out_data, cw[c][K + p]);
          end
          @(negedge clk);
        end
      shift_out = 0;
      if (rep == 4) begin
        in_valid = 1; in_data = 8'h5A; @(negedge clk); in_valid = 0;
        clear = 1; @(negedge clk); clear = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
