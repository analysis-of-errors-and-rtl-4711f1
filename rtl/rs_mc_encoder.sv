// rs_mc_encoder: multiple-channel (interleaved) RS(N,K) encoder that computes
// the shared parities of the parity-sharing code.
//
// It is the LFSR of an RS(N,K) encoder in which every delay element is
// replaced by a chain of CH_MAX registers. With num_ch active channels the
// chain is cut to num_ch registers by a multiplexer (the tap at position
// num_ch-1), so num_ch independent codewords are encoded with their symbols
// interleaved: channel 0, 1, ..., num_ch-1, channel 0, ... In the PS encoder
// the channels are the N1-M columns, so changing M only moves this tap.
//
// Interface: in_valid shifts one data symbol of the current channel in. After
// K symbols per channel, pulse shift_out for (N-K)*num_ch cycles: out_data
// then carries the parities, highest degree first and for each degree
// channel 0 first. Shifting out leaves the registers at zero, ready for the
// next block; clear also zeroes them. Registers past the selected length are
// held at zero, so the chain length may change between blocks. num_ch must stay constant during a
// block. out_data is valid in the same cycle as shift_out (registered state).
// The chain-length multiplexer follows the document's Fig. 7; the ordering
// and control inputs are this design's choices.
module rs_mc_encoder
  import gf_pkg::*;
#(
  parameter int unsigned N      = 32,
  parameter int unsigned K      = 26,
  parameter int unsigned CH_MAX = 3
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [$clog2(CH_MAX+1)-1:0] num_ch,
  input  logic                        clear,
  input  logic                        in_valid,
  input  sym_t                        in_data,
  input  logic                        shift_out,
  output sym_t                        out_data
);
  localparam int unsigned P = N - K;
  localparam logic [8*32-1:0] G = gen_poly(P);

  sym_t chain [P][CH_MAX];
  sym_t head  [P];     // output of each chain at the selected length
  sym_t fb;

  always_comb begin
    for (int i = 0; i < int'(P); i++) begin
      head[i] = chain[i][0];
      for (int c = 0; c < int'(CH_MAX); c++)
        if (c == int'(num_ch) - 1) head[i] = chain[i][c];
    end
  end

  assign fb       = in_data ^ head[P-1];
  assign out_data = head[P-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(P); i++)
        for (int c = 0; c < int'(CH_MAX); c++) chain[i][c] <= '0;
    end else if (clear) begin
      for (int i = 0; i < int'(P); i++)
        for (int c = 0; c < int'(CH_MAX); c++) chain[i][c] <= '0;
    end else if (in_valid || shift_out) begin
      for (int i = 0; i < int'(P); i++)
        for (int c = 1; c < int'(CH_MAX); c++)
          chain[i][c] <= (c < int'(num_ch)) ? chain[i][c-1] : '0;   // unused tail stays zero
      if (in_valid) begin
        chain[0][0] <= gf_mul(G[0 +: 8], fb);
        for (int i = 1; i < int'(P); i++) chain[i][0] <= head[i-1] ^ gf_mul(G[8*i +: 8], fb);
      end else begin
        chain[0][0] <= '0;
        for (int i = 1; i < int'(P); i++) chain[i][0] <= head[i-1];
      end
    end
  end

  // Shifting data in and parity out at once is meaningless.
  assert property (@(posedge clk) disable iff (!rst_n) !(in_valid && shift_out));
  assert property (@(posedge clk) disable iff (!rst_n) (int'(num_ch) >= 1) && (int'(num_ch) <= int'(CH_MAX)));
endmodule
