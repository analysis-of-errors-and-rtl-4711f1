// ps_codec_top: parity-sharing Reed-Solomon codec PS(N1,K1,N2,K2,M) over
// GF(2^8), default PS(32,28,32,26,30): the encoder and the three-step decoder
// side by side. The channel between them (transmission line or memory) is
// outside: the encoder's transmitted symbols (enc_out_dv) are what the channel
// carries, and the decoder takes the received symbols with an erasure flag
// per symbol supplied by the channel side information.
//
// Encoder side: enc_in_* takes K2 rows of K1 data symbols while enc_rfd is
// high; enc_out_* gives K2*N1 + (N2-K2)*(N1-M) slots per PS codeword, of
// which those with enc_out_dv are transmitted.
// Decoder side: dec_in_* takes the K2*M + (N2-K2)*(N1-M) transmitted symbols
// while dec_in_ready is high; dec_out_* gives the K2*K1 data symbols with a
// per-row failure flag. M is chosen per PS codeword on enc_m_sel and
// dec_m_sel (K1 < M < N1); both ends must use the same value.
//
// Timing: the encoder output is registered (one cycle after the data). The
// decoder holds dec_in_ready low only for the N1-M untransmitted slots of
// each row, so it keeps up with the encoder's stream; the first data symbol
// of a PS codeword comes out about 300 cycles after its last received symbol.
// The structure follows the document; the interface signals are this
// design's own.
module ps_codec_top
  import gf_pkg::*;
#(
  parameter int unsigned N1 = 32,
  parameter int unsigned K1 = 28,
  parameter int unsigned N2 = 32,
  parameter int unsigned K2 = 26,
  parameter int unsigned MW = $clog2(N1 + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // encoder
  input  logic [MW-1:0] enc_m_sel,
  input  logic          enc_in_valid,
  input  sym_t          enc_in_data,
  output logic          enc_rfd,
  output logic          enc_out_valid,
  output logic          enc_out_dv,
  output sym_t          enc_out_data,
  output logic          enc_out_sof,
  output logic          enc_out_eof,
  // decoder
  input  logic [MW-1:0] dec_m_sel,
  input  logic          dec_in_valid,
  input  sym_t          dec_in_data,
  input  logic          dec_in_era,
  output logic          dec_in_ready,
  output logic          dec_out_valid,
  output sym_t          dec_out_data,
  output logic          dec_out_fail,
  output logic          dec_out_sof,
  output logic          dec_out_eof,
  output logic          dec_evt_row_fail,
  output logic          dec_evt_col_fail
);
  ps_encoder #(.N1(N1), .K1(K1), .N2(N2), .K2(K2), .MW(MW)) u_enc (
    .clk, .rst_n,
    .m_sel    (enc_m_sel),
    .in_valid (enc_in_valid),
    .in_data  (enc_in_data),
    .rfd      (enc_rfd),
    .out_valid(enc_out_valid),
    .out_dv   (enc_out_dv),
    .out_data (enc_out_data),
    .out_sof  (enc_out_sof),
    .out_eof  (enc_out_eof)
  );

  ps_decoder #(.N1(N1), .K1(K1), .N2(N2), .K2(K2), .MW(MW)) u_dec (
    .clk, .rst_n,
    .m_sel       (dec_m_sel),
    .in_valid    (dec_in_valid),
    .in_data     (dec_in_data),
    .in_era      (dec_in_era),
    .in_ready    (dec_in_ready),
    .out_valid   (dec_out_valid),
    .out_data    (dec_out_data),
    .out_fail    (dec_out_fail),
    .out_sof     (dec_out_sof),
    .out_eof     (dec_out_eof),
    .evt_row_fail(dec_evt_row_fail),
    .evt_col_fail(dec_evt_col_fail)
  );
endmodule
