// ps_encoder: parity-sharing RS encoder PS(N1,K1,N2,K2,M).
//
// K2 data rows of K1 symbols each enter on in_data (in_valid && rfd). Every
// row is encoded by an RS(N1,K1) LFSR encoder; the first M symbols of each row
// codeword are output directly, the last N1-M (all check symbols, since
// M > K1) are not transmitted but feed the multiple-channel RS(N2,K2)
// encoder, one channel per column. After the K2 rows, the H/V multiplexer
// switches to the multiple-channel encoder and the (N2-K2)*(N1-M) shared
// parities are output. A control FSM produces H/V, En, DV and RFD. This is
// the structure of the document's encoder; the handshake and output framing
// are this design's choices.
//
// Output (registered, one cycle after the row encoder produces a symbol):
// out_valid for every one of the K2*N1 + (N2-K2)*(N1-M) symbol slots, out_dv
// high on the K2*M + (N2-K2)*(N1-M) transmitted ones, out_sof/out_eof on the
// first and last slot of a PS codeword. m_sel (M, K1 < M < N1) is sampled at
// the first row symbol of each PS codeword.
module ps_encoder
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
  input  logic [MW-1:0] m_sel,
  input  logic          in_valid,
  input  sym_t          in_data,
  output logic          rfd,
  output logic          out_valid,
  output logic          out_dv,
  output sym_t          out_data,
  output logic          out_sof,
  output logic          out_eof
);
  localparam int unsigned CH_MAX = N1 - K1 - 1;
  localparam int unsigned CW     = $clog2(N1 - K1);

  logic          hv, en, dv, vshift, sof, eof;
  logic          row_in_ready, row_valid, row_last;
  sym_t          row_data, mc_data;
  logic [CW-1:0] num_ch;

  rs_lfsr_encoder #(.N(N1), .K(K1)) u_row (
    .clk, .rst_n,
    .in_valid (in_valid && rfd),
    .in_data,
    .in_ready (row_in_ready),
    .out_valid(row_valid),
    .out_data (row_data),
    .out_last (row_last)
  );

  rs_mc_encoder #(.N(N2), .K(K2), .CH_MAX(CH_MAX)) u_col (
    .clk, .rst_n,
    .num_ch   ($clog2(CH_MAX+1)'(num_ch)),
    .clear    (1'b0),
    .in_valid (en),
    .in_data  (row_data),
    .shift_out(vshift),
    .out_data (mc_data)
  );

  ps_enc_ctrl #(.N1(N1), .K1(K1), .N2(N2), .K2(K2), .MW(MW), .CW(CW)) u_ctrl (
    .clk, .rst_n, .m_sel,
    .row_step    (row_valid && !hv),
    .row_in_ready,
    .hv, .en, .dv, .rfd, .vshift, .num_ch, .sof, .eof
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_dv    <= 1'b0;
      out_data  <= '0;
      out_sof   <= 1'b0;
      out_eof   <= 1'b0;
    end else begin
      out_valid <= (row_valid && !hv) || vshift;
      out_dv    <= dv;
      out_data  <= hv ? mc_data : row_data;   // the H/V multiplexer
      out_sof   <= sof;
      out_eof   <= eof;
    end
  end

  logic unused;
  assign unused = row_last;
endmodule
