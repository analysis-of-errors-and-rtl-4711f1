// ps_enc_ctrl: control FSM of the parity-sharing encoder PS(N1,K1,N2,K2,M).
//
// It follows the symbols produced by the row encoder RS(N1,K1) (row_step) and
// derives the four control signals named in the document:
//   hv   0 while row codewords are output, 1 while the shared (vertical)
//        parities of the multiple-channel encoder are output;
//   en   the row symbol is one of the last N1-M and is sampled by the
//        multiple-channel RS(N2,K2) encoder;
//   dv   the current output symbol is transmitted (0 for the N1-M
//        untransmitted row symbols);
//   rfd  the encoder can take a new data symbol.
// A PS codeword is K2 rows of N1 symbols followed by (N2-K2)*(N1-M) shared
// parities (state VPAR, one per cycle, vshift high). M is sampled from m_sel
// when the first symbol of a PS codeword is produced and held for the whole
// codeword; m_sel must lie in K1+1 .. N1-1. sof/eof mark the first and last
// output symbol of a PS codeword. All outputs are combinational from the
// state and row_step.
module ps_enc_ctrl #(
  parameter int unsigned N1 = 32,
  parameter int unsigned K1 = 28,
  parameter int unsigned N2 = 32,
  parameter int unsigned K2 = 26,
  parameter int unsigned MW = $clog2(N1 + 1),
  parameter int unsigned CW = $clog2(N1 - K1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [MW-1:0] m_sel,
  input  logic          row_step,
  input  logic          row_in_ready,
  output logic          hv,
  output logic          en,
  output logic          dv,
  output logic          rfd,
  output logic          vshift,
  output logic [CW-1:0] num_ch,
  output logic          sof,
  output logic          eof
);
  localparam int unsigned P2 = N2 - K2;

  typedef enum logic {ROWS, VPAR} state_t;
  state_t st;

  logic [$clog2(N1)-1:0]        j;       // symbol index inside the row
  logic [$clog2(K2)-1:0]        row;
  logic [$clog2(P2*N1+1)-1:0]   vcnt;
  logic [MW-1:0]                m_q;
  logic [MW-1:0]                m_eff;
  logic                         first;

  assign first  = (st == ROWS) && (row == '0) && (j == '0);
  assign m_eff  = first ? m_sel : m_q;
  assign num_ch = CW'(N1 - int'(m_eff));

  assign hv     = (st == VPAR);
  assign rfd    = (st == ROWS) && row_in_ready;
  assign dv     = (st == VPAR) || (MW'(j) < m_eff);
  assign en     = (st == ROWS) && row_step && (MW'(j) >= m_eff);
  assign vshift = (st == VPAR);
  assign sof    = first && row_step;
  assign eof    = (st == VPAR) && (int'(vcnt) == P2 * int'(num_ch) - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st   <= ROWS;
      j    <= '0;
      row  <= '0;
      vcnt <= '0;
      m_q  <= MW'(N1 - 2);
    end else begin
      case (st)
        ROWS: if (row_step) begin
          if (first) m_q <= m_sel;
          if (int'(j) == N1 - 1) begin
            j <= '0;
            if (int'(row) == K2 - 1) begin
              row  <= '0;
              st   <= VPAR;
              vcnt <= '0;
            end else begin
              row <= row + 1'b1;
            end
          end else begin
            j <= j + 1'b1;
          end
        end
        VPAR: begin
          if (eof) st <= ROWS;
          vcnt <= vcnt + 1'b1;
        end
        default: st <= ROWS;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   sof |-> (int'(m_sel) > int'(K1)) && (int'(m_sel) < int'(N1)));
endmodule
