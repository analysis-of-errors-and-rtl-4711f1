// rs_lfsr_encoder: systematic RS(N,K) encoder over GF(2^8) built as a linear
// feedback shift register (the row encoder RS(N1,K1) of the PS encoder).
//
// The encoder accepts K data symbols (in_valid && in_ready) and passes each
// one straight to the output in the same cycle while it divides the message
// by the generator polynomial g(x) = prod_{j=0}^{N-K-1}(x + alpha^j). After the
// K-th data symbol it drops in_ready and shifts the N-K remainder symbols out
// on the following N-K cycles, highest degree first, so a codeword leaves as
// N symbols with the data first. Data may arrive with gaps; the parity phase
// never stalls. out_last marks the final parity symbol.
//
// Timing: data symbols appear at the output combinationally (zero latency);
// parity symbols come from registers, one per cycle, right after the data.
// The LFSR form follows the document; the field and root choice (alpha^0 as
// first root) and the handshake are this design's choices.
module rs_lfsr_encoder
  import gf_pkg::*;
#(
  parameter int unsigned N = 32,
  parameter int unsigned K = 28
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  sym_t in_data,
  output logic in_ready,
  output logic out_valid,
  output sym_t out_data,
  output logic out_last
);
  localparam int unsigned P  = N - K;
  localparam int unsigned CW = $clog2(N + 1);
  localparam logic [8*32-1:0] G = gen_poly(P);

  sym_t            par [P];
  logic [CW-1:0]   cnt;          // symbols of the current codeword already out
  logic            data_phase;
  logic            step;
  sym_t            fb;

  assign data_phase = (cnt < CW'(K));
  assign in_ready   = data_phase;
  assign step       = data_phase ? in_valid : 1'b1;
  assign fb         = in_data ^ par[P-1];

  assign out_valid  = step;
  assign out_data   = data_phase ? in_data : par[P-1];
  assign out_last   = !data_phase && (cnt == CW'(N - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
      for (int i = 0; i < int'(P); i++) par[i] <= '0;
    end else if (step) begin
      cnt <= (cnt == CW'(N - 1)) ? '0 : cnt + 1'b1;
      if (data_phase) begin
        par[0] <= gf_mul(G[0 +: 8], fb);
        for (int i = 1; i < int'(P); i++) par[i] <= par[i-1] ^ gf_mul(G[8*i +: 8], fb);
      end else begin
        par[0] <= '0;
        for (int i = 1; i < int'(P); i++) par[i] <= par[i-1];
      end
    end
  end
endmodule
