// rs_ee_decoder: errors-and-erasures Reed-Solomon RS(N,K) decoder over
// GF(2^8), the building block used three times by the parity-sharing decoder
// (two row decoders RS(N1,K1) and the column decoder RS(N2,K2)).
//
// A codeword is N symbols on N consecutive cycles (in_valid), highest degree
// first, each with an erasure flag in_era. It can start only while ready is
// high. The decoder corrects any pattern of e errors and s erasures with
// 2e + s <= N-K; otherwise it raises out_fail for the whole codeword and
// passes the received symbols through unchanged.
//
// Pipeline (each stage holds one codeword, so codewords overlap):
//   1. input     : syndromes S_j = r(alpha^j), j = 0..N-K-1, by Horner's rule,
//                  the erasure locator Gamma(x) = prod(1 + alpha^pos x) built
//                  one factor per flagged symbol, and a copy of the symbols in
//                  a circular buffer;
//   2. solve     : Berlekamp-Massey started from Gamma (one iteration per
//                  cycle for the N-K-s free syndromes) gives the errata
//                  locator Lambda, then Omega = S*Lambda mod x^(N-K), then a
//                  full root count of Lambda over the N positions decides
//                  whether decoding failed;
//   3. wait      : the result is held so that every codeword takes the same
//                  fixed time;
//   4. output    : a Chien search walks the positions in output order; where
//                  Lambda(x) = 0 the Forney value Omega(x) / (x Lambda'(x)) is
//                  added to the buffered symbol.
// Timing follows the figures the document uses for its decoders:
//   processing delay PD = (N-K)(N-K+2) + 3 cycles between codeword starts
//   (ready is low until max(N, PD) cycles after the last start), and
//   latency N + PD + 7 cycles from sampling a symbol at the input to sampling
//   its corrected copy at the output (out_valid). The algorithm inside is
//   this design's own; the document gives only the function and the timing.
module rs_ee_decoder
  import gf_pkg::*;
#(
  parameter int unsigned N = 32,
  parameter int unsigned K = 28
) (
  input  logic clk,
  input  logic rst_n,
  output logic ready,
  input  logic in_valid,
  input  sym_t in_data,
  input  logic in_era,
  output logic out_valid,
  output sym_t out_data,
  output logic out_sop,
  output logic out_eop,
  output logic out_fail
);
  localparam int unsigned P      = N - K;
  localparam int unsigned PD     = P * (P + 2) + 3;
  localparam int unsigned LAT    = N + PD + 7;
  localparam int unsigned PER    = (PD > N) ? PD : N;
  localparam int unsigned PROC   = (P + 2 > 7) ? P + 2 : 7;
  localparam int unsigned INFL   = N * ((LAT + PER - 1) / PER + 1);
  localparam int unsigned AW     = $clog2(INFL);
  localparam int unsigned NW     = $clog2(N + 1);
  localparam int unsigned PW     = $clog2(P + 2);
  localparam logic [8*33-1:0] APOS  = gf_pow_table(1);             // alpha^i
  localparam logic [8*33-1:0] ANEG  = gf_pow_table(-1);            // alpha^-i
  localparam sym_t            XFIRST = gf_exp(int'(N) - 1);          // alpha^(N-1)
  localparam logic [8*33-1:0] ASTRT = gf_pow_table(-(int'(N) - 1)); // alpha^-(N-1)i

  // ------------------------------------------------------------------ input
  logic [NW-1:0]          icnt;
  logic [$clog2(PER+1)-1:0] since;
  sym_t                   syn   [P];
  sym_t                   gam   [P+1];
  logic [PW-1:0]          rho;
  sym_t                   xpos;          // alpha^pos of the current symbol
  sym_t                   syn_n [P];
  sym_t                   gam_n [P+1];
  logic [PW-1:0]          rho_n;
  sym_t                   xcur;
  logic                   first;
  logic [AW-1:0]          wptr;
  sym_t                   buffer [2**AW];

  assign first = (icnt == '0);
  assign ready = first && (int'(since) >= int'(PER));
  assign xcur  = first ? XFIRST : xpos;

  always_comb begin
    for (int j = 0; j < int'(P); j++)
      syn_n[j] = (first ? 8'h00 : gf_mul(syn[j], APOS[8*j +: 8])) ^ in_data;
    for (int i = 0; i <= int'(P); i++) gam_n[i] = first ? ((i == 0) ? 8'h01 : 8'h00) : gam[i];
    rho_n = first ? '0 : rho;
    if (in_era) begin
      for (int i = int'(P); i > 0; i--) gam_n[i] = gam_n[i] ^ gf_mul(xcur, gam_n[i-1]);
      if (int'(rho_n) <= int'(P)) rho_n = rho_n + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      icnt  <= '0;
      since <= ($clog2(PER+1))'(PER);
      rho   <= '0;
      xpos  <= '0;
      wptr  <= '0;
      for (int j = 0; j < int'(P); j++) syn[j] <= '0;
      for (int i = 0; i <= int'(P); i++) gam[i] <= '0;
    end else begin
      if (in_valid && first) since <= ($clog2(PER+1))'(1);
      else if (int'(since) < int'(PER)) since <= since + 1'b1;
      if (in_valid) begin
        icnt <= (int'(icnt) == int'(N) - 1) ? '0 : icnt + 1'b1;
        xpos <= gf_mul(xcur, ANEG[8 +: 8]);
        syn  <= syn_n;
        gam  <= gam_n;
        rho  <= rho_n;
        wptr <= wptr + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) if (in_valid) buffer[wptr] <= in_data;

  logic in_done;
  assign in_done = in_valid && (int'(icnt) == int'(N) - 1);

  // ------------------------------------------------------------------ solve
  logic                   pbusy;
  sym_t                   s_syn [P];
  sym_t                   lam   [P+1];
  sym_t                   bp    [P+1];
  sym_t                   om    [P];
  logic [PW-1:0]          L;
  logic [PW-1:0]          s_rho;
  logic [$clog2(PROC+1)-1:0] pstep;

  // Berlekamp-Massey iteration pc (free syndromes only, pc >= rho)
  sym_t delta;
  sym_t lam_bm [P+1];
  sym_t bp_bm  [P+1];
  logic [PW-1:0] L_bm;
  always_comb begin
    delta = '0;
    for (int j = 0; j <= int'(P); j++)
      if (j <= int'(pstep) && int'(pstep) - j < int'(P))
        delta = delta ^ gf_mul(lam[j], s_syn[int'(pstep) - j]);
    lam_bm = lam;
    L_bm   = L;
    bp_bm[0] = '0;
    for (int i = 1; i <= int'(P); i++) bp_bm[i] = bp[i-1];
    if (delta != '0) begin
      for (int i = 1; i <= int'(P); i++) lam_bm[i] = lam[i] ^ gf_mul(delta, bp[i-1]);
      if (2 * int'(L) <= int'(pstep) + int'(s_rho)) begin
        L_bm = PW'(int'(pstep) + 1 + int'(s_rho) - int'(L));
        for (int i = 0; i <= int'(P); i++) bp_bm[i] = gf_mul(gf_inv(delta), lam[i]);
      end
    end
  end

  // errata evaluator
  sym_t om_c [P];
  always_comb begin
    for (int i = 0; i < int'(P); i++) begin
      om_c[i] = '0;
      for (int j = 0; j <= i; j++) om_c[i] = om_c[i] ^ gf_mul(lam[j], s_syn[i-j]);
    end
  end

  // root count over the N code positions and degree of Lambda
  logic [NW-1:0] nroots;
  logic [PW-1:0] deg;
  always_comb begin
    sym_t v;
    sym_t term [P+1];
    nroots = '0;
    term   = lam;                       // terms lam_j * alpha^(-pos*j), pos = 0
    for (int pos = 0; pos < int'(N); pos++) begin
      v = '0;
      for (int j = 0; j <= int'(P); j++) v = v ^ term[j];
      if (v == '0) nroots = nroots + 1'b1;
      for (int j = 0; j <= int'(P); j++) term[j] = gf_mul(term[j], ANEG[8*j +: 8]);
    end
    deg = '0;
    for (int j = 0; j <= int'(P); j++) if (lam[j] != '0) deg = PW'(j);
  end

  logic solve_fail;
  assign solve_fail = (int'(s_rho) > int'(P)) || (nroots != NW'(L)) || (deg != L);

  // pending result (stage 3)
  logic                      hvalid;
  logic [$clog2(PD+6)-1:0]   hwait;
  sym_t                      h_lam [P+1];
  sym_t                      h_om  [P];
  logic                      h_fail;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pbusy  <= 1'b0;
      pstep  <= '0;
      L      <= '0;
      s_rho  <= '0;
      hvalid <= 1'b0;
      hwait  <= '0;
      h_fail <= 1'b0;
      for (int j = 0; j < int'(P); j++) begin
        s_syn[j] <= '0; om[j] <= '0; h_om[j] <= '0;
      end
      for (int i = 0; i <= int'(P); i++) begin
        lam[i] <= '0; bp[i] <= '0; h_lam[i] <= '0;
      end
    end else begin
      if (in_done) begin
        pbusy <= 1'b1;
        pstep <= '0;
        s_syn <= syn_n;
        lam   <= gam_n;
        bp    <= gam_n;
        L     <= (int'(rho_n) > int'(P)) ? PW'(P) : rho_n;
        s_rho <= rho_n;
      end else if (pbusy) begin
        pstep <= pstep + 1'b1;
        if (int'(pstep) < int'(P)) begin
          if (int'(pstep) >= int'(s_rho)) begin
            lam <= lam_bm;
            bp  <= bp_bm;
            L   <= L_bm;
          end
        end else if (int'(pstep) == int'(P)) begin
          om <= om_c;
        end
        if (int'(pstep) == int'(PROC) - 1) begin
          pbusy  <= 1'b0;
          hvalid <= 1'b1;
          hwait  <= ($clog2(PD+6))'(PD + 5 - PROC);
          h_fail <= solve_fail;
          // pre-scale for the first output position, pos = N-1
          for (int i = 0; i <= int'(P); i++) h_lam[i] <= gf_mul(lam[i], ASTRT[8*i +: 8]);
          for (int i = 0; i < int'(P); i++)  h_om[i]  <= gf_mul(om[i],  ASTRT[8*i +: 8]);
        end
      end
      if (hvalid) begin
        if (hwait == '0) hvalid <= 1'b0;
        else             hwait  <= hwait - 1'b1;
      end
    end
  end

  // ----------------------------------------------------------------- output
  logic          oact;
  logic [NW-1:0] ocnt;
  logic [AW-1:0] rptr;
  sym_t          c_lam [P+1];
  sym_t          c_om  [P];
  logic          c_fail;
  sym_t          lamv, oddv, omv, corr;

  always_comb begin
    lamv = '0; oddv = '0; omv = '0;
    for (int i = 0; i <= int'(P); i++) begin
      lamv = lamv ^ c_lam[i];
      if (i % 2 == 1) oddv = oddv ^ c_lam[i];
    end
    for (int i = 0; i < int'(P); i++) omv = omv ^ c_om[i];
    corr = (!c_fail && lamv == '0) ? gf_mul(omv, gf_inv(oddv)) : '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      oact      <= 1'b0;
      ocnt      <= '0;
      rptr      <= '0;
      c_fail    <= 1'b0;
      out_valid <= 1'b0;
      out_data  <= '0;
      out_sop   <= 1'b0;
      out_eop   <= 1'b0;
      out_fail  <= 1'b0;
      for (int i = 0; i <= int'(P); i++) c_lam[i] <= '0;
      for (int i = 0; i < int'(P); i++)  c_om[i]  <= '0;
    end else begin
      out_valid <= oact;
      out_sop   <= oact && (ocnt == '0);
      out_eop   <= oact && (int'(ocnt) == int'(N) - 1);
      out_fail  <= oact && c_fail;
      out_data  <= buffer[rptr] ^ corr;
      if (oact) begin
        rptr <= rptr + 1'b1;
        ocnt <= ocnt + 1'b1;
        for (int i = 0; i <= int'(P); i++) c_lam[i] <= gf_mul(c_lam[i], APOS[8*i +: 8]);
        for (int i = 0; i < int'(P); i++)  c_om[i]  <= gf_mul(c_om[i],  APOS[8*i +: 8]);
        if (int'(ocnt) == int'(N) - 1) oact <= 1'b0;
      end
      if (hvalid && hwait == '0) begin
        oact   <= 1'b1;
        ocnt   <= '0;
        c_lam  <= h_lam;
        c_om   <= h_om;
        c_fail <= h_fail;
      end
    end
  end

  // A codeword occupies N consecutive cycles and starts only when ready.
  assert property (@(posedge clk) disable iff (!rst_n) (in_valid && first) |-> ready);
  assert property (@(posedge clk) disable iff (!rst_n) (!first) |-> in_valid);
  // The fixed schedule never overruns a stage.
  assert property (@(posedge clk) disable iff (!rst_n) in_done |-> !pbusy);
  assert property (@(posedge clk) disable iff (!rst_n) (pbusy && int'(pstep) == int'(PROC) - 1) |-> !hvalid);
  assert property (@(posedge clk) disable iff (!rst_n) (hvalid && hwait == '0) |-> (!oact || int'(ocnt) == int'(N) - 1));
endmodule
