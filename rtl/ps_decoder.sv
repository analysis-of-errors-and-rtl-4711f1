// ps_decoder: three-step decoder for the parity-sharing RS code
// PS(N1,K1,N2,K2,M), with its control FSM, two RS(N1,K1) row decoders, one
// RS(N2,K2) column decoder and the two RAMs.
//
// Input (in_valid && in_ready): K2 received rows of M symbols, then the
// (N2-K2)*(N1-M) shared parities in the order the encoder sends them (for
// each parity degree, column 0 first). in_era is the erasure flag from the
// channel side information. The M symbols of a row must follow each other on
// consecutive cycles once the first is accepted; the shared parities may
// arrive with gaps. m_sel (K1 < M < N1) is sampled with the first symbol of a
// PS codeword.
//
// Step 1 (En1/Er1): each row goes through row decoder 1 as N1 symbols: the M
//   received ones with their erasure flags and N1-M zero symbols flagged as
//   erasures (the untransmitted check symbols). Corrected rows go to RAM1;
//   a failed row is stored as received, its Fail bit is set, and its
//   erasure flags are kept beside RAM1.
// Step 2 (En2/Er2): once all rows are through and the shared parities are in
//   RAM2, the N1-M columns are decoded one after another by the RS(N2,K2)
//   decoder: the first K2 symbols are the row check symbols from RAM1, erased
//   where the row failed (Fail), the last N2-K2 are the shared parities with
//   their received erasure flags (Er2). Corrected check symbols are written
//   back to RAM2 and a failed column is remembered.
// Step 3 (En3/Er3): each row is decoded again by row decoder 2 from RAM1
//   (erasures of failed rows restored) and the recovered check symbols from
//   RAM2 (erased where the column failed).
// Output: the K1 data symbols of every row (out_valid), with out_fail when
// the row is still uncorrectable after step 3; out_sof/out_eof frame the K2
// rows. evt_row_fail and evt_col_fail pulse once per row failed in step 1
// and per column failed in step 2.
//
// RAM1 (with its erasure plane), RAM2 and the Fail/column-fail flags exist
// in NB banks, one per PS codeword in flight. Banks are used in turn: while
// row decoder 1 works on codeword n+2, the column decoder can work on n+1 and
// row decoder 2 on n. A bank is released when step 3 has read its last row;
// the input waits (in_ready low) only if the next bank is still in use. With
// NB = 3 the decoder keeps up with a continuous stream: apart from the N1-M
// filler cycles of each row, in_ready stays high.
//
// The three-step algorithm, the decoders, the RAMs and the Fail/Er signals
// follow the document. Its FSM is described only by its outputs; the
// sequencing, the bank count and the order in which columns are decoded (one
// after the other, once all rows of the codeword are through step 1) are
// this design's own. Output latency is therefore about one PS codeword plus
// the column decoding time, longer than a schedule that starts a column while
// rows are still arriving.
module ps_decoder
  import gf_pkg::*;
#(
  parameter int unsigned N1 = 32,
  parameter int unsigned K1 = 28,
  parameter int unsigned N2 = 32,
  parameter int unsigned K2 = 26,
  parameter int unsigned MW = $clog2(N1 + 1),
  parameter int unsigned NB = 3                   // RAM banks (PS codewords in flight)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [MW-1:0] m_sel,
  input  logic          in_valid,
  input  sym_t          in_data,
  input  logic          in_era,
  output logic          in_ready,
  output logic          out_valid,
  output sym_t          out_data,
  output logic          out_fail,
  output logic          out_sof,
  output logic          out_eof,
  output logic          evt_row_fail,
  output logic          evt_col_fail
);
  localparam int unsigned P2     = N2 - K2;
  localparam int unsigned CH_MAX = N1 - K1 - 1;
  localparam int unsigned D1     = K2 * N1;          // RAM1 words per bank
  localparam int unsigned D2     = N2 * CH_MAX;      // RAM2 words per bank
  localparam int unsigned A1     = $clog2(D1);
  localparam int unsigned A2     = $clog2(D2);
  localparam int unsigned JW     = $clog2(N1 + 1);
  localparam int unsigned RW     = $clog2(N2 + 1);
  localparam int unsigned BW     = (NB > 1) ? $clog2(NB) : 1;
  localparam int unsigned CHW    = $clog2(CH_MAX + 1);

  typedef logic [BW-1:0] bank_t;

  function automatic bank_t next_bank(bank_t b);
    return (int'(b) == int'(NB) - 1) ? '0 : b + 1'b1;
  endfunction

  // Bank state. A bank is claimed when the shared parities of a PS codeword
  // are complete (par_done) and released when step 3 has read its last row.
  logic [NB-1:0]         par_done, rows1_done, cols_done;
  logic [MW-1:0]         m_bank  [NB];
  logic [K2-1:0]         fail1   [NB];
  logic [CH_MAX-1:0]     colfail [NB];

  bank_t ib;     // bank being received (input, erasure plane, shared parities)
  bank_t ob;     // bank written by row decoder 1
  bank_t cb;     // bank of the columns being decoded
  bank_t tb;     // bank read by step 3

  logic ev_par, ev_rows1, ev_cols, row3_fed;

  // ------------------------------------------------------------ input side
  typedef enum logic [1:0] {IN_ROWS, IN_PAR, IN_WAIT} in_state_t;
  in_state_t ist;

  logic [MW-1:0]         m_q, m_cur;
  logic [JW-1:0]         fj;        // symbol slot of the row fed to decoder 1
  logic [RW-1:0]         frow;
  logic [RW-1:0]         pp;        // shared parity degree being received
  logic [CHW-1:0]        pc;        // column of that parity
  logic [CHW-1:0]        nch;
  logic                  in_first;

  logic d1_ready, d1_in_valid, d1_in_era;
  sym_t d1_in_data;
  logic d1_out_valid, d1_out_sop, d1_out_eop, d1_out_fail;
  sym_t d1_out_data;

  assign in_first = (ist == IN_ROWS) && (frow == '0) && (fj == '0);
  assign m_cur    = in_first ? m_sel : m_q;
  assign nch      = CHW'(N1 - int'(m_cur));

  always_comb begin
    in_ready = 1'b0;
    case (ist)
      IN_ROWS: in_ready = (fj == '0) ? d1_ready : (MW'(fj) < m_cur);
      IN_PAR:  in_ready = 1'b1;
      default: in_ready = 1'b0;
    endcase
  end

  // row decoder 1 input: received symbols, then N1-M erased fillers (Er1)
  logic fill;
  assign fill        = (ist == IN_ROWS) && (fj != '0) && (MW'(fj) >= m_cur);
  assign d1_in_valid = (in_valid && in_ready && ist == IN_ROWS) || fill;
  assign d1_in_data  = fill ? '0 : in_data;
  assign d1_in_era   = fill ? 1'b1 : in_era;

  // RAM1 erasure plane: received flags of the first M symbols of each row
  logic          ep_we;
  logic [A1-1:0] ep_waddr;
  assign ep_we    = in_valid && in_ready && (ist == IN_ROWS);
  assign ep_waddr = A1'(int'(frow) * int'(N1) + int'(fj));

  assign ev_par = (ist == IN_PAR) && in_valid && (int'(pc) == int'(nch) - 1) &&
                  (int'(pp) == int'(P2) - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ist  <= IN_ROWS;
      ib   <= '0;
      m_q  <= MW'(N1 - 2);
      fj   <= '0;
      frow <= '0;
      pp   <= '0;
      pc   <= '0;
    end else begin
      case (ist)
        IN_ROWS: if (d1_in_valid) begin
          if (in_first) m_q <= m_sel;
          if (int'(fj) == int'(N1) - 1) begin
            fj <= '0;
            if (int'(frow) == int'(K2) - 1) begin
              frow <= '0;
              ist  <= IN_PAR;
              pp   <= '0;
              pc   <= '0;
            end else begin
              frow <= frow + 1'b1;
            end
          end else begin
            fj <= fj + 1'b1;
          end
        end
        IN_PAR: if (in_valid) begin
          if (int'(pc) == int'(nch) - 1) begin
            pc <= '0;
            if (int'(pp) == int'(P2) - 1) begin
              ist <= par_done[next_bank(ib)] ? IN_WAIT : IN_ROWS;
              ib  <= next_bank(ib);
            end else begin
              pp <= pp + 1'b1;
            end
          end else begin
            pc <= pc + 1'b1;
          end
        end
        default: if (!par_done[ib]) ist <= IN_ROWS;
      endcase
    end
  end

  rs_ee_decoder #(.N(N1), .K(K1)) u_dec1 (
    .clk, .rst_n,
    .ready    (d1_ready),
    .in_valid (d1_in_valid),
    .in_data  (d1_in_data),
    .in_era   (d1_in_era),
    .out_valid(d1_out_valid),
    .out_data (d1_out_data),
    .out_sop  (d1_out_sop),
    .out_eop  (d1_out_eop),
    .out_fail (d1_out_fail)
  );

  // ------------------------------------------------- step 1 results to RAM1
  logic [JW-1:0] oj;
  logic [RW-1:0] orow;
  logic [A1-1:0] r1_waddr;

  assign r1_waddr     = A1'(int'(orow) * int'(N1) + int'(oj));
  assign evt_row_fail = d1_out_valid && d1_out_sop && d1_out_fail;
  assign ev_rows1     = d1_out_valid && d1_out_eop && (int'(orow) == int'(K2) - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      oj   <= '0;
      orow <= '0;
      ob   <= '0;
    end else if (d1_out_valid) begin
      if (d1_out_eop) begin
        oj <= '0;
        if (int'(orow) == int'(K2) - 1) begin
          orow <= '0;
          ob   <= next_bank(ob);
        end else begin
          orow <= orow + 1'b1;
        end
      end else begin
        oj <= oj + 1'b1;
      end
    end
  end

  // ------------------------------------------------- step 2: column decoding
  typedef enum logic [1:0] {C_IDLE, C_FEED, C_WAIT} col_state_t;
  col_state_t cst;
  logic [CHW-1:0] cc;      // column fed
  logic [RW-1:0]  ci;      // symbol of the column fed
  logic           c_rd;    // a column read is in flight (data next cycle)
  logic           c_rd_lo; // it was one of the first K2 symbols
  logic           c_rd_er; // Fail flag of its row
  logic [MW-1:0]  m2;
  logic [CHW-1:0] nch2;

  logic d2_ready, d2_in_valid, d2_in_era;
  sym_t d2_in_data;
  logic d2_out_valid, d2_out_sop, d2_out_eop, d2_out_fail;
  sym_t d2_out_data;

  logic [CHW-1:0] oc;      // column coming out
  logic [RW-1:0]  oi;

  sym_t          r1_rdata [NB];
  logic          ep_rdata [NB];
  logic [8:0]    r2_rdata [NB];

  assign m2          = m_bank[cb];
  assign nch2        = CHW'(N1 - int'(m2));
  assign d2_in_valid = c_rd;
  assign d2_in_data  = c_rd_lo ? r1_rdata[cb] : r2_rdata[cb][7:0];
  assign d2_in_era   = c_rd_lo ? c_rd_er      : r2_rdata[cb][8];   // Fail OR Er2
  assign evt_col_fail = d2_out_valid && d2_out_sop && d2_out_fail;
  assign ev_cols     = d2_out_valid && d2_out_eop && (int'(oc) == int'(nch2) - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cst     <= C_IDLE;
      cb      <= '0;
      cc      <= '0;
      ci      <= '0;
      c_rd    <= 1'b0;
      c_rd_lo <= 1'b0;
      c_rd_er <= 1'b0;
      oc      <= '0;
      oi      <= '0;
      for (int b = 0; b < int'(NB); b++) colfail[b] <= '0;
    end else begin
      c_rd <= 1'b0;
      case (cst)
        C_IDLE: if (rows1_done[cb] && par_done[cb] && !cols_done[cb]) begin
          cst <= C_FEED;
          cc  <= '0;
          ci  <= '0;
        end
        C_FEED: if (ci != '0 || d2_ready) begin
          c_rd    <= 1'b1;
          c_rd_lo <= (int'(ci) < int'(K2));
          c_rd_er <= (int'(ci) < int'(K2)) ? fail1[cb][ci[$clog2(K2)-1:0]] : 1'b0;
          if (int'(ci) == int'(N2) - 1) begin
            ci <= '0;
            if (int'(cc) == int'(nch2) - 1) cst <= C_WAIT;
            else                            cc  <= cc + 1'b1;
          end else begin
            ci <= ci + 1'b1;
          end
        end
        default: ;
      endcase
      if (d2_out_valid) begin
        if (d2_out_sop) colfail[cb][oc] <= d2_out_fail;
        if (d2_out_eop) begin
          oi <= '0;
          if (int'(oc) == int'(nch2) - 1) begin
            oc  <= '0;
            cb  <= next_bank(cb);
            cst <= C_IDLE;
          end else begin
            oc <= oc + 1'b1;
          end
        end else begin
          oi <= oi + 1'b1;
        end
      end
    end
  end

  rs_ee_decoder #(.N(N2), .K(K2)) u_dec2 (
    .clk, .rst_n,
    .ready    (d2_ready),
    .in_valid (d2_in_valid),
    .in_data  (d2_in_data),
    .in_era   (d2_in_era),
    .out_valid(d2_out_valid),
    .out_data (d2_out_data),
    .out_sop  (d2_out_sop),
    .out_eop  (d2_out_eop),
    .out_fail (d2_out_fail)
  );

  // ----------------------------------------------- step 3: row re-decoding
  logic [RW-1:0]  tr;      // row fed to decoder 2
  logic [JW-1:0]  tj;
  logic           t_act;
  logic           t_rd, t_rd_lo, t_rd_fail;
  logic [CHW-1:0] t_rd_col;
  logic [MW-1:0]  m3;

  logic d3_ready, d3_in_valid, d3_in_era;
  sym_t d3_in_data;
  logic d3_out_valid, d3_out_sop, d3_out_eop, d3_out_fail;
  sym_t d3_out_data;

  assign m3          = m_bank[tb];
  assign d3_in_valid = t_rd;
  assign d3_in_data  = t_rd_lo ? r1_rdata[tb] : r2_rdata[tb][7:0];
  // Er3: received erasures of a row that failed in step 1, failed columns
  assign d3_in_era   = t_rd_lo ? (t_rd_fail && ep_rdata[tb]) : colfail[tb][t_rd_col];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tb        <= '0;
      tr        <= '0;
      tj        <= '0;
      t_act     <= 1'b0;
      t_rd      <= 1'b0;
      t_rd_lo   <= 1'b0;
      t_rd_fail <= 1'b0;
      t_rd_col  <= '0;
      row3_fed  <= 1'b0;
    end else begin
      t_rd     <= 1'b0;
      row3_fed <= 1'b0;
      if (row3_fed) tb <= next_bank(tb);
      if (!t_act && cols_done[tb] && !row3_fed) begin
        t_act <= 1'b1;
        tr    <= '0;
        tj    <= '0;
      end
      if (t_act && (tj != '0 || d3_ready)) begin
        t_rd      <= 1'b1;
        t_rd_lo   <= (MW'(tj) < m3);
        t_rd_fail <= fail1[tb][tr[$clog2(K2)-1:0]];
        t_rd_col  <= CHW'(int'(tj) - int'(m3));
        if (int'(tj) == int'(N1) - 1) begin
          tj <= '0;
          if (int'(tr) == int'(K2) - 1) begin
            t_act    <= 1'b0;
            row3_fed <= 1'b1;
          end else begin
            tr <= tr + 1'b1;
          end
        end else begin
          tj <= tj + 1'b1;
        end
      end
    end
  end

  // ------------------------------------------------------------ bank flags
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      par_done   <= '0;
      rows1_done <= '0;
      cols_done  <= '0;
      for (int b = 0; b < int'(NB); b++) begin
        m_bank[b] <= MW'(N1 - 2);
        fail1[b]  <= '0;
      end
    end else begin
      if (in_first && d1_in_valid) m_bank[ib] <= m_sel;
      if (d1_out_valid && d1_out_sop) fail1[ob][orow[$clog2(K2)-1:0]] <= d1_out_fail;
      if (ev_par)   par_done[ib]   <= 1'b1;
      if (ev_rows1) rows1_done[ob] <= 1'b1;
      if (ev_cols)  cols_done[cb]  <= 1'b1;
      if (row3_fed) begin
        par_done[tb]   <= 1'b0;
        rows1_done[tb] <= 1'b0;
        cols_done[tb]  <= 1'b0;
      end
    end
  end

  // ------------------------------------------------------------ RAM banks
  for (genvar b = 0; b < int'(NB); b++) begin : g_bank
    logic          r1_we, ep_we_b, r2_we;
    logic [A1-1:0] r1_raddr;
    logic [A2-1:0] r2_waddr, r2_raddr;
    logic [8:0]    r2_wdata;
    logic          rd3;            // step 3 reads this bank

    assign rd3     = t_act && (int'(tb) == b);
    assign r1_we   = d1_out_valid && (int'(ob) == b);
    assign ep_we_b = ep_we && (int'(ib) == b);
    assign r1_raddr = rd3 ? A1'(int'(tr) * int'(N1) + int'(tj))
                          : A1'(int'(ci) * int'(N1) + int'(m2) + int'(cc));
    assign r2_raddr = rd3 ? A2'(int'(tr) * int'(CH_MAX) + int'(tj) - int'(m3))
                          : A2'(int'(ci) * int'(CH_MAX) + int'(cc));

    // RAM2 write: shared parities during input, corrected check symbols after
    always_comb begin
      if (ist == IN_PAR && int'(ib) == b) begin
        r2_we    = in_valid;
        r2_waddr = A2'((int'(K2) + int'(pp)) * int'(CH_MAX) + int'(pc));
        r2_wdata = {in_era, in_data};
      end else begin
        r2_we    = d2_out_valid && (int'(oi) < int'(K2)) && (int'(cb) == b);
        r2_waddr = A2'(int'(oi) * int'(CH_MAX) + int'(oc));
        r2_wdata = {1'b0, d2_out_data};
      end
    end

    ps_ram #(.DEPTH(D1), .WIDTH(8)) u_ram1 (
      .clk, .we(r1_we), .waddr(r1_waddr), .wdata(d1_out_data), .raddr(r1_raddr),
      .rdata(r1_rdata[b])
    );

    ps_ram #(.DEPTH(D1), .WIDTH(1)) u_ram1_era (
      .clk, .we(ep_we_b), .waddr(ep_waddr), .wdata(in_era), .raddr(r1_raddr),
      .rdata(ep_rdata[b])
    );

    ps_ram #(.DEPTH(D2), .WIDTH(9)) u_ram2 (
      .clk, .we(r2_we), .waddr(r2_waddr), .wdata(r2_wdata), .raddr(r2_raddr),
      .rdata(r2_rdata[b])
    );
  end

  rs_ee_decoder #(.N(N1), .K(K1)) u_dec3 (
    .clk, .rst_n,
    .ready    (d3_ready),
    .in_valid (d3_in_valid),
    .in_data  (d3_in_data),
    .in_era   (d3_in_era),
    .out_valid(d3_out_valid),
    .out_data (d3_out_data),
    .out_sop  (d3_out_sop),
    .out_eop  (d3_out_eop),
    .out_fail (d3_out_fail)
  );

  // ------------------------------------------------------------------ output
  logic [JW-1:0] xj;
  logic [RW-1:0] xrow;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xj   <= '0;
      xrow <= '0;
    end else if (d3_out_valid) begin
      if (d3_out_eop) begin
        xj   <= '0;
        xrow <= (int'(xrow) == int'(K2) - 1) ? '0 : xrow + 1'b1;
      end else begin
        xj <= xj + 1'b1;
      end
    end
  end

  assign out_valid = d3_out_valid && (int'(xj) < int'(K1));
  assign out_data  = d3_out_data;
  assign out_fail  = d3_out_fail;
  assign out_sof   = out_valid && d3_out_sop && (xrow == '0);
  assign out_eof   = out_valid && (int'(xrow) == int'(K2) - 1) && (int'(xj) == int'(K1) - 1);

  // a row's M received symbols arrive back to back
  assert property (@(posedge clk) disable iff (!rst_n)
                   (ist == IN_ROWS && fj != '0 && MW'(fj) < m_cur) |-> in_valid);
  assert property (@(posedge clk) disable iff (!rst_n)
                   in_first && in_valid && in_ready |-> (int'(m_sel) > int'(K1)) && (int'(m_sel) < int'(N1)));
  // a bank is never claimed by the input while it is still in use
  assert property (@(posedge clk) disable iff (!rst_n)
                   in_first && d1_in_valid |-> !par_done[ib]);
endmodule
