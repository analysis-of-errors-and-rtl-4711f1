// ps_ram: simple dual-port RAM (one write port, one read port, one clock)
// holding the partial results of the parity-sharing decoder: RAM1 keeps the
// rows corrected by the first row decoder, RAM2 the column codewords (the
// received shared parities and, after column decoding, the corrected check
// symbols). The document names the two RAMs; their organisation is this
// design's choice. Writes take effect at the clock edge; reads are
// registered, so rdata shows the word at raddr one cycle after raddr is
// presented (read-before-write when both ports hit the same address).
module ps_ram #(
  parameter int unsigned DEPTH = 832,
  parameter int unsigned WIDTH = 8,
  parameter int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
