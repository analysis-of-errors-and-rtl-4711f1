// tb_ps_ram: writes random words to random addresses of a RAM1-sized ps_ram
// while reading others, and checks every read (one-cycle latency) against a
// shadow copy, including read-before-write on a simultaneous hit.
module tb_ps_ram;
  localparam int DEPTH = 832, WIDTH = 8, AW = 10;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we = 0;
  logic [AW-1:0] waddr = 0, raddr = 0;
  logic [WIDTH-1:0] wdata = 0, rdata;
  int checks = 0, failures = 0;
  logic [WIDTH-1:0] shadow [DEPTH];
  logic [WIDTH-1:0] expd;

  ps_ram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  initial begin
    // fill every word first
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = AW'(a); wdata = 8'($urandom); shadow[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      raddr = AW'($urandom_range(0, DEPTH - 1));
      we    = $urandom_range(0, 1);
      waddr = (t % 7 == 0) ? raddr : AW'($urandom_range(0, DEPTH - 1));
      wdata = 8'($urandom);
      expd  = shadow[raddr];
      if (we) shadow[waddr] = wdata;
      @(posedge clk); #1;
      checks++;
      if (rdata !== expd) begin failures++; $display("addr %0d got %h exp %h", raddr, rdata, expd); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
