// tb_rs_ee_decoder: self-checking test of the errors-and-erasures RS decoder
// in the two sizes the PS decoder uses: RS(32,28) for rows (processing delay
// 27 < 32, continuous streaming) and RS(32,26) for columns (processing delay
// 51 > 32, so ready pauses the input between codewords).
module tb_rs_ee_decoder;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic d1, d2;
  int   c1, c2, f1, f2;

  rs_dec_check #(.N(32), .K(28), .NWORDS(48)) u_row (.clk, .rst_n, .done(d1), .checks(c1), .failures(f1));
  rs_dec_check #(.N(32), .K(26), .NWORDS(48)) u_col (.clk, .rst_n, .done(d2), .checks(c2), .failures(f2));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (d1 && d2);
    repeat (2) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c1 + c2, f1 + f2);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c1 + c2, f1 + f2 + 1);
    $finish;
  end
endmodule
