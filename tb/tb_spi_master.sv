// tb_spi_master: self-checking test of the SPI master.
//
// Runs the harness at the two settings of the reference bring-up test:
// CLKDIV = 2 with 2/4 cycles of pre/post wait, and CLKDIV = 6 with 8/16
// (ten and sixteen divided-clock cycles between chip select and data,
// i.e. 60 and 96 bus cycles). See spi_master_harness for what is checked.
module tb_spi_master;
  logic clk = 1'b0;
  logic rst = 1'b1;
  logic done2, done6;
  int   c2, f2, c6, f6;

  always #5 clk = ~clk;

  spi_master_harness #(.CLKDIV(2), .CNT_CSWAITPRE(2), .CNT_CSWAITPOST(4))
    h2 (.clk(clk), .rst(rst), .done(done2), .checks(c2), .failures(f2));
  spi_master_harness #(.CLKDIV(6), .CNT_CSWAITPRE(8), .CNT_CSWAITPOST(16))
    h6 (.clk(clk), .rst(rst), .done(done6), .checks(c6), .failures(f6));

  initial begin
    repeat (4) @(posedge clk);
    rst <= 1'b0;
    wait (done2 && done6);
    $display("TB_RESULT checks=%0d failures=%0d", c2 + c6, f2 + f6);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c2 + c6, f2 + f6 + 1);
    $finish;
  end
endmodule
