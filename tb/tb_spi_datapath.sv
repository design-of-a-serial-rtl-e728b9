// tb_spi_datapath: self-checking test of the SPI data path.
//
// Drives the control strobes directly. For each of the four slaves (modes
// 0..3 by the default CPOL = 4'b1100, CPHA = 4'b1010) and several random
// words it checks: the SCLK idle level follows the slave's CPOL right after
// mode_load, before cs_set; cs is one-hot on the selected slave; MOSI shows
// the word MSB first, one bit per load/shift; the raw clock is CPHA in the
// first half of each bit and !CPHA in the second, inverted by CPOL; MISO
// bits sampled in the middle of each bit form rx_data after rx_store; stop
// returns SCLK to idle and MOSI low; cs_clr releases the chip select.
module tb_spi_datapath;
  import spi_pkg::*;
  localparam logic [3:0] CPOL = 4'b1100, CPHA = 4'b1010;

  logic clk = 1'b0, rst = 1'b1;
  spi_dp_ctrl_t dp;
  logic [1:0] sel;
  logic [7:0] tx_data, rx_data;
  logic sclk, mosi, miso;
  logic [3:0] cs;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  spi_datapath #(.DW(8), .CSNUM(4), .CPOL(CPOL), .CPHA(CPHA)) dut (
    .clk(clk), .rst(rst), .dp(dp), .sel(sel), .tx_data(tx_data), .rx_data(rx_data),
    .sclk(sclk), .mosi(mosi), .miso(miso), .cs(cs)
  );

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // apply one set of strobes for one clock cycle
  task automatic strobe(input spi_dp_ctrl_t s);
    @(negedge clk);
    dp = s;
    @(posedge clk);
    #1 dp = '0;
  endtask

  initial begin
    spi_dp_ctrl_t s;
    logic [7:0] d, p;
    dp = '0; sel = '0; tx_data = '0; miso = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    for (int sl = 0; sl < 4; sl++) begin
      sel = 2'(sl);
      s = '0; s.mode_load = 1; strobe(s);
      sel = 2'(3 - sl);                 // must have been latched
      chk(sclk == CPOL[sl] && cs == '0, $sformatf("slave %0d: idle level before CS", sl));
      s = '0; s.cs_set = 1; strobe(s);
      chk(cs == 4'(1 << sl), $sformatf("slave %0d: cs %b", sl, cs));
      for (int w = 0; w < 3; w++) begin
        d = 8'($urandom); p = 8'($urandom);
        if (w == 0) d = 8'hab;
        tx_data = d;
        for (int i = 7; i >= 0; i--) begin
          s = '0;
          if (i == 7) s.load = 1; else s.shift = 1;
          strobe(s);
          tx_data = ~d;                 // the word must have been latched
          chk(mosi == d[i], $sformatf("slave %0d word %h bit %0d MOSI", sl, d, i));
          chk(sclk == (CPOL[sl] ^ CPHA[sl]), $sformatf("slave %0d first half SCLK", sl));
          repeat (2) @(posedge clk);
          miso = p[i];
          s = '0; s.sample = 1; s.rx_store = (i == 0);
          strobe(s);
          miso = !p[i];
          chk(sclk == (CPOL[sl] ^ !CPHA[sl]), $sformatf("slave %0d second half SCLK", sl));
          chk(mosi == d[i], "MOSI held through the bit");
          repeat (2) @(posedge clk);
        end
        chk(rx_data == p, $sformatf("slave %0d rx %h expected %h", sl, rx_data, p));
        s = '0; s.stop = 1; strobe(s);
        chk(sclk == CPOL[sl] && mosi == 1'b0, "stop: idle SCLK and MOSI low");
        chk(cs == 4'(1 << sl), "cs held between words");
      end
      s = '0; s.cs_clr = 1; strobe(s);
      chk(cs == '0, "cs released");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
