// spi_master: configurable full-duplex SPI master with stream ports.
//
// Packets of DW bits arrive on the output stream (ocpout, host -> slave) with
// a user field naming the slave and a READ/WRITE bit. For a packet flagged
// tfirst the master configures the slave's SPI mode, asserts its chip
// select, waits, and shifts the word out on MOSI MSB first while it shifts
// MISO in. READ packets return the received word on the input stream
// (ocpin); WRITE packets drop it. A packet flagged tlast is followed by a
// wait and the release of the chip select.
//
// Structure: clk_div makes the re/fe clock enables for the divided SCLK
// (f_SCLK = f_clk / CLKDIV), spi_ctrl is the control FSM, spi_datapath holds
// the shift registers, SCLK generation and chip-select decoding. The CNT_*
// parameters give the length of each FSM state in SCLK periods; the
// chip-select-to-first-bit time is (CNT_CSASS + CNT_CSWAITPRE) periods and
// the last-bit-to-release time CNT_CSWAITPOST periods. CPOL and CPHA are
// packed per-slave mode bits (bit i for slave i). The defaults are the
// settings of the reference bring-up test: four slaves in modes 0..3,
// CLKDIV = 2 (20 MHz SCLK from a 40 MHz bus clock).
module spi_master
  import spi_pkg::*;
#(
  parameter int unsigned      DW             = 8,
  parameter int unsigned      CSNUM          = 4,
  parameter int unsigned      CLKDIV         = 2,
  parameter logic [CSNUM-1:0] CPOL           = 4'b1100,
  parameter logic [CSNUM-1:0] CPHA           = 4'b1010,
  parameter int unsigned      CNT_MODECFG    = 2,
  parameter int unsigned      CNT_CSASS      = 2,
  parameter int unsigned      CNT_CSWAITPRE  = 2,
  parameter int unsigned      CNT_DATA       = 8,
  parameter int unsigned      CNT_CSWAITPOST = 4,
  parameter int unsigned      CNT_CSDEASS    = 2
) (
  input  logic   clk,
  input  logic   rst,
  axis_if.dst    ocpout,
  axis_if.src    ocpin,
  spi_if.master  spi
);

  localparam int unsigned SW = sel_width(CSNUM);

  if (CNT_DATA != DW) begin : g_bad_data
    $error("spi_master: CNT_DATA (%0d) must equal the packet width DW (%0d)", CNT_DATA, DW);
  end

  logic         re, fe;
  spi_dp_ctrl_t dp;
  spi_state_e   state;

  clk_div #(.CLKDIV(CLKDIV)) u_clk_div (
    .clk (clk),
    .rst (rst),
    .re  (re),
    .fe  (fe)
  );

  spi_ctrl #(
    .CSNUM         (CSNUM),
    .CNT_MODECFG   (CNT_MODECFG),
    .CNT_CSASS     (CNT_CSASS),
    .CNT_CSWAITPRE (CNT_CSWAITPRE),
    .CNT_DATA      (CNT_DATA),
    .CNT_CSWAITPOST(CNT_CSWAITPOST),
    .CNT_CSDEASS   (CNT_CSDEASS)
  ) u_ctrl (
    .clk          (clk),
    .rst          (rst),
    .re           (re),
    .fe           (fe),
    .ocpout_tvalid(ocpout.tvalid),
    .ocpout_tfirst(ocpout.tfirst),
    .ocpout_tlast (ocpout.tlast),
    .ocpout_tuser (ocpout.tuser),
    .ocpout_tnext (ocpout.tnext),
    .ocpin_tvalid (ocpin.tvalid),
    .ocpin_tfirst (ocpin.tfirst),
    .ocpin_tlast  (ocpin.tlast),
    .ocpin_tuser  (ocpin.tuser),
    .ocpin_tnext  (ocpin.tnext),
    .dp           (dp),
    .state        (state)
  );

  // the deselect state really has every chip select released
  assert property (@(posedge clk) disable iff (rst) (state == ST_CSDEASS) |-> (spi.cs == '0))
    else $error("spi_master: chip select active in CSDEASS");

  spi_datapath #(
    .DW   (DW),
    .CSNUM(CSNUM),
    .CPOL (CPOL),
    .CPHA (CPHA)
  ) u_dp (
    .clk    (clk),
    .rst    (rst),
    .dp     (dp),
    .sel    (ocpout.tuser[SW-1:0]),
    .tx_data(ocpout.tdata),
    .rx_data(ocpin.tdata),
    .sclk   (spi.sclk),
    .mosi   (spi.mosi),
    .miso   (spi.miso),
    .cs     (spi.cs)
  );

endmodule
