// ananas_spi_top: FPGA-side slow-control path to an SPI-to-I2C bridge.
//
// Two blocks hang off the board's on-chip bus. The SPI master takes packets
// from the bus adapter's output stream, talks to up to CSNUM SPI slaves in
// each slave's own mode and timing, and returns READ data on the input
// stream. The ocp_io register block can hold the bus: a dummy write to
// address ...111h stalls all further bus traffic until the bridge's
// active-low interrupt (io_in[0]) fires or CNT_BLOCK cycles pass, so the
// host cannot read the bridge's buffer before the I2C transfer behind it is
// done. The bus adapter itself is outside this module: its stream signals
// and the OCP slave port of ocp_io are plain ports here. The stream and pin
// bundles are carried by the axis_if and spi_if interfaces inside.
// All logic runs on the single bus clock clk (about 40 MHz on the board)
// with a synchronous active-high reset.
module ananas_spi_top
  import spi_pkg::*;
  import ocp_pkg::*;
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
  parameter int unsigned      CNT_CSDEASS    = 2,
  parameter int unsigned      OCP_AW         = 32,
  parameter int unsigned      OCP_DW         = 32,
  parameter int unsigned      IW             = 1,
  parameter int unsigned      OW             = 2,
  parameter logic [OW-1:0]    OINIT          = '0,
  parameter int unsigned      CNT_BLOCK      = 700000,
  localparam int unsigned     UW = sel_width(CSNUM) + 1
) (
  input  logic              clk,
  input  logic              rst,
  // output stream from the bus adapter (towards MOSI)
  input  logic [DW-1:0]     ocpout_tdata,
  input  logic [UW-1:0]     ocpout_tuser,
  input  logic              ocpout_tfirst,
  input  logic              ocpout_tlast,
  input  logic              ocpout_tvalid,
  output logic              ocpout_tnext,
  // input stream to the bus adapter (from MISO)
  output logic [DW-1:0]     ocpin_tdata,
  output logic [UW-1:0]     ocpin_tuser,
  output logic              ocpin_tfirst,
  output logic              ocpin_tlast,
  output logic              ocpin_tvalid,
  input  logic              ocpin_tnext,
  // SPI pins
  output logic              spi_sclk,
  output logic              spi_mosi,
  input  logic              spi_miso,
  output logic [CSNUM-1:0]  spi_cs_n,
  // OCP slave port of ocp_io
  input  ocp_mcmd_e         ocp_mcmd,
  input  logic [OCP_AW-1:0] ocp_maddr,
  input  logic [OCP_DW-1:0] ocp_mdata,
  output logic              ocp_scmdaccept,
  output ocp_sresp_e        ocp_sresp,
  output logic [OCP_DW-1:0] ocp_sdata,
  // ocp_io register ports: io_in[0] is the bridge's active-low interrupt
  input  logic [IW-1:0]     io_in,
  output logic [OW-1:0]     io_out,
  output logic              io_blocking
);

  axis_if #(.DW(DW), .UW(UW)) ocpout (.clk(clk), .rst(rst));
  axis_if #(.DW(DW), .UW(UW)) ocpin  (.clk(clk), .rst(rst));
  spi_if  #(.CSNUM(CSNUM))    spi    ();

  assign ocpout.tdata  = ocpout_tdata;
  assign ocpout.tuser  = ocpout_tuser;
  assign ocpout.tfirst = ocpout_tfirst;
  assign ocpout.tlast  = ocpout_tlast;
  assign ocpout.tvalid = ocpout_tvalid;
  assign ocpout_tnext  = ocpout.tnext;

  assign ocpin_tdata   = ocpin.tdata;
  assign ocpin_tuser   = ocpin.tuser;
  assign ocpin_tfirst  = ocpin.tfirst;
  assign ocpin_tlast   = ocpin.tlast;
  assign ocpin_tvalid  = ocpin.tvalid;
  assign ocpin.tnext   = ocpin_tnext;

  assign spi_sclk      = spi.sclk;
  assign spi_mosi      = spi.mosi;
  assign spi.miso      = spi_miso;
  assign spi_cs_n      = spi.cs_n;

  spi_master #(
    .DW            (DW),
    .CSNUM         (CSNUM),
    .CLKDIV        (CLKDIV),
    .CPOL          (CPOL),
    .CPHA          (CPHA),
    .CNT_MODECFG   (CNT_MODECFG),
    .CNT_CSASS     (CNT_CSASS),
    .CNT_CSWAITPRE (CNT_CSWAITPRE),
    .CNT_DATA      (CNT_DATA),
    .CNT_CSWAITPOST(CNT_CSWAITPOST),
    .CNT_CSDEASS   (CNT_CSDEASS)
  ) u_spi (
    .clk   (clk),
    .rst   (rst),
    .ocpout(ocpout.dst),
    .ocpin (ocpin.src),
    .spi   (spi.master)
  );

  ocp_io #(
    .AW       (OCP_AW),
    .DW       (OCP_DW),
    .IW       (IW),
    .OW       (OW),
    .OINIT    (OINIT),
    .CNT_BLOCK(CNT_BLOCK)
  ) u_ocp_io (
    .clk       (clk),
    .rst       (rst),
    .mcmd      (ocp_mcmd),
    .maddr     (ocp_maddr),
    .mdata     (ocp_mdata),
    .scmdaccept(ocp_scmdaccept),
    .sresp     (ocp_sresp),
    .sdata     (ocp_sdata),
    .in        (io_in),
    .out       (io_out),
    .blocking  (io_blocking)
  );

endmodule
