// spi_pkg: types and constants shared by the SPI master blocks.
//
// The control FSM of the SPI master has the seven states of the design
// (IDLE, MODECFG, CSASS, CSWAITPRE, DATA, CSWAITPOST, CSDEASS). The control
// path drives the data path only through the one-cycle strobes bundled in
// spi_dp_ctrl_t, which keeps the two paths strictly separated: the FSM decides
// *when* something happens, the data path decides *what* the pins do.
// The user-field helper follows the stream convention of the design: the
// select field is ceil(log2(N)) bits wide and one command bit (1 = WRITE,
// 0 = READ) sits on top of it. For N = 1 the select field is kept at one bit
// so that no zero-width vector appears (a choice of this implementation).
package spi_pkg;

  typedef enum logic [2:0] {
    ST_IDLE       = 3'd0,
    ST_MODECFG    = 3'd1,
    ST_CSASS      = 3'd2,
    ST_CSWAITPRE  = 3'd3,
    ST_DATA       = 3'd4,
    ST_CSWAITPOST = 3'd5,
    ST_CSDEASS    = 3'd6
  } spi_state_e;

  // One-OCP-cycle strobes from the control FSM to the data path.
  typedef struct packed {
    logic mode_load;  // latch slave select and its CPOL/CPHA (entry of MODECFG)
    logic cs_set;     // assert the chip select of the latched slave (entry of CSASS)
    logic cs_clr;     // release all chip selects (entry of CSDEASS)
    logic load;       // start of the first bit of a packet: load the TX shift register
    logic shift;      // start of a following bit: shift the TX register by one
    logic sample;     // middle of a bit: clock MISO into the RX shift register
    logic rx_store;   // with the last sample: copy the received word to the output register
    logic stop;       // end of the last bit: SCLK back to idle, MOSI low
  } spi_dp_ctrl_t;

  // Width of the slave-select part of tuser.
  function automatic int unsigned sel_width(int unsigned n);
    return (n > 1) ? $clog2(n) : 1;
  endfunction

  localparam bit CMD_READ  = 1'b0;
  localparam bit CMD_WRITE = 1'b1;

endpackage
