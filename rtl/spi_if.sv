// spi_if: the pin bundle of an SPI master with N slaves.
//
// Carries sclk, mosi, miso and the chip selects. Inside the design the chip
// selects are active high (cs); the interface itself inverts them into the
// active-low pins cs_n that go to the slaves, so no module has to deal with
// the pin polarity. Modport master is the side of the SPI master, modport
// pins the board side (slaves or a loop-back). Inverting the chip selects
// inside the interface follows the design; the modports are this
// implementation's own.
interface spi_if #(
  parameter int unsigned CSNUM = 4
);
  logic             sclk;
  logic             mosi;
  logic             miso;
  logic [CSNUM-1:0] cs;     // active high, driven by the master
  logic [CSNUM-1:0] cs_n;   // active-low pins

  assign cs_n = ~cs;

  modport master (output sclk, output mosi, output cs, input miso);
  modport pins   (input sclk, input mosi, input cs_n, output miso);
endinterface
