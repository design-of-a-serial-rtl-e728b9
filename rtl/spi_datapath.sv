// spi_datapath: data path of the SPI master.
//
// Reacts only to the one-cycle strobes of the control FSM (spi_dp_ctrl_t):
//  * mode_load latches the slave number from tuser and that slave's bits of
//    the packed CPOL/CPHA parameters (bit i belongs to slave i). The idle
//    level of SCLK follows the new CPOL at once, before any chip select moves.
//  * cs_set / cs_clr drive the 1-in-N chip-select vector cs (active high; the
//    pin interface inverts it to the active-low pins). A slave number of
//    CSNUM or above selects no slave.
//  * load puts the packet word into the TX shift register; its MSB is on MOSI
//    from that cycle. shift moves the next bit up at each later bit start.
//  * sample shifts MISO into the RX shift register in the middle of each bit;
//    rx_store copies the full word, including the bit sampled in the same
//    cycle, to rx_data.
// SCLK: a bit lasts one divided-clock period. With CPHA = 0 the raw clock is
// low in the first half of a bit and high in the second (data set up at the
// bit start, sampled on the leading edge); with CPHA = 1 it is high in the
// first half (data changes on the leading edge, sampled on the trailing one),
// which is the half-period shift of the design. CPOL inverts the raw clock.
// This gives the four modes of the SPI mode table. All outputs come
// straight from registers (SCLK through one XOR with the CPOL register). Follows the design: shift registers MSB first, 1-in-N chip
// select, per-slave packed CPOL/CPHA, SCLK inversion for CPOL. Own choices:
// MOSI low outside DATA, out-of-range slave numbers selecting nobody.
module spi_datapath
  import spi_pkg::*;
#(
  parameter int unsigned   DW    = 8,
  parameter int unsigned   CSNUM = 4,
  parameter logic [CSNUM-1:0] CPOL = 4'b1100,
  parameter logic [CSNUM-1:0] CPHA = 4'b1010,
  localparam int unsigned  SW = sel_width(CSNUM)
) (
  input  logic             clk,
  input  logic             rst,
  input  spi_dp_ctrl_t     dp,
  input  logic [SW-1:0]    sel,       // slave number, valid with dp.mode_load
  input  logic [DW-1:0]    tx_data,   // packet word, valid with dp.load
  output logic [DW-1:0]    rx_data,   // last received word, updated on dp.rx_store
  output logic             sclk,
  output logic             mosi,
  input  logic             miso,
  output logic [CSNUM-1:0] cs
);

  if (DW < 3) begin : g_bad_dw
    $error("spi_datapath: DW must be at least 3");
  end

  logic [SW-1:0] sel_r;
  logic          cpol_r, cpha_r;
  logic          sclk_raw;
  logic [DW-1:0] tx_sr;
  logic [DW-2:0] rx_sr;            // the last bit goes straight to rx_data

  always_ff @(posedge clk) begin
    if (rst) begin
      sel_r    <= '0;
      cpol_r   <= CPOL[0];
      cpha_r   <= CPHA[0];
      cs       <= '0;
      sclk_raw <= 1'b0;
      tx_sr    <= '0;
      rx_sr    <= '0;
      rx_data  <= '0;
    end else begin
      if (dp.mode_load) begin
        sel_r  <= sel;
        cpol_r <= (int'(sel) < CSNUM) ? CPOL[sel] : 1'b0;
        cpha_r <= (int'(sel) < CSNUM) ? CPHA[sel] : 1'b0;
      end
      if (dp.cs_set) begin
        for (int i = 0; i < CSNUM; i++) cs[i] <= (int'(sel_r) == i);
      end else if (dp.cs_clr) begin
        cs <= '0;
      end

      if (dp.load) begin
        tx_sr    <= tx_data;
        sclk_raw <= cpha_r;
      end else if (dp.shift) begin
        tx_sr    <= {tx_sr[DW-2:0], 1'b0};
        sclk_raw <= cpha_r;
      end else if (dp.stop) begin
        tx_sr    <= '0;
        sclk_raw <= 1'b0;
      end else if (dp.sample) begin
        sclk_raw <= !cpha_r;
      end

      if (dp.sample) rx_sr <= {rx_sr[DW-3:0], miso};
      if (dp.rx_store) rx_data <= {rx_sr[DW-2:0], miso};
    end
  end

  assign sclk = sclk_raw ^ cpol_r;
  assign mosi = tx_sr[DW-1];

  assert property (@(posedge clk) disable iff (rst) $onehot0(cs))
    else $error("spi_datapath: more than one chip select active");

endmodule
