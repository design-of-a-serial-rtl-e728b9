// spi_slave_model: behavioural SPI slave for the testbenches.
//
// Implements one SPI mode (CPOL, CPHA). While cs_n is low it shifts MOSI in
// and its own reply words out, MSB first: with CPHA = 0 it samples on the
// leading SCLK edge and changes MISO on the trailing one, with CPHA = 1 the
// other way round. Reply word k (the k-th word exchanged in the whole run,
// counting from 0) is reply_word(k). Received words are stored in rx_mem in arrival order,
// rx_count counts them. idle_err counts chip-select assertions that found
// SCLK away from its idle level CPOL, and bit_err counts chip-select
// releases in the middle of a word. miso_en is high while the slave is
// selected (the testbench builds the shared MISO line from it).
module spi_slave_model #(
  parameter bit          CPOL = 1'b0,
  parameter bit          CPHA = 1'b0,
  parameter int unsigned DW   = 8,
  parameter logic [7:0]  SEED = 8'h3c
) (
  input  logic sclk,
  input  logic mosi,
  input  logic cs_n,
  output logic miso,
  output logic miso_en
);
  logic [DW-1:0] tx_sr = '0;
  logic [DW-1:0] rx_sr = '0;
  int            bitn = 0;
  int            rx_count = 0;
  int            idle_err = 0;
  int            bit_err = 0;
  logic [DW-1:0] rx_mem [0:255];

  function automatic logic [DW-1:0] reply_word(int k);
    return DW'(SEED ^ 8'(k * 37 + 11));
  endfunction

  assign miso    = cs_n ? 1'b0 : tx_sr[DW-1];
  assign miso_en = !cs_n;

  always @(negedge cs_n) begin
    if (sclk != CPOL) idle_err++;
    bitn = 0;
    if (!CPHA) begin
      tx_sr = reply_word(rx_count);
    end
  end

  always @(posedge cs_n) if (bitn != 0) bit_err++;

  always @(posedge sclk or negedge sclk) begin
    if (!cs_n) begin
      if (sclk != CPOL) begin                      // leading edge
        if (!CPHA) begin
          rx_sr = {rx_sr[DW-2:0], mosi};
          bitn++;
        end else begin
          if (bitn == 0) begin
            tx_sr = reply_word(rx_count);
          end else begin
            tx_sr = {tx_sr[DW-2:0], 1'b0};
          end
        end
      end else begin                               // trailing edge
        if (!CPHA) begin
          if (bitn == DW) begin
            rx_mem[rx_count[7:0]] = rx_sr;
            rx_count++;
            bitn = 0;
            tx_sr = reply_word(rx_count);
          end else begin
            tx_sr = {tx_sr[DW-2:0], 1'b0};
          end
        end else begin
          rx_sr = {rx_sr[DW-2:0], mosi};
          bitn++;
          if (bitn == DW) begin
            rx_mem[rx_count[7:0]] = rx_sr;
            rx_count++;
            bitn = 0;
          end
        end
      end
    end
  end
endmodule
