// spi_ctrl: control path of the SPI master.
//
// A seven-state FSM that runs on the divided clock: it only moves on the fe
// strobe of the clock divider (one step per SCLK period), and the re strobe
// marks the middle of each data bit. Every state except IDLE lasts a fixed
// number of divided-clock cycles, set by the CNT_* parameters, counted by one
// shared counter:
//   IDLE       wait for a packet on the output stream (ocpout_tvalid) while the
//              input-stream output register is free. A packet flagged tfirst
//              (or any packet when no chip select is active) goes to MODECFG,
//              otherwise the packet is sent at once in DATA.
//   MODECFG    latch slave select and that slave's CPOL/CPHA   (CNT_MODECFG)
//   CSASS      chip select of the slave asserted              (CNT_CSASS)
//   CSWAITPRE  extra wait before the first SCLK edge         (CNT_CSWAITPRE)
//   DATA       one bit per cycle                              (CNT_DATA)
//   CSWAITPOST wait after a packet flagged tlast             (CNT_CSWAITPOST)
//   CSDEASS    chip select released                           (CNT_CSDEASS)
// At the end of DATA the FSM goes to CSWAITPOST if the packet was flagged
// tlast, straight back into DATA if the next packet is already valid (and is
// not a tfirst) and the output register is free, and to IDLE otherwise; the
// chip select stays asserted in IDLE until a tlast packet closes it.
//
// Stream handshakes: a transfer happens in a cycle where tvalid and tnext are
// both high. ocpout_tnext is a one-cycle pulse raised with the last MISO
// sample of a packet, so the source holds the packet for its whole
// transmission. Packets whose command bit (tuser MSB) is READ put the
// received word into the input-stream register: ocpin_tvalid then stays high,
// with tuser/tfirst/tlast mirrored from the packet, until ocpin_tnext.
// While it is high no new packet is started (slave blocking).
//
// Follows the design: the states, their order and conditions, the CNT_*
// counters, tfirst/tlast/tvalid/tnext and the READ/WRITE bit. Own choices:
// moving on fe, the exact pulse timing of tnext, returning MISO data only for
// READ packets, treating a packet without an open transaction as a first one,
// and the synchronous active-high reset.
module spi_ctrl
  import spi_pkg::*;
#(
  parameter int unsigned CSNUM          = 4,
  parameter int unsigned CNT_MODECFG    = 2,
  parameter int unsigned CNT_CSASS      = 2,
  parameter int unsigned CNT_CSWAITPRE  = 2,
  parameter int unsigned CNT_DATA       = 8,
  parameter int unsigned CNT_CSWAITPOST = 4,
  parameter int unsigned CNT_CSDEASS    = 2,
  localparam int unsigned UW = sel_width(CSNUM) + 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          re,
  input  logic          fe,
  // output direction (host -> slave, MOSI)
  input  logic          ocpout_tvalid,
  input  logic          ocpout_tfirst,
  input  logic          ocpout_tlast,
  input  logic [UW-1:0] ocpout_tuser,
  output logic          ocpout_tnext,
  // input direction (slave -> host, MISO)
  output logic          ocpin_tvalid,
  output logic          ocpin_tfirst,
  output logic          ocpin_tlast,
  output logic [UW-1:0] ocpin_tuser,
  input  logic          ocpin_tnext,
  // to the data path
  output spi_dp_ctrl_t  dp,
  output spi_state_e    state
);

  if (CNT_MODECFG < 1 || CNT_CSASS < 1 || CNT_CSWAITPRE < 1 || CNT_DATA < 1 ||
      CNT_CSWAITPOST < 1 || CNT_CSDEASS < 1) begin : g_bad_cnt
    $error("spi_ctrl: every CNT_* parameter must be at least 1");
  end

  localparam int unsigned CMAX = (CNT_MODECFG > CNT_CSASS ? CNT_MODECFG : CNT_CSASS) >
                                 (CNT_CSWAITPRE > CNT_DATA ? CNT_CSWAITPRE : CNT_DATA) ?
                                 (CNT_MODECFG > CNT_CSASS ? CNT_MODECFG : CNT_CSASS) :
                                 (CNT_CSWAITPRE > CNT_DATA ? CNT_CSWAITPRE : CNT_DATA);
  localparam int unsigned CMAX2 = CMAX > (CNT_CSWAITPOST > CNT_CSDEASS ? CNT_CSWAITPOST : CNT_CSDEASS) ?
                                  CMAX : (CNT_CSWAITPOST > CNT_CSDEASS ? CNT_CSWAITPOST : CNT_CSDEASS);
  localparam int unsigned CW = (CMAX2 > 1) ? $clog2(CMAX2) : 1;

  spi_state_e    state_n;
  logic [CW-1:0] cnt;
  logic          cs_open;          // a chip select is asserted
  logic          pkt_last;         // flags of the packet in transmission
  logic          pkt_first;
  logic [UW-1:0] pkt_user;

  // the input-stream register can take a word this cycle
  logic in_free;
  assign in_free = !ocpin_tvalid || ocpin_tnext;

  logic pkt_ready;                 // a packet can start now
  assign pkt_ready = ocpout_tvalid && in_free;

  // count reached the length of the current state
  logic at_end;
  always_comb begin
    unique case (state)
      ST_MODECFG:    at_end = (cnt == CW'(CNT_MODECFG - 1));
      ST_CSASS:      at_end = (cnt == CW'(CNT_CSASS - 1));
      ST_CSWAITPRE:  at_end = (cnt == CW'(CNT_CSWAITPRE - 1));
      ST_DATA:       at_end = (cnt == CW'(CNT_DATA - 1));
      ST_CSWAITPOST: at_end = (cnt == CW'(CNT_CSWAITPOST - 1));
      ST_CSDEASS:    at_end = (cnt == CW'(CNT_CSDEASS - 1));
      default:       at_end = 1'b1;
    endcase
  end

  // next state and data-path strobes
  always_comb begin
    state_n = state;
    dp      = '0;
    if (fe) begin
      unique case (state)
        ST_IDLE:
          if (pkt_ready) begin
            if (ocpout_tfirst || !cs_open) begin
              state_n      = ST_MODECFG;
              dp.mode_load = 1'b1;
            end else begin
              state_n = ST_DATA;
              dp.load = 1'b1;
            end
          end
        ST_MODECFG:
          if (at_end) begin
            state_n   = ST_CSASS;
            dp.cs_set = 1'b1;
          end
        ST_CSASS:
          if (at_end) state_n = ST_CSWAITPRE;
        ST_CSWAITPRE:
          if (at_end) begin
            state_n = ST_DATA;
            dp.load = 1'b1;
          end
        ST_DATA:
          if (!at_end) begin
            dp.shift = 1'b1;
          end else if (pkt_last) begin
            state_n = ST_CSWAITPOST;
            dp.stop = 1'b1;
          end else if (pkt_ready && !ocpout_tfirst) begin
            dp.load = 1'b1;                       // back-to-back packet
          end else begin
            state_n = ST_IDLE;
            dp.stop = 1'b1;
          end
        ST_CSWAITPOST:
          if (at_end) begin
            state_n   = ST_CSDEASS;
            dp.cs_clr = 1'b1;
          end
        ST_CSDEASS:
          if (at_end) state_n = ST_IDLE;
        default: state_n = ST_IDLE;
      endcase
    end
    if (re && state == ST_DATA) begin
      dp.sample   = 1'b1;
      dp.rx_store = at_end && (pkt_user[UW-1] == CMD_READ);
    end
  end

  // the packet has been shifted out and in completely
  assign ocpout_tnext = re && (state == ST_DATA) && at_end;

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= ST_IDLE;
      cnt       <= '0;
      cs_open   <= 1'b0;
      pkt_last  <= 1'b0;
      pkt_first <= 1'b0;
      pkt_user  <= '0;
    end else begin
      if (fe) begin
        state <= state_n;
        cnt   <= (state_n != state || at_end) ? '0 : cnt + 1'b1;
      end
      if (dp.cs_set) cs_open <= 1'b1;
      if (dp.cs_clr) cs_open <= 1'b0;
      if (dp.load || dp.mode_load) begin
        pkt_last  <= ocpout_tlast;
        pkt_first <= ocpout_tfirst;
        pkt_user  <= ocpout_tuser;
      end
    end
  end

  // output register of the input direction
  always_ff @(posedge clk) begin
    if (rst) begin
      ocpin_tvalid <= 1'b0;
      ocpin_tfirst <= 1'b0;
      ocpin_tlast  <= 1'b0;
      ocpin_tuser  <= '0;
    end else if (dp.rx_store) begin
      ocpin_tvalid <= 1'b1;
      ocpin_tfirst <= pkt_first;
      ocpin_tlast  <= pkt_last;
      ocpin_tuser  <= pkt_user;
    end else if (ocpin_tnext) begin
      ocpin_tvalid <= 1'b0;
    end
  end

  // a word can only be stored when the register is free: the FSM checks this
  // before it starts a packet
  assert property (@(posedge clk) disable iff (rst) dp.rx_store |-> in_free)
    else $error("spi_ctrl: received word would overwrite an unread one");

endmodule
