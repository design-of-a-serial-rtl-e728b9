// ocp_io: OCP register block with variable-response (blocking) slave.
//
// A plain register access on the bus: a read returns the IW input bits
// (zero-extended to the bus width), a write sets the OW output bits, which
// reset to OINIT. On top of that it can hold the bus: a write whose lower
// twelve address bits are 12'h111 (blk_enable) is not accepted at once.
// The module then withholds SCmdAccept, which stalls the master and with it
// every later bus transaction, until either the interrupt on in[0] becomes
// active (low, as the INT pin of an SPI-to-I2C bridge) or CNT_BLOCK bus
// cycles have passed. Then the accept is given and the bus runs again. With
// the bus held between the last write to a slave and the interrupt, a
// following read of the slave's buffer cannot come too early.
//
// Interface: OCP slave port (MCmd/MAddr/MData in, SCmdAccept/SResp/SData
// out). Commands other than the blocking write are accepted in the cycle
// they are presented; a read answers with SResp = DVA and the data in the
// next cycle; writes are posted (no response). The blocking write does not
// change out. in is synchronised with two flip-flops before use. The INT
// polarity, the bit used (in[0]), the level (not edge) trigger, the
// synchroniser and the cycle-level protocol are choices of this
// implementation; the 12'h111 address, CNT_BLOCK = 700000 (a 20-bit counter)
// and the IW/OW/OINIT parameters follow the design.
module ocp_io
  import ocp_pkg::*;
#(
  parameter int unsigned   AW        = 32,
  parameter int unsigned   DW        = 32,
  parameter int unsigned   IW        = 1,
  parameter int unsigned   OW        = 2,
  parameter logic [OW-1:0] OINIT     = '0,
  parameter int unsigned   CNT_BLOCK = 700000
) (
  input  logic          clk,
  input  logic          rst,
  // OCP slave port
  input  ocp_mcmd_e     mcmd,
  input  logic [AW-1:0] maddr,
  input  logic [DW-1:0] mdata,
  output logic          scmdaccept,
  output ocp_sresp_e    sresp,
  output logic [DW-1:0] sdata,
  // register ports
  input  logic [IW-1:0] in,
  output logic [OW-1:0] out,
  // status: the bus is being held
  output logic          blocking
);

  if (IW > DW || OW > DW || CNT_BLOCK < 1) begin : g_bad_par
    $error("ocp_io: need IW <= DW, OW <= DW and CNT_BLOCK >= 1");
  end

  localparam int unsigned BW = (CNT_BLOCK > 1) ? $clog2(CNT_BLOCK) : 1;

  logic [IW-1:0] in_meta, in_sync;
  logic [BW-1:0] blk_cnt;
  logic          blk_enable, blk_done, int_active;

  assign blk_enable = (mcmd == MCMD_WR) && (maddr[11:0] == BLK_ADDR);
  assign int_active = !in_sync[0];
  assign blk_done   = blocking && (int_active || blk_cnt == BW'(CNT_BLOCK - 1));

  always_comb begin
    unique case (mcmd)
      MCMD_WR: scmdaccept = blk_enable ? blk_done : 1'b1;
      MCMD_RD: scmdaccept = 1'b1;
      default: scmdaccept = 1'b0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      in_meta  <= '0;
      in_sync  <= '0;
      out      <= OINIT;
      blocking <= 1'b0;
      blk_cnt  <= '0;
      sresp    <= SRESP_NULL;
      sdata    <= '0;
    end else begin
      in_meta <= in;
      in_sync <= in_meta;

      // blocking write: hold the command until the interrupt or the time-out
      if (blk_enable && !blocking) begin
        blocking <= 1'b1;
        blk_cnt  <= '0;
      end else if (blocking) begin
        if (blk_done) blocking <= 1'b0;
        blk_cnt <= blk_cnt + 1'b1;
      end

      if (mcmd == MCMD_WR && !blk_enable) out <= mdata[OW-1:0];

      if (mcmd == MCMD_RD) begin
        sresp <= SRESP_DVA;
        sdata <= DW'(in_sync);
      end else begin
        sresp <= SRESP_NULL;
      end
    end
  end

  // the master has to keep the blocking command on the bus until accepted
  assert property (@(posedge clk) disable iff (rst) blocking |-> blk_enable)
    else $error("ocp_io: blocking write withdrawn before it was accepted");

endmodule
