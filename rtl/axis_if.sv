// axis_if: one direction of the stream link between the bus adapter and the
// SPI master.
//
// A packet is a DW-bit word (tdata) with a user field (tuser: slave number
// plus a READ/WRITE command bit on top) and the flags tfirst/tlast that mark
// the first and last packet of a transaction with one slave. The source holds
// tvalid and the packet until the sink answers with tnext; a transfer is a
// cycle in which both are high. The assertions check that rule. Modport src
// is the sending side, modport dst the receiving side. The signal names and
// the meaning of tfirst/tlast/tnext follow the design; the exact handshake
// rule (transfer when tvalid and tnext are high together) and the clk/rst
// ports for the assertions are choices of this implementation.
interface axis_if #(
  parameter int unsigned DW = 8,
  parameter int unsigned UW = 3
) (
  input logic clk,
  input logic rst
);
  logic [DW-1:0] tdata;
  logic [UW-1:0] tuser;
  logic          tfirst;
  logic          tlast;
  logic          tvalid;
  logic          tnext;

  modport src (output tdata, output tuser, output tfirst, output tlast, output tvalid,
               input tnext);
  modport dst (input tdata, input tuser, input tfirst, input tlast, input tvalid,
               output tnext);

  // a packet that was offered stays offered, unchanged, until it is taken
  assert property (@(posedge clk) disable iff (rst) tvalid && !tnext |=> tvalid)
    else $error("axis_if: tvalid dropped before tnext");
  assert property (@(posedge clk) disable iff (rst)
                   tvalid && !tnext |=> $stable({tdata, tuser, tfirst, tlast}))
    else $error("axis_if: packet changed before tnext");
endinterface
