// ocp_pkg: the subset of the Open Core Protocol encodings used by ocp_io.
//
// MCmd and SResp use the standard OCP code points (IDLE/WR/RD and
// NULL/DVA). Only single-word reads and posted writes are used here; that
// subset is a choice of this implementation. The blocking address is the
// design's own.
package ocp_pkg;

  typedef enum logic [2:0] {
    MCMD_IDLE = 3'b000,
    MCMD_WR   = 3'b001,
    MCMD_RD   = 3'b010
  } ocp_mcmd_e;

  typedef enum logic [1:0] {
    SRESP_NULL = 2'b00,
    SRESP_DVA  = 2'b01
  } ocp_sresp_e;

  // lower address bits that arm the blocking behaviour of ocp_io
  localparam logic [11:0] BLK_ADDR = 12'h111;

endpackage
