// hrc_pkg: types shared by the reliable-cache RTL.
//
// The 8T-cell data cache (wgrb_cache) accepts three request kinds: a word
// read, a byte-enabled word write, and a line fill that installs a whole line
// with a new tag (the refill path a write-back L1 needs; the refill source
// itself lies outside this RTL). The opcode encoding and the controller
// state names are this design's own choice.
package hrc_pkg;

  typedef enum logic [1:0] {
    OP_READ  = 2'd0,
    OP_WRITE = 2'd1,
    OP_FILL  = 2'd2
  } cache_op_e;

  // States of the Set-Buffer controller (wg_ctrl).
  typedef enum logic [2:0] {
    S_INIT   = 3'd0,  // clearing the tag array after reset
    S_IDLE   = 3'd1,  // waiting for a request
    S_PROBE  = 3'd2,  // one cycle: compare the request set with the Tag-Buffer
    S_WB     = 3'd3,  // writeback of the Set-Buffer to the array row
    S_RDONLY = 3'd4,  // plain array read, answered from the read latches
    S_RDFILL = 3'd5,  // array read that refills Set-Buffer and Tag-Buffer
    S_MODIFY = 3'd6,  // one cycle: update the Set-Buffer in the selected columns
    S_BYPASS = 3'd7   // one cycle: answer a read from the Set-Buffer
  } wg_state_e;

endpackage
