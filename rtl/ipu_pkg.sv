// ipu_pkg: types shared by the SHA-2 input preprocessing unit (IPU).
//
// The control unit drives the datapath through six command lines, bundled
// here as one packed struct. Their names and meanings follow the unit's
// control-path description: clr clears the index counter and the message
// length register, c_up advances the index counter, and st_pkt, pad_pkt,
// zero_pkt and mgln_pkt each write one packet into the register file at the
// current index (the message packet, the padding packet, an all-zero packet
// or the message length). The state type lists the control unit's seven
// states in the order the unit walks through them.
package ipu_pkg;

  // Datapath commands issued by the control unit in the current cycle.
  typedef struct packed {
    logic clr;       // clear index counter and message length
    logic c_up;      // index <- index + 1 (modulo the block size)
    logic st_pkt;    // store the incoming message packet, length += packet width
    logic pad_pkt;   // store the padding packet: a 1 followed by zeros
    logic zero_pkt;  // store an all-zero packet
    logic mgln_pkt;  // store the message length packet
  } ipu_ctl_t;

  typedef enum logic [2:0] {
    START   = 3'd0,  // one cycle after reset: clear the datapath
    RX_PKT  = 3'd1,  // store one message packet per cycle until lst_pkt
    PAD     = 3'd2,  // store the padding packet
    ZERO    = 3'd3,  // store zero packets until the last slot of a block
    MGLN    = 3'd4,  // store the message length in the last slot
    MSG_END = 3'd5,  // final block is complete: blk_val with msg_end
    STOP    = 3'd6   // message done, no command until the next reset
  } ipu_state_t;

endpackage
