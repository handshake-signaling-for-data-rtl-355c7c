// ipu: SHA-2 input preprocessing unit.
//
// The unit sits between a message deliverer and a SHA-2 hash engine. The
// deliverer presents one PKT_W-bit packet (64 bits) per clock cycle on pkt,
// with no handshake, starting in the second cycle after rst_b is released and
// marking the final packet with lst_pkt. The unit stores the packets in an
// 8-entry register file and, every time the 8 entries are full, shows the
// 512-bit block on blk and raises blk_val for one cycle (a valid-only
// interface: the hash engine must take the block in that cycle). After the
// last packet the unit writes the SHA-2 padding: one packet holding a 1
// followed by zeros, then zero packets up to the last slot of a block, then
// the message length in bits in that last slot, i.e. in the least
// significant 64 bits of the final block. The final blk_val comes with
// msg_end. After that the unit is idle until the next reset.
//
// Timing, for a message of n packets (8 packets per block): cycle 0 after
// reset is START, packets are taken in cycles 1 to n, so a new block is
// announced every 8 cycles while packets arrive. The padding packet is
// written in cycle n+1, then z = (6 - n) mod 8 zero packets, the length
// packet in cycle n+2+z, and blk_val with msg_end is high in cycle n+3+z.
// A block whose last slot is written in cycle c is announced in cycle c+1.
// The message occupies (n+2+z)/8 blocks.
//
// The unit is built from a control unit (ipu_ctrl, a Mealy state machine) and
// a datapath (ipu_datapath: index counter, message length register, register
// file and write multiplexer). The packet and block sizes, the padding rule,
// the split into control unit and datapath and the state machine's states
// follow the published description of this unit. The active-low
// asynchronous reset, the one-cycle START state and the exact cycle of
// blk_val are this design's choices. Packets are whole 64-bit words: the
// message length is always a multiple of 64 bits.
module ipu
  import ipu_pkg::*;
#(
  parameter int unsigned PKT_W    = 64,
  parameter int unsigned BLK_PKTS = 8
) (
  input  logic                      clk,
  input  logic                      rst_b,
  input  logic [PKT_W-1:0]          pkt,
  input  logic                      lst_pkt,
  output logic [BLK_PKTS*PKT_W-1:0] blk,
  output logic                      blk_val,
  output logic                      msg_end
);

  localparam int unsigned IDX_W = $clog2(BLK_PKTS);

  ipu_ctl_t         ctl;
  logic [IDX_W-1:0] idx;

  ipu_ctrl #(.IDX_W(IDX_W)) u_ctrl (
    .clk, .rst_b, .lst_pkt, .idx, .ctl, .blk_val, .msg_end
  );

  ipu_datapath #(.PKT_W(PKT_W), .BLK_PKTS(BLK_PKTS)) u_dp (
    .clk, .rst_b, .ctl, .pkt, .idx, .blk
  );

  // msg_end only ever accompanies a block.
  a_msg_end_blk: assert property (@(posedge clk)
    msg_end |-> blk_val);

endmodule
