// ipu_datapath: datapath of the SHA-2 input preprocessing unit.
//
// Holds the index counter, the message length register and the block
// register file, and a multiplexer that picks the word written into the
// register file at the current index:
//   st_pkt   -> the incoming message packet pkt (the length grows by PKT_W)
//   pad_pkt  -> the padding packet, a 1 followed by PKT_W-1 zeros
//   zero_pkt -> an all-zero packet
//   mgln_pkt -> the message length in bits, as held before this edge
// The control unit asserts at most one of the four per cycle; each write, the
// counter step (c_up) and the length update all take effect on the same
// rising edge. clr clears the counter and the length register. The current
// index idx goes back to the control unit, and blk is the register file read
// as one block, first packet in the most significant bits. The length packet
// is one packet wide, as in the unit's 64-bit length field. The four write
// sources and the command names follow the unit's description; the
// arrangement of the multiplexer is this design's own.
module ipu_datapath
  import ipu_pkg::*;
#(
  parameter int unsigned PKT_W    = 64,
  parameter int unsigned BLK_PKTS = 8,
  localparam int unsigned IDX_W   = $clog2(BLK_PKTS)
) (
  input  logic                      clk,
  input  logic                      rst_b,
  input  ipu_ctl_t                  ctl,
  input  logic [PKT_W-1:0]          pkt,
  output logic [IDX_W-1:0]          idx,
  output logic [BLK_PKTS*PKT_W-1:0] blk
);

  localparam logic [PKT_W-1:0] PAD_WORD = {1'b1, {(PKT_W-1){1'b0}}};

  logic [PKT_W-1:0] msg_len;
  logic [PKT_W-1:0] wdata;
  logic             we;

  ipu_idx_counter #(.IDX_W(IDX_W)) u_idx (
    .clk, .rst_b, .clr(ctl.clr), .c_up(ctl.c_up), .idx
  );

  ipu_msglen_reg #(.LEN_W(PKT_W), .INC(PKT_W)) u_len (
    .clk, .rst_b, .clr(ctl.clr), .inc(ctl.st_pkt), .len(msg_len)
  );

  always_comb begin
    we = ctl.st_pkt | ctl.pad_pkt | ctl.zero_pkt | ctl.mgln_pkt;
    unique case (1'b1)
      ctl.st_pkt:   wdata = pkt;
      ctl.pad_pkt:  wdata = PAD_WORD;
      ctl.mgln_pkt: wdata = msg_len;
      default:      wdata = '0;  // zero_pkt, or no write
    endcase
  end

  ipu_regfile #(.WORD_W(PKT_W), .DEPTH(BLK_PKTS)) u_rf (
    .clk, .we, .waddr(idx), .wdata, .rdata(blk)
  );

endmodule
