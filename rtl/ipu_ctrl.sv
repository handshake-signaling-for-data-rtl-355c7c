// ipu_ctrl: control unit of the SHA-2 input preprocessing unit.
//
// A Mealy state machine with the states START, RX_PKT, PAD, ZERO, MGLN,
// MSG_END and STOP that carries out the preprocessing algorithm. Its inputs
// are lst_pkt from the message deliverer and the register-file index idx from
// the datapath; its outputs are the datapath commands (ipu_ctl_t) and the two
// signals towards the hash engine.
//
//   START    clr                          -> RX_PKT
//   RX_PKT   st_pkt, c_up                 -> PAD if lst_pkt, else RX_PKT
//   PAD      pad_pkt, c_up                -> MGLN if idx = 6, else ZERO
//   ZERO     zero_pkt, c_up               -> MGLN if idx = 6, else ZERO
//   MGLN     mgln_pkt (always at idx = 7) -> MSG_END
//   MSG_END  msg_end                      -> STOP
//   STOP     nothing                      -> STOP (until rst_b)
//
// ("6" and "7" stand for BLK_PKTS-2 and BLK_PKTS-1.) A block is complete
// when a packet of any kind is written at the last index. blk_val is that
// event delayed by one flip-flop, so it is high in the cycle after the write,
// when the whole block can be read from the register file; the hash engine
// takes blk on the rising edge that ends that cycle. The length packet is
// written in MGLN, so the last blk_val falls in MSG_END, together with
// msg_end. One packet is accepted per cycle from the first cycle in RX_PKT
// (the cycle after START) up to the one marked by lst_pkt; pkt is ignored in
// every other state. The states, their order and the commands follow the
// unit's description; the one-cycle START, the asynchronous active-low reset
// and the registered blk_val are this design's choices.
module ipu_ctrl
  import ipu_pkg::*;
#(
  parameter int unsigned IDX_W = 3
) (
  input  logic             clk,
  input  logic             rst_b,
  input  logic             lst_pkt,
  input  logic [IDX_W-1:0] idx,
  output ipu_ctl_t         ctl,
  output logic             blk_val,
  output logic             msg_end
);

  localparam logic [IDX_W-1:0] IDX_LAST = '1;
  localparam logic [IDX_W-1:0] IDX_PREV = IDX_LAST - 1'b1;

  ipu_state_t state, state_nxt;
  logic       blk_done;

  always_ff @(posedge clk or negedge rst_b) begin
    if (!rst_b) begin
      state   <= START;
      blk_val <= 1'b0;
    end else begin
      state   <= state_nxt;
      blk_val <= blk_done;
    end
  end

  always_comb begin
    ctl       = '0;
    msg_end   = 1'b0;
    state_nxt = state;
    unique case (state)
      START: begin
        ctl.clr   = 1'b1;
        state_nxt = RX_PKT;
      end
      RX_PKT: begin
        ctl.st_pkt = 1'b1;
        ctl.c_up   = 1'b1;
        if (lst_pkt) state_nxt = PAD;
      end
      PAD: begin
        ctl.pad_pkt = 1'b1;
        ctl.c_up    = 1'b1;
        state_nxt   = (idx == IDX_PREV) ? MGLN : ZERO;
      end
      ZERO: begin
        ctl.zero_pkt = 1'b1;
        ctl.c_up     = 1'b1;
        if (idx == IDX_PREV) state_nxt = MGLN;
      end
      MGLN: begin
        ctl.mgln_pkt = 1'b1;
        state_nxt    = MSG_END;
      end
      MSG_END: begin
        msg_end   = 1'b1;
        state_nxt = STOP;
      end
      STOP:    state_nxt = STOP;
      default: state_nxt = START;
    endcase
  end

  // A block is complete when its last slot is written.
  assign blk_done = (ctl.st_pkt | ctl.pad_pkt | ctl.zero_pkt | ctl.mgln_pkt)
                    && (idx == IDX_LAST);

  // The length packet always goes into the last slot of a block.
  a_mgln_last: assert property (@(posedge clk)
    ctl.mgln_pkt |-> idx == IDX_LAST);

endmodule
