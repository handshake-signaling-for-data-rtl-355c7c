// ipu_msglen_reg: message length register of the SHA-2 input preprocessing
// unit.
//
// Holds the length of the message received so far, in bits. clr clears it;
// inc adds INC, the packet width, once per stored message packet, as the
// preprocessing algorithm's "MessageLength <- MessageLength + 64" does. clr
// wins over inc. The register is LEN_W bits wide because the unit appends the
// length as one 64-bit packet; the sum wraps modulo 2**LEN_W. The update is
// seen in the cycle after the edge. The asynchronous reset is this design's
// addition; the unit clears the register with clr in its START state.
module ipu_msglen_reg #(
  parameter int unsigned LEN_W = 64,
  parameter int unsigned INC   = 64
) (
  input  logic             clk,
  input  logic             rst_b,
  input  logic             clr,
  input  logic             inc,
  output logic [LEN_W-1:0] len
);

  localparam logic [LEN_W-1:0] STEP = LEN_W'(INC);

  always_ff @(posedge clk or negedge rst_b) begin
    if (!rst_b)   len <= '0;
    else if (clr) len <= '0;
    else if (inc) len <= len + STEP;
  end

endmodule
