// ipu_regfile: block register file of the SHA-2 input preprocessing unit.
//
// DEPTH registers of WORD_W bits. One register, addressed by waddr, is written
// on the rising clock edge when we is high. All registers are read at once as
// one block of DEPTH*WORD_W bits: register 0 in the most significant word,
// register DEPTH-1 in the least significant one. The unit writes its packets
// at indices 0 to 7 in arrival order, so the first packet of a block sits in
// the top 64 bits and the length packet, always written at index 7, lands in
// the least significant 64 bits, where SHA-2 expects it. The size follows the
// unit's description; the word order on the read port, the single write port
// and the absence of a reset are this design's choices (every register is
// written before a block is announced).
module ipu_regfile #(
  parameter int unsigned WORD_W = 64,
  parameter int unsigned DEPTH  = 8,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic                    clk,
  input  logic                    we,
  input  logic [AW-1:0]           waddr,
  input  logic [WORD_W-1:0]       wdata,
  output logic [DEPTH*WORD_W-1:0] rdata
);

  logic [WORD_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_comb begin
    for (int i = 0; i < int'(DEPTH); i++)
      rdata[(DEPTH-1-i)*WORD_W +: WORD_W] = mem[i];
  end

endmodule
