// ipu_idx_counter: register-file index counter of the SHA-2 input
// preprocessing unit.
//
// A binary counter of IDX_W bits that wraps around, so it counts modulo
// 2**IDX_W (modulo 8 for the unit's 512-bit blocks of 64-bit packets, as in
// the preprocessing algorithm's "index <- (index + 1) mod 2^3"). clr clears
// it and wins over c_up; c_up increments it. Both act on the rising clock
// edge, so idx shows the new value in the next cycle. The active-low
// asynchronous reset rst_b also clears it; the reset is this design's choice,
// the unit itself clears the counter with clr in its START state.
module ipu_idx_counter #(
  parameter int unsigned IDX_W = 3
) (
  input  logic             clk,
  input  logic             rst_b,
  input  logic             clr,
  input  logic             c_up,
  output logic [IDX_W-1:0] idx
);

  always_ff @(posedge clk or negedge rst_b) begin
    if (!rst_b)    idx <= '0;
    else if (clr)  idx <= '0;
    else if (c_up) idx <= idx + 1'b1;
  end

endmodule
