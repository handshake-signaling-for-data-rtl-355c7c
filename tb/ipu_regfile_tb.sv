// ipu_regfile_tb: checks the block register file against a reference
// array kept in the testbench. First all eight entries are written in order
// and the 512-bit read is compared word by word (entry 0 in the top bits);
// then 300 cycles of random writes, some with we low, each followed by a
// check of the whole block.
module ipu_regfile_tb;
  localparam int WORD_W = 64;
  localparam int DEPTH  = 8;

  logic                    clk = 1'b0, we = 1'b0;
  logic [2:0]              waddr = '0;
  logic [WORD_W-1:0]       wdata = '0;
  logic [DEPTH*WORD_W-1:0] rdata;
  logic [WORD_W-1:0]       ref_mem [DEPTH];
  int checks = 0, failures = 0;

  ipu_regfile dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(input int c);
    for (int i = 0; i < DEPTH; i++) begin
      checks++;
      if (rdata[(DEPTH-1-i)*WORD_W +: WORD_W] != ref_mem[i]) begin
        failures++;
        $display("FAIL step %0d entry %0d: %h expected %h", c, i,
                 rdata[(DEPTH-1-i)*WORD_W +: WORD_W], ref_mem[i]);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = 3'(i); wdata = {$urandom, $urandom};
      ref_mem[i] = wdata;
    end
    @(negedge clk);
    we = 1'b0;
    compare(-1);
    for (int c = 0; c < 300; c++) begin
      we = 1'($urandom); waddr = 3'($urandom); wdata = {$urandom, $urandom};
      @(posedge clk);
      if (we) ref_mem[waddr] = wdata;
      @(negedge clk);
      compare(c);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
