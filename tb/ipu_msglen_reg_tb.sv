// ipu_msglen_reg_tb: checks the message length register against a
// reference sum kept in the testbench: after clr it must read 0, and every
// cycle with inc it must grow by 64 bits, clr winning over inc. Random
// commands for 400 cycles.
module ipu_msglen_reg_tb;
  logic        clk = 1'b0, rst_b = 1'b1, clr = 1'b0, inc = 1'b0;
  logic [63:0] len;
  longint unsigned ref_len = 0;
  int          checks = 0, failures = 0;

  ipu_msglen_reg dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2 rst_b = 1'b0;
    #10 rst_b = 1'b1;
    @(negedge clk);
    checks++;
    if (len != 0) begin failures++; $display("FAIL reset: len=%0d", len); end
    for (int c = 0; c < 400; c++) begin
      clr = ($urandom_range(31) == 0);
      inc = ($urandom_range(3) != 0);
      @(posedge clk);
      if (clr) ref_len = 0;
      else if (inc) ref_len += 64;
      @(negedge clk);
      checks++;
      if (len != ref_len) begin
        failures++;
        $display("FAIL cycle %0d: len=%0d expected %0d", c, len, ref_len);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
