// ipu_idx_counter_tb: checks the register-file index counter against a
// reference count kept in the testbench: random clr and c_up for 400
// cycles, clr winning over c_up, and the wrap from 7 back to 0. The wrap must
// be seen at least once.
module ipu_idx_counter_tb;
  localparam int IDX_W = 3;

  logic             clk = 1'b0, rst_b = 1'b1, clr = 1'b0, c_up = 1'b0;
  logic [IDX_W-1:0] idx;
  int               ref_idx = 0;
  int               checks = 0, failures = 0, wraps = 0;

  ipu_idx_counter dut (.*);

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
    if (idx != 0) begin failures++; $display("FAIL reset: idx=%0d", idx); end
    for (int c = 0; c < 400; c++) begin
      clr  = ($urandom_range(15) == 0);
      c_up = ($urandom_range(3) != 0);
      @(posedge clk);
      if (clr) ref_idx = 0;
      else if (c_up) begin
        if (ref_idx == 7) wraps++;
        ref_idx = (ref_idx + 1) % 8;
      end
      @(negedge clk);
      checks++;
      if (int'(idx) != ref_idx) begin
        failures++;
        $display("FAIL cycle %0d: idx=%0d expected %0d", c, idx, ref_idx);
      end
    end
    checks++;
    if (wraps == 0) begin failures++; $display("FAIL no wrap seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
