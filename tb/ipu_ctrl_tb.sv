// ipu_ctrl_tb: checks the control unit's command sequence. The testbench
// plays the index counter (clr and c_up drive its own modulo-8 count, fed
// back on idx) and the message deliverer. For message lengths 1 to 24 it
// works out, from the message length alone, which commands every cycle must
// carry: cycle 0 clr; cycles 1..n st_pkt with c_up; cycle n+1 pad_pkt with
// c_up; z = (6 - n) mod 8 cycles of zero_pkt with c_up; one cycle of mgln_pkt;
// then msg_end; then nothing. blk_val must be high exactly in cycles 8*j+9
// for j below the number of blocks. lst_pkt is driven randomly after the
// message to show that it is ignored there.
module ipu_ctrl_tb;
  import ipu_pkg::*;

  logic       clk = 1'b0, rst_b = 1'b1, lst_pkt = 1'b0;
  logic [2:0] idx = '0;
  ipu_ctl_t   ctl;
  logic       blk_val, msg_end;
  int checks = 0, failures = 0;

  ipu_ctrl dut (.*);

  always #5 clk = ~clk;

  // Index counter model.
  always_ff @(posedge clk) begin
    if (ctl.clr) idx <= '0;
    else if (ctl.c_up) idx <= idx + 3'd1;
  end

  initial begin
    repeat (20_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_msg(input int n);
    int z, t_mgln, nblk;
    ipu_ctl_t exp_ctl;
    logic exp_bv, exp_me;
    z = (6 - n % 8 + 8) % 8;
    t_mgln = n + 2 + z;
    nblk = (t_mgln + 1) / 8;
    @(negedge clk);
    rst_b = 1'b0;
    lst_pkt = 1'b0;
    repeat (2) @(negedge clk);
    rst_b = 1'b1;
    for (int c = 0; c <= t_mgln + 6; c++) begin
      exp_ctl = '0;
      if (c == 0) exp_ctl.clr = 1'b1;
      else if (c <= n) begin exp_ctl.st_pkt = 1'b1; exp_ctl.c_up = 1'b1; end
      else if (c == n + 1) begin exp_ctl.pad_pkt = 1'b1; exp_ctl.c_up = 1'b1; end
      else if (c < t_mgln) begin exp_ctl.zero_pkt = 1'b1; exp_ctl.c_up = 1'b1; end
      else if (c == t_mgln) exp_ctl.mgln_pkt = 1'b1;
      exp_me = (c == t_mgln + 1);
      exp_bv = (c >= 9) && ((c - 9) % 8 == 0) && ((c - 9) / 8 < nblk);
      checks++;
      if (ctl != exp_ctl || blk_val != exp_bv || msg_end != exp_me) begin
        failures++;
        $display("FAIL n=%0d cycle %0d: ctl=%b blk_val=%b msg_end=%b, expected %b %b %b",
                 n, c, ctl, blk_val, msg_end, exp_ctl, exp_bv, exp_me);
      end
      @(posedge clk);
      #1;
      lst_pkt = (c < n) ? (c == n - 1) : 1'($urandom);
      @(negedge clk);
    end
  endtask

  initial begin
    for (int n = 1; n <= 24; n++) run_msg(n);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
