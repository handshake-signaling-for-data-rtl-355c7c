// ipu_tb: end-to-end test of the SHA-2 input preprocessing unit at its
// default size (64-bit packets, 512-bit blocks).
//
// For every message length n from 1 to MAX_N, and then for a set of random
// lengths, the testbench resets the unit and acts as the message deliverer:
// one random packet per cycle, lst_pkt on the last one. Independently of the
// unit it builds the expected padded message (the packets, a 1 followed by
// 63 zeros, zero packets up to the last slot of a block, the length 64*n) and
// cuts it into 512-bit blocks, first packet in the top bits. Block j must be
// announced by blk_val exactly in cycle 8*j+9 after reset (cycle 0 is the
// START cycle), with the expected contents on blk, and msg_end only with the
// last block. After msg_end the unit must stay silent.
//
// Mechanisms counted, each of which must occur at least once: a block filled
// by message packets alone, a block closed by the padding packet, messages
// that need no zero packet, messages needing zero packets, a final block that
// holds padding only (the padding spills into a block of its own), and
// multi-block messages.
module ipu_tb;
  localparam int PKT_W    = 64;
  localparam int BLK_PKTS = 8;
  localparam int BLK_W    = PKT_W * BLK_PKTS;
  localparam int MAX_N    = 40;
  localparam int N_RAND   = 30;

  logic             clk = 1'b0;
  logic             rst_b = 1'b1;
  logic [PKT_W-1:0] pkt = '0;
  logic             lst_pkt = 1'b0;
  logic [BLK_W-1:0] blk;
  logic             blk_val, msg_end;

  int checks = 0, failures = 0;
  int n_msg_only_blk = 0, n_pad_closes = 0, n_no_zero = 0, n_zeros = 0;
  int n_extra_blk = 0, n_multi_blk = 0;

  ipu dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic run_msg(input int n);
    logic [PKT_W-1:0] words[$];
    logic [BLK_W-1:0] exp_blk;
    int nblk, z, got_blk, cyc, last_cyc;

    // Expected padded message, built word by word.
    words = {};
    for (int k = 0; k < n; k++) words.push_back({$urandom, $urandom});
    words.push_back({1'b1, 63'b0});
    z = 0;
    while (words.size() % BLK_PKTS != BLK_PKTS - 1) begin
      words.push_back('0);
      z++;
    end
    words.push_back(64'(n) * 64);
    nblk = words.size() / BLK_PKTS;

    if (n % BLK_PKTS == BLK_PKTS - 1) n_pad_closes++;
    if (n >= BLK_PKTS)                n_msg_only_blk++;
    if (z == 0)                       n_no_zero++; else n_zeros++;
    if (n % BLK_PKTS == BLK_PKTS - 1 || n % BLK_PKTS == 0) n_extra_blk++;
    if (nblk > 1)                     n_multi_blk++;

    // Reset, released at a falling edge: the following cycle is cycle 0.
    @(negedge clk);
    rst_b   = 1'b0;
    lst_pkt = 1'b0;
    repeat (2) @(negedge clk);
    rst_b = 1'b1;
    got_blk = 0;
    last_cyc = 8 * nblk + 1 + 4;
    for (cyc = 0; cyc <= last_cyc; cyc++) begin
      // Outputs of cycle cyc.
      if (blk_val) begin
        exp_blk = '0;
        for (int i = 0; i < BLK_PKTS; i++)
          exp_blk[(BLK_PKTS-1-i)*PKT_W +: PKT_W] = words[got_blk*BLK_PKTS + i];
        check(cyc == 8 * got_blk + 9,
              $sformatf("n=%0d block %0d announced in cycle %0d", n, got_blk, cyc));
        check(got_blk < nblk, $sformatf("n=%0d extra block", n));
        check(blk == exp_blk, $sformatf("n=%0d block %0d contents", n, got_blk));
        check(msg_end == (got_blk == nblk - 1),
              $sformatf("n=%0d block %0d msg_end=%0b", n, got_blk, msg_end));
        got_blk++;
      end else begin
        check(!msg_end, $sformatf("n=%0d msg_end without blk_val", n));
      end
      // Inputs of the next cycle: packet k is presented in cycle k+1.
      @(posedge clk);
      #1;
      if (cyc < n) begin
        pkt     = words[cyc];
        lst_pkt = (cyc == n - 1);
      end else begin
        pkt     = {$urandom, $urandom};  // ignored by the unit
        lst_pkt = 1'($urandom);
      end
      @(negedge clk);
    end
    check(got_blk == nblk, $sformatf("n=%0d got %0d of %0d blocks", n, got_blk, nblk));
  endtask

  initial begin
    for (int n = 1; n <= MAX_N; n++) run_msg(n);
    for (int r = 0; r < N_RAND; r++) run_msg(1 + int'($urandom_range(199)));
    check(n_msg_only_blk > 0, "no block of message packets only");
    check(n_pad_closes > 0,   "padding packet never closed a block");
    check(n_no_zero > 0,      "no message without zero packets");
    check(n_zeros > 0,        "no message with zero packets");
    check(n_extra_blk > 0,    "padding never spilled into an extra block");
    check(n_multi_blk > 0,    "no multi-block message");
    $display("messages: msg-only blocks %0d, pad closes block %0d, no zero %0d, zeros %0d, extra block %0d, multi-block %0d",
             n_msg_only_blk, n_pad_closes, n_no_zero, n_zeros, n_extra_blk, n_multi_blk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
