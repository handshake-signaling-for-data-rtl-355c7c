// ipu_datapath_tb: checks the datapath against a reference model kept in
// the testbench (eight 64-bit words, an index and a bit count). Each cycle
// it issues a random command of the control unit's kind: clr, or at most one
// of st_pkt, pad_pkt, zero_pkt and mgln_pkt together with a random c_up. It
// then compares idx and the whole 512-bit block with the model. Each of the
// four write kinds, and a length packet of a non-zero length, must occur.
module ipu_datapath_tb;
  import ipu_pkg::*;

  logic         clk = 1'b0, rst_b = 1'b1;
  ipu_ctl_t     ctl = '0;
  logic [63:0]  pkt = '0;
  logic [2:0]   idx;
  logic [511:0] blk;

  logic [63:0]     ref_rf [8];
  int              ref_idx = 0;
  longint unsigned ref_len = 0;
  int checks = 0, failures = 0;
  int n_st = 0, n_pad = 0, n_zero = 0, n_mgln = 0;

  ipu_datapath dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2 rst_b = 1'b0;
    #10 rst_b = 1'b1;
    // Fill the register file with known words first.
    for (int i = 0; i < 8; i++) begin
      @(negedge clk);
      ctl = '0; ctl.st_pkt = 1'b1; ctl.c_up = 1'b1;
      pkt = {$urandom, $urandom};
      @(posedge clk);
      ref_rf[ref_idx] = pkt;
      ref_idx = (ref_idx + 1) % 8;
      ref_len += 64;
    end
    @(negedge clk);
    for (int c = 0; c < 2000; c++) begin
      ctl = '0;
      pkt = {$urandom, $urandom};
      if ($urandom_range(40) == 0) ctl.clr = 1'b1;
      else begin
        case ($urandom_range(4))
          0: ctl.st_pkt   = 1'b1;
          1: ctl.pad_pkt  = 1'b1;
          2: ctl.zero_pkt = 1'b1;
          3: ctl.mgln_pkt = 1'b1;
          default: ;
        endcase
        ctl.c_up = 1'($urandom);
      end
      @(posedge clk);
      if (ctl.clr) begin
        ref_idx = 0;
        ref_len = 0;
      end else begin
        if (ctl.st_pkt)   begin ref_rf[ref_idx] = pkt; n_st++; end
        if (ctl.pad_pkt)  begin ref_rf[ref_idx] = 64'h8000_0000_0000_0000; n_pad++; end
        if (ctl.zero_pkt) begin ref_rf[ref_idx] = 64'h0; n_zero++; end
        if (ctl.mgln_pkt) begin
          ref_rf[ref_idx] = ref_len;
          if (ref_len != 0) n_mgln++;
        end
        if (ctl.st_pkt) ref_len += 64;
        if (ctl.c_up) ref_idx = (ref_idx + 1) % 8;
      end
      @(negedge clk);
      checks++;
      if (int'(idx) != ref_idx) begin
        failures++;
        $display("FAIL cycle %0d: idx=%0d expected %0d", c, idx, ref_idx);
      end
      for (int i = 0; i < 8; i++) begin
        checks++;
        if (blk[(7-i)*64 +: 64] != ref_rf[i]) begin
          failures++;
          $display("FAIL cycle %0d word %0d: %h expected %h", c, i,
                   blk[(7-i)*64 +: 64], ref_rf[i]);
        end
      end
    end
    checks++;
    if (n_st == 0 || n_pad == 0 || n_zero == 0 || n_mgln == 0) begin
      failures++;
      $display("FAIL a write kind never occurred");
    end
    $display("writes: st %0d pad %0d zero %0d mgln %0d", n_st, n_pad, n_zero, n_mgln);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
