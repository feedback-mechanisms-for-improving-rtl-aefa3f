// tb_slh_histogram: self-checking test of the Stream Length Histogram.
//
// The test feeds whole streams of random length (1 .. FS+3) as position
// sequences 1,2,..,L, with idle cycles in between, and sizes each epoch so
// that it ends exactly at a stream's end. At every epoch end it compares
// lht_prev with the definition lht(i) = sum of L over streams with L >= i,
// computed here from the stream lengths, checks that lht_prev2 holds the
// previous epoch and that epoch_end comes one cycle after the epoch's last
// Read. The epoch length changes between epochs.
module tb_slh_histogram;
  localparam int FSL = 6, CW = 16, EW = 10;
  localparam int POS_W = $clog2(FSL + 2);

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [POS_W-1:0] in_pos = '0;
  logic [EW:0] epoch_len;
  logic [FSL:1][CW-1:0] lht_cur, lht_prev, lht_prev2;
  logic [EW:0] epoch_reads;
  logic epoch_end;
  int checks = 0, failures = 0;

  slh_histogram #(.FS_LEN(FSL), .CW(CW), .EW(EW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int exp_lht [FSL+1];
  int old_lht [FSL+1];

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int i = 1; i <= FSL; i++) old_lht[i] = 0;
    for (int ep = 0; ep < 30; ep++) begin
      int total, target;
      target = 20 + $urandom_range(0, 60);
      epoch_len <= (EW+1)'(target);
      for (int i = 1; i <= FSL; i++) exp_lht[i] = 0;
      total = 0;
      while (total < target) begin
        int len;
        len = $urandom_range(1, FSL + 3);
        if ($urandom_range(0, 1)) len = $urandom_range(1, 3);
        if (total + len > target) len = target - total;
        for (int p = 1; p <= len; p++) begin
          in_valid <= 1;
          in_pos   <= POS_W'((p > FSL) ? FSL + 1 : p);
          @(posedge clk);
          in_valid <= 0;
          #1;
          if (total + p < target) check(!epoch_end, "early epoch_end");
          if ($urandom_range(0, 3) == 0) @(posedge clk);
        end
        for (int i = 1; i <= FSL; i++) if (len >= i) exp_lht[i] += len;
        total += len;
      end
      // epoch_end is visible right after the last Read's edge
      if (!epoch_end) begin
        @(posedge clk); #1;
        check(0, "epoch_end not one cycle after the last Read");
      end else check(1, "");
      check(epoch_reads == 0, "epoch read counter not cleared");
      for (int i = 1; i <= FSL; i++) begin
        check(int'(lht_prev[i]) == exp_lht[i],
              $sformatf("epoch %0d lht(%0d)=%0d expected %0d", ep, i, lht_prev[i], exp_lht[i]));
        check(int'(lht_prev2[i]) == old_lht[i], $sformatf("epoch %0d prev2 lht(%0d)", ep, i));
        check(lht_cur[i] == 0, "current histogram not cleared");
        old_lht[i] = exp_lht[i];
      end
      check(int'(lht_prev[1]) == target, "lht(1) is not the epoch's Read count");
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
