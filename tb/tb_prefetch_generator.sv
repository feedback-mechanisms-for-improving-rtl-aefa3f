// tb_prefetch_generator: self-checking test of the prefetch decision.
//
// Random histograms are drawn as bars (Reads in streams of each length) and
// turned into the cumulative lht() form the block takes. The expected number
// of lines is computed here from the probability form of the rule: prefetch
// s lines when, for every s' <= s, the Reads in streams of length i..i+s'-1
// are fewer than the Reads in streams longer than i+s'-1 (sums of bars).
// With the Queue Status Check enabled and the Read Reorder Queue at least
// half full the count is limited to one. Lines, the one-cycle latency and
// the statistics pulses are checked too.
module tb_prefetch_generator;
  localparam int FSL = 8, CW = 16, AW = 20, ML = 3, RRQ = 8;
  localparam int POS_W = $clog2(FSL + 2);
  localparam int OCC_W = $clog2(RRQ + 1);

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [AW-1:0] in_line = '0;
  logic [POS_W-1:0] in_pos = '0;
  logic [FSL:1][CW-1:0] lht = '0;
  logic [OCC_W-1:0] rrq_occupancy = '0;
  logic qsc_enable = 1;
  logic [ML-1:0] pf_valid;
  logic [AW-1:0] pf_line [ML];
  logic single, multi, qsc;
  int checks = 0, failures = 0;
  int cnt_hist [ML+1];
  int n_qsc = 0;

  prefetch_generator #(.FS_LEN(FSL), .CW(CW), .ADDR_W(AW), .MAX_L(ML), .RRQ_D(RRQ)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int bar [FSL+2];

  function automatic int bsum(int lo, int hi);
    int t = 0;
    for (int k = lo; k <= hi; k++) if (k >= 1 && k <= FSL) t += bar[k];
    return t;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < 5000; n++) begin
      int i, occ, want, hist_ok, cut, sum;
      bit qen;
      // bars: sometimes dominated by short streams, sometimes by long ones
      for (int k = 1; k <= FSL; k++) begin
        bar[k] = $urandom_range(0, 100);
        if (n % 3 == 0 && k > 2) bar[k] = bar[k] / 8;
        if (n % 3 == 1 && k < 4) bar[k] = bar[k] / 8;
      end
      sum = 0;
      for (int k = FSL; k >= 1; k--) begin sum += bar[k]; lht[k] = CW'(sum); end
      i   = $urandom_range(1, FSL + 1);
      occ = $urandom_range(0, RRQ);
      qen = $urandom_range(0, 3) != 0;
      // expected line count
      hist_ok = 0;
      for (int s = 1; s <= ML; s++)
        if (hist_ok == s - 1 && i <= FSL && bsum(i, i + s - 1) < bsum(i + s, FSL)) hist_ok = s;
      want = hist_ok;
      cut = 0;
      if (qen && 2 * occ >= RRQ && want > 1) begin want = 1; cut = 1; end
      in_valid <= 1; in_pos <= POS_W'(i); in_line <= AW'($urandom);
      rrq_occupancy <= OCC_W'(occ); qsc_enable <= qen;
      @(posedge clk);
      in_valid <= 0;
      #1;
      checks++;
      for (int s = 0; s < ML; s++) begin
        if (pf_valid[s] != (s < want)) begin
          failures++;
          if (failures < 20) $display("FAIL n=%0d i=%0d: pf_valid=%b want %0d lines", n, i, pf_valid, want);
          break;
        end
        if (pf_line[s] != in_line + AW'(s + 1)) begin
          failures++;
          $display("FAIL: wrong prefetch address");
          break;
        end
      end
      checks++;
      if (single != (want == 1) || multi != (want > 1) || qsc != cut) begin
        failures++;
        if (failures < 20) $display("FAIL n=%0d: pulses s%0d m%0d q%0d", n, single, multi, qsc);
      end
      cnt_hist[want]++;
      n_qsc += cut;
      // nothing is asked for without a Read
      @(posedge clk); #1;
      checks++;
      if (pf_valid != 0) begin failures++; $display("FAIL: prefetch without a Read"); end
    end
    checks++;
    if (cnt_hist[0] == 0 || cnt_hist[1] == 0 || cnt_hist[ML] == 0 || n_qsc == 0) begin
      failures++;
      $display("FAIL: decision outcomes not all covered");
    end
    $display("lines 0:%0d 1:%0d 2:%0d 3:%0d, queue-status cuts %0d", cnt_hist[0], cnt_hist[1], cnt_hist[2], cnt_hist[3], n_qsc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
