// tb_slh_workload: the prefetcher, at its default parameters, fed with the
// stream-length mix of the worked example that motivates the design: per
// 1024 Reads, 21.8% of the Reads belong to streams of length 1, 43.7% to
// streams of length 2 and the remaining 34.5% to longer streams.
//
// Each block of 1024 Reads is built from 223 streams of length 1, 224 of
// length 2, 101 of length 3 and 10 of length 5 (223 + 448 + 303 + 50 = 1024
// Reads), in a random order, one stream at a time, GAP cycles between Reads.
// The cumulative histogram of such a block is exactly
//   lht(1..6) = 1024, 801, 353, 50, 50, 0
// and the rule lht(i) < 2*lht(i+1) then prefetches one line on the first
// Read of a stream (1024 < 1602), none on the second (801 >= 706) or third
// (353 >= 100), one on the fourth (50 < 100) and none on the fifth; two
// lines are never prefetched (1024 >= 2*353, 50 >= 2*0).
//
// Checked: no prefetch during the first epoch (no history yet); the
// histogram handed over at the end of the first epoch equals the numbers
// above; the second epoch (its length 512 after a dissimilar first
// comparison) takes exactly the decisions above, Read by Read; in the later,
// shorter epochs (whose random 256-Read samples can tip the close call at
// the second position either way) a first Read always prefetches and a
// third never does;
// every prefetch asks for the line after the Read; the prefetch buffer
// answers a Read exactly when that line was prefetched, with the right data.
// The DRAM latency is shorter than GAP, so every prefetch is timely: in the
// second epoch the second Read of every stream of length 2 or more and the
// fifth Read of every length-5 stream hit, about a third of all Reads, while
// the prefetches made for streams of length 1 and 4 go unused.
module tb_slh_workload;
  import asd_pkg::*;

  localparam int AW = LINE_ADDR_W, DW = LINE_BITS;
  localparam int OCC_W = $clog2(RRQ_DEPTH + 1);
  localparam int DRAM_LAT = 20;
  localparam int GAP = 60;
  localparam int BLOCKS = 4;

  logic clk = 0, rst_n = 0;
  logic mc_cmd_valid = 0, mc_cmd_write = 0;
  logic [0:0] mc_cmd_tid = '0;
  logic [AW-1:0] mc_cmd_line = '0;
  logic [OCC_W-1:0] rrq_occupancy = '0;
  logic qsc_enable = 1;
  logic pb_rsp_valid, pb_rsp_hit;
  logic [DW-1:0] pb_rsp_data;
  logic caq_valid = 0, caq_write = 0, caq_ready;
  logic [AW-1:0] caq_line = '0;
  logic dram_cmd_valid, dram_cmd_write, dram_cmd_prefetch, dram_cmd_ready = 1;
  logic [AW-1:0] dram_cmd_line;
  logic dram_rd_valid = 0, dram_rd_prefetch = 0;
  logic [AW-1:0] dram_rd_line = '0;
  logic [DW-1:0] dram_rd_data = '0;
  logic [EPOCH_W:0] epoch_len, epoch_reads;
  logic [$clog2(LPQ_DEPTH+1)-1:0] lpq_count;
  epoch_state_e epoch_state;
  asd_events_t events;

  asd_prefetcher dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, what); end
  endtask

  function automatic logic [DW-1:0] line_data(logic [AW-1:0] l);
    logic [DW-1:0] d;
    for (int k = 0; k < DW / AW; k++) d[k*AW +: AW] = ~l ^ AW'(k * 7);
    return d;
  endfunction

  // ---------------- DRAM model: prefetches only ----------------
  typedef struct { logic [AW-1:0] line; longint due; } ret_t;
  ret_t   ret_q[$];
  longint cyc = 0;
  bit     fetched[logic [AW-1:0]];   // lines prefetched and not yet read
  logic [AW-1:0] last_read = '0;
  int     n_single = 0, n_multi = 0, n_issue = 0;

  always @(posedge clk) begin
    cyc++;
    if (events.pf_single) n_single++;
    if (events.pf_multi)  n_multi++;
    if (rst_n && dram_cmd_valid && dram_cmd_ready) begin
      n_issue++;
      check(dram_cmd_prefetch && !dram_cmd_write, "regular command at DRAM without a CAQ");
      check(dram_cmd_line == last_read + 1, "prefetch is not the line after the Read");
      fetched[dram_cmd_line] = 1;
      ret_q.push_back('{dram_cmd_line, cyc + DRAM_LAT});
    end
  end

  always @(negedge clk) begin
    dram_rd_valid = 0;
    if (ret_q.size() != 0 && ret_q[0].due <= cyc) begin
      dram_rd_valid    = 1;
      dram_rd_prefetch = 1;
      dram_rd_line     = ret_q[0].line;
      dram_rd_data     = line_data(ret_q[0].line);
      void'(ret_q.pop_front());
    end
  end

  // ---------------- workload ----------------
  int lens[$];

  task automatic make_block();
    int t, j;
    lens.delete();
    repeat (223) lens.push_back(1);
    repeat (224) lens.push_back(2);
    repeat (101) lens.push_back(3);
    repeat (10)  lens.push_back(5);
    for (int k = lens.size() - 1; k > 0; k--) begin
      j = $urandom_range(k, 0);
      t = lens[k]; lens[k] = lens[j]; lens[j] = t;
    end
  endtask

  int unsigned exp_lht [1:6] = '{1024, 801, 353, 50, 50, 0};
  int reads = 0, len2 = 0;
  int w_reads = 0, w_hits = 0, w_pf = 0;
  logic [AW-1:0] next_base = 32'h0010_0000;

  initial begin
    int s0, m0;
    bit hit, expect_hit;
    repeat (4) @(negedge clk);
    rst_n = 1;
    repeat (4) @(negedge clk);
    for (int b = 0; b < BLOCKS; b++) begin
      make_block();
      foreach (lens[k]) begin
        for (int p = 1; p <= lens[k]; p++) begin
          reads++;
          if (reads == 1025) begin
            for (int i = 1; i <= 6; i++)
              check(32'(dut.lht_prev[i]) == exp_lht[i], $sformatf("lht(%0d) after the first epoch", i));
            len2 = int'(epoch_len);
            check(len2 == EPOCH_INIT / 2, "second epoch length");
          end
          s0 = n_single; m0 = n_multi;
          expect_hit = fetched.exists(next_base + AW'(p - 1));
          mc_cmd_valid = 1; mc_cmd_write = 0; mc_cmd_line = next_base + AW'(p - 1);
          last_read = mc_cmd_line;
          @(negedge clk);
          mc_cmd_valid = 0;
          check(pb_rsp_valid, "no prefetch-buffer response");
          hit = pb_rsp_hit;
          check(hit == expect_hit, $sformatf("hit=%0b for a line %s prefetched", hit,
                                             expect_hit ? "" : "not"));
          if (hit) check(pb_rsp_data == line_data(last_read), "wrong prefetched data");
          if (expect_hit) fetched.delete(last_read);
          repeat (GAP - 1) @(negedge clk);
          check(n_multi == m0, "multiline prefetch although lht(i) >= 2*lht(i+2)");
          if (reads <= 1024)
            check(n_single == s0, "prefetch before any histogram exists");
          else if (reads < 1024 + len2) begin
            check(n_single - s0 == ((p == 1 || p == 4) ? 1 : 0),
                  $sformatf("decision at stream position %0d in the second epoch", p));
            w_reads++;
            if (hit) w_hits++;
            w_pf += n_single - s0;
          end else if (p == 1 || p == 3)
            check(n_single - s0 == ((p == 1) ? 1 : 0),
                  $sformatf("decision at stream position %0d", p));
        end
        next_base += 64;
      end
    end
    check(n_issue == n_single, "every single-line decision reaches DRAM");
    $display("second epoch: %0d Reads, %0d prefetches, %0d hits (coverage %0d%%, useful %0d%%)",
             w_reads, w_pf, w_hits, w_hits * 100 / w_reads, w_hits * 100 / w_pf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
