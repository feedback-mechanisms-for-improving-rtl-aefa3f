// tb_asd_prefetcher: end-to-end test of the prefetcher inside a modelled
// memory controller, with every parameter at its default.
//
// The environment: a workload of interleaved ascending streams (up to 12
// live at once) whose length distribution switches between short-stream and
// long-stream phases, with Writes mixed in; a CAQ model that queues each
// Read the prefetch buffer misses and every Write; and a DRAM model that
// accepts commands at a rate that changes between busy and quiet periods
// and returns Read data after a fixed latency. The Read Reorder Queue
// occupancy given to the prefetcher is the number of Reads waiting in the
// CAQ model.
//
// Checked: data served from the prefetch buffer equals the line's DRAM
// contents; a hit is only possible for a line whose prefetch data arrived
// after its last Write and last hit; every prefetch asks for one of the
// MAX_LINES lines after a line that was Read; regular commands reach DRAM
// in order and none is lost; epochs end exactly after epoch_len Reads and
// the epoch length stays a power of two within 256..8192. Every mechanism
// (stream continuation and slot replacement, epoch ends, similar and
// dissimilar histograms, growing, shrinking and clamped epoch lengths,
// single and multiline prefetches, Queue Status Check cuts, prefetch
// candidates found in the buffer, LPQ duplicate, full and squash drops,
// prefetch issue, delayed regular commands, buffer hits and unused
// evictions) is counted and must occur at least once.
module tb_asd_prefetcher;
  import asd_pkg::*;

  localparam int AW = LINE_ADDR_W, DW = LINE_BITS;
  localparam int OCC_W = $clog2(RRQ_DEPTH + 1);
  localparam int DRAM_LAT = 40;
  localparam int N_READS = 150000;
  localparam int RATE = 10;      // percent of cycles with a new command
  localparam int BURST = 70;     // percent of Reads that continue the last stream

  logic clk = 0, rst_n = 0;
  logic mc_cmd_valid = 0, mc_cmd_write = 0;
  logic [0:0] mc_cmd_tid = '0;          // one hardware thread
  logic [AW-1:0] mc_cmd_line = '0;
  logic [OCC_W-1:0] rrq_occupancy = '0;
  logic qsc_enable = 1;
  logic pb_rsp_valid, pb_rsp_hit;
  logic [DW-1:0] pb_rsp_data;
  logic caq_valid = 0, caq_write = 0, caq_ready;
  logic [AW-1:0] caq_line = '0;
  logic dram_cmd_valid, dram_cmd_write, dram_cmd_prefetch, dram_cmd_ready = 0;
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
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, what); end
  endtask

  // DRAM contents of a line: the line address replicated
  function automatic logic [DW-1:0] line_data(logic [AW-1:0] l);
    logic [DW-1:0] d;
    for (int k = 0; k < DW / AW; k++) d[k*AW +: AW] = l ^ AW'(k);
    return d;
  endfunction

  // ---------------- environment state ----------------
  typedef struct { logic [AW-1:0] line; bit wr; } cmd_t;
  typedef struct { logic [AW-1:0] line; bit pf; longint due; } ret_t;
  cmd_t caq_q[$];          // CAQ model
  cmd_t caq_sent[$];       // expected order of regular commands at DRAM
  ret_t ret_q[$];          // DRAM returns in flight
  longint fill_t[logic [AW-1:0]];   // last prefetch data return of a line
  longint issue_t[logic [AW-1:0]];  // first prefetch issue since the line's last Read/Write
  bit     was_read[logic [AW-1:0]];
  longint cyc = 0;

  // event counters, one per field of asd_events_t
  int ev_cnt [19];
  string ev_name [19] = '{"stream_continue", "stream_alloc_evict", "epoch_end", "similar",
                         "dissimilar", "epoch_grow", "epoch_shrink", "epoch_clamped",
                         "pf_single", "pf_multi", "qsc_suppress", "pf_in_buffer", "lpq_dup",
                         "lpq_full", "lpq_squash", "pf_issue", "reg_delayed", "pb_hit",
                         "pb_evict_unused"};

  // workload: stream slots
  localparam int SLOTS = 12;
  logic [AW-1:0] s_next [SLOTS];
  int            s_left [SLOTS];
  int            reads = 0, reads_at_epoch = 0, writes = 0, n_epochs = 0;
  bit            long_phase = 0;
  int            phase_left = 0;
  int            busy_left = 0;
  bit            busy = 0;
  int            last_slot = 0;

  function automatic int draw_len();
    if (long_phase) return $urandom_range(3, 20);
    return ($urandom_range(0, 9) < 6) ? 1 : $urandom_range(2, 3);
  endfunction

  task automatic new_stream(int s);
    s_next[s] = AW'({$urandom_range(0, 32'h3fff_ffff), 6'h00});
    s_left[s] = draw_len();
  endtask

  initial begin
    bit dram_take, caq_take, armed;
    longint armed_t;
    int rd_before, s;
    for (int k = 0; k < 19; k++) ev_cnt[k] = 0;
    for (int k = 0; k < SLOTS; k++) new_stream(k);
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    #1;
    while (reads < N_READS || caq_q.size() > 0 || caq_valid || ret_q.size() > 0) begin
      // ---- workload phases ----
      if (phase_left == 0) begin
        long_phase = $urandom_range(0, 1);
        phase_left = 300 * $urandom_range(1, 24);
      end
      if (busy_left == 0) begin
        busy = !busy;
        busy_left = busy ? $urandom_range(50, 400) : $urandom_range(50, 800);
      end
      busy_left--;
      // ---- new command into the controller ----
      mc_cmd_valid = 0;
      if (reads < N_READS && caq_q.size() < 24 && $urandom_range(0, 99) < RATE) begin
        if ($urandom_range(0, 9) == 0) begin
          mc_cmd_valid = 1; mc_cmd_write = 1;
          mc_cmd_line  = s_next[$urandom_range(0, SLOTS - 1)] + AW'($urandom_range(0, 2));
        end else begin
          // streams come in bursts: mostly the same stream as last time
          s = ($urandom_range(0, 99) < BURST) ? last_slot : $urandom_range(0, SLOTS - 1);
          last_slot = s;
          mc_cmd_valid = 1; mc_cmd_write = 0;
          mc_cmd_line  = s_next[s];
          s_next[s]++;
          if (--s_left[s] == 0) new_stream(s);
        end
      end
      // ---- CAQ head and DRAM ----
      caq_valid = caq_q.size() > 0;
      if (caq_valid) begin caq_line = caq_q[0].line; caq_write = caq_q[0].wr; end
      dram_cmd_ready = busy ? ($urandom_range(0, 7) == 0) : 1'b1;
      begin
        int occ;
        occ = 0;
        foreach (caq_q[i]) if (!caq_q[i].wr) occ++;
        rrq_occupancy = OCC_W'((occ > RRQ_DEPTH) ? RRQ_DEPTH : occ);
      end
      dram_rd_valid = 0;
      if (ret_q.size() > 0 && ret_q[0].due <= cyc) begin
        dram_rd_valid = 1; dram_rd_line = ret_q[0].line; dram_rd_prefetch = ret_q[0].pf;
        dram_rd_data = line_data(ret_q[0].line);
        void'(ret_q.pop_front());
      end
      #1;
      // ---- observe rd_before the edge ----
      caq_take  = caq_valid && caq_ready;
      dram_take = dram_cmd_valid && dram_cmd_ready;
      if (dram_take) begin
        if (dram_cmd_prefetch) begin
          check(!dram_cmd_write, "prefetch marked as write");
          check(was_read.exists(dram_cmd_line - AW'(1)) || was_read.exists(dram_cmd_line - AW'(2)),
                "prefetch of a line that follows no Read");
          ret_q.push_back('{line: dram_cmd_line, pf: 1, due: cyc + DRAM_LAT});
          if (!issue_t.exists(dram_cmd_line)) issue_t[dram_cmd_line] = cyc;
        end else begin
          check(caq_sent.size() > 0 && caq_sent[0].line == dram_cmd_line &&
                caq_sent[0].wr == dram_cmd_write, "regular command order at DRAM");
          if (caq_sent.size() > 0) void'(caq_sent.pop_front());
          if (!dram_cmd_write) ret_q.push_back('{line: dram_cmd_line, pf: 0, due: cyc + DRAM_LAT});
        end
      end
      if (dram_rd_valid && dram_rd_prefetch) fill_t[dram_rd_line] = cyc;
      // a Read or Write of a line ends what its earlier prefetches can serve
      armed = mc_cmd_valid && issue_t.exists(mc_cmd_line);
      armed_t = armed ? issue_t[mc_cmd_line] : -1;
      if (mc_cmd_valid) issue_t.delete(mc_cmd_line);
      // ---- clock edge ----
      @(posedge clk);
      #1;
      cyc++;
      rd_before = reads;
      if (caq_take) begin caq_sent.push_back(caq_q[0]); void'(caq_q.pop_front()); end
      if (mc_cmd_valid) begin
        if (mc_cmd_write) begin
          writes++;
          caq_q.push_back('{line: mc_cmd_line, wr: 1});
        end else begin
          reads++;
          was_read[mc_cmd_line] = 1;
        end
      end
      // prefetch buffer answer for this Read, one cycle after it entered
      if (mc_cmd_valid && !mc_cmd_write) begin
        check(pb_rsp_valid, "no prefetch buffer answer");
        if (pb_rsp_hit) begin
          check(pb_rsp_data == line_data(mc_cmd_line), "wrong data from the prefetch buffer");
          // a prefetch of the line was issued after its last Write and its
          // previous Read, and prefetched data has come back since
          check(armed && fill_t.exists(mc_cmd_line) && fill_t[mc_cmd_line] > armed_t,
                "hit on a line without fresh prefetched data");
        end else begin
          caq_q.push_back('{line: mc_cmd_line, wr: 0});
        end
      end
      mc_cmd_valid = 0;
      // ---- events ----
      for (int k = 0; k < 19; k++) ev_cnt[k] += int'(events[18 - k]);
      if (events.epoch_end) begin
        n_epochs++;
        reads_at_epoch_check(rd_before);
      end
      check(epoch_len >= EPOCH_MIN && epoch_len <= EPOCH_MAX && $onehot(epoch_len), "epoch length");
      if (phase_left > 0) phase_left--;
    end
    repeat (20) @(posedge clk);
    for (int k = 0; k < 19; k++) begin
      check(ev_cnt[k] > 0, {"mechanism never happened: ", ev_name[k]});
      $display("%-20s %0d", ev_name[k], ev_cnt[k]);
    end
    check(caq_sent.size() == 0, "regular commands lost");
    $display("reads %0d writes %0d epochs %0d cycles %0d", reads, writes, n_epochs, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reads counted by the prefetcher's histogram in one epoch: the Read that
  // entered at edge e reaches the histogram at edge e+1, whose epoch_end is
  // seen after it. So at epoch_end the epoch holds the Reads that entered up
  // to the previous edge.
  int epoch_len_seen;
  task automatic reads_at_epoch_check(int reads_before_this_edge);
    int n;
    n = reads_before_this_edge - reads_at_epoch;
    check(n == int'(epoch_len_seen), $sformatf("epoch of %0d Reads, length %0d", n, epoch_len_seen));
    reads_at_epoch = reads_before_this_edge;
  endtask

  always @(posedge clk) epoch_len_seen <= int'(epoch_len);

endmodule
