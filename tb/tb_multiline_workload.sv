// tb_multiline_workload: why the prefetcher fetches more than one line, and
// what the Queue Status Check costs and saves.
//
// Four prefetchers run side by side on the same Reads: MAX_L = 1, 2 and 3
// with the Queue Status Check enabled, and MAX_L = 2 with it disabled. Every
// other parameter is at its default. Each has its own DRAM model that takes a
// prefetch at once and returns its data DRAM_LAT cycles later.
//
// The workload is a run of streams of 8 ascending lines, one stream at a
// time, a Read every GAP cycles; GAP stays below the shortest stream
// lifetime, so the halving lifetimes never cut a stream. All streams have
// the same length, so once the first epoch has built a histogram, lht(1..8) are equal and lht(9) is 0:
// positions 1..6 ask for two lines (lht(i) < 2*lht(i+2)), position 7 for
// one and position 8 for none. A prefetch leaves for DRAM about 5 cycles
// after its Read; since 5 + DRAM_LAT is more than GAP but less than 2*GAP,
// the line right after a Read always arrives too late
// (the Read for it comes while the prefetch is still outstanding and cancels
// it), while the line two ahead arrives in time. So, per stream:
//   MAX_L = 1            no hit at all
//   MAX_L = 2 or 3       Reads 3..8 hit: 6 hits
// In the second phase the Read Reorder Queue is reported half full. The
// Queue Status Check then cuts every decision down to one line, which
// removes the hits as well, while the copy without the check keeps them.
// These counts, the number of multiline decisions and of Queue Status Check
// cuts, and the data of every hit are checked.
module tb_multiline_workload;
  import asd_pkg::*;

  localparam int AW = LINE_ADDR_W, DW = LINE_BITS;
  localparam int OCC_W = $clog2(RRQ_DEPTH + 1);
  localparam int DRAM_LAT = 14;
  localparam int GAP = 12;       // under the 16-cycle lifetime floor
  localparam int SLEN = 8;
  localparam int STREAMS = 128;       // per phase: 1024 Reads
  localparam int N = 4;
  localparam int ML  [N] = '{1, 2, 3, 2};
  localparam bit QSC [N] = '{1, 1, 1, 0};

  logic clk = 0, rst_n = 0;
  logic mc_cmd_valid = 0;
  logic [AW-1:0] mc_cmd_line = '0;
  logic [OCC_W-1:0] rrq_occupancy = '0;

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (1_000_000) @(posedge clk);
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
    for (int k = 0; k < DW / AW; k++) d[k*AW +: AW] = l + AW'(k * 3);
    return d;
  endfunction

  logic [AW-1:0] rd_line_q = '0;    // line of the Read one cycle ago
  always @(posedge clk) if (mc_cmd_valid) rd_line_q <= mc_cmd_line;

  for (genvar g = 0; g < N; g++) begin : gd
    logic pb_rsp_valid, pb_rsp_hit;
    logic [DW-1:0] pb_rsp_data;
    logic caq_ready;
    logic dram_cmd_valid, dram_cmd_write, dram_cmd_prefetch;
    logic [AW-1:0] dram_cmd_line;
    logic dram_rd_valid = 0;
    logic [AW-1:0] dram_rd_line = '0;
    logic [DW-1:0] dram_rd_data = '0;
    logic [EPOCH_W:0] epoch_len, epoch_reads;
    logic [$clog2(LPQ_DEPTH+1)-1:0] lpq_count;
    epoch_state_e epoch_state;
    asd_events_t events;

    asd_prefetcher #(.MAX_L(ML[g])) dut (
      .clk, .rst_n,
      .mc_cmd_valid, .mc_cmd_line, .mc_cmd_write(1'b0), .mc_cmd_tid(1'b0),
      .rrq_occupancy, .qsc_enable(QSC[g]),
      .pb_rsp_valid, .pb_rsp_hit, .pb_rsp_data,
      .caq_valid(1'b0), .caq_line('0), .caq_write(1'b0), .caq_ready,
      .dram_cmd_valid, .dram_cmd_line, .dram_cmd_write, .dram_cmd_prefetch,
      .dram_cmd_ready(1'b1),
      .dram_rd_valid, .dram_rd_line, .dram_rd_prefetch(1'b1), .dram_rd_data,
      .epoch_len, .epoch_reads, .lpq_count, .epoch_state, .events
    );

    typedef struct { logic [AW-1:0] line; longint due; } ret_t;
    ret_t   ret_q[$];
    longint cyc = 0;
    int hits = 0, multi = 0, cuts = 0, issued = 0;

    always @(posedge clk) begin
      cyc++;
      if (events.pf_multi)     multi++;
      if (events.qsc_suppress) cuts++;
      if (rst_n && dram_cmd_valid) begin
        issued++;
        check(dram_cmd_prefetch, "only prefetches reach DRAM here");
        ret_q.push_back('{dram_cmd_line, cyc + longint'(DRAM_LAT)});
      end
      if (pb_rsp_valid && pb_rsp_hit) begin
        hits++;
        check(pb_rsp_data == line_data(rd_line_q), "wrong data from the prefetch buffer");
      end
    end

    always @(negedge clk) begin
      dram_rd_valid = 0;
      if (ret_q.size() != 0 && ret_q[0].due <= cyc) begin
        dram_rd_valid = 1;
        dram_rd_line  = ret_q[0].line;
        dram_rd_data  = line_data(ret_q[0].line);
        void'(ret_q.pop_front());
      end
    end
  end

  logic [AW-1:0] base = 32'h0200_0000;
  int h0 [N], m0 [N], c0 [N];

  task automatic run_streams(int n);
    for (int s = 0; s < n; s++) begin
      for (int p = 0; p < SLEN; p++) begin
        mc_cmd_valid = 1;
        mc_cmd_line  = base + AW'(p);
        @(negedge clk);
        mc_cmd_valid = 0;
        repeat (GAP - 1) @(negedge clk);
      end
      base += 64;
    end
    repeat (2 * DRAM_LAT) @(negedge clk);
  endtask

  task automatic snapshot();
    h0 = '{gd[0].hits,  gd[1].hits,  gd[2].hits,  gd[3].hits};
    m0 = '{gd[0].multi, gd[1].multi, gd[2].multi, gd[3].multi};
    c0 = '{gd[0].cuts,  gd[1].cuts,  gd[2].cuts,  gd[3].cuts};
  endtask

  task automatic expect_phase(string ph, int eh [N], int em [N], int ec [N]);
    int h [N], m [N], c [N];
    h = '{gd[0].hits  - h0[0], gd[1].hits  - h0[1], gd[2].hits  - h0[2], gd[3].hits  - h0[3]};
    m = '{gd[0].multi - m0[0], gd[1].multi - m0[1], gd[2].multi - m0[2], gd[3].multi - m0[3]};
    c = '{gd[0].cuts  - c0[0], gd[1].cuts  - c0[1], gd[2].cuts  - c0[2], gd[3].cuts  - c0[3]};
    for (int g = 0; g < N; g++) begin
      $display("%s: MAX_L=%0d QSC=%0d  hits %0d of %0d Reads, multiline %0d, QSC cuts %0d",
               ph, ML[g], QSC[g], h[g], STREAMS * SLEN, m[g], c[g]);
      check(h[g] == eh[g], $sformatf("%s: hits of prefetcher %0d", ph, g));
      check(m[g] == em[g], $sformatf("%s: multiline decisions of prefetcher %0d", ph, g));
      check(c[g] == ec[g], $sformatf("%s: QSC cuts of prefetcher %0d", ph, g));
    end
  endtask

  localparam int S = STREAMS;

  initial begin
    repeat (4) @(negedge clk);
    rst_n = 1;
    repeat (4) @(negedge clk);
    // first epoch (1024 Reads): histogram only, nothing is prefetched
    snapshot();
    run_streams(S);
    expect_phase("warm-up", '{0, 0, 0, 0}, '{0, 0, 0, 0}, '{0, 0, 0, 0});
    // empty Read Reorder Queue: multiline prefetching turns late prefetches into hits
    snapshot();
    run_streams(S);
    expect_phase("RRQ empty", '{0, 6*S, 6*S, 6*S}, '{0, 6*S, 6*S, 6*S}, '{0, 0, 0, 0});
    // RRQ half full: the check cuts every decision to one line
    rrq_occupancy = OCC_W'(RRQ_DEPTH / 2);
    snapshot();
    run_streams(S);
    expect_phase("RRQ half full", '{0, 0, 0, 6*S}, '{0, 0, 0, 6*S}, '{0, 6*S, 6*S, 0});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
