// asd_prefetcher: enhanced Adaptive Stream Detection (ASD) memory-side
// prefetcher, placed inside a memory controller between the caches and DRAM.
//
// Every Read entering the controller goes both to the controller's own
// queues and to the stream filter, which tells which element of its stream
// the Read is (length-based lifetimes). The SLH histogram counts, per epoch,
// how many Reads belong to streams of each length; at the end of an epoch
// the finished histogram steers prefetch decisions during the next one, and
// the similarity unit compares it with the histogram before it to let the
// epoch-length state machine grow, shrink or keep the epoch length. The
// prefetch generator applies lht(i) < 2*lht(i+s) to prefetch up to MAX_L next
// lines (one line only while the Read Reorder Queue is at least half full).
// Candidates already held or awaited in the prefetch buffer are dropped; the rest enter
// the Low Priority Queue, which the final scheduler drains into DRAM only
// when the CAQ has nothing to send. Each issued prefetch reserves a
// prefetch-buffer entry, which its returning data fills and which answers a
// later Read of that line. This structure is the
// one the design's description gives; the queues of the host controller
// (reorder queues, CAQ) and DRAM are outside and connect through ports.
//
// Interface (all valid/ready or one-cycle pulses, one command per cycle):
//   mc_cmd_*      Read/Write commands as they enter the memory controller;
//                 mc_cmd_tid names the issuing hardware thread (only the
//                 stream filter uses it, and only when THREADS > 1)
//   rrq_occupancy entries in use in the Read Reorder Queue
//   qsc_enable    enables the Queue Status Check
//   pb_rsp_*      one cycle after each Read: hit flag and data from the buffer
//   caq_*         head of the Centralized Arbiter Queue (regular commands)
//   dram_cmd_*    commands to DRAM, prefetches flagged
//   dram_rd_*     data returned by DRAM; prefetch returns fill the buffer
//   epoch_len, epoch_reads, epoch_state, lpq_count, events: status and
//                 one-cycle statistics pulses
// A Read's prefetches reach the LPQ three cycles after the Read.
module asd_prefetcher
  import asd_pkg::*;
#(
  parameter int unsigned ADDR_W   = LINE_ADDR_W,
  parameter int unsigned DATA_W   = LINE_BITS,
  parameter int unsigned FS_LEN   = FS,
  parameter int unsigned CW       = CNT_W,
  parameter int unsigned SF_N     = SF_ENTRIES,
  parameter int unsigned LIFE     = LIFETIME,
  parameter int unsigned MIN_LIFE = MIN_LIFETIME,
  parameter int unsigned MAX_L    = MAX_LINES,
  parameter int unsigned PB_N     = PB_BLOCKS,
  parameter int unsigned LPQ_N    = LPQ_DEPTH,
  parameter int unsigned RRQ_D    = RRQ_DEPTH,
  parameter int unsigned EP_MIN   = EPOCH_MIN,
  parameter int unsigned EP_MAX   = EPOCH_MAX,
  parameter int unsigned EP_INIT  = EPOCH_INIT,
  parameter int unsigned EW       = EPOCH_W,
  parameter int unsigned THR_Q8   = SIM_THR_Q8,
  parameter int unsigned THREADS  = SMT_THREADS,
  localparam int unsigned OCC_W   = $clog2(RRQ_D + 1),
  localparam int unsigned TID_W   = (THREADS > 1) ? $clog2(THREADS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              mc_cmd_valid,
  input  logic [ADDR_W-1:0] mc_cmd_line,
  input  logic              mc_cmd_write,
  input  logic [TID_W-1:0]  mc_cmd_tid,
  input  logic [OCC_W-1:0]  rrq_occupancy,
  input  logic              qsc_enable,
  output logic              pb_rsp_valid,
  output logic              pb_rsp_hit,
  output logic [DATA_W-1:0] pb_rsp_data,
  input  logic              caq_valid,
  input  logic [ADDR_W-1:0] caq_line,
  input  logic              caq_write,
  output logic              caq_ready,
  output logic              dram_cmd_valid,
  output logic [ADDR_W-1:0] dram_cmd_line,
  output logic              dram_cmd_write,
  output logic              dram_cmd_prefetch,
  input  logic              dram_cmd_ready,
  input  logic              dram_rd_valid,
  input  logic [ADDR_W-1:0] dram_rd_line,
  input  logic              dram_rd_prefetch,
  input  logic [DATA_W-1:0] dram_rd_data,
  output logic [EW:0]       epoch_len,
  output logic [EW:0]       epoch_reads,
  output logic [$clog2(LPQ_N+1)-1:0]  lpq_count,
  output epoch_state_e      epoch_state,
  output asd_events_t       events
);

  localparam int unsigned POS_W = $clog2(FS_LEN + 2);

  logic rd_in, wr_in;
  assign rd_in = mc_cmd_valid && !mc_cmd_write;
  assign wr_in = mc_cmd_valid &&  mc_cmd_write;

  // ---------------- stream filter ----------------
  logic              sf_valid, sf_cont, sf_evict;
  logic [ADDR_W-1:0] sf_line;
  logic [POS_W-1:0]  sf_pos;

  stream_filter #(
    .ENTRIES(SF_N), .ADDR_W(ADDR_W), .FS_LEN(FS_LEN), .LIFE(LIFE), .MIN_LIFE(MIN_LIFE),
    .THREADS(THREADS)
  ) u_sf (
    .clk, .rst_n,
    .rd_valid (rd_in),
    .rd_line  (mc_cmd_line),
    .rd_tid   (mc_cmd_tid),
    .out_valid(sf_valid),
    .out_line (sf_line),
    .out_pos  (sf_pos),
    .out_cont (sf_cont),
    .out_evict(sf_evict)
  );

  // ---------------- SLH and adaptive epoch length ----------------
  logic [FS_LEN:1][CW-1:0] lht_cur, lht_prev, lht_prev2;
  logic                    ep_end, sim_busy, sim_done, sim_similar;
  logic                    ep_grow, ep_shrink, ep_clamp;

  slh_histogram #(.FS_LEN(FS_LEN), .CW(CW), .EW(EW)) u_slh (
    .clk, .rst_n,
    .in_valid   (sf_valid),
    .in_pos     (sf_pos),
    .epoch_len  (epoch_len),
    .lht_cur    (lht_cur),
    .lht_prev   (lht_prev),
    .lht_prev2  (lht_prev2),
    .epoch_reads(epoch_reads),
    .epoch_end  (ep_end)
  );

  slh_similarity #(.FS_LEN(FS_LEN), .CW(CW), .THR_Q8(THR_Q8)) u_sim (
    .clk, .rst_n,
    .start  (ep_end),
    .lht_a  (lht_prev),
    .lht_b  (lht_prev2),
    .busy   (sim_busy),
    .done   (sim_done),
    .similar(sim_similar)
  );

  epoch_length_fsm #(.MIN_LEN(EP_MIN), .MAX_LEN(EP_MAX), .INIT_LEN(EP_INIT), .EW(EW)) u_ep (
    .clk, .rst_n,
    .res_valid  (sim_done),
    .res_similar(sim_similar),
    .epoch_len  (epoch_len),
    .state      (epoch_state),
    .grow       (ep_grow),
    .shrink     (ep_shrink),
    .clamped    (ep_clamp)
  );

  // ---------------- prefetch generation ----------------
  logic [MAX_L-1:0]  pg_valid, pb_probe_hit, lpq_enq;
  logic [ADDR_W-1:0] pg_line [MAX_L];
  logic              pg_single, pg_multi, pg_qsc;

  prefetch_generator #(
    .FS_LEN(FS_LEN), .CW(CW), .ADDR_W(ADDR_W), .MAX_L(MAX_L), .RRQ_D(RRQ_D)
  ) u_pg (
    .clk, .rst_n,
    .in_valid     (sf_valid),
    .in_line      (sf_line),
    .in_pos       (sf_pos),
    .lht          (lht_prev),
    .rrq_occupancy(rrq_occupancy),
    .qsc_enable   (qsc_enable),
    .pf_valid     (pg_valid),
    .pf_line      (pg_line),
    .single       (pg_single),
    .multi        (pg_multi),
    .qsc          (pg_qsc)
  );

  assign lpq_enq = pg_valid & ~pb_probe_hit;

  // ---------------- LPQ and final scheduler ----------------
  logic              lpq_valid, lpq_ready, lpq_dup, lpq_full, lpq_sq;
  logic [ADDR_W-1:0] lpq_line;
  logic              fs_pf_issue, fs_delayed;

  low_priority_queue #(.DEPTH(LPQ_N), .ENQ(MAX_L), .ADDR_W(ADDR_W)) u_lpq (
    .clk, .rst_n,
    .enq_valid(lpq_enq),
    .enq_line (pg_line),
    .sq_valid (mc_cmd_valid),
    .sq_line  (mc_cmd_line),
    .deq_valid(lpq_valid),
    .deq_line (lpq_line),
    .deq_ready(lpq_ready),
    .count    (lpq_count),
    .dup      (lpq_dup),
    .full_drop(lpq_full),
    .squashed (lpq_sq)
  );

  final_scheduler #(.ADDR_W(ADDR_W)) u_fsch (
    .clk, .rst_n,
    .caq_valid, .caq_line, .caq_write, .caq_ready,
    .lpq_valid, .lpq_line, .lpq_ready,
    .dram_cmd_valid, .dram_cmd_line, .dram_cmd_write, .dram_cmd_prefetch, .dram_cmd_ready,
    .pf_issue   (fs_pf_issue),
    .reg_delayed(fs_delayed)
  );

  // ---------------- prefetch buffer ----------------
  logic pb_evict;

  prefetch_buffer #(.BLOCKS(PB_N), .ADDR_W(ADDR_W), .DATA_W(DATA_W), .PROBES(MAX_L)) u_pb (
    .clk, .rst_n,
    .alloc_valid (fs_pf_issue),
    .alloc_line  (dram_cmd_line),
    .fill_valid  (dram_rd_valid && dram_rd_prefetch),
    .fill_line   (dram_rd_line),
    .fill_data   (dram_rd_data),
    .rd_valid    (rd_in),
    .rd_line     (mc_cmd_line),
    .wr_valid    (wr_in),
    .wr_line     (mc_cmd_line),
    .rsp_valid   (pb_rsp_valid),
    .rsp_hit     (pb_rsp_hit),
    .rsp_data    (pb_rsp_data),
    .probe_line  (pg_line),
    .probe_hit   (pb_probe_hit),
    .evict_unused(pb_evict)
  );

  // ---------------- statistics ----------------
  always_comb begin
    events                    = '0;
    events.stream_continue    = sf_cont;
    events.stream_alloc_evict = sf_evict;
    events.epoch_end          = ep_end;
    events.similar            = sim_done && sim_similar;
    events.dissimilar         = sim_done && !sim_similar;
    events.epoch_grow         = ep_grow;
    events.epoch_shrink       = ep_shrink;
    events.epoch_clamped      = ep_clamp;
    events.pf_single          = pg_single;
    events.pf_multi           = pg_multi;
    events.qsc_suppress       = pg_qsc;
    events.pf_in_buffer       = |(pg_valid & pb_probe_hit);
    events.lpq_dup            = lpq_dup;
    events.lpq_full           = lpq_full;
    events.lpq_squash         = lpq_sq;
    events.pf_issue           = fs_pf_issue;
    events.reg_delayed        = fs_delayed;
    events.pb_hit             = pb_rsp_hit;
    events.pb_evict_unused    = pb_evict;
  end

endmodule
