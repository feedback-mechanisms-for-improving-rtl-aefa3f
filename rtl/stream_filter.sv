// stream_filter: Read stream detection with length-based lifetimes.
//
// The filter holds SF_ENTRIES stream slots. Each slot remembers the last
// cache line of its stream, the stream's length so far and a lifetime
// counter that counts down every cycle; a slot whose counter reaches zero is
// free. A Read to line A continues the stream whose last line is A-1: its
// length grows by one and its counter is reloaded. A Read that continues no
// stream opens a new one of length 1 in a free slot, or, when none is free,
// in the slot with the least lifetime left.
//
// Length-based detection, as the design's description gives it: the reload
// value halves with every unit of stream length (t for a stream of length 1,
// t/2 for length 2, t/4 for length 3 ...). Own choices: the halving stops at
// MIN_LIFETIME so that long streams are not lost at once, streams are
// ascending only, the length count saturates at FS+1 (meaning "longer than
// the longest tracked length"), and a slot is replaced by least remaining
// lifetime.
//
// Threads: for processors running several hardware threads the slots are
// split evenly among THREADS threads, so that each thread tracks its own set
// of streams (the design's description doubles the filter for two threads).
// A Read tagged rd_tid only continues, takes or replaces a slot of its own
// thread. With THREADS = 1 (the default) rd_tid is ignored.
//
// Interface: one Read per cycle on rd_valid/rd_line/rd_tid. One cycle later
// out_valid/out_line/out_pos give the Read's position in its stream (1 for
// the first element). cont/evict pulse with out_valid for statistics.
module stream_filter
  import asd_pkg::*;
#(
  parameter int unsigned ENTRIES  = SF_ENTRIES,
  parameter int unsigned ADDR_W   = LINE_ADDR_W,
  parameter int unsigned FS_LEN   = FS,
  parameter int unsigned LIFE     = LIFETIME,
  parameter int unsigned MIN_LIFE = MIN_LIFETIME,
  parameter int unsigned THREADS  = SMT_THREADS,
  localparam int unsigned TID_W   = (THREADS > 1) ? $clog2(THREADS) : 1,
  localparam int unsigned POS_W   = $clog2(FS_LEN + 2),
  localparam int unsigned LIFE_W  = $clog2(LIFE + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              rd_valid,
  input  logic [ADDR_W-1:0] rd_line,
  input  logic [TID_W-1:0]  rd_tid,
  output logic              out_valid,
  output logic [ADDR_W-1:0] out_line,
  output logic [POS_W-1:0]  out_pos,
  output logic              out_cont,
  output logic              out_evict
);

  logic [ADDR_W-1:0] last_q  [ENTRIES];
  logic [POS_W-1:0]  len_q   [ENTRIES];
  logic [LIFE_W-1:0] timer_q [ENTRIES];

  localparam int unsigned PER_T = ENTRIES / THREADS;   // slots per thread
  localparam int unsigned IDX_W = $clog2(ENTRIES);
  if (ENTRIES % THREADS != 0) begin : g_bad_split
    $error("stream_filter: ENTRIES must be a multiple of THREADS");
  end

  logic                       hit, any_free;
  logic [$clog2(ENTRIES)-1:0] hit_idx, free_idx, victim_idx, sel_idx;
  logic [POS_W-1:0]           new_len;
  logic [LIFE_W-1:0]          new_life;
  logic [ENTRIES-1:0]         own;       // slots of the Read's thread

  // Reload value for a stream that has just reached length len.
  function automatic logic [LIFE_W-1:0] life_for(input logic [POS_W-1:0] len);
    logic [LIFE_W-1:0] l;
    l = LIFE_W'(LIFE);
    for (int k = 1; k <= FS_LEN + 1; k++)
      if (k < int'(len)) l = l >> 1;
    if (l < LIFE_W'(MIN_LIFE)) l = LIFE_W'(MIN_LIFE);
    return l;
  endfunction

  always_comb begin
    hit        = 1'b0;
    hit_idx    = '0;
    any_free   = 1'b0;
    free_idx   = '0;
    for (int e = 0; e < ENTRIES; e++)
      own[e] = (THREADS == 1) || (e / PER_T == int'(rd_tid));
    victim_idx = (THREADS == 1) ? '0 : IDX_W'(int'(rd_tid) * PER_T);
    for (int e = ENTRIES - 1; e >= 0; e--) begin
      if (own[e] && timer_q[e] != '0 && last_q[e] + ADDR_W'(1) == rd_line) begin
        hit     = 1'b1;
        hit_idx = e[$clog2(ENTRIES)-1:0];
      end
      if (own[e] && timer_q[e] == '0) begin
        any_free = 1'b1;
        free_idx = e[$clog2(ENTRIES)-1:0];
      end
    end
    for (int e = 0; e < ENTRIES; e++)
      if (own[e] && timer_q[e] < timer_q[victim_idx]) victim_idx = e[$clog2(ENTRIES)-1:0];
    sel_idx = hit ? hit_idx : (any_free ? free_idx : victim_idx);
    if (hit) new_len = (len_q[hit_idx] == POS_W'(FS_LEN + 1)) ? len_q[hit_idx]
                                                              : len_q[hit_idx] + POS_W'(1);
    else     new_len = POS_W'(1);
    new_life = life_for(new_len);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < ENTRIES; e++) begin
        last_q[e]  <= '0;
        len_q[e]   <= '0;
        timer_q[e] <= '0;
      end
      out_valid <= 1'b0;
      out_line  <= '0;
      out_pos   <= '0;
      out_cont  <= 1'b0;
      out_evict <= 1'b0;
    end else begin
      for (int e = 0; e < ENTRIES; e++) begin
        if (rd_valid && sel_idx == e[$clog2(ENTRIES)-1:0]) begin
          last_q[e]  <= rd_line;
          len_q[e]   <= new_len;
          timer_q[e] <= new_life;
        end else if (timer_q[e] != '0) begin
          timer_q[e] <= timer_q[e] - LIFE_W'(1);
        end
      end
      out_valid <= rd_valid;
      out_line  <= rd_line;
      out_pos   <= new_len;
      out_cont  <= rd_valid && hit;
      out_evict <= rd_valid && !hit && !any_free;
    end
  end

endmodule
