// low_priority_queue: the Low Priority Queue (LPQ) for prefetch commands.
//
// Prefetch commands wait here, oldest first, until the final scheduler takes
// one. A regular Read or Write to a line that is still queued makes that
// prefetch useless (the demand request already goes to DRAM), so the entry
// is squashed. Both behaviours follow the design's description. Own choices:
// the depth, an incoming prefetch is dropped when the queue is full or the
// line is already queued, and up to ENQ prefetches can enter per cycle.
//
// Implementation: a collapsing queue. Entry 0 is the oldest. Every cycle the
// dequeued and squashed entries are removed, the survivors close up in order
// and the accepted new prefetches are appended behind them.
//
// Interface: enq_valid/enq_line (ENQ lanes, lane 0 first); sq_valid/sq_line
// squash; deq_valid/deq_line is the head and is removed when deq_ready is
// high. Status pulses dup/full_drop/squashed count dropped and squashed
// prefetches of that cycle.
module low_priority_queue
  import asd_pkg::*;
#(
  parameter int unsigned DEPTH  = LPQ_DEPTH,
  parameter int unsigned ENQ    = MAX_LINES,
  parameter int unsigned ADDR_W = LINE_ADDR_W,
  localparam int unsigned CNT_B = $clog2(DEPTH + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ENQ-1:0]    enq_valid,
  input  logic [ADDR_W-1:0] enq_line [ENQ],
  input  logic              sq_valid,
  input  logic [ADDR_W-1:0] sq_line,
  output logic              deq_valid,
  output logic [ADDR_W-1:0] deq_line,
  input  logic              deq_ready,
  output logic [CNT_B-1:0]  count,
  output logic              dup,
  output logic              full_drop,
  output logic              squashed
);

  logic [ADDR_W-1:0] line_q [DEPTH];
  logic [DEPTH-1:0]  vld_q;
  logic [ADDR_W-1:0] line_n [DEPTH];
  logic [DEPTH-1:0]  vld_n;
  logic              dup_n, full_n, sq_n;

  assign deq_valid = vld_q[0];
  assign deq_line  = line_q[0];

  always_comb begin
    int w;
    logic present;
    w       = 0;
    present = 1'b0;
    dup_n   = 1'b0;
    full_n = 1'b0;
    sq_n  = 1'b0;
    for (int i = 0; i < DEPTH; i++) begin
      line_n[i] = '0;
      vld_n[i]  = 1'b0;
    end
    // survivors, in age order
    for (int i = 0; i < DEPTH; i++) begin
      if (vld_q[i]) begin
        if (i == 0 && deq_ready) begin
          // taken by the scheduler
        end else if (sq_valid && line_q[i] == sq_line) begin
          sq_n = 1'b1;
        end else begin
          line_n[w] = line_q[i];
          vld_n[w]  = 1'b1;
          w++;
        end
      end
    end
    // new prefetches
    for (int l = 0; l < ENQ; l++) begin
      if (enq_valid[l]) begin
        present = sq_valid && enq_line[l] == sq_line;
        for (int i = 0; i < DEPTH; i++)
          if (vld_q[i] && line_q[i] == enq_line[l]) present = 1'b1;
        for (int i = 0; i < DEPTH; i++)
          if (vld_n[i] && line_n[i] == enq_line[l]) present = 1'b1;
        if (present) begin
          dup_n = 1'b1;
        end else if (w >= DEPTH) begin
          full_n = 1'b1;
        end else begin
          line_n[w] = enq_line[l];
          vld_n[w]  = 1'b1;
          w++;
        end
      end
    end
  end

  always_comb begin
    count = '0;
    for (int i = 0; i < DEPTH; i++) count = count + CNT_B'(vld_q[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld_q     <= '0;
      dup       <= 1'b0;
      full_drop <= 1'b0;
      squashed  <= 1'b0;
      for (int i = 0; i < DEPTH; i++) line_q[i] <= '0;
    end else begin
      vld_q     <= vld_n;
      dup       <= dup_n;
      full_drop <= full_n;
      squashed  <= sq_n;
      for (int i = 0; i < DEPTH; i++) line_q[i] <= line_n[i];
    end
  end

  // the scheduler only takes a valid head
  a_deq_valid: assert property (@(posedge clk) disable iff (!rst_n) deq_ready |-> deq_valid);

endmodule
