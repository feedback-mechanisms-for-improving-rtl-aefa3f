// prefetch_buffer: storage for lines fetched by the memory-side prefetcher.
//
// BLOCKS fully associative entries, each a line address tag, a state
// (free, pending, valid) and one line of data. An entry is reserved when a
// prefetch is issued to DRAM (pending) and filled when its data returns
// (valid). Entries are reserved in round-robin order, so a line that waits
// too long is overwritten by newer prefetches; overwriting a pending or
// valid entry that no Read used is reported as an unused prefetch. A Read
// that finds a valid line is answered from the buffer and frees the entry
// (the line moves on to the caches). A Read that finds its line still
// pending frees the entry too: the Read goes to DRAM itself and the late
// data is dropped. A Write to a pending or valid line frees it, and a fill
// for a line that is no longer pending is dropped, so the buffer never
// returns data older than a Write. The buffer size (16 lines) and the
// overwriting of old prefetched data follow the design's description; the
// reservation at issue, round-robin replacement and the Read/Write rules are
// this implementation's own choices.
//
// Interface: alloc_*: a prefetch was issued to DRAM. fill_*: its data
// returns. rd_valid/rd_line: a Read looks up the buffer; rsp_valid/rsp_hit/
// rsp_data answer one cycle later. wr_valid/wr_line: a Write invalidates.
// probe_line[k]/probe_hit[k] are combinational lookups (pending or valid)
// used to avoid prefetching a line twice. A Read or Write in the same cycle
// as an alloc for its line cancels the alloc, as does a line already held.
module prefetch_buffer
  import asd_pkg::*;
#(
  parameter int unsigned BLOCKS = PB_BLOCKS,
  parameter int unsigned ADDR_W = LINE_ADDR_W,
  parameter int unsigned DATA_W = LINE_BITS,
  parameter int unsigned PROBES = MAX_LINES,
  localparam int unsigned IDX_W = (BLOCKS > 1) ? $clog2(BLOCKS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              alloc_valid,
  input  logic [ADDR_W-1:0] alloc_line,
  input  logic              fill_valid,
  input  logic [ADDR_W-1:0] fill_line,
  input  logic [DATA_W-1:0] fill_data,
  input  logic              rd_valid,
  input  logic [ADDR_W-1:0] rd_line,
  input  logic              wr_valid,
  input  logic [ADDR_W-1:0] wr_line,
  output logic              rsp_valid,
  output logic              rsp_hit,
  output logic [DATA_W-1:0] rsp_data,
  input  logic [ADDR_W-1:0] probe_line [PROBES],
  output logic [PROBES-1:0] probe_hit,
  output logic              evict_unused
);

  logic [ADDR_W-1:0] tag_q  [BLOCKS];
  logic [BLOCKS-1:0] vld_q;    // data present
  logic [BLOCKS-1:0] pend_q;   // reserved, data not yet returned
  logic [DATA_W-1:0] data_q [BLOCKS];
  logic [IDX_W-1:0]  rr_q;

  logic              rd_hit, do_alloc;
  logic [IDX_W-1:0]  rd_idx;
  logic [BLOCKS-1:0] rd_kill, wr_kill, fill_match, alloc_match;

  always_comb begin
    rd_hit      = 1'b0;
    rd_idx      = '0;
    for (int b = 0; b < BLOCKS; b++) begin
      if (vld_q[b] && tag_q[b] == rd_line) begin
        rd_hit = 1'b1;
        rd_idx = IDX_W'(b);
      end
      rd_kill[b]     = rd_valid && (vld_q[b] || pend_q[b]) && tag_q[b] == rd_line;
      wr_kill[b]     = wr_valid && (vld_q[b] || pend_q[b]) && tag_q[b] == wr_line;
      fill_match[b]  = fill_valid && pend_q[b] && tag_q[b] == fill_line;
      alloc_match[b] = (vld_q[b] || pend_q[b]) && tag_q[b] == alloc_line;
    end
    do_alloc = alloc_valid && !(wr_valid && wr_line == alloc_line) &&
               !(rd_valid && rd_line == alloc_line) && (alloc_match == '0);
    for (int p = 0; p < PROBES; p++) begin
      probe_hit[p] = 1'b0;
      for (int b = 0; b < BLOCKS; b++)
        if ((vld_q[b] || pend_q[b]) && tag_q[b] == probe_line[p]) probe_hit[p] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld_q        <= '0;
      pend_q       <= '0;
      rr_q         <= '0;
      rsp_valid    <= 1'b0;
      rsp_hit      <= 1'b0;
      rsp_data     <= '0;
      evict_unused <= 1'b0;
      for (int b = 0; b < BLOCKS; b++) begin
        tag_q[b]  <= '0;
        data_q[b] <= '0;
      end
    end else begin
      rsp_valid    <= rd_valid;
      rsp_hit      <= rd_valid && rd_hit;
      rsp_data     <= (rd_valid && rd_hit) ? data_q[rd_idx] : '0;
      evict_unused <= do_alloc && (vld_q[rr_q] || pend_q[rr_q]) && !rd_kill[rr_q] && !wr_kill[rr_q];
      for (int b = 0; b < BLOCKS; b++) begin
        if (fill_match[b]) begin
          data_q[b] <= fill_data;
          vld_q[b]  <= 1'b1;
          pend_q[b] <= 1'b0;
        end
        if (rd_kill[b] || wr_kill[b]) begin
          vld_q[b]  <= 1'b0;
          pend_q[b] <= 1'b0;
        end
      end
      if (do_alloc) begin
        tag_q[rr_q]  <= alloc_line;
        vld_q[rr_q]  <= 1'b0;
        pend_q[rr_q] <= 1'b1;
        rr_q         <= (int'(rr_q) == BLOCKS - 1) ? '0 : rr_q + 1'b1;
      end
    end
  end

  // a line is never both pending and valid
  a_state: assert property (@(posedge clk) disable iff (!rst_n) (vld_q & pend_q) == '0);

endmodule
