// slh_histogram: Stream Length Histogram of the current epoch, kept in the
// cumulative form lht(i) = number of Reads that belong to streams of length
// i or longer (1 <= i <= FS; lht(i) = 0 for i > FS).
//
// How it counts: when a Read is the k-th element of its stream (k <= FS),
// the stream now has at least k elements, so lht(1..k-1) gain this one Read
// and lht(k) gains all k Reads of the stream. A Read of a stream longer than
// FS adds one to every lht(j). lht(1) is therefore the number of Reads of the
// epoch. Counters saturate. An epoch ends after epoch_len Reads: the current
// histogram moves to lht_prev (the one prefetch decisions use during the next
// epoch), lht_prev moves to lht_prev2, and counting restarts from zero. The
// epoch-based flow and the lht() form follow the design's description; the
// incremental update rule is this implementation's own. A stream that spans
// an epoch boundary puts its older Reads into the new epoch's lht(k) too.
//
// Interface: in_valid/in_pos come from the stream filter (in_pos = FS+1
// means longer than FS). epoch_end pulses for one cycle in the cycle the
// new lht_prev/lht_prev2 become visible. Both start at zero after reset.
module slh_histogram
  import asd_pkg::*;
#(
  parameter int unsigned FS_LEN = FS,
  parameter int unsigned CW     = CNT_W,
  parameter int unsigned EW     = EPOCH_W,
  localparam int unsigned POS_W = $clog2(FS_LEN + 2)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic [POS_W-1:0]         in_pos,
  input  logic [EW:0]              epoch_len,
  output logic [FS_LEN:1][CW-1:0]  lht_cur,
  output logic [FS_LEN:1][CW-1:0]  lht_prev,
  output logic [FS_LEN:1][CW-1:0]  lht_prev2,
  output logic [EW:0]              epoch_reads,
  output logic                     epoch_end
);

  logic [FS_LEN:1][CW-1:0] lht_next;
  logic                    last_read;

  function automatic logic [CW-1:0] sat_add(input logic [CW-1:0] a, input logic [CW-1:0] b);
    logic [CW:0] s;
    s = {1'b0, a} + {1'b0, b};
    return s[CW] ? '1 : s[CW-1:0];
  endfunction

  always_comb begin
    lht_next = lht_cur;
    for (int j = 1; j <= FS_LEN; j++) begin
      if (int'(in_pos) > j)       lht_next[j] = sat_add(lht_cur[j], CW'(1));
      else if (int'(in_pos) == j) lht_next[j] = sat_add(lht_cur[j], CW'(j));
    end
    last_read = in_valid && (epoch_reads + 1'b1 >= epoch_len);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lht_cur     <= '0;
      lht_prev    <= '0;
      lht_prev2   <= '0;
      epoch_reads <= '0;
      epoch_end   <= 1'b0;
    end else begin
      epoch_end <= last_read;
      if (last_read) begin
        lht_prev2   <= lht_prev;
        lht_prev    <= lht_next;
        lht_cur     <= '0;
        epoch_reads <= '0;
      end else if (in_valid) begin
        lht_cur     <= lht_next;
        epoch_reads <= epoch_reads + 1'b1;
      end
    end
  end

endmodule
