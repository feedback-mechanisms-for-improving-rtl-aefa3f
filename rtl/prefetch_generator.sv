// prefetch_generator: probabilistic, variable-length prefetch decision.
//
// For a Read that is the i-th element of its stream, prefetching s more
// lines pays off when the Read is more likely to belong to a stream longer
// than i+s-1 than to one of length i..i+s-1. With the cumulative histogram
// lht() of the previous epoch this reduces to
//     lht(i) < 2 * lht(i+s)        (lht(j) = 0 for j > FS)
// and the generator prefetches the largest count s <= MAX_L for which the
// test holds for every s' in 1..s. A count of one is the single-line
// decision of the original scheme. Queue Status Check: when the Read
// Reorder Queue is at least half full the count is cut to one line. Both
// rules follow the design's description. Own choices: the prefetched lines
// are the next ascending lines i.e. Read line + 1 .. + s, and a Read longer
// than FS never prefetches (its lht() is zero).
//
// Interface: in_valid/in_line/in_pos come from the stream filter. One cycle
// later pf_valid[k] asks for line in_line+k+1 (k = 0..MAX_L-1); pf_valid is
// filled from bit 0 up. multi/single/qsc are one-cycle statistics pulses.
module prefetch_generator
  import asd_pkg::*;
#(
  parameter int unsigned FS_LEN  = FS,
  parameter int unsigned CW      = CNT_W,
  parameter int unsigned ADDR_W  = LINE_ADDR_W,
  parameter int unsigned MAX_L   = MAX_LINES,
  parameter int unsigned RRQ_D   = RRQ_DEPTH,
  localparam int unsigned POS_W  = $clog2(FS_LEN + 2),
  localparam int unsigned OCC_W  = $clog2(RRQ_D + 1)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic [ADDR_W-1:0]       in_line,
  input  logic [POS_W-1:0]        in_pos,
  input  logic [FS_LEN:1][CW-1:0] lht,
  input  logic [OCC_W-1:0]        rrq_occupancy,
  input  logic                    qsc_enable,
  output logic [MAX_L-1:0]        pf_valid,
  output logic [ADDR_W-1:0]       pf_line [MAX_L],
  output logic                    single,
  output logic                    multi,
  output logic                    qsc
);

  logic [MAX_L-1:0] ok;
  logic [CW-1:0]    lht_i;
  logic             busy_rrq;

  // lht(j), zero outside 1..FS.
  function automatic logic [CW-1:0] lht_at(input logic [FS_LEN:1][CW-1:0] h, input int j);
    logic [CW-1:0] v;
    v = '0;
    for (int k = 1; k <= FS_LEN; k++)
      if (k == j) v = h[k];
    return v;
  endfunction

  always_comb begin
    lht_i    = lht_at(lht, int'(in_pos));
    busy_rrq = qsc_enable && (2 * int'(rrq_occupancy) >= int'(RRQ_D));
    for (int s = 1; s <= MAX_L; s++) begin
      ok[s-1] = in_valid && ({1'b0, lht_i} < {lht_at(lht, int'(in_pos) + s), 1'b0});
      if (s > 1) ok[s-1] = ok[s-1] && ok[s-2] && !busy_rrq;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pf_valid <= '0;
      single   <= 1'b0;
      multi    <= 1'b0;
      qsc      <= 1'b0;
      for (int k = 0; k < MAX_L; k++) pf_line[k] <= '0;
    end else begin
      pf_valid <= ok;
      for (int k = 0; k < MAX_L; k++) pf_line[k] <= in_line + ADDR_W'(k + 1);
      single <= ok[0] && (MAX_L == 1 || !ok[MAX_L > 1 ? 1 : 0]);
      multi  <= (MAX_L > 1) && ok[MAX_L > 1 ? 1 : 0];
      // the histogram would have allowed more lines than the busy queue permits
      qsc    <= (MAX_L > 1) && busy_rrq && ok[0] && in_valid &&
                ({1'b0, lht_i} < {lht_at(lht, int'(in_pos) + 2), 1'b0});
    end
  end

endmodule
