// slh_similarity: decides whether two Stream Length Histograms are similar.
//
// Metric (from the design's description): normalise both histograms to the
// same number of Reads, sum the absolute differences of corresponding bars
// and divide by that number; the histograms are similar when this average
// difference is below a threshold. With bars a(k), b(k) and Read counts
// na = lht_a(1), nb = lht_b(1) the test is done without division as
//     256 * sum_k |a(k)*nb - b(k)*na|  <  THR_Q8 * na * nb .
// Bars come from the cumulative form: a(k) = lht_a(k) - lht_a(k+1).
// Own choices: the threshold (THR_Q8/256, default 0.25), the bar-per-cycle
// sequential evaluation, and the rule that an empty histogram is similar only
// to another empty one.
//
// Timing: start pulses once; the inputs must stay stable until done, which
// rises FS_LEN+1 clock edges after the edge that samples start, for one
// cycle, with a valid similar bit.
module slh_similarity
  import asd_pkg::*;
#(
  parameter int unsigned FS_LEN = FS,
  parameter int unsigned CW     = CNT_W,
  parameter int unsigned THR_Q8 = SIM_THR_Q8,
  localparam int unsigned IDX_W = $clog2(FS_LEN + 2),
  localparam int unsigned ACC_W = 2 * CW + IDX_W + 10
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic [FS_LEN:1][CW-1:0] lht_a,
  input  logic [FS_LEN:1][CW-1:0] lht_b,
  output logic                    busy,
  output logic                    done,
  output logic                    similar
);

  logic [IDX_W-1:0] idx_q;
  logic [ACC_W-1:0] acc_q;
  logic [CW-1:0]    bar_a, bar_b, na, nb;
  logic [2*CW-1:0]  pa, pb, diff;

  assign na = lht_a[1];
  assign nb = lht_b[1];

  always_comb begin
    bar_a = '0;
    bar_b = '0;
    for (int k = 1; k <= FS_LEN; k++) begin
      if (int'(idx_q) == k) begin
        bar_a = lht_a[k] - ((k < FS_LEN) ? lht_a[(k < FS_LEN) ? k + 1 : k] : '0);
        bar_b = lht_b[k] - ((k < FS_LEN) ? lht_b[(k < FS_LEN) ? k + 1 : k] : '0);
      end
    end
    pa   = bar_a * nb;
    pb   = bar_b * na;
    diff = (pa > pb) ? pa - pb : pb - pa;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      done    <= 1'b0;
      similar <= 1'b0;
      idx_q   <= '0;
      acc_q   <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy  <= 1'b1;
        idx_q <= IDX_W'(1);
        acc_q <= '0;
      end else if (busy) begin
        if (int'(idx_q) <= FS_LEN) begin
          acc_q <= acc_q + ACC_W'(diff);
          idx_q <= idx_q + 1'b1;
        end else begin
          busy <= 1'b0;
          done <= 1'b1;
          if (na == '0 || nb == '0)
            similar <= (na == nb);
          else
            similar <= (acc_q << 8) < ACC_W'(THR_Q8) * ACC_W'(na) * ACC_W'(nb);
        end
      end
    end
  end

endmodule
