// tb_slh_similarity: self-checking test of the SLH similarity metric.
//
// Each case builds two histograms from random bars, and the expected answer
// is computed here in floating point straight from the metric's definition:
// average difference = sum_k |a(k)/na - b(k)/nb|, similar when below
// THR_Q8/256. Cases that land within 1e-9 of the threshold are skipped.
// Fixed cases: identical, proportional (similar after normalisation),
// disjoint (dissimilar), and empty histograms. The latency from start to
// done is checked on every case.
module tb_slh_similarity;
  localparam int FSL = 8, CW = 16, THR = 64;

  logic clk = 0, rst_n = 0;
  logic start = 0;
  logic [FSL:1][CW-1:0] lht_a, lht_b;
  logic busy, done, similar;
  int checks = 0, failures = 0, n_sim = 0, n_dis = 0;

  slh_similarity #(.FS_LEN(FSL), .CW(CW), .THR_Q8(THR)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int bar_a [FSL+1];
  int bar_b [FSL+1];

  task automatic build();
    int sa = 0, sb = 0;
    for (int k = FSL; k >= 1; k--) begin
      sa += bar_a[k]; sb += bar_b[k];
      lht_a[k] = CW'(sa);
      lht_b[k] = CW'(sb);
    end
  endtask

  task automatic run_case(int force_exp);
    real na, nb, avg;
    int exp_sim, lat;
    na = 0; nb = 0; avg = 0;
    for (int k = 1; k <= FSL; k++) begin na += bar_a[k]; nb += bar_b[k]; end
    if (na == 0 || nb == 0) exp_sim = (na == nb);
    else begin
      for (int k = 1; k <= FSL; k++) begin
        real d;
        d = bar_a[k] / na - bar_b[k] / nb;
        avg += (d < 0) ? -d : d;
      end
      exp_sim = (avg < THR / 256.0);
      if ((avg - THR / 256.0) < 1e-9 && (THR / 256.0 - avg) < 1e-9) exp_sim = -1;
    end
    if (force_exp >= 0 && exp_sim != force_exp) begin
      failures++;
      $display("FAIL: test case construction (expected %0d, model %0d)", force_exp, exp_sim);
    end
    build();
    start <= 1;
    @(posedge clk);
    start <= 0;
    lat = 0;
    do begin
      @(posedge clk); #1; lat++;
    end while (!done && lat < 100);
    checks++;
    if (lat != FSL + 1) begin
      failures++;
      $display("FAIL: latency %0d, expected %0d", lat, FSL + 1);
    end
    if (exp_sim >= 0) begin
      checks++;
      if (similar != exp_sim[0]) begin
        failures++;
        if (failures < 20) $display("FAIL: similar=%0d expected %0d (avg %f)", similar, exp_sim, avg);
      end
      if (exp_sim == 1) n_sim++; else n_dis++;
    end
    @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // identical
    for (int k = 1; k <= FSL; k++) begin bar_a[k] = 10 * k; bar_b[k] = 10 * k; end
    run_case(1);
    // proportional: one epoch twice as long
    for (int k = 1; k <= FSL; k++) begin bar_a[k] = 7 + k; bar_b[k] = 2 * (7 + k); end
    run_case(1);
    // disjoint
    for (int k = 1; k <= FSL; k++) begin bar_a[k] = (k <= 2) ? 100 : 0; bar_b[k] = (k > 2) ? 100 : 0; end
    run_case(0);
    // empty against empty, empty against non-empty
    for (int k = 1; k <= FSL; k++) begin bar_a[k] = 0; bar_b[k] = 0; end
    run_case(1);
    bar_b[1] = 5;
    run_case(0);
    // random, from near-identical to very different
    for (int n = 0; n < 600; n++) begin
      int noise;
      noise = $urandom_range(0, 40);
      for (int k = 1; k <= FSL; k++) begin
        bar_a[k] = $urandom_range(0, 300);
        bar_b[k] = bar_a[k] + $urandom_range(0, noise * 3) ;
        if ($urandom_range(0, 1)) bar_b[k] = bar_b[k] * 2;
      end
      run_case(-1);
    end
    checks++;
    if (n_sim < 20 || n_dis < 20) begin
      failures++;
      $display("FAIL: random cases did not cover both outcomes (%0d/%0d)", n_sim, n_dis);
    end
    $display("similar %0d, dissimilar %0d", n_sim, n_dis);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
