// tb_low_priority_queue: self-checking test of the Low Priority Queue.
//
// A reference queue kept here as a SystemVerilog queue applies the same
// rules each cycle: the head leaves when taken, entries whose line matches
// a regular command are squashed, and new prefetches are appended in lane
// order unless the line is already queued (or is the squashed line) or the
// queue is full. Random traffic on a small address range makes duplicates,
// squashes and full drops frequent; head, count and pulses are compared
// every cycle.
module tb_low_priority_queue;
  localparam int DEPTH = 4, ENQ = 2, AW = 8;
  localparam int CNT_B = $clog2(DEPTH + 1);

  logic clk = 0, rst_n = 0;
  logic [ENQ-1:0] enq_valid = '0;
  logic [AW-1:0] enq_line [ENQ];
  logic sq_valid = 0;
  logic [AW-1:0] sq_line = '0;
  logic deq_valid, deq_ready;
  logic [AW-1:0] deq_line;
  logic [CNT_B-1:0] count;
  logic dup, full_drop, squashed;
  int checks = 0, failures = 0;
  int n_dup = 0, n_full = 0, n_sq = 0, n_deq = 0;

  low_priority_queue #(.DEPTH(DEPTH), .ENQ(ENQ), .ADDR_W(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int q[$];

  initial begin
    bit e_dup, e_full, e_sq, take;
    for (int l = 0; l < ENQ; l++) enq_line[l] = '0;
    deq_ready = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    #1;
    for (int n = 0; n < 20000; n++) begin
      int nq[$];
      nq.delete();
      // drive
      for (int l = 0; l < ENQ; l++) begin
        enq_valid[l] = $urandom_range(0, 2) != 0;
        enq_line[l]  = AW'($urandom_range(0, 11));
      end
      sq_valid = $urandom_range(0, 3) == 0;
      sq_line  = AW'($urandom_range(0, 11));
      #1;
      // compare head and count before the edge
      checks++;
      if (deq_valid != (q.size() > 0) || (q.size() > 0 && int'(deq_line) != q[0]) ||
          int'(count) != q.size()) begin
        failures++;
        if (failures < 20) $display("FAIL n=%0d: head %0d/%0d count %0d, model size %0d head %0d",
                                    n, deq_valid, deq_line, count, q.size(), (q.size() > 0) ? q[0] : -1);
      end
      take = deq_valid && ($urandom_range(0, 2) == 0);
      deq_ready = take;
      // model
      e_dup = 0; e_full = 0; e_sq = 0;
      foreach (q[i]) begin
        if (i == 0 && take) begin
          n_deq++;
        end else if (sq_valid && q[i] == int'(sq_line)) begin
          e_sq = 1;
        end else nq.push_back(q[i]);
      end
      for (int l = 0; l < ENQ; l++) begin
        if (enq_valid[l]) begin
          bit present;
          present = sq_valid && enq_line[l] == sq_line;
          foreach (q[i]) if (q[i] == int'(enq_line[l])) present = 1;
          foreach (nq[i]) if (nq[i] == int'(enq_line[l])) present = 1;
          if (present) e_dup = 1;
          else if (nq.size() >= DEPTH) e_full = 1;
          else nq.push_back(int'(enq_line[l]));
        end
      end
      q = nq;
      @(posedge clk);
      #1;
      checks++;
      if (dup != e_dup || full_drop != e_full || squashed != e_sq) begin
        failures++;
        if (failures < 20) $display("FAIL n=%0d: pulses d%0d f%0d s%0d, expected d%0d f%0d s%0d",
                                    n, dup, full_drop, squashed, e_dup, e_full, e_sq);
      end
      n_dup += e_dup; n_full += e_full; n_sq += e_sq;
      deq_ready = 0;
    end
    checks++;
    if (n_dup == 0 || n_full == 0 || n_sq == 0 || n_deq == 0) begin
      failures++;
      $display("FAIL: not every event happened");
    end
    $display("dequeued %0d, duplicates %0d, full drops %0d, squashes %0d", n_deq, n_dup, n_full, n_sq);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
