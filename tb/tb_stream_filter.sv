// tb_stream_filter: self-checking test of the stream filter.
//
// Directed part: stream growth, the halving lifetimes (gaps of up to L
// cycles still continue a stream whose reload was L, L+1 do not), the
// lifetime floor, length saturation and replacement of the slot with the
// least lifetime left. Random part: a reference model written here from the
// block's specification is run side by side on random Reads that favour
// short streams. A second filter, split between two hardware threads, is
// checked for thread separation (a Read never continues, takes or replaces
// another thread's slot), directed and then against a thread-aware model.
module tb_stream_filter;
  localparam int ENT = 4, FSL = 6, LIFE = 64, MINL = 4, AW = 16;
  localparam int POS_W = $clog2(FSL + 2);

  logic clk = 0, rst_n = 0;
  logic rd_valid = 0;
  logic [AW-1:0] rd_line = '0;
  logic out_valid, out_cont, out_evict;
  logic [AW-1:0] out_line;
  logic [POS_W-1:0] out_pos;
  logic [0:0] rd_tid = '0;
  int checks = 0, failures = 0;

  stream_filter #(.ENTRIES(ENT), .ADDR_W(AW), .FS_LEN(FSL), .LIFE(LIFE), .MIN_LIFE(MINL)) dut (.*);

  // two-thread filter: slots 0..3 belong to thread 0, 4..7 to thread 1
  localparam int ENT2 = 8, PER_T = 4;
  logic t_valid = 0;
  logic [AW-1:0] t_line = '0;
  logic [0:0] t_tid = '0;
  logic t_out_valid, t_out_cont, t_out_evict;
  logic [AW-1:0] t_out_line;
  logic [POS_W-1:0] t_out_pos;

  stream_filter #(.ENTRIES(ENT2), .ADDR_W(AW), .FS_LEN(FSL), .LIFE(LIFE), .MIN_LIFE(MINL),
                  .THREADS(2)) dut2 (
    .clk, .rst_n, .rd_valid(t_valid), .rd_line(t_line), .rd_tid(t_tid),
    .out_valid(t_out_valid), .out_line(t_out_line), .out_pos(t_out_pos),
    .out_cont(t_out_cont), .out_evict(t_out_evict));

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- reference model ----
  int m_last [ENT];
  int m_len  [ENT];
  int m_tmr  [ENT];

  function automatic int life_of(int len);
    int l = LIFE;
    for (int k = 1; k < len; k++) l = l / 2;
    return (l < MINL) ? MINL : l;
  endfunction

  // returns expected position; updates the model for one cycle
  function automatic int model_step(bit v, int line);
    int pos = 0, sel = -1, free = -1, vic = 0;
    if (v) begin
      for (int e = 0; e < ENT; e++)
        if (sel < 0 && m_tmr[e] != 0 && ((m_last[e] + 1) % (1 << AW)) == line) sel = e;
      if (sel >= 0) begin
        pos = (m_len[sel] == FSL + 1) ? FSL + 1 : m_len[sel] + 1;
      end else begin
        for (int e = 0; e < ENT; e++) if (free < 0 && m_tmr[e] == 0) free = e;
        if (free < 0) begin
          for (int e = 1; e < ENT; e++) if (m_tmr[e] < m_tmr[vic]) vic = e;
          free = vic;
        end
        sel = free;
        pos = 1;
      end
    end
    for (int e = 0; e < ENT; e++) begin
      if (v && e == sel) begin
        m_last[e] = line; m_len[e] = pos; m_tmr[e] = life_of(pos);
      end else if (m_tmr[e] != 0) m_tmr[e]--;
    end
    return pos;
  endfunction

  int exp_pos;
  bit exp_v;

  // thread-aware model of the two-thread filter
  int t_last [ENT2];
  int t_len  [ENT2];
  int t_tmr  [ENT2];

  function automatic int model2_step(bit v, int line, int tid);
    int pos = 0, sel = -1, free = -1, vic = tid * PER_T;
    if (v) begin
      for (int e = tid * PER_T; e < (tid + 1) * PER_T; e++)
        if (sel < 0 && t_tmr[e] != 0 && ((t_last[e] + 1) % (1 << AW)) == line) sel = e;
      if (sel >= 0) begin
        pos = (t_len[sel] == FSL + 1) ? FSL + 1 : t_len[sel] + 1;
      end else begin
        for (int e = tid * PER_T; e < (tid + 1) * PER_T; e++)
          if (free < 0 && t_tmr[e] == 0) free = e;
        if (free < 0) begin
          for (int e = tid * PER_T; e < (tid + 1) * PER_T; e++)
            if (t_tmr[e] < t_tmr[vic]) vic = e;
          free = vic;
        end
        sel = free;
        pos = 1;
      end
    end
    for (int e = 0; e < ENT2; e++) begin
      if (v && e == sel) begin
        t_last[e] = line; t_len[e] = pos; t_tmr[e] = life_of(pos);
      end else if (t_tmr[e] != 0) t_tmr[e]--;
    end
    return pos;
  endfunction

  task automatic t_read(int line, int tid, int want);
    int mp;
    t_valid <= 1; t_line <= AW'(line); t_tid <= 1'(tid);
    mp = model2_step(1, line, tid);
    @(posedge clk);
    t_valid <= 0;
    #1;
    checks++;
    if (!t_out_valid || int'(t_out_pos) != want || mp != want) begin
      failures++;
      $display("FAIL thread %0d line %0d: pos %0d, model %0d, expected %0d",
               tid, line, t_out_pos, mp, want);
    end
  endtask

  task automatic t_idle(int n);
    repeat (n) begin
      void'(model2_step(0, 0, 0));
      @(posedge clk);
    end
  endtask

  task automatic read_line(int line, int want);
    rd_valid <= 1; rd_line <= AW'(line);
    exp_pos = model_step(1, line);
    @(posedge clk);
    rd_valid <= 0;
    #1;
    checks++;
    if (!out_valid || int'(out_pos) != want || int'(out_line) != line) begin
      failures++;
      $display("FAIL line %0d: pos %0d, expected %0d", line, out_pos, want);
    end
    if (want != exp_pos) begin
      failures++;
      $display("model disagrees with directed expectation at line %0d", line);
    end
  endtask

  task automatic idle(int n);
    repeat (n) begin
      void'(model_step(0, 0));
      @(posedge clk);
    end
  endtask

  initial begin
    for (int e = 0; e < ENT; e++) begin m_last[e] = 0; m_len[e] = 0; m_tmr[e] = 0; end
    for (int e = 0; e < ENT2; e++) begin t_last[e] = 0; t_len[e] = 0; t_tmr[e] = 0; end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // growth of a stream
    read_line(100, 1); read_line(101, 2); read_line(102, 3);
    idle(LIFE);  // everything expires (longest reload is LIFE)
    // a stream reloaded with L waits L cycles: gap L continues, L+1 does not
    read_line(200, 1); idle(LIFE - 1); read_line(201, 2);  // gap = t
    idle(LIFE / 2 - 1); read_line(202, 3);                 // gap = t/2
    idle(LIFE / 4); read_line(203, 1);                     // gap = t/4 + 1 after length 3: expired
    idle(LIFE);
    // floor: length 5 reloads LIFE/16 = 4 = MINL, length 6 would be 2 -> 4
    read_line(300, 1); read_line(301, 2); read_line(302, 3); read_line(303, 4);
    read_line(304, 5); idle(MINL - 1); read_line(305, 6);
    idle(MINL - 1); read_line(306, 7);                     // FSL+1 = 7
    idle(MINL - 1); read_line(307, 7);                     // saturates
    idle(MINL); read_line(308, 1);                         // floor is MINL cycles
    idle(LIFE);
    // replacement: 4 live streams, 5th displaces the one with least lifetime
    read_line(400, 1); read_line(401, 2);                  // slot A reload 32
    read_line(500, 1); read_line(600, 1); read_line(700, 1);
    read_line(800, 1);                                     // displaces slot A (least left)
    checks++;
    if (!out_evict) begin failures++; $display("FAIL: no eviction reported"); end
    read_line(402, 1);                                     // stream 400 is gone
    read_line(701, 2);                                     // younger streams survive
    idle(LIFE);
    // random phase against the model
    for (int n = 0; n < 4000; n++) begin
      int line;
      bit v;
      v = ($urandom_range(0, 3) != 0);
      line = $urandom_range(0, 3) == 0 ? $urandom_range(0, 2000) : 0;
      if (line == 0) begin
        // continue a random live stream
        int e = $urandom_range(0, ENT - 1);
        line = (m_last[e] + 1) % (1 << AW);
      end
      rd_valid <= v; rd_line <= AW'(line);
      exp_v = v;
      exp_pos = model_step(v, line);
      @(posedge clk);
      #1;
      if (exp_v) begin
        checks++;
        if (!out_valid || int'(out_pos) != exp_pos) begin
          failures++;
          if (failures < 10) $display("FAIL random %0d: line %0d pos %0d exp %0d", n, line, out_pos, exp_pos);
        end
      end
    end
    rd_valid <= 0;
    // ---- two threads ----
    t_idle(LIFE);
    t_read(100, 0, 1);
    t_read(101, 1, 1);             // thread 1 does not continue thread 0's stream
    t_read(101, 0, 2);             // thread 0 does
    t_read(102, 1, 2);             // and thread 1 continues its own
    t_read(500, 1, 1); t_read(600, 1, 1);
    t_read(700, 1, 1);
    t_read(800, 1, 1);             // thread 1's four slots are full: replaces its own
    checks++;
    if (!t_out_evict) begin failures++; $display("FAIL: no eviction in thread 1"); end
    t_read(102, 0, 3);             // thread 0's stream was not touched
    t_idle(LIFE);
    for (int n = 0; n < 4000; n++) begin
      int line, tid, mp;
      bit v;
      v   = ($urandom_range(0, 3) != 0);
      tid = $urandom_range(0, 1);
      line = $urandom_range(0, 3) == 0 ? $urandom_range(0, 300) : 0;
      if (line == 0)               // continue a live stream of either thread
        line = (t_last[$urandom_range(0, ENT2 - 1)] + 1) % (1 << AW);
      t_valid <= v; t_line <= AW'(line); t_tid <= 1'(tid);
      mp = model2_step(v, line, tid);
      @(posedge clk);
      #1;
      if (v) begin
        checks++;
        if (!t_out_valid || int'(t_out_pos) != mp) begin
          failures++;
          if (failures < 10) $display("FAIL two-thread random %0d: pos %0d exp %0d", n, t_out_pos, mp);
        end
      end
    end
    t_valid <= 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
