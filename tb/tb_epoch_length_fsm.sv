// tb_epoch_length_fsm: self-checking test of the adaptive epoch-length
// state machine.
//
// The reference here describes the machine by its rules rather than by a
// state table: a good state remembers its direction and holds on similar
// results; a dissimilar result always turns the direction round and takes
// one step; a similar result after a step takes a second step in the same
// direction, and a similar result after two steps reaches the good state of
// that direction. Lengths stay within 256..8192 with steps that would leave
// the range ignored. A directed sequence and 3000 random results are checked
// for state, length and the grow/shrink/clamp pulses.
module tb_epoch_length_fsm;
  import asd_pkg::*;
  localparam int EW = 14;

  logic clk = 0, rst_n = 0;
  logic res_valid = 0, res_similar = 0;
  logic [EW:0] epoch_len;
  epoch_state_e state;
  logic grow, shrink, clamped;
  int checks = 0, failures = 0;
  int n_grow = 0, n_shrink = 0, n_clamp = 0;

  epoch_length_fsm #(.MIN_LEN(256), .MAX_LEN(8192), .INIT_LEN(1024), .EW(EW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: good flag, direction (+1 grow, -1 shrink), steps taken
  bit m_good = 1;
  int m_dir = 1, m_steps = 0, m_len = 1024;

  function automatic epoch_state_e m_state();
    if (m_good) return (m_dir > 0) ? EP_GOOD_INC : EP_GOOD_DEC;
    if (m_dir > 0) return (m_steps == 1) ? EP_INC1 : EP_INC2;
    return (m_steps == 1) ? EP_DEC1 : EP_DEC2;
  endfunction

  task automatic step(bit s);
    int act, nl;
    bit e_grow, e_shrink, e_clamp;
    act = 0;
    if (m_good) begin
      if (!s) begin m_good = 0; m_dir = -m_dir; m_steps = 1; act = m_dir; end
    end else if (!s) begin
      m_dir = -m_dir; m_steps = 1; act = m_dir;
    end else if (m_steps == 1) begin
      m_steps = 2; act = m_dir;
    end else begin
      m_good = 1; m_steps = 0;
    end
    e_grow = 0; e_shrink = 0; e_clamp = 0;
    if (act != 0) begin
      nl = (act > 0) ? m_len * 2 : m_len / 2;
      if (nl < 256 || nl > 8192) e_clamp = 1;
      else begin
        m_len = nl;
        if (act > 0) e_grow = 1; else e_shrink = 1;
      end
    end
    res_valid <= 1; res_similar <= s;
    @(posedge clk);
    res_valid <= 0;
    #1;
    checks++;
    if (state != m_state() || int'(epoch_len) != m_len ||
        grow != e_grow || shrink != e_shrink || clamped != e_clamp) begin
      failures++;
      if (failures < 20)
        $display("FAIL: s=%0d state %s len %0d (g%0d s%0d c%0d), expected %s len %0d",
                 s, state.name(), epoch_len, grow, shrink, clamped, m_state().name(), m_len);
    end
    n_grow += e_grow; n_shrink += e_shrink; n_clamp += e_clamp;
    // idle cycles between results leave everything unchanged
    repeat ($urandom_range(0, 2)) begin
      @(posedge clk); #1;
      checks++;
      if (int'(epoch_len) != m_len || grow || shrink || clamped) begin
        failures++;
        $display("FAIL: change without a result");
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    checks++;
    if (state != EP_GOOD_INC || epoch_len != 1024) begin failures++; $display("FAIL: reset state"); end
    // directed walk through all six states
    step(0);   // GOOD_INC -> DEC1, 512
    step(1);   // DEC2, 256
    step(1);   // GOOD_DEC, 256
    step(1);   // stays
    step(0);   // INC1, 512
    step(0);   // DEC1, 256
    step(1);   // DEC2, 128 is below the bound: ignored
    step(0);   // INC1, 512
    step(1);   // INC2, 1024
    step(1);   // GOOD_INC
    for (int n = 0; n < 3000; n++) step($urandom_range(0, 99) < 60);
    checks++;
    if (n_grow == 0 || n_shrink == 0 || n_clamp == 0) begin
      failures++;
      $display("FAIL: not every action happened");
    end
    $display("grow %0d shrink %0d clamp %0d", n_grow, n_shrink, n_clamp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
