// tb_final_scheduler: self-checking test of the final scheduler.
//
// Two sources (a CAQ list of regular commands, an LPQ list of prefetches)
// follow valid/ready rules and DRAM accepts at random. Checked: every
// command reaches DRAM exactly once and in its source's order, with the
// right write and prefetch flags; a prefetch is never taken in a cycle in
// which the CAQ offers a command; the output holds while DRAM stalls; and
// the delayed-regular-command pulse matches its definition (CAQ waiting
// while a prefetch occupies the DRAM command slot).
module tb_final_scheduler;
  localparam int AW = 16;

  logic clk = 0, rst_n = 0;
  logic caq_valid = 0, caq_write = 0, lpq_valid = 0, dram_cmd_ready = 0;
  logic [AW-1:0] caq_line = '0, lpq_line = '0;
  logic caq_ready, lpq_ready, dram_cmd_valid, dram_cmd_write, dram_cmd_prefetch;
  logic [AW-1:0] dram_cmd_line;
  logic pf_issue, reg_delayed;
  int checks = 0, failures = 0;
  int n_delayed = 0, n_pf = 0, n_reg = 0, n_pf_pulse = 0;

  final_scheduler #(.ADDR_W(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NCMD = 3000;
  int caq_i = 0, lpq_i = 0, caq_o = 0, lpq_o = 0;

  function automatic logic [AW-1:0] caq_addr(int i); return AW'(i * 7 + 1); endfunction
  function automatic logic caq_wr(int i);            return logic'(i % 3 == 0); endfunction
  function automatic logic [AW-1:0] lpq_addr(int i); return AW'(i * 5 + 30000); endfunction

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    bit prev_stall, caq_take, lpq_take;
    logic [AW-1:0] prev_line;
    prev_stall = 0;
    prev_line = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    #1;
    while (caq_o < NCMD || lpq_o < NCMD) begin
      // sources: offer the next command now and then, hold it until taken
      if (!caq_valid && caq_i < NCMD && $urandom_range(0, 2) == 0) caq_valid = 1;
      caq_line  = caq_addr(caq_i);
      caq_write = caq_wr(caq_i);
      if (!lpq_valid && lpq_i < NCMD && $urandom_range(0, 1) == 0) lpq_valid = 1;
      lpq_line = lpq_addr(lpq_i);
      dram_cmd_ready = $urandom_range(0, 2) != 0;
      #1;
      check(!(lpq_ready && caq_valid), "prefetch taken while the CAQ offers a command");
      check(reg_delayed == (caq_valid && dram_cmd_valid && dram_cmd_prefetch && !dram_cmd_ready),
            "delayed pulse");
      check(pf_issue == (dram_cmd_valid && dram_cmd_ready && dram_cmd_prefetch), "issue pulse");
      if (prev_stall) check(dram_cmd_valid && dram_cmd_line == prev_line, "output changed during a stall");
      n_delayed += reg_delayed;
      n_pf_pulse += pf_issue;
      if (dram_cmd_valid && dram_cmd_ready) begin
        if (dram_cmd_prefetch) begin
          check(lpq_o < NCMD && dram_cmd_line == lpq_addr(lpq_o) && !dram_cmd_write, "prefetch order");
          lpq_o++; n_pf++;
        end else begin
          check(caq_o < NCMD && dram_cmd_line == caq_addr(caq_o) && dram_cmd_write == caq_wr(caq_o),
                "regular command order");
          caq_o++; n_reg++;
        end
      end
      prev_stall = dram_cmd_valid && !dram_cmd_ready;
      prev_line  = dram_cmd_line;
      caq_take   = caq_valid && caq_ready;
      lpq_take   = lpq_valid && lpq_ready;
      @(posedge clk);
      #1;
      if (caq_take) begin caq_valid = 0; caq_i++; end
      if (lpq_take) begin lpq_valid = 0; lpq_i++; end
    end
    check(n_delayed > 0 && n_pf_pulse == NCMD, "events not covered");
    $display("regular %0d, prefetches %0d, delayed-regular cycles %0d", n_reg, n_pf, n_delayed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
