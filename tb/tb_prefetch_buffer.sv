// tb_prefetch_buffer: self-checking test of the prefetch buffer.
//
// A reference model kept here (tags, per-entry state free/pending/valid,
// data and a round-robin pointer) receives the same random reservations,
// fills, Reads and Writes over a small line range. Checked every cycle: the
// Read answer one cycle later (hit and data), the combinational probes, and
// the report of unused entries that a reservation overwrites. Fill data is
// derived from the line and a sequence number, so stale data would show;
// fills for lines that were never reserved are mixed in and must be
// ignored.
module tb_prefetch_buffer;
  localparam int BLOCKS = 4, AW = 8, DW = 64, PR = 2;

  logic clk = 0, rst_n = 0;
  logic alloc_valid = 0, fill_valid = 0, rd_valid = 0, wr_valid = 0;
  logic [AW-1:0] alloc_line = '0, fill_line = '0, rd_line = '0, wr_line = '0;
  logic [DW-1:0] fill_data = '0;
  logic rsp_valid, rsp_hit, evict_unused;
  logic [DW-1:0] rsp_data;
  logic [AW-1:0] probe_line [PR];
  logic [PR-1:0] probe_hit;
  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0, n_evict = 0, n_winv = 0, n_drop = 0;

  prefetch_buffer #(.BLOCKS(BLOCKS), .ADDR_W(AW), .DATA_W(DW), .PROBES(PR)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef enum {FREE, PEND, VALID} st_e;
  int m_tag [BLOCKS];
  st_e m_st [BLOCKS];
  logic [DW-1:0] m_data [BLOCKS];
  int m_rr = 0;

  function automatic int m_find(int line, bit only_valid);
    for (int b = 0; b < BLOCKS; b++)
      if (m_tag[b] == line && (m_st[b] == VALID || (!only_valid && m_st[b] == PEND))) return b;
    return -1;
  endfunction

  initial begin
    int rd_b, rd_any, wr_b, fl_b;
    bit e_hit, e_evict, do_alloc;
    logic [DW-1:0] e_data;
    for (int b = 0; b < BLOCKS; b++) begin m_st[b] = FREE; m_tag[b] = 0; m_data[b] = '0; end
    for (int p = 0; p < PR; p++) probe_line[p] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    #1;
    for (int n = 0; n < 30000; n++) begin
      alloc_valid = $urandom_range(0, 2) == 0;
      alloc_line  = AW'($urandom_range(0, 9));
      fill_valid  = $urandom_range(0, 1) == 0;
      fill_line   = AW'($urandom_range(0, 9));
      fill_data   = {32'(n), 24'(0), fill_line};
      rd_valid    = $urandom_range(0, 2) == 0;
      rd_line     = AW'($urandom_range(0, 9));
      wr_valid    = $urandom_range(0, 7) == 0;
      wr_line     = AW'($urandom_range(0, 9));
      for (int p = 0; p < PR; p++) probe_line[p] = AW'($urandom_range(0, 9));
      #1;
      for (int p = 0; p < PR; p++) begin
        checks++;
        if (probe_hit[p] != (m_find(int'(probe_line[p]), 0) >= 0)) begin
          failures++;
          if (failures < 20) $display("FAIL n=%0d: probe %0d", n, p);
        end
      end
      // model: lookups on the old state, then fill, kills, reservation
      rd_b   = rd_valid ? m_find(int'(rd_line), 1) : -1;
      rd_any = rd_valid ? m_find(int'(rd_line), 0) : -1;
      wr_b   = wr_valid ? m_find(int'(wr_line), 0) : -1;
      fl_b   = -1;
      if (fill_valid)
        for (int b = 0; b < BLOCKS; b++) if (m_st[b] == PEND && m_tag[b] == int'(fill_line)) fl_b = b;
      e_hit  = rd_b >= 0;
      e_data = e_hit ? m_data[rd_b] : '0;
      do_alloc = alloc_valid && !(wr_valid && wr_line == alloc_line) &&
                 !(rd_valid && rd_line == alloc_line) && m_find(int'(alloc_line), 0) < 0;
      e_evict = do_alloc && m_st[m_rr] != FREE && rd_any != m_rr && wr_b != m_rr;
      if (fill_valid && fl_b < 0) n_drop++;
      if (fl_b >= 0) begin m_st[fl_b] = VALID; m_data[fl_b] = fill_data; end
      if (rd_any >= 0) m_st[rd_any] = FREE;
      if (wr_b >= 0) begin m_st[wr_b] = FREE; n_winv++; end
      if (do_alloc) begin
        m_tag[m_rr] = int'(alloc_line); m_st[m_rr] = PEND;
        m_rr = (m_rr + 1) % BLOCKS;
      end
      @(posedge clk);
      #1;
      checks++;
      if (rsp_valid != rd_valid || rsp_hit != (rd_valid && e_hit) ||
          (rd_valid && e_hit && rsp_data != e_data) || evict_unused != e_evict) begin
        failures++;
        if (failures < 20) $display("FAIL n=%0d: rsp v%0d h%0d ev%0d, expected h%0d ev%0d",
                                    n, rsp_valid, rsp_hit, evict_unused, e_hit, e_evict);
      end
      if (rd_valid) begin if (e_hit) n_hit++; else n_miss++; end
      n_evict += e_evict;
    end
    checks++;
    if (n_hit == 0 || n_miss == 0 || n_evict == 0 || n_winv == 0 || n_drop == 0) begin
      failures++;
      $display("FAIL: not every event happened");
    end
    $display("hits %0d misses %0d unused evictions %0d write invalidations %0d dropped fills %0d",
             n_hit, n_miss, n_evict, n_winv, n_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
