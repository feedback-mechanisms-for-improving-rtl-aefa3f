// final_scheduler: picks the next command for DRAM from the Centralized
// Arbiter Queue (regular commands) and the Low Priority Queue (prefetches).
//
// Regular commands always win; a prefetch is taken only in a cycle in which
// the CAQ offers nothing. The chosen command is held in an output register
// until DRAM accepts it. A regular command that arrives while a prefetch
// occupies that register has to wait, which is the cost of memory-side
// prefetching that the design tracks as delayed regular commands; the
// scheduler reports each such cycle. That it selects between the CAQ and
// the LPQ follows the design's description; the strict priority, the single
// output register and the valid/ready handshakes are this implementation's
// own choices.
//
// Interface: caq_* and lpq_* are valid/ready sources, dram_cmd_* a
// valid/ready sink. A command moves into the output register in the cycle
// its source sees ready; it reaches DRAM one cycle later at the earliest.
module final_scheduler
  import asd_pkg::*;
#(
  parameter int unsigned ADDR_W = LINE_ADDR_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              caq_valid,
  input  logic [ADDR_W-1:0] caq_line,
  input  logic              caq_write,
  output logic              caq_ready,
  input  logic              lpq_valid,
  input  logic [ADDR_W-1:0] lpq_line,
  output logic              lpq_ready,
  output logic              dram_cmd_valid,
  output logic [ADDR_W-1:0] dram_cmd_line,
  output logic              dram_cmd_write,
  output logic              dram_cmd_prefetch,
  input  logic              dram_cmd_ready,
  output logic              pf_issue,
  output logic              reg_delayed
);

  logic slot_free;

  assign slot_free   = !dram_cmd_valid || dram_cmd_ready;
  assign caq_ready   = slot_free;
  assign lpq_ready   = slot_free && !caq_valid && lpq_valid;
  assign pf_issue    = dram_cmd_valid && dram_cmd_ready && dram_cmd_prefetch;
  assign reg_delayed = caq_valid && dram_cmd_valid && dram_cmd_prefetch && !dram_cmd_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dram_cmd_valid    <= 1'b0;
      dram_cmd_line     <= '0;
      dram_cmd_write    <= 1'b0;
      dram_cmd_prefetch <= 1'b0;
    end else if (slot_free) begin
      if (caq_valid) begin
        dram_cmd_valid    <= 1'b1;
        dram_cmd_line     <= caq_line;
        dram_cmd_write    <= caq_write;
        dram_cmd_prefetch <= 1'b0;
      end else if (lpq_valid) begin
        dram_cmd_valid    <= 1'b1;
        dram_cmd_line     <= lpq_line;
        dram_cmd_write    <= 1'b0;
        dram_cmd_prefetch <= 1'b1;
      end else begin
        dram_cmd_valid    <= 1'b0;
      end
    end
  end

  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           dram_cmd_valid && !dram_cmd_ready |=> dram_cmd_valid && $stable(dram_cmd_line));

endmodule
