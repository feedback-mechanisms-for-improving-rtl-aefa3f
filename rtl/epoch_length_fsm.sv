// epoch_length_fsm: adaptive epoch length.
//
// After every epoch the similarity of the two most recent Stream Length
// Histograms (s = similar, d = dissimilar) drives a six-state machine. Each
// state carries an action that is applied to the epoch length when the
// state is entered: the two good states keep it, INC1/INC2 double it and
// DEC1/DEC2 halve it.
//
//   GOOD_INC  s->GOOD_INC  d->DEC1     (reached by growing: a phase change shrinks)
//   GOOD_DEC  s->GOOD_DEC  d->INC1     (reached by shrinking: a phase change grows)
//   INC1      s->INC2      d->DEC1     (success: grow again; failure: turn round)
//   INC2      s->GOOD_INC  d->DEC1     (two successful grows reach a good state)
//   DEC1      s->DEC2      d->INC1
//   DEC2      s->GOOD_DEC  d->INC1
//
// These rules follow the design's description of the machine: good states
// are entered only after two consecutive similar results, each good state
// remembers the direction it was reached from, and a dissimilar result
// reverses the direction. The length stays within MIN_LEN..MAX_LEN (256 and
// 8192 Reads); a change that would cross a bound is ignored while the state
// still moves. The reset state (GOOD_INC) and reset length (INIT_LEN) are
// this implementation's own choice.
//
// Timing: one result per res_valid pulse; state and epoch_len update on the
// next clock edge.
module epoch_length_fsm
  import asd_pkg::*;
#(
  parameter int unsigned MIN_LEN  = EPOCH_MIN,
  parameter int unsigned MAX_LEN  = EPOCH_MAX,
  parameter int unsigned INIT_LEN = EPOCH_INIT,
  parameter int unsigned EW       = EPOCH_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         res_valid,
  input  logic         res_similar,
  output logic [EW:0]  epoch_len,
  output epoch_state_e state,
  output logic         grow,
  output logic         shrink,
  output logic         clamped
);

  epoch_state_e next_state;
  logic         want_grow, want_shrink;

  always_comb begin
    next_state = state;
    unique case (state)
      EP_GOOD_INC: next_state = res_similar ? EP_GOOD_INC : EP_DEC1;
      EP_GOOD_DEC: next_state = res_similar ? EP_GOOD_DEC : EP_INC1;
      EP_INC1:     next_state = res_similar ? EP_INC2     : EP_DEC1;
      EP_INC2:     next_state = res_similar ? EP_GOOD_INC : EP_DEC1;
      EP_DEC1:     next_state = res_similar ? EP_DEC2     : EP_INC1;
      EP_DEC2:     next_state = res_similar ? EP_GOOD_DEC : EP_INC1;
      default:     next_state = EP_GOOD_INC;
    endcase
    want_grow   = res_valid && (next_state == EP_INC1 || next_state == EP_INC2);
    want_shrink = res_valid && (next_state == EP_DEC1 || next_state == EP_DEC2);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= EP_GOOD_INC;
      epoch_len <= (EW+1)'(INIT_LEN);
      grow      <= 1'b0;
      shrink    <= 1'b0;
      clamped   <= 1'b0;
    end else begin
      grow    <= 1'b0;
      shrink  <= 1'b0;
      clamped <= 1'b0;
      if (res_valid) begin
        state <= next_state;
        if (want_grow) begin
          if ((epoch_len << 1) <= (EW+1)'(MAX_LEN)) begin
            epoch_len <= epoch_len << 1;
            grow      <= 1'b1;
          end else begin
            clamped <= 1'b1;
          end
        end else if (want_shrink) begin
          if ((epoch_len >> 1) >= (EW+1)'(MIN_LEN)) begin
            epoch_len <= epoch_len >> 1;
            shrink    <= 1'b1;
          end else begin
            clamped <= 1'b1;
          end
        end
      end
    end
  end

endmodule
