// ctrl_unit - the control block that reconfigures the equalizer after a
// permanent failure.
//
// States: NORMAL (both sub-FFEs, 20 taps) -> TRY1 (first block only) ->
// TRY2 (second block only, fed directly with x[n]) -> FAILED. Each
// fail_detect pulse from the failure counter moves one step. On the moves to
// TRY1 and TRY2 the control restarts the adaptation counter, so the
// remaining block goes through a new training phase with the high alpha,
// and clears the failure counter. In FAILED the equalizer keeps running on
// the second block and raises fail, which stays high until reset; a reset
// starts again with both blocks.
//
// The control also passes the training flag (alpha) of the adaptation
// counter on to the slicer and the coefficients unchanged, as the alpha path
// of the block diagram runs through the control, and enables the failure
// counter only outside training and before FAILED.
//
// Timing: the state register changes on the clock edge after fail_detect;
// restart and fc_clear are one-cycle pulses in that cycle. Outputs are
// combinational from the state.
//
// The sequence of configurations and the fail signal follow the case study;
// the behaviour in FAILED and the clearing of the counters are this design's
// choices.
module ctrl_unit
  import ffe_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     fail_detect,   // permanent failure found
  input  logic     training_in,   // from the adaptation counter
  output ffe_cfg_e cfg,           // slicer configuration
  output logic     direct,        // input switch: x[n] straight to FFE_2
  output logic     en1,           // adaptation enable of FFE_1
  output logic     en2,           // adaptation enable of FFE_2
  output logic     training,      // high alpha / training reference
  output logic     fc_enable,     // failure counter enable
  output logic     restart,       // restart the adaptation counter
  output logic     fc_clear,      // clear the failure counter
  output logic     fail,          // unrecoverable failure
  output ctrl_state_e state
);

  ctrl_state_e nxt;

  always_comb begin
    nxt = state;
    if (fail_detect) begin
      unique case (state)
        ST_NORMAL: nxt = ST_TRY1;
        ST_TRY1:   nxt = ST_TRY2;
        ST_TRY2:   nxt = ST_FAILED;
        default:   nxt = ST_FAILED;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= ST_NORMAL;
    else        state <= nxt;
  end

  always_comb begin
    restart  = fail_detect && (nxt == ST_TRY1 || nxt == ST_TRY2) && (nxt != state);
    fc_clear = fail_detect;
    training = training_in;
    fail     = (state == ST_FAILED);
    fc_enable = !training_in && (state != ST_FAILED);
    unique case (state)
      ST_NORMAL: begin cfg = CFG_BOTH;   direct = 1'b0; en1 = 1'b1; en2 = 1'b1; end
      ST_TRY1:   begin cfg = CFG_FIRST;  direct = 1'b0; en1 = 1'b1; en2 = 1'b0; end
      default:   begin cfg = CFG_SECOND; direct = 1'b1; en1 = 1'b0; en2 = 1'b1; end
    endcase
  end

  // The sequence only moves forward; FAILED is left only by reset.
  a_forward: assert property (@(posedge clk) disable iff (!rst_n)
                              state != $past(state) |-> $past(fail_detect));
  a_failed_final: assert property (@(posedge clk) disable iff (!rst_n)
                                   state == ST_FAILED |=> state == ST_FAILED);

endmodule
