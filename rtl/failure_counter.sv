// failure_counter - tells a permanent failure apart from noise and soft
// errors by how long the slicer error stays large.
//
// A sample is "large" when |e| > THRESH. The first large sample starts the
// failure counter, which then counts every cycle. A second, internal counter
// counts consecutive small samples; when it reaches QUIET_CYCLES the
// disturbance is taken to be over and both counters are cleared and stopped.
// If the failure counter reaches FAIL_LIMIT first, the error has persisted
// longer than any adaptation would take, and fail_detect is pulsed for one
// cycle (the counter then starts again from zero).
//
// Interface: enable is high only in steady state (a training phase has large
// errors by nature); enable low or clear high empties both counters.
// Timing: fail_detect is registered; it rises on the clock edge that counts
// the FAIL_LIMIT-th sample of a disturbance that never goes quiet (the
// first large sample included).
//
// The threshold on e, the counter that runs each cycle once enabled, the
// internal quiet counter and a limit above the worst-case adaptation time
// follow the case study; the threshold value is read from its plots and
// QUIET_CYCLES is this design's choice.
module failure_counter
  import ffe_pkg::*;
#(
  parameter int unsigned P_EW           = E_W,
  parameter int unsigned P_THRESH       = FAIL_THRESH,
  parameter int unsigned P_QUIET_CYCLES = QUIET_CYCLES,
  parameter int unsigned P_FAIL_LIMIT   = FAIL_LIMIT
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   enable,       // steady state: detection on
  input  logic                   clear,        // empty the counters
  input  logic signed [P_EW-1:0] e,            // slicer error
  output logic                   active,       // failure counter running
  output logic                   fail_detect   // permanent failure, 1-cycle pulse
);

  localparam int unsigned FW = $clog2(P_FAIL_LIMIT + 1);
  localparam int unsigned QW = $clog2(P_QUIET_CYCLES + 1);

  logic [P_EW-1:0] mag;
  logic            over;
  logic [FW-1:0]   fcnt;
  logic [QW-1:0]   qcnt;

  always_comb begin
    mag   = e[P_EW-1] ? P_EW'(-e) : P_EW'(e);
    over = (mag > P_EW'(P_THRESH));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active      <= 1'b0;
      fcnt        <= '0;
      qcnt        <= '0;
      fail_detect <= 1'b0;
    end else begin
      fail_detect <= 1'b0;
      if (clear || !enable) begin
        active <= 1'b0;
        fcnt   <= '0;
        qcnt   <= '0;
      end else if (active || over) begin
        if (over) qcnt <= '0;
        else       qcnt <= qcnt + 1'b1;
        if (!over && qcnt == QW'(P_QUIET_CYCLES - 1)) begin
          // long enough below the threshold: not a permanent failure
          active <= 1'b0;
          fcnt   <= '0;
          qcnt   <= '0;
        end else if (fcnt == FW'(P_FAIL_LIMIT - 1)) begin
          fail_detect <= 1'b1;
          active      <= 1'b0;
          fcnt        <= '0;
          qcnt        <= '0;
        end else begin
          active <= 1'b1;
          fcnt   <= fcnt + 1'b1;
        end
      end
    end
  end

  // A detection is a single-cycle pulse and needs detection enabled.
  a_pulse: assert property (@(posedge clk) disable iff (!rst_n)
                            fail_detect |=> !fail_detect);
  a_enabled: assert property (@(posedge clk) disable iff (!rst_n)
                              fail_detect |-> $past(enable) && !$past(clear));

endmodule
