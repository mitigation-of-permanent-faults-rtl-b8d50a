// adapt_counter - times the initial adaptation (training) phase.
//
// After reset, and again whenever restart is pulsed, training is high for
// ADAPT_CYCLES samples and then low until the next restart. While training
// is high the equalizer adapts with the large alpha against the training
// sequence; afterwards it uses the small alpha and its own decisions.
//
// Timing: training rises in the cycle after restart and stays high for
// exactly ADAPT_CYCLES cycles. A restart during training starts the count
// again.
//
// That a counter sets alpha (high in training, low in steady state) follows
// the case study; the training length of 35000 samples is read from the
// plotted start-up of the equalizer, and the restart input is this design's
// way of starting a new adaptation after a reconfiguration.
module adapt_counter
  import ffe_pkg::*;
#(
  parameter int unsigned P_ADAPT_CYCLES = ADAPT_CYCLES
) (
  input  logic clk,
  input  logic rst_n,
  input  logic restart,   // start a new training phase
  output logic training   // 1: training phase, high alpha
);

  localparam int unsigned CW = $clog2(P_ADAPT_CYCLES + 1);

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt      <= '0;
      training <= 1'b1;
    end else if (restart) begin
      cnt      <= '0;
      training <= 1'b1;
    end else if (training) begin
      if (cnt == CW'(P_ADAPT_CYCLES - 1)) begin
        training <= 1'b0;
        cnt      <= '0;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

endmodule
