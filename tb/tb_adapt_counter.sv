// tb_adapt_counter - self-checking test of the training-phase timer at its
// default length (35000 samples).
//
// Checks that training is high for exactly ADAPT_CYCLES cycles after reset,
// stays low afterwards, is raised again for exactly ADAPT_CYCLES cycles by a
// restart pulse, and that a restart during training starts the count again.
`timescale 1ns/1ps
module tb_adapt_counter;
  import ffe_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, restart = 1'b0, training;

  adapt_counter dut (.clk(clk), .rst_n(rst_n), .restart(restart), .training(training));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // count cycles (sampled at falling edges) with training high
  task automatic measure(output int n);
    n = 0;
    while (training) begin
      n++;
      @(negedge clk);
    end
  endtask

  int n;
  initial begin
    @(negedge clk);
    chk(training == 1'b1, "training high during reset");
    rst_n = 1'b1;
    measure(n);
    chk(n == ADAPT_CYCLES, $sformatf("start-up training length %0d", n));
    repeat (1000) begin @(negedge clk); chk(!training, "stays in steady state"); end
    // restart in steady state
    restart = 1'b1; @(negedge clk); restart = 1'b0;
    measure(n);
    chk(n == ADAPT_CYCLES, $sformatf("restarted training length %0d", n));
    // restart in the middle of training
    restart = 1'b1; @(negedge clk); restart = 1'b0;
    repeat (1000) @(negedge clk);
    restart = 1'b1; @(negedge clk); restart = 1'b0;
    measure(n);
    chk(n == ADAPT_CYCLES, $sformatf("training length after mid-training restart %0d", n));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
