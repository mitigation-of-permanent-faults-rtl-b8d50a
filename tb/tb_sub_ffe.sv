// tb_sub_ffe - self-checking test of one 10-tap sub-FFE block.
//
// Drives random samples, errors, adaptation enable and training. A
// reference model in the testbench keeps its own delay line and its own
// 30-bit coefficient accumulators and checks every cycle the block output
// y = sum h_k x[n-k], the end of the delay line and all coefficients.
`timescale 1ns/1ps
module tb_sub_ffe;
  import ffe_pkg::*;

  localparam int T = BLOCK_TAPS;

  logic clk = 1'b0, rst_n = 1'b0;
  logic adapt_en = 1'b0, training = 1'b0;
  logic signed [XW-1:0] x_in = '0;
  logic signed [E_W-1:0] e = '0;
  logic signed [YB_W-1:0] y;
  logic signed [XW-1:0] x_last;
  logic signed [COEF_W-1:0] coef [T];

  sub_ffe dut (.clk(clk), .rst_n(rst_n), .x_in(x_in), .adapt_en(adapt_en),
               .training(training), .e(e), .y(y), .x_last(x_last), .coef(coef));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint acc [T];
  longint dl  [T];

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    for (int k = 0; k < T; k++) begin acc[k] = 0; dl[k] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 20000; i++) begin
      longint ysum, c;
      @(negedge clk);
      ysum = 0;
      for (int k = 0; k < T; k++) begin
        c = acc[k] >>> 20;
        ysum += c * dl[k];
        chk(coef[k] == COEF_W'(c), $sformatf("coef[%0d] cycle %0d", k, i));
      end
      chk(y == YB_W'(ysum), $sformatf("y cycle %0d: %0d vs %0d", i, y, ysum));
      chk(x_last == XW'(dl[T-1]), "x_last");
      // stimulus
      adapt_en = ($urandom_range(0, 7) != 0);
      training = (i < 10000);
      x_in     = XW'($urandom);
      e        = E_W'($signed($urandom_range(0, 60000)) - 30000);
      #1;
      // reference update at the next rising edge
      for (int k = 0; k < T; k++) begin
        if (adapt_en) begin
          acc[k] = acc[k] - ((longint'(e) * dl[k]) >>> (training ? 4 : 8));
          if (acc[k] > (64'sd1 <<< 29) - 1) acc[k] = (64'sd1 <<< 29) - 1;
          if (acc[k] < -(64'sd1 <<< 29))    acc[k] = -(64'sd1 <<< 29);
        end
      end
      for (int k = T-1; k > 0; k--) dl[k] = dl[k-1];
      dl[0] = longint'(x_in);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
