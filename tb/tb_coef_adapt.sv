// tb_coef_adapt - self-checking test of one coefficient's LMS adaptation.
//
// Drives random tap samples and slicer errors (small and full-range, the
// latter to reach the accumulator's saturation), random enable and
// training, and compares the coefficient every cycle with a reference
// accumulator kept in 64-bit arithmetic: acc -= (e*x) >> shift, with shift
// 4 in training (alpha 2^-12) and 8 in steady state (alpha 2^-16), clamped
// to 30 bits; coefficient = acc >> 20.
`timescale 1ns/1ps
module tb_coef_adapt;
  import ffe_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic en = 1'b0, training = 1'b0;
  logic signed [XW-1:0] x_tap = '0;
  logic signed [E_W-1:0] e = '0;
  logic signed [COEF_W-1:0] coef;

  coef_adapt dut (.clk(clk), .rst_n(rst_n), .en(en), .training(training),
                  .x_tap(x_tap), .e(e), .coef(coef));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint acc_ref = 0;
  int n_sat = 0, n_train = 0, n_hold = 0;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      checks++;
      if (coef !== COEF_W'(acc_ref >>> 20)) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d: coef=%0d ref=%0d", i, coef, acc_ref >>> 20);
      end
      // new stimulus
      en       = ($urandom_range(0, 9) != 0);
      training = ($urandom_range(0, 1) == 1);
      x_tap    = XW'($urandom);
      if (i % 4000 < 2000) e = E_W'($signed($urandom_range(0, 4000)) - 2000);
      else                 e = E_W'($urandom);   // full range: drives saturation
      #1;
      if (en) begin
        longint upd, nxt;
        upd = (longint'(e) * longint'(x_tap)) >>> (training ? 4 : 8);
        nxt = acc_ref - upd;
        if (nxt > (64'sd1 <<< 29) - 1) begin nxt = (64'sd1 <<< 29) - 1; n_sat++; end
        if (nxt < -(64'sd1 <<< 29))    begin nxt = -(64'sd1 <<< 29);    n_sat++; end
        acc_ref = nxt;
        if (training) n_train++;
      end else n_hold++;
    end
    checks++;
    if (n_sat == 0 || n_train == 0 || n_hold == 0) begin
      failures++;
      $display("FAIL: saturation/training/hold not exercised");
    end
    $display("saturations=%0d training updates=%0d held cycles=%0d", n_sat, n_train, n_hold);
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
