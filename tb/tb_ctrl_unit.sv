// tb_ctrl_unit - self-checking test of the recuperation control.
//
// Steps the control through NORMAL -> TRY1 -> TRY2 -> FAILED with
// fail_detect pulses and checks in every state the configuration, input
// switch, adaptation enables and fail flag, the restart and clear pulses
// that go with each move, the gating of the failure counter by training,
// and that reset returns to the 20-tap configuration.
`timescale 1ns/1ps
module tb_ctrl_unit;
  import ffe_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, fail_detect = 1'b0, training_in = 1'b1;
  ffe_cfg_e cfg;
  logic direct, en1, en2, training, fc_enable, restart, fc_clear, fail;
  ctrl_state_e state;

  ctrl_unit dut (.clk(clk), .rst_n(rst_n), .fail_detect(fail_detect),
                 .training_in(training_in), .cfg(cfg), .direct(direct),
                 .en1(en1), .en2(en2), .training(training), .fc_enable(fc_enable),
                 .restart(restart), .fc_clear(fc_clear), .fail(fail), .state(state));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (state %s)", what, state.name()); end
  endtask

  task automatic expect_outputs(input ffe_cfg_e c, input bit dir, input bit e1,
                                input bit e2, input bit f);
    chk(cfg == c, "cfg");
    chk(direct == dir, "input switch");
    chk(en1 == e1 && en2 == e2, "adaptation enables");
    chk(fail == f, "fail");
    training_in = 1'b1; #1;
    chk(training && !fc_enable, "training passes through, failure counter off");
    training_in = 1'b0; #1;
    chk(!training && (fc_enable == !f), "steady state enables failure counter");
  endtask

  task automatic pulse(input bit want_restart);
    fail_detect = 1'b1; #1;
    chk(fc_clear, "clear pulse with fail_detect");
    chk(restart == want_restart, "restart pulse");
    @(negedge clk);
    fail_detect = 1'b0; #1;
    chk(!restart && !fc_clear, "pulses last one cycle");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    chk(state == ST_NORMAL, "reset state");
    expect_outputs(CFG_BOTH, 1'b0, 1'b1, 1'b1, 1'b0);
    repeat (5) @(negedge clk);
    chk(state == ST_NORMAL, "no move without fail_detect");
    pulse(1'b1);
    chk(state == ST_TRY1, "first failure -> FFE_1 only");
    expect_outputs(CFG_FIRST, 1'b0, 1'b1, 1'b0, 1'b0);
    pulse(1'b1);
    chk(state == ST_TRY2, "second failure -> FFE_2 only");
    expect_outputs(CFG_SECOND, 1'b1, 1'b0, 1'b1, 1'b0);
    pulse(1'b0);
    chk(state == ST_FAILED, "third failure -> FAILED");
    expect_outputs(CFG_SECOND, 1'b1, 1'b0, 1'b1, 1'b1);
    pulse(1'b0);
    chk(state == ST_FAILED, "FAILED is final");
    rst_n = 1'b0; @(negedge clk); rst_n = 1'b1; #1;
    chk(state == ST_NORMAL && !fail, "reset restores normal mode");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
