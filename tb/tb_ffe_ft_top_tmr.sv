// tb_ffe_ft_top_tmr - end-to-end test of the partial-TMR variant
// (PARTIAL_TMR = 1: slicer, input switch, adaptation counter, failure
// counter and control triplicated and voted).
//
// Same channel and training alignment as tb_ffe_ft_top. After start-up, the
// slicer error of control lane 1 is held stuck at a large value, which
// drives that lane alone through all recuperation steps to FAILED; the
// voted configuration must stay at 20 taps with correct decisions
// throughout. Then a permanent stuck bit in FFE_2 must still be detected by
// the two healthy lanes and lead to the FFE_1-only configuration with
// correct decisions.
`timescale 1ns/1ps
module tb_ffe_ft_top_tmr;
  import ffe_pkg::*;

  localparam int D = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [XW-1:0] x_in = '0;
  logic t_sym = 1'b0;
  logic d_sym, training, fail;
  logic signed [E_W-1:0] e;
  logic signed [YB_W:0] y;
  ffe_cfg_e cfg;
  ctrl_state_e state;

  ffe_ft_top #(.PARTIAL_TMR(1'b1)) dut (
    .clk(clk), .rst_n(rst_n), .x_in(x_in), .t_sym(t_sym),
    .d_sym(d_sym), .e(e), .training(training), .y(y), .cfg(cfg),
    .state(state), .fail(fail)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic s_hist [64];
  int dec_err, dec_n;
  int unsigned emax;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic step(input bit measure);
    int unsigned mag;
    @(negedge clk);
    for (int k = 63; k > 0; k--) s_hist[k] = s_hist[k-1];
    s_hist[0] = $urandom_range(0, 1) == 1;
    x_in  = XW'((s_hist[0] ? 64 : -64) + (s_hist[1] ? 16 : -16));
    t_sym = s_hist[1 + D];
    #1;
    if (measure) begin
      dec_n++;
      if (d_sym !== s_hist[1 + D]) dec_err++;
      mag = (e < 0) ? unsigned'(-int'(e)) : unsigned'(int'(e));
      if (mag > emax) emax = mag;
    end
  endtask

  task automatic run(input int n);
    for (int i = 0; i < n; i++) step(1'b0);
  endtask

  task automatic steady(input int n, input string tag);
    dec_err = 0; dec_n = 0; emax = 0;
    for (int i = 0; i < n; i++) step(1'b1);
    $display("[%s] cfg=%s errors=%0d/%0d max|e|=%0d", tag, cfg.name(), dec_err, dec_n, emax);
    chk(dec_err == 0, {tag, ": decision errors"});
    chk(emax <= FAIL_THRESH, {tag, ": steady-state error above threshold"});
  endtask

  int w;
  initial begin
    dec_err = 0; dec_n = 0; emax = 0;
    for (int k = 0; k < 64; k++) s_hist[k] = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(ADAPT_CYCLES + 2000);
    steady(5000, "start-up");

    // permanent fault in control lane 1: its slicer error stuck at a large value
    force dut.g_lane[1].u_slicer.e = E_W'(100000);
    dec_err = 0; dec_n = 0; emax = 0;
    w = 0;
    while (dut.g_lane[1].u_ctrl.state != ST_FAILED && w < 3 * FAIL_LIMIT + 3 * ADAPT_CYCLES) begin
      step(1'b1);
      w++;
      if (state != ST_NORMAL || fail) break;
    end
    $display("lane 1 reached FAILED after %0d samples; decision errors %0d/%0d, max|e| %0d",
             w, dec_err, dec_n, emax);
    chk(dec_err == 0 && emax <= FAIL_THRESH, "voted output unaffected while lane 1 reconfigures");
    chk(dut.g_lane[1].u_ctrl.state == ST_FAILED, "faulty lane went to FAILED");
    chk(state == ST_NORMAL && cfg == CFG_BOTH && !fail, "voting masks the faulty lane");
    steady(5000, "one control lane faulty");

    // permanent fault in FFE_2, seen by the two healthy lanes
    force dut.u_ffe2.y[13] = 1'b1;
    w = 0;
    while (state != ST_TRY1 && w < FAIL_LIMIT + 20000) begin step(1'b0); w++; end
    chk(state == ST_TRY1 && cfg == CFG_FIRST, "FFE_2 fault handled by healthy lanes");
    run(ADAPT_CYCLES + 2000);
    steady(10000, "FFE_1 only, one lane faulty");
    chk(!fail, "no fail signal");
    release dut.u_ffe2.y[13];
    release dut.g_lane[1].u_slicer.e;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
