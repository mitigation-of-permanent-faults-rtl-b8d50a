// tb_ffe_ft_top - end-to-end test of the fault-tolerant equalizer at its
// default sizes (20 taps, 35000-sample training, failure limit 2^17).
//
// Random +/-1 symbols pass through the channel 1 + 0.25 z^-1 and are fed to
// the equalizer as Q2.6 samples; the training symbol is the transmitted
// symbol delayed by D samples, which places the main tap at tap D. The
// test runs three scenarios, each from reset:
//   1. Start-up training, steady state, then a transient disturbance of
//      FFE_2's output (a short stuck bit) that must not be taken for a
//      permanent failure; then a permanent stuck-at-1 on FFE_2's output, which
//      must lead to the FFE_1-only configuration and error-free decisions.
//   2. A permanent stuck bit in FFE_1: first attempt (FFE_1 only) fails,
//      second attempt (FFE_2 fed directly with x[n]) recovers.
//   3. Stuck bits in both blocks: the equalizer ends in FAILED with fail high.
// Faults are stuck-at values forced onto a sub-FFE output bit.
// Checks: symbol decisions against the transmitted symbols, |e| below the
// failure threshold in steady state, the configuration sequence, that
// detection takes at least FAIL_LIMIT cycles, and that every mechanism
// (training phase, transient rejection, failure detection, each
// reconfiguration, the fail signal) happened at least once.
`timescale 1ns/1ps
module tb_ffe_ft_top;
  import ffe_pkg::*;

  localparam int D = 2;                   // training delay = main-tap position
  localparam int WATCHDOG = 2_000_000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [XW-1:0] x_in = '0;
  logic t_sym = 1'b0;
  logic d_sym, training, fail;
  logic signed [E_W-1:0] e;
  logic signed [YB_W:0] y;
  ffe_cfg_e cfg;
  ctrl_state_e state;

  ffe_ft_top dut (
    .clk(clk), .rst_n(rst_n), .x_in(x_in), .t_sym(t_sym),
    .d_sym(d_sym), .e(e), .training(training), .y(y), .cfg(cfg),
    .state(state), .fail(fail)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // mechanism counters
  int n_train = 0, n_detect = 0, n_try1 = 0, n_try2 = 0, n_failed = 0;
  int n_direct = 0, n_transient_cleared = 0;
  logic trn_q = 1'b0, act_q = 1'b0;
  ctrl_state_e st_q = ST_NORMAL;
  always @(posedge clk) begin
    trn_q <= training;
    st_q  <= state;
    act_q <= dut.g_lane[0].u_fail_cnt.active;
    if (rst_n && !training && trn_q) n_train++;   // training phase completed
    if (dut.g_lane[0].u_fail_cnt.fail_detect) n_detect++;
    if (state != st_q) begin
      if (state == ST_TRY1)   n_try1++;
      if (state == ST_TRY2)   n_try2++;
      if (state == ST_FAILED) n_failed++;
    end
    if (dut.g_lane[0].u_switch.direct) n_direct++;
    if (act_q && !dut.g_lane[0].u_fail_cnt.active &&
        !dut.g_lane[0].u_fail_cnt.fail_detect && !dut.g_lane[0].fc_clear &&
        dut.g_lane[0].fc_enable)
      n_transient_cleared++;
  end

  // symbol history: s_hist[k] = symbol sent k samples ago (+1 -> 1)
  logic s_hist [64];

  function automatic logic signed [XW-1:0] chan(input logic s0, input logic s1);
    // x = s[n] + 0.25 s[n-1] in Q2.6
    return XW'((s0 ? 64 : -64) + (s1 ? 16 : -16));
  endfunction

  int dec_err, dec_n;
  int unsigned emax;

  // One sample: apply x[n] and t[n] at the falling edge, check decision.
  task automatic step(input bit check_dec, input bit check_err);
    int unsigned mag;
    @(negedge clk);
    for (int k = 63; k > 0; k--) s_hist[k] = s_hist[k-1];
    s_hist[0] = $urandom_range(0, 1) == 1;
    x_in  = chan(s_hist[0], s_hist[1]);
    // the decision made during this cycle belongs to the sample applied one
    // edge earlier, delayed by D
    t_sym = s_hist[1 + D];
    #1;
    if (check_dec) begin
      dec_n++;
      if (d_sym !== s_hist[1 + D]) dec_err++;
    end
    if (check_err) begin
      mag = (e < 0) ? unsigned'(-int'(e)) : unsigned'(int'(e));
      if (mag > emax) emax = mag;
    end
  endtask

  task automatic run(input int n, input bit check_dec, input bit check_err);
    for (int i = 0; i < n; i++) step(check_dec, check_err);
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  task automatic do_reset();
    rst_n = 1'b0;
    for (int k = 0; k < 64; k++) s_hist[k] = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
  endtask

  // Measure steady-state quality over n samples.
  task automatic steady(input int n, input string tag);
    dec_err = 0; dec_n = 0; emax = 0;
    run(n, 1'b1, 1'b1);
    $display("[%s] cfg=%s decisions=%0d errors=%0d max|e|=%0d (thr %0d)",
             tag, cfg.name(), dec_n, dec_err, emax, FAIL_THRESH);
    check(dec_err == 0, {tag, ": decision errors"});
    check(emax <= FAIL_THRESH, {tag, ": steady-state error above threshold"});
  endtask

  // Wait for the next state change, at most 'limit' samples; return samples.
  task automatic wait_state(input ctrl_state_e want, input int limit, output int waited);
    waited = 0;
    while (state != want && waited < limit) begin
      step(1'b0, 1'b0);
      waited++;
    end
    check(state == want, $sformatf("reached state %s", want.name()));
  endtask

  int w;
  initial begin
    // ---------------- scenario 1: fault in FFE_2 ----------------
    do_reset();
    run(ADAPT_CYCLES, 1'b0, 1'b0);
    check(training == 1'b0, "training ends after ADAPT_CYCLES");
    check(state == ST_NORMAL && cfg == CFG_BOTH, "normal mode after start-up");
    run(2000, 1'b0, 1'b0);
    steady(20000, "start-up, 20 taps");
    $display("coefficients FFE_1: %0d %0d %0d %0d %0d, FFE_2 tap0: %0d",
             dut.u_ffe1.coef[0], dut.u_ffe1.coef[1], dut.u_ffe1.coef[2],
             dut.u_ffe1.coef[3], dut.u_ffe1.coef[4], dut.u_ffe2.coef[0]);
    check(dut.u_ffe1.coef[D] > 230 && dut.u_ffe1.coef[D] < 282, "main tap near 1.0");
    check(dut.u_ffe1.coef[D+1] < -48 && dut.u_ffe1.coef[D+1] > -80, "first post-cursor tap near -0.25");

    // transient: stuck bit for 200 samples, then gone
    force dut.u_ffe2.y[13] = 1'b1;
    run(200, 1'b0, 1'b0);
    release dut.u_ffe2.y[13];
    run(5000, 1'b0, 1'b0);
    check(state == ST_NORMAL, "transient disturbance not taken as permanent");
    check(n_transient_cleared > 0, "failure counter cleared by quiet counter");

    // permanent fault in FFE_2
    force dut.u_ffe2.y[13] = 1'b1;
    wait_state(ST_TRY1, FAIL_LIMIT + 20000, w);
    $display("FFE_2 fault detected after %0d samples", w);
    check(w >= FAIL_LIMIT, "detection takes at least FAIL_LIMIT cycles");
    check(cfg == CFG_FIRST && training, "FFE_1-only configuration retrains");
    run(ADAPT_CYCLES + 2000, 1'b0, 1'b0);
    steady(20000, "after FFE_2 fault, FFE_1 only");
    check(state == ST_TRY1 && !fail, "stays on FFE_1");
    release dut.u_ffe2.y[13];

    // ---------------- scenario 2: fault in FFE_1 ----------------
    do_reset();
    run(ADAPT_CYCLES + 2000, 1'b0, 1'b0);
    steady(10000, "start-up again, 20 taps");
    force dut.u_ffe1.y[13] = 1'b1;
    wait_state(ST_TRY1, FAIL_LIMIT + 20000, w);
    wait_state(ST_TRY2, ADAPT_CYCLES + FAIL_LIMIT + 20000, w);
    $display("FFE_1-only attempt failed after %0d samples", w);
    check(cfg == CFG_SECOND && dut.g_lane[0].u_switch.direct, "x[n] switched to FFE_2");
    run(ADAPT_CYCLES + 2000, 1'b0, 1'b0);
    steady(20000, "after FFE_1 fault, FFE_2 only");
    check(!fail, "no fail signal while FFE_2 works");

    // ---------------- scenario 3: both blocks faulty ----------------
    force dut.u_ffe2.y[13] = 1'b1;
    wait_state(ST_FAILED, FAIL_LIMIT + 20000, w);
    check(fail == 1'b1, "fail raised when both blocks are faulty");
    run(1000, 1'b0, 1'b0);
    check(fail == 1'b1 && state == ST_FAILED, "fail stays high");
    release dut.u_ffe1.y[13];
    release dut.u_ffe2.y[13];
    do_reset();
    @(negedge clk);
    check(!fail && state == ST_NORMAL && cfg == CFG_BOTH, "reset restores 20 taps");

    // ---------------- mechanism coverage ----------------
    $display("mechanisms: training=%0d transient_cleared=%0d detect=%0d try1=%0d try2=%0d failed=%0d direct_cycles=%0d",
             n_train, n_transient_cleared, n_detect, n_try1, n_try2, n_failed, n_direct);
    check(n_train >= 5, "training phases");
    check(n_transient_cleared > 0, "transient rejection");
    check(n_detect >= 4, "failure detections");
    check(n_try1 >= 2, "FFE_1-only reconfiguration");
    check(n_try2 >= 1, "FFE_2-only reconfiguration");
    check(n_failed >= 1, "unrecoverable failure");
    check(n_direct > 0, "input switch forwarding x[n] to FFE_2");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
