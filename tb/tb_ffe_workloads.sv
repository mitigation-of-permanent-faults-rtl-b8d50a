// tb_ffe_workloads - the equalizer on a long low-pass channel, with soft
// errors and with a permanent fault, at the default sizes.
//
// Channel: 0.75 * [1, 0.5, 0.25, 0.15, 0.1, 0.08, 0.06, 0.03, 0.01], a
// decaying low-pass response (scaled by 0.75 so that the received signal
// fits the Q2.6 input), symbols +/-1, no added noise, main tap at D = 2.
// On this channel the steady-state alpha of 2^-16 lets the error shrink only
// slowly after the 35000-sample training, so the failure threshold is set to
// 0.25 (4096) here; every other parameter keeps its default.
//   1. Start-up and a long settling time; measure the SNR of the 20-tap
//      equalizer, SNR = 10 log10(1 / mean(e^2)), with error-free decisions.
//   2. Soft errors that must not be taken for permanent failures: a
//      one-sample upset of a delay-line register, and an upset of bit 6 of
//      the main coefficient (a step of 0.25) that takes tens of thousands of
//      samples to adapt away.
//   3. A permanent fault in FFE_2; after the FFE_1-only retraining and the
//      same settling time the SNR of the 10-tap equalizer is measured and
//      compared; decisions must stay error-free.
`timescale 1ns/1ps
module tb_ffe_workloads;
  import ffe_pkg::*;

  localparam int D = 2;
  localparam int THR = 4096;
  localparam int SETTLE = 1_500_000;
  localparam int NCH = 9;
  localparam real CH [NCH] = '{0.75, 0.375, 0.1875, 0.1125, 0.075, 0.06, 0.045, 0.0225, 0.0075};

  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [XW-1:0] x_in = '0;
  logic t_sym = 1'b0;
  logic d_sym, training, fail;
  logic signed [E_W-1:0] e;
  logic signed [YB_W:0] y;
  ffe_cfg_e cfg;
  ctrl_state_e state;

  ffe_ft_top #(.P_FAIL_THRESH(THR)) dut (
    .clk(clk), .rst_n(rst_n), .x_in(x_in), .t_sym(t_sym),
    .d_sym(d_sym), .e(e), .training(training), .y(y), .cfg(cfg),
    .state(state), .fail(fail)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic s_hist [64];
  int dec_err, dec_n;
  real esq;
  int n_active = 0;
  logic act_q = 1'b0;
  always @(posedge clk) begin
    act_q <= dut.g_lane[0].u_fail_cnt.active;
    if (dut.g_lane[0].u_fail_cnt.active && !act_q) n_active++;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic step(input bit measure);
    real xr, ev;
    @(negedge clk);
    for (int k = 63; k > 0; k--) s_hist[k] = s_hist[k-1];
    s_hist[0] = $urandom_range(0, 1) == 1;
    xr = 0.0;
    for (int k = 0; k < NCH; k++) xr += CH[k] * (s_hist[k] ? 1.0 : -1.0);
    x_in  = XW'($rtoi(xr * 64.0 + (xr >= 0 ? 0.5 : -0.5)));
    t_sym = s_hist[1 + D];
    #1;
    if (measure) begin
      dec_n++;
      if (d_sym !== s_hist[1 + D]) dec_err++;
      ev = real'(e) / 16384.0;
      esq += ev * ev;
    end
  endtask

  task automatic run(input int n);
    for (int i = 0; i < n; i++) step(1'b0);
  endtask

  task automatic snr(input int n, output real db);
    dec_err = 0; dec_n = 0; esq = 0.0;
    for (int i = 0; i < n; i++) step(1'b1);
    db = 10.0 * $log10(real'(n) / esq);
    chk(dec_err == 0, "decision errors");
  endtask

  real snr20, snr10;
  int w, act0;
  initial begin
    for (int k = 0; k < 64; k++) s_hist[k] = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(ADAPT_CYCLES + SETTLE);
    snr(20000, snr20);
    $display("20 taps: SNR = %0.2f dB", snr20);
    chk(state == ST_NORMAL, "no failure detected on the long channel with 20 taps");

    // soft error in a delay-line register
    act0 = n_active;
    @(negedge clk);
    force dut.u_ffe1.dl[D] = ~dut.u_ffe1.dl[D];
    @(negedge clk);
    release dut.u_ffe1.dl[D];
    run(2000);
    chk(n_active > act0 && !dut.g_lane[0].u_fail_cnt.active, "delay-line upset seen and cleared");
    chk(state == ST_NORMAL, "delay-line upset not taken as permanent");

    // soft error in the main coefficient's register (bit 6 of the coefficient)
    act0 = n_active;
    @(negedge clk);
    force dut.u_ffe1.g_tap[D].u_coef.acc = dut.u_ffe1.g_tap[D].u_coef.acc ^ (30'sd1 << 26);
    @(posedge clk);
    #1 release dut.u_ffe1.g_tap[D].u_coef.acc;
    run(FAIL_LIMIT + 50000);
    chk(n_active > act0, "coefficient upset seen by the failure counter");
    chk(state == ST_NORMAL, "coefficient upset not taken as permanent");

    // permanent fault in FFE_2
    force dut.u_ffe2.y[13] = 1'b1;
    w = 0;
    while (state != ST_TRY1 && w < FAIL_LIMIT + 20000) begin step(1'b0); w++; end
    chk(state == ST_TRY1, "FFE_2 fault detected");
    run(ADAPT_CYCLES + SETTLE);
    snr(20000, snr10);
    $display("10 taps (FFE_1 only): SNR = %0.2f dB, loss %0.2f dB", snr10, snr10 - snr20);
    chk(snr10 < snr20, "fewer taps give a lower SNR");
    chk(state == ST_TRY1 && !fail, "10-tap configuration holds");
    release dut.u_ffe2.y[13];
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
