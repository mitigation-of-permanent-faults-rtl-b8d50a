// tb_failure_counter - self-checking test of the permanent-failure detector
// with small sizes (threshold 100, quiet time 8, limit 50 cycles).
//
// Directed cases: a persistent large error is detected on its LIMIT-th
// sample; a burst shorter than LIMIT followed by a quiet
// gap is rejected; short gaps inside a long disturbance do not reset the
// count; enable low and clear stop detection; |e| equal to the threshold is
// not large, negative errors count by magnitude. A random phase compares
// against a cycle model of the counters.
`timescale 1ns/1ps
module tb_failure_counter;
  import ffe_pkg::*;

  localparam int THR = 100, QUIET = 8, LIMIT = 50;

  logic clk = 1'b0, rst_n = 1'b0, enable = 1'b0, clear = 1'b0;
  logic signed [E_W-1:0] e = '0;
  logic active, fail_detect;

  failure_counter #(.P_THRESH(THR), .P_QUIET_CYCLES(QUIET), .P_FAIL_LIMIT(LIMIT)) dut (
    .clk(clk), .rst_n(rst_n), .enable(enable), .clear(clear), .e(e),
    .active(active), .fail_detect(fail_detect));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_detect = 0;
  always @(posedge clk) if (fail_detect) n_detect++;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // apply one error sample for one cycle
  task automatic put(input int v);
    e = E_W'(v);
    @(negedge clk);
  endtask

  // run samples until detection or n cycles; return index of detection (-1)
  task automatic run_until(input int n, input int v_large, input int gap_every,
                           input int gap_len, output int at);
    at = -1;
    for (int i = 0; i < n; i++) begin
      bit g;
      g = (gap_every > 0) && (i % gap_every >= gap_every - gap_len);
      put(g ? 3 : ((i % 2) ? v_large : -v_large));
      if (fail_detect && at < 0) at = i;
    end
  endtask

  int at, d0;
  // cycle model for the random phase
  bit m_act; int m_f, m_q; bit m_det;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    enable = 1'b1;

    // 1. persistent error: detection exactly LIMIT cycles after it starts
    put(0); put(0);
    run_until(LIMIT + 10, 500, 0, 0, at);
    chk(at == LIMIT - 1, $sformatf("persistent error detected at sample %0d, expected %0d (LIMIT samples counted)", at, LIMIT - 1));
    repeat (QUIET + 2) put(0);

    // 2. short burst then quiet: rejected
    d0 = n_detect;
    run_until(LIMIT - 10, 500, 0, 0, at);
    chk(active, "counter active during burst");
    repeat (QUIET) put(0);
    chk(!active, "quiet period clears the counter");
    run_until(LIMIT - 10, 500, 0, 0, at);
    repeat (QUIET + 2) put(0);
    chk(n_detect == d0, "two separated short bursts not detected");

    // 3. gaps shorter than QUIET do not reset
    d0 = n_detect;
    run_until(LIMIT * 2, 500, 10, QUIET - 2, at);
    chk(n_detect > d0, "disturbance with short gaps detected");
    repeat (QUIET + 2) put(0);

    // 4. threshold: |e| == THR is not large, -(THR+1) is
    d0 = n_detect;
    repeat (LIMIT * 2) put(THR);
    chk(!active && n_detect == d0, "error equal to threshold ignored");
    repeat (LIMIT + 2) put(-(THR + 1));
    chk(n_detect == d0 + 1, "negative error above threshold detected");
    repeat (QUIET + 2) put(0);

    // 5. enable low and clear
    d0 = n_detect;
    enable = 1'b0;
    repeat (LIMIT * 2) put(1000);
    chk(n_detect == d0 && !active, "no detection while disabled (training)");
    enable = 1'b1;
    repeat (LIMIT - 5) put(1000);
    clear = 1'b1; put(1000); clear = 1'b0;
    repeat (LIMIT - 5) put(1000);
    chk(n_detect == d0, "clear restarts the count");
    repeat (QUIET + 2) put(0);

    // 6. random phase against a cycle model
    m_act = 0; m_f = 0; m_q = 0; m_det = 0;
    // model state is in step with the design after the quiet period
    for (int i = 0; i < 20000; i++) begin
      int v; bit big;
      if ((i / 300) % 2 == 0) v = $urandom_range(0, 2 * THR) - THR;          // mostly small
      else                    v = $urandom_range(0, 8 * THR) - 4 * THR;      // mostly large
      if ($urandom_range(0, 50) == 0) enable = ~enable;
      e = E_W'(v);
      big = (v > THR) || (v < -THR);
      #1;
      @(posedge clk);
      // model update (same edge)
      m_det = 0;
      if (!enable) begin m_act = 0; m_f = 0; m_q = 0; end
      else if (m_act || big) begin
        m_q = big ? 0 : m_q + 1;
        if (!big && m_q == QUIET) begin m_act = 0; m_f = 0; m_q = 0; end
        else if (m_f == LIMIT - 1) begin m_det = 1; m_act = 0; m_f = 0; m_q = 0; end
        else begin m_act = 1; m_f++; end
      end
      @(negedge clk);
      chk(fail_detect == m_det && active == m_act, $sformatf("random phase cycle %0d", i));
    end

    $display("detections=%0d", n_detect);
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
