// ffe_ft_top - adaptive feed-forward equalizer that survives a permanent
// fault in half of its filter.
//
// The 20-tap LMS equalizer is built as two 10-tap blocks, FFE_1 and FFE_2.
// In normal operation the delay line of FFE_1 continues into FFE_2 and the
// slicer adds both outputs, which is exactly a 20-tap equalizer. The slicer
// error e[n] is watched by a failure counter: an error above the failure
// threshold that does not go away within FAIL_LIMIT cycles is taken to be a
// permanent fault. The control then retrains with FFE_1 alone; if the error
// is still persistent it switches x[n] straight into FFE_2 and retrains with
// FFE_2 alone; if that fails too it raises fail. A reset restores the
// 20-tap configuration.
//
// Interface: one sample per clock. x_in is the received sample (Q2.6),
// t_sym the training symbol (1 = +1, 0 = -1) that must be valid while
// training is high, i.e. for ADAPT_CYCLES samples after reset and after
// each reconfiguration. d_sym is the decided symbol and e the slicer error
// (Q.14). The decision for the sample taken at clock edge n is available
// after that edge (one cycle of latency). The training reference must be
// aligned with the decision the equalizer is meant to produce; the position
// of the main tap follows from that alignment.
//
// PARTIAL_TMR = 1 builds the partial triple-modular-redundancy variant: the
// slicer, input switch, adaptation counter, failure counter and control are
// triplicated as three independent lanes, and the lane outputs that leave
// this control part are majority-voted. The default (0) is the plain
// fault-mitigation design. The two-block structure, the modes, the
// detection and the recuperation order follow the case study; the number
// formats, the handshake-free sample interface and the behaviour after an
// unrecoverable failure are this design's choices.
module ffe_ft_top
  import ffe_pkg::*;
#(
  parameter bit          PARTIAL_TMR       = 1'b0,          // triplicated control
  parameter int unsigned P_FAIL_THRESH     = FAIL_THRESH,   // |e| threshold (2^-14 units)
  parameter int unsigned P_QUIET_CYCLES    = QUIET_CYCLES,  // quiet samples that clear
  parameter int unsigned P_FAIL_LIMIT      = FAIL_LIMIT,    // cycles to declare a failure
  parameter int unsigned P_ADAPT_CYCLES    = ADAPT_CYCLES   // training length
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic signed [XW-1:0]   x_in,      // received sample x[n]
  input  logic                   t_sym,     // training symbol t[n]
  output logic                   d_sym,     // decided symbol d[n]
  output logic signed [E_W-1:0]  e,         // slicer error e[n]
  output logic                   training,  // training phase (high alpha)
  output logic signed [YB_W:0]   y,         // equalizer output y[n]
  output ffe_cfg_e               cfg,       // blocks in use
  output ctrl_state_e            state,     // recuperation state
  output logic                   fail       // unrecoverable failure
);

  localparam int unsigned NL = PARTIAL_TMR ? 3 : 1;   // control lanes

  // ---- the two sub-FFEs ----------------------------------------------------
  logic signed [YB_W-1:0]   y1, y2;
  logic signed [XW-1:0]     x1_last, x2_in;
  logic                     en1, en2;

  sub_ffe u_ffe1 (
    .clk      (clk),
    .rst_n    (rst_n),
    .x_in     (x_in),
    .adapt_en (en1),
    .training (training),
    .e        (e),
    .y        (y1),
    .x_last   (x1_last),
    .coef     ()
  );

  sub_ffe u_ffe2 (
    .clk      (clk),
    .rst_n    (rst_n),
    .x_in     (x2_in),
    .adapt_en (en2),
    .training (training),
    .e        (e),
    .y        (y2),
    .x_last   (),
    .coef     ()
  );

  // ---- control lanes (one, or three with voting) ---------------------------
  logic [XW-1:0]          l_x2   [NL];
  logic                   l_d    [NL];
  logic signed [E_W-1:0]  l_e    [NL];
  logic                   l_trn  [NL];
  ffe_cfg_e               l_cfg  [NL];
  logic                   l_dir  [NL];
  logic                   l_en1  [NL];
  logic                   l_en2  [NL];
  logic                   l_fail [NL];
  logic signed [YB_W:0]   l_y    [NL];
  ctrl_state_e            l_st   [NL];

  for (genvar i = 0; i < NL; i++) begin : g_lane
    logic        cnt_training, fc_enable, fc_clear, restart, fail_detect;
    logic        en1_l, en2_l;

    input_switch #(.W(XW)) u_switch (
      .cascade_in (x1_last),
      .direct_in  (x_in),
      .direct     (l_dir[i]),
      .out        (l_x2[i])
    );

    slicer u_slicer (
      .y1       (y1),
      .y2       (y2),
      .cfg      (l_cfg[i]),
      .training (l_trn[i]),
      .t_sym    (t_sym),
      .y        (l_y[i]),
      .d_sym    (l_d[i]),
      .e        (l_e[i])
    );

    adapt_counter #(.P_ADAPT_CYCLES(P_ADAPT_CYCLES)) u_adapt_cnt (
      .clk      (clk),
      .rst_n    (rst_n),
      .restart  (restart),
      .training (cnt_training)
    );

    failure_counter #(
      .P_THRESH       (P_FAIL_THRESH),
      .P_QUIET_CYCLES (P_QUIET_CYCLES),
      .P_FAIL_LIMIT   (P_FAIL_LIMIT)
    ) u_fail_cnt (
      .clk         (clk),
      .rst_n       (rst_n),
      .enable      (fc_enable),
      .clear       (fc_clear),
      .e           (l_e[i]),
      .active      (),
      .fail_detect (fail_detect)
    );

    ctrl_unit u_ctrl (
      .clk         (clk),
      .rst_n       (rst_n),
      .fail_detect (fail_detect),
      .training_in (cnt_training),
      .cfg         (l_cfg[i]),
      .direct      (l_dir[i]),
      .en1         (en1_l),
      .en2         (en2_l),
      .training    (l_trn[i]),
      .fc_enable   (fc_enable),
      .restart     (restart),
      .fc_clear    (fc_clear),
      .fail        (l_fail[i]),
      .state       (l_st[i])
    );

    assign l_en1[i] = en1_l;
    assign l_en2[i] = en2_l;
  end

  if (PARTIAL_TMR) begin : g_vote
    // Everything that leaves the control part is voted.
    logic [1:0] cfg_v, st_v;
    tmr_voter #(.W(XW)) u_v_x2 (.a(l_x2[0]), .b(l_x2[1]), .c(l_x2[2]), .y(x2_in));
    tmr_voter #(.W(E_W)) u_v_e (.a(l_e[0]), .b(l_e[1]), .c(l_e[2]), .y(e));
    tmr_voter #(.W(2)) u_v_cfg (.a(l_cfg[0]), .b(l_cfg[1]), .c(l_cfg[2]), .y(cfg_v));
    tmr_voter #(.W(2)) u_v_st (.a(l_st[0]), .b(l_st[1]), .c(l_st[2]), .y(st_v));
    tmr_voter #(.W(YB_W+1)) u_v_y (.a(l_y[0]), .b(l_y[1]), .c(l_y[2]), .y(y));
    tmr_voter #(.W(5)) u_v_ctl (
      .a ({l_d[0], l_trn[0], l_en1[0], l_en2[0], l_fail[0]}),
      .b ({l_d[1], l_trn[1], l_en1[1], l_en2[1], l_fail[1]}),
      .c ({l_d[2], l_trn[2], l_en1[2], l_en2[2], l_fail[2]}),
      .y ({d_sym, training, en1, en2, fail})
    );
    assign cfg   = ffe_cfg_e'(cfg_v);
    assign state = ctrl_state_e'(st_v);
  end else begin : g_single
    assign x2_in    = l_x2[0];
    assign e        = l_e[0];
    assign cfg      = l_cfg[0];
    assign d_sym    = l_d[0];
    assign training = l_trn[0];
    assign y        = l_y[0];
    assign state    = l_st[0];
    assign en1      = l_en1[0];
    assign en2      = l_en2[0];
    assign fail     = l_fail[0];
  end

endmodule
