// slicer - combines the sub-FFE outputs, decides the received symbol and
// computes the slicer error.
//
// The equalizer output y is y1 + y2 when both blocks are in use, y1 alone
// when only the first block works and y2 alone when only the second block
// works. The decision d picks the nearer of the two symbol levels +1 and -1
// (+/-LEVEL in the Q.14 scale), i.e. the sign of y. The error is
// e = y - r, where the reference r is the decision d in normal operation
// and the known training symbol t[n] while training is high.
//
// Interface: d_sym and t_sym are bits, 1 meaning +1 and 0 meaning -1.
// Timing: purely combinational.
//
// Two levels, the error definition y - d, the training-sequence reference and
// the selection y1 / y2 / y1+y2 follow the case study; the level scale is this
// design's choice.
module slicer
  import ffe_pkg::*;
#(
  parameter int unsigned P_YW  = YB_W,
  parameter int unsigned P_EW  = P_YW + 2,
  parameter int unsigned LEVEL = 1 << YF
) (
  input  logic signed [P_YW-1:0] y1,        // output of FFE_1
  input  logic signed [P_YW-1:0] y2,        // output of FFE_2
  input  ffe_cfg_e               cfg,       // which blocks are in use
  input  logic                   training,  // use t_sym as reference
  input  logic                   t_sym,     // training symbol t[n]
  output logic signed [P_YW:0]   y,         // equalizer output
  output logic                   d_sym,     // decided symbol d[n]
  output logic signed [P_EW-1:0] e          // slicer error e[n]
);

  localparam logic signed [P_EW-1:0] POS = P_EW'(LEVEL);
  localparam logic signed [P_EW-1:0] NEG = -P_EW'(LEVEL);

  logic signed [P_EW-1:0] ref_lvl;

  always_comb begin
    unique case (cfg)
      CFG_FIRST:  y = (P_YW+1)'(y1);
      CFG_SECOND: y = (P_YW+1)'(y2);
      default:    y = (P_YW+1)'(y1) + (P_YW+1)'(y2);
    endcase
    d_sym   = (y >= 0);
    if (training) ref_lvl = t_sym ? POS : NEG;
    else          ref_lvl = d_sym ? POS : NEG;
    e = P_EW'(y) - ref_lvl;
  end

endmodule
