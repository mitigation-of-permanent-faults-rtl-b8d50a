// coef_adapt - LMS adaptation logic of one equalizer coefficient.
//
// Each cycle the slicer error e[n] is multiplied by the delay-line sample
// that belongs to this tap and by the step size alpha, and the result is
// subtracted from a wide accumulator (the LMS rule,
// h <- h - alpha * e * x). The coefficient used by the filter is the most
// significant COEF_W bits of the accumulator. alpha is a power of two, so
// the multiplication by alpha is an arithmetic right shift; the shift
// amount follows from the number formats in ffe_pkg:
//   shift = alpha_exp + 2*XF - (ACC_W - COEF_W)   (4 in training, 8 after).
// The accumulator saturates instead of wrapping.
//
// Interface: en freezes the accumulator when low (a disabled sub-FFE);
// training selects the large alpha. coef is a registered value and changes
// one clock after the sample that caused the update.
//
// The structure (multiply by e, by alpha, accumulate, take the MSBs) and
// the widths 30/10 bits follow the case study; subtracting the update
// (e is defined as y - d), saturation and reset to zero are this design's
// choices.
module coef_adapt
  import ffe_pkg::*;
#(
  parameter int unsigned P_XW        = XW,
  parameter int unsigned P_XF        = XF,
  parameter int unsigned P_EW        = E_W,
  parameter int unsigned P_COEF_W    = COEF_W,
  parameter int unsigned P_ACC_W     = ACC_W,
  parameter int unsigned P_TRAIN_EXP = ALPHA_TRAIN_EXP,
  parameter int unsigned P_STEADY_EXP= ALPHA_STEADY_EXP
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       en,        // adaptation enable
  input  logic                       training,  // 1: high alpha
  input  logic signed [P_XW-1:0]     x_tap,     // delay-line sample of this tap
  input  logic signed [P_EW-1:0]     e,         // slicer error
  output logic signed [P_COEF_W-1:0] coef       // coefficient (accumulator MSBs)
);

  localparam int unsigned PW = P_EW + P_XW;                 // product width
  localparam int unsigned SW = ((PW > P_ACC_W) ? PW : P_ACC_W) + 1;
  localparam int SH_TRAIN  = int'(P_TRAIN_EXP)  + 2*int'(P_XF) - int'(P_ACC_W - P_COEF_W);
  localparam int SH_STEADY = int'(P_STEADY_EXP) + 2*int'(P_XF) - int'(P_ACC_W - P_COEF_W);

  localparam logic signed [SW-1:0] ACC_MAX = SW'((64'sd1 <<< (P_ACC_W-1)) - 1);
  localparam logic signed [SW-1:0] ACC_MIN = -SW'(64'sd1 <<< (P_ACC_W-1));

  logic signed [P_ACC_W-1:0] acc;
  logic signed [PW-1:0]      prod;
  logic signed [SW-1:0]      upd, nxt;

  always_comb begin
    prod = PW'(e) * PW'(x_tap);
    upd  = training ? (SW'(prod) >>> SH_TRAIN) : (SW'(prod) >>> SH_STEADY);
    nxt  = SW'(acc) - upd;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      acc <= '0;
    else if (en) begin
      if (nxt > ACC_MAX)      acc <= ACC_MAX[P_ACC_W-1:0];
      else if (nxt < ACC_MIN) acc <= ACC_MIN[P_ACC_W-1:0];
      else                    acc <= nxt[P_ACC_W-1:0];
    end
  end

  assign coef = acc[P_ACC_W-1 -: P_COEF_W];

  initial begin
    assert (SH_STEADY >= SH_TRAIN && SH_TRAIN >= 0)
      else $error("coef_adapt: alpha exponents and formats give a negative shift");
  end

endmodule
