// sub_ffe - one block of the split equalizer (FFE_1 or FFE_2): a TAPS-tap
// adaptive FIR filter with its own delay line, coefficients and adaptation
// logic.
//
// The delay line is a chain of TAPS registers; dl[0] takes x_in and dl[k]
// holds the sample k clocks older. Tap k multiplies dl[k] by coefficient
// h_k and the products are summed by an adder chain into y. Each coefficient
// is adapted by its own coef_adapt instance from the common slicer error.
// x_last (= dl[TAPS-1]) is brought out so that a second block can continue
// the delay line: two blocks connected this way and with their outputs added
// form one filter of 2*TAPS taps.
//
// Timing: y is combinational from the delay-line and coefficient registers,
// so y reflects x_in one clock after it is sampled. adapt_en low freezes all
// coefficients (used when the block is disabled); the delay line always
// shifts.
//
// The block split, the cascade of delay lines and the per-coefficient
// adaptation follow the case study; the register placement is this design's
// choice.
module sub_ffe
  import ffe_pkg::*;
#(
  parameter int unsigned TAPS = BLOCK_TAPS,
  parameter int unsigned P_YW = COEF_W + XW + $clog2(TAPS)
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic signed [XW-1:0]         x_in,      // delay-line input
  input  logic                         adapt_en,  // coefficient adaptation enable
  input  logic                         training,  // high alpha
  input  logic signed [E_W-1:0]        e,         // slicer error
  output logic signed [P_YW-1:0]       y,         // block output
  output logic signed [XW-1:0]         x_last,    // end of the delay line
  output logic signed [COEF_W-1:0]     coef [TAPS] // current coefficients
);

  logic signed [XW-1:0]         dl   [TAPS];
  logic signed [COEF_W+XW-1:0]  prod [TAPS];
  logic signed [P_YW-1:0]       acc  [TAPS];

  // Delay line
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < TAPS; k++) dl[k] <= '0;
    end else begin
      dl[0] <= x_in;
      for (int k = 1; k < TAPS; k++) dl[k] <= dl[k-1];
    end
  end

  // Adaptation logic, one per coefficient
  for (genvar k = 0; k < TAPS; k++) begin : g_tap
    coef_adapt u_coef (
      .clk      (clk),
      .rst_n    (rst_n),
      .en       (adapt_en),
      .training (training),
      .x_tap    (dl[k]),
      .e        (e),
      .coef     (coef[k])
    );
  end

  // Multipliers and adder chain
  always_comb begin
    for (int k = 0; k < TAPS; k++) begin
      prod[k] = (COEF_W+XW)'(coef[k]) * (COEF_W+XW)'(dl[k]);
      if (k == 0) acc[k] = P_YW'(prod[k]);
      else        acc[k] = acc[k-1] + P_YW'(prod[k]);
    end
  end

  assign y      = acc[TAPS-1];
  assign x_last = dl[TAPS-1];

endmodule
