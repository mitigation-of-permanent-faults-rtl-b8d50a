// input_switch - the switching multiplexer in front of the second
// sub-FFE's delay line.
//
// With direct low, FFE_2 continues the delay line of FFE_1 (its input is
// the last sample of FFE_1), so both blocks together act as one 20-tap
// filter. With direct high, x[n] is forwarded straight to FFE_2, which then
// works alone as a 10-tap equalizer after FFE_1 has been found faulty.
// Purely combinational. The multiplexer and its two inputs follow the
// case study; the select polarity is this design's choice.
module input_switch #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] cascade_in,  // end of FFE_1 delay line
  input  logic [W-1:0] direct_in,   // received sample x[n]
  input  logic         direct,      // 1: feed FFE_2 with x[n]
  output logic [W-1:0] out          // FFE_2 delay-line input
);

  always_comb out = direct ? direct_in : cascade_in;

endmodule
