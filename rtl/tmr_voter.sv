// tmr_voter - bitwise two-out-of-three majority voter.
//
// Used when the small control part of the equalizer (slicer, adaptation
// counter, failure counter, control and input switch) is triplicated: each
// output bit takes the value that at least two of the three copies agree
// on, so a permanent fault in one copy is outvoted. Purely combinational.
// The voting follows the partial triple modular redundancy variant of the
// design.
module tmr_voter #(
  parameter int unsigned W = 1
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] y
);

  always_comb begin
    y = (a & b) | (a & c) | (b & c);
  end

endmodule
