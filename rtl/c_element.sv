// Muller C-element with N inputs and an asynchronous reset.
//
// The output goes high when every input is high, low when every input is low,
// and keeps its value while the inputs disagree. It is the state-holding gate
// of the dual-rail circuits: latch rails, DIMS minterms and completion-detector
// joins. The static and symmetric transistor implementations differ in speed,
// area and leakage but not in function, so one model serves both. The reset
// (active high, forces 0) is this design's addition so that every C-element
// starts from a known state.
//
// Circuit warnings: the model is a level-sensitive latch by nature; latches and
// the loops they close in the self-timed rings are intended.
module c_element #(
  parameter int unsigned N = 2
) (
  input  logic         rst,
  input  logic [N-1:0] in,
  output logic         out
);

  always_latch begin
    if (rst)
      out = 1'b0;
    else if (&in)
      out = 1'b1;
    else if (~|in)
      out = 1'b0;
  end

endmodule
