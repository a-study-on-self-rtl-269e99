// NCL-X dual-rail AND gate.
//
// The true rail is the AND of the true rails and the false rail is the OR of
// the false rails, so the gate is built from one standard AND and one OR gate.
// It is not input-complete: the false rail can become valid before both inputs
// are, which is why NCL-X circuits need a separate completion detector in
// front of their state-holding elements. Purely combinational, no state.
module nclx_and
  import dr_pkg::*;
(
  input  dr_t a,
  input  dr_t b,
  output dr_t y
);

  assign y = dr_and(a, b);

endmodule
