// Dual-rail latch stage of the DIMS counter, with its completion detector.
//
// Each rail is a C-element of the incoming rail and the enable: with en high a
// valid input rail sets the stored rail, with en low a spacer input clears it,
// otherwise it holds. The control lowers en once the next stage has taken the
// data, so the stage passes the spacer on only after its data was used (a
// weak-condition half buffer). cd is high when all W bits hold data and low
// when all hold the spacer; it is the acknowledge to the previous stage. Reset
// (active high) clears every rail to the spacer.
module dims_latch
  import dr_pkg::*;
#(
  parameter int unsigned W = 4
) (
  input  logic        rst,
  input  logic        en,
  input  dr_t [W-1:0] d,
  output dr_t [W-1:0] q,
  output logic        cd
);

  for (genvar i = 0; i < W; i++) begin : g_bit
    c_element #(.N(2)) u_t (.rst(rst), .in({d[i].t, en}), .out(q[i].t));
    c_element #(.N(2)) u_f (.rst(rst), .in({d[i].f, en}), .out(q[i].f));
  end

  completion_detector #(.W(W)) u_cd (.rst(rst), .d(q), .cd(cd));

  // A stored bit never holds both rails: the input never offers both.
  always_comb begin
    for (int i = 0; i < W; i++)
      a_one_rail: assert final (!(q[i].t && q[i].f));
  end

endmodule
