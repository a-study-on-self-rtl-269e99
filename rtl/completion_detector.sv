// Dual-rail completion detector.
//
// Each monitored bit is reduced to a validity signal (OR of its two rails) and
// the validity signals are joined by a C-element. cd therefore rises once every
// monitored bit carries data and falls once every monitored bit has returned to
// the spacer; in between it holds. MASK selects the monitored bits: a cleared
// bit is left out, which is how the reduced completion detection of the
// multiplier omits low-order product bits. The C-element join is written as one
// wide C-element; in silicon it is a tree of two-input C-elements.
module completion_detector
  import dr_pkg::*;
#(
  parameter int unsigned W = 4,
  parameter logic [W-1:0] MASK = '1
) (
  input  logic        rst,
  input  dr_t [W-1:0] d,
  output logic        cd
);

  localparam int unsigned NM = $countones(MASK);

  logic [NM-1:0] v;

  always_comb begin
    int k;
    k = 0;
    v = '0;
    for (int i = 0; i < W; i++) begin
      if (MASK[i]) begin
        v[k] = dr_valid(d[i]);
        k++;
      end
    end
  end

  c_element #(.N(NM)) u_join (.rst(rst), .in(v), .out(cd));

endmodule
