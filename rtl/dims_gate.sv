// Delay Insensitive Minterm Synthesis (DIMS) gate with N dual-rail inputs and
// M dual-rail outputs.
//
// Every one of the 2**N input minterms has its own N-input C-element, fed by
// the rail of each input that the minterm selects. Exactly one minterm fires
// when all inputs are valid, and every C-element returns to 0 only when all
// inputs are back at the spacer, so the gate is input-complete in both phases.
// Output rail y[o].t is the OR of the minterms where output o is 1, y[o].f the
// OR of those where it is 0. TABLE holds the truth table: bit (m*M + o) is
// output o for input minterm m (input i is bit i of m). The default is the
// two-input AND gate; the counter also uses it as a half adder.
module dims_gate
  import dr_pkg::*;
#(
  parameter int unsigned N = 2,
  parameter int unsigned M = 1,
  parameter logic [(2**N)*M-1:0] TABLE = 4'b1000
) (
  input  logic        rst,
  input  dr_t [N-1:0] a,
  output dr_t [M-1:0] y
);

  localparam int unsigned NM = 2**N;

  logic [NM-1:0] mt;

  for (genvar m = 0; m < NM; m++) begin : g_min
    logic [N-1:0] sel;
    for (genvar i = 0; i < N; i++) begin : g_in
      assign sel[i] = m[i] ? a[i].t : a[i].f;
    end
    c_element #(.N(N)) u_c (.rst(rst), .in(sel), .out(mt[m]));
  end

  always_comb begin
    for (int o = 0; o < M; o++) begin
      y[o] = DR_NULL;
      for (int m = 0; m < NM; m++) begin
        if (TABLE[m*M + o]) y[o].t = y[o].t | mt[m];
        else                y[o].f = y[o].f | mt[m];
      end
    end
  end

endmodule
