// Dual-rail register of the NCL-X counter with AND-gated outputs.
//
// Every rail is an RS latch: it is set when its input rail is high while
// load is high, and cleared by clr or rst (reset dominates). load comes from
// the completion detector at the register input, so the rails are set only
// once the whole input word is valid. The stored word reaches the next stage
// through one AND gate per rail controlled by send: dropping send puts the
// spacer on the next stage's input at once, without waiting for a reset wave,
// which is what lets a ring of two such stages work. full tells the control
// that the register holds data; all rails are set by the same load event, so
// the rails of bit 0 are enough to see it.
//
// Circuit warnings: the RS latches are intended state; in a ring their set
// and clear inputs depend on their own outputs through the control.
module nclx_reg
  import dr_pkg::*;
#(
  parameter int unsigned W = 4
) (
  input  logic        rst,
  input  logic        load,
  input  logic        clr,
  input  logic        send,
  input  dr_t [W-1:0] d,
  output dr_t [W-1:0] q,
  output dr_t [W-1:0] y,
  output logic        full
);

  always_latch begin
    for (int i = 0; i < W; i++) begin
      if (rst || clr) begin
        q[i].t = 1'b0;
        q[i].f = 1'b0;
      end else if (load) begin
        if (d[i].t) q[i].t = 1'b1;
        if (d[i].f) q[i].f = 1'b1;
      end
    end
  end

  always_comb begin
    for (int i = 0; i < W; i++) begin
      y[i].t = q[i].t & send;
      y[i].f = q[i].f & send;
    end
  end

  assign full = dr_valid(q[0]);

  // A stored bit never holds both rails.
  always_comb begin
    for (int i = 0; i < W; i++)
      a_one_rail: assert final (!(q[i].t && q[i].f));
  end

endmodule
