// Self-timed 4-bit ring counter in DIMS dual-rail logic.
//
// Three dims_latch stages form a ring that carries one data token and its
// spacer: stage 0 holds the count, a DIMS incrementer between stage 0 and
// stage 1 adds one, stage 1 to stage 2 is a plain wire and stage 2 feeds
// stage 0 through the preset multiplexer. Three stages are the fewest a ring
// of such latches needs to hold a data word, its spacer and a free place.
// Every latch enable is the inverse of the next stage's completion signal;
// stage 0 is also read by an observer through a four-phase channel (cnt,
// out_ack) whose acknowledge is joined with stage 1's completion by a
// C-element, so each new count waits until the observer has seen the last one.
// The incrementer is a chain of DIMS half adders (bit 0 is an inversion, i.e.
// a rail swap); all logic is input-complete, so the counter needs no timing
// assumption at all.
//
// Startup: rst clears every latch to the spacer and sets the preset flag,
// which selects the preset value (single-rail input, encoded to dual-rail) at
// the multiplexer. When stage 0 has taken it, the flag is cleared and the
// multiplexer passes the ring from then on. Counting wraps from 2**W-1 to 0.
//
// Interface: cnt is valid (cnt_cd high) with the count, then returns to the
// spacer (cnt_cd low). The observer raises out_ack after it has seen a valid
// cnt and lowers it after it has seen the spacer.
// The three-stage ring, the latches with enables and completion detectors and
// the preset multiplexer follow the document; the placement of incrementer and
// multiplexer, the control equations and the observer channel are this
// design's choices.
//
// Circuit warnings: the ring is a closed asynchronous loop through C-element
// latches, which is the intended structure of a self-timed counter.
module dims_counter
  import dr_pkg::*;
#(
  parameter int unsigned W = 4
) (
  input  logic         rst,
  input  logic [W-1:0] preset,
  output dr_t  [W-1:0] cnt,
  output logic         cnt_cd,
  input  logic         out_ack
);

  dr_t [W-1:0] d0, q0, d1, q1, q2;
  logic        cd0, cd1, cd2;
  logic        ack0;
  logic        sel_preset;

  // Preset flag: set by reset, cleared once stage 0 holds the preset.
  always_latch begin
    if (rst)      sel_preset = 1'b1;
    else if (cd0) sel_preset = 1'b0;
  end

  always_comb begin
    for (int i = 0; i < W; i++)
      d0[i] = sel_preset ? dr_enc(preset[i]) : q2[i];
  end

  // Stage 0 is released by the join of stage 1 and the observer.
  c_element #(.N(2)) u_ack0 (.rst(rst), .in({cd1, out_ack}), .out(ack0));

  dims_latch #(.W(W)) u_s0 (.rst(rst), .en(!ack0), .d(d0), .q(q0), .cd(cd0));

  // DIMS incrementer: c1 = q0[0], s0 = not q0[0], then half adders.
  dr_t [W-1:1] carry;
  assign d1[0]    = dr_not(q0[0]);
  assign carry[1] = q0[0];
  for (genvar i = 1; i < W; i++) begin : g_ha
    dr_t [1:0] ha_out;
    // Inputs {carry, bit}; outputs {carry_out, sum}. Minterm m = {c, x}:
    // m=0: s=0 c=0; m=1: s=1 c=0; m=2: s=1 c=0; m=3: s=0 c=1.
    dims_gate #(.N(2), .M(2), .TABLE(8'b10_01_01_00)) u_ha (
      .rst(rst), .a({carry[i], q0[i]}), .y(ha_out));
    assign d1[i] = ha_out[0];
    if (i < W-1) begin : g_c
      assign carry[i+1] = ha_out[1];
    end
  end

  dims_latch #(.W(W)) u_s1 (.rst(rst), .en(!cd2), .d(d1), .q(q1), .cd(cd1));
  dims_latch #(.W(W)) u_s2 (.rst(rst), .en(!cd0), .d(q1), .q(q2), .cd(cd2));

  assign cnt    = q0;
  assign cnt_cd = cd0;

endmodule
