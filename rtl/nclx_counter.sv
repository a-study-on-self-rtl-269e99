// Self-timed 4-bit ring counter in NCL-X dual-rail logic with reduced
// completion detection.
//
// Two nclx_reg registers, A and B, form the ring. A holds the count and sends
// it to B through B's input completion detector; B sends it back through an
// NCL-X incrementer (half-adder chain of monotone AND/OR rail functions,
// bit 0 an inversion) and the preset multiplexer to A. Completion detection
// sits only at the two register inputs, where it triggers the load of the RS
// latches. Because each register drives the next stage through AND gates, it
// can withdraw its data (send the spacer) by itself, so two stages suffice.
// The end of the reset phase inside the incrementer is not detected: only the
// register inputs are watched, so the spacer is assumed to have reached every
// internal gate once it has reached them (the weak timing dependence of this
// style).
//
// Control (speed-independent, one rule per transfer):
//   send_a = fullA & !fullB & out_ack    A passes the count to B
//   send_b = fullB & !fullA & !out_ack   B passes count+1 to A
//   clr_a  = fullA & fullB & !cdB & out_ack    B has taken the count from A
//                                              and its input is the spacer
//   clr_b  = fullA & fullB & !cdA & !out_ack   A has taken count+1 from B
//                                              and its input is the spacer
// Both registers are full right after either transfer; the level of the
// observer's acknowledge tells which of the two has just happened.
// Startup: rst clears both registers and sets the preset flag, which selects
// the single-rail preset value (encoded to dual-rail) at the multiplexer until
// A has loaded it. Counting wraps from 2**W-1 to 0.
//
// Interface: cnt is register A: valid (cnt_full high) with the count, then the
// spacer. The observer raises out_ack after seeing a valid count and lowers it
// after seeing the spacer. The two-stage ring, RS latches with AND-gated
// outputs, completion detection before the latches and the preset multiplexer
// follow the document; the control equations, incrementer placement and
// observer channel are this design's choices.
//
// Circuit warnings: latches and the asynchronous ring loop are intended.
// Register B's stored word is used only through its AND-gated output.
module nclx_counter
  import dr_pkg::*;
#(
  parameter int unsigned W = 4
) (
  input  logic         rst,
  input  logic [W-1:0] preset,
  output dr_t  [W-1:0] cnt,
  output logic         cnt_full,
  input  logic         out_ack
);

  dr_t [W-1:0] da, qa, ya, db, qb, yb, inc;
  logic        cda, cdb, full_a, full_b;
  logic        send_a, send_b, clr_a, clr_b;
  logic        sel_preset;

  always_latch begin
    if (rst)         sel_preset = 1'b1;
    else if (full_a) sel_preset = 1'b0;
  end

  // NCL-X incrementer on the output of B: bit 0 is inverted (rail swap) and
  // carries 1 upwards; bit i is yb[i] xor carry, the next carry is the NCL-X
  // AND of the two.
  dr_t [W-1:1] carry;
  assign inc[0]   = dr_not(yb[0]);
  assign carry[1] = yb[0];
  for (genvar i = 1; i < W; i++) begin : g_inc
    assign inc[i] = dr_xor(yb[i], carry[i]);
    if (i < W-1) begin : g_c
      nclx_and u_carry (.a(yb[i]), .b(carry[i]), .y(carry[i+1]));
    end
  end

  always_comb begin
    for (int i = 0; i < W; i++)
      da[i] = sel_preset ? dr_enc(preset[i]) : inc[i];
  end

  assign db = ya;

  completion_detector #(.W(W)) u_cda (.rst(rst), .d(da), .cd(cda));
  completion_detector #(.W(W)) u_cdb (.rst(rst), .d(db), .cd(cdb));

  assign send_a = full_a & !full_b & out_ack;
  assign send_b = full_b & !full_a & !out_ack;
  assign clr_a  = full_a & full_b & !cdb & out_ack;
  assign clr_b  = full_a & full_b & !cda & !out_ack;

  nclx_reg #(.W(W)) u_ra (.rst(rst), .load(cda), .clr(clr_a), .send(send_a),
                          .d(da), .q(qa), .y(ya), .full(full_a));
  nclx_reg #(.W(W)) u_rb (.rst(rst), .load(cdb), .clr(clr_b), .send(send_b),
                          .d(db), .q(qb), .y(yb), .full(full_b));

  assign cnt      = qa;
  assign cnt_full = full_a;

endmodule
