// Top level of the self-timed dual-rail subthreshold designs.
//
// Three independent circuits stand side by side, each with its own ports:
//  - nclx_counter: the 4-bit two-stage ring counter in NCL-X logic with
//    reduced completion detection (the main proof-of-concept circuit);
//  - dims_counter: the same counter as a three-stage DIMS ring;
//  - dr_multiplier: the 8 x 8 dual-rail reference multiplier (partial-product
//    matrix, Wallace tree, Kogge-Stone adder) with a completion detector that
//    omits the low product bits.
// There is no clock. Every data port is dual-rail (dr_pkg::dr_t per bit) and
// follows the four-phase protocol: a valid word, then the all-spacer word.
// Counter outputs are read through a request/acknowledge pair per counter
// (the observer raises *_ack after a valid count and lowers it after the
// spacer); the multiplier is combinational from operands to product and
// reports completion on mul_cd. rst is an asynchronous, active-high reset
// that clears all state and loads the preset values into the counters.
//
// Circuit warnings: the latches and closed asynchronous loops of the rings
// are intended; see the counter modules.
module async_subthreshold_top
  import dr_pkg::*;
#(
  parameter int unsigned W  = 4,   // counter width
  parameter int unsigned MW = 8    // multiplier operand width
) (
  input  logic            rst,

  input  logic [W-1:0]    nclx_preset,
  output dr_t  [W-1:0]    nclx_cnt,
  output logic            nclx_cnt_full,
  input  logic            nclx_ack,

  input  logic [W-1:0]    dims_preset,
  output dr_t  [W-1:0]    dims_cnt,
  output logic            dims_cnt_cd,
  input  logic            dims_ack,

  input  dr_t  [MW-1:0]   mul_a,
  input  dr_t  [MW-1:0]   mul_b,
  output dr_t  [2*MW-1:0] mul_p,
  output logic            mul_cd
);

  nclx_counter #(.W(W)) u_nclx_counter (
    .rst(rst), .preset(nclx_preset), .cnt(nclx_cnt),
    .cnt_full(nclx_cnt_full), .out_ack(nclx_ack));

  dims_counter #(.W(W)) u_dims_counter (
    .rst(rst), .preset(dims_preset), .cnt(dims_cnt),
    .cnt_cd(dims_cnt_cd), .out_ack(dims_ack));

  dr_multiplier #(.W(MW)) u_mul (
    .rst(rst), .a(mul_a), .b(mul_b), .p(mul_p), .cd(mul_cd));

endmodule
