// Dual-rail (1-of-2) data type and rail functions shared by all blocks.
//
// A dual-rail bit carries its value on two wires: t high means a valid 1,
// f high means a valid 0, both low is the spacer (no data) that separates two
// data words in the four-phase protocol, and both high never occurs.
// The functions below are NCL-X style gates: every rail is a monotone
// (AND/OR only) function of input rails, so an all-spacer input gives an
// all-spacer output and a complete input gives a valid output. Inversion is
// a rail swap and costs no gate. A constant needs a validity reference: it is
// derived from another dual-rail bit so that it follows the data/spacer waves.
package dr_pkg;

  typedef struct packed {
    logic t;  // valid true
    logic f;  // valid false
  } dr_t;

  localparam dr_t DR_NULL = '{t: 1'b0, f: 1'b0};

  function automatic dr_t dr_enc(input logic v);
    return '{t: v, f: !v};
  endfunction

  function automatic logic dr_valid(input dr_t a);
    return a.t | a.f;
  endfunction

  function automatic dr_t dr_not(input dr_t a);
    return '{t: a.f, f: a.t};
  endfunction

  function automatic dr_t dr_and(input dr_t a, input dr_t b);
    return '{t: a.t & b.t, f: a.f | b.f};
  endfunction

  function automatic dr_t dr_or(input dr_t a, input dr_t b);
    return '{t: a.t | b.t, f: a.f & b.f};
  endfunction

  function automatic dr_t dr_xor(input dr_t a, input dr_t b);
    return '{t: (a.t & b.f) | (a.f & b.t), f: (a.t & b.t) | (a.f & b.f)};
  endfunction

  // Majority (full-adder carry).
  function automatic dr_t dr_maj(input dr_t a, input dr_t b, input dr_t c);
    return '{t: (a.t & b.t) | (a.t & c.t) | (b.t & c.t),
             f: (a.f & b.f) | (a.f & c.f) | (b.f & c.f)};
  endfunction

  // Constant 0 that is valid exactly when the reference bit is valid.
  function automatic dr_t dr_zero_like(input dr_t ref_bit);
    return '{t: 1'b0, f: ref_bit.t | ref_bit.f};
  endfunction

endpackage
