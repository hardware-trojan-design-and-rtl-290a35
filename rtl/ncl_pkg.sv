// ncl_pkg: shared types and helpers for dual-rail NULL Convention Logic (NCL).
//
// A dual-rail signal has two wires, r0 and r1. r0=1 alone is DATA0 (Boolean 0),
// r1=1 alone is DATA1 (Boolean 1), neither is NULL (no value yet) and both is the
// ILLEGAL state, which never occurs in a correctly operating circuit but which the
// Trojan cells of this design use as their trigger. Words are packed arrays of
// dr_t, bit 0 first.
package ncl_pkg;

  typedef struct packed {
    logic r1;
    logic r0;
  } dr_t;

  localparam dr_t DR_NULL    = '{r1: 1'b0, r0: 1'b0};
  localparam dr_t DR_DATA0   = '{r1: 1'b0, r0: 1'b1};
  localparam dr_t DR_DATA1   = '{r1: 1'b1, r0: 1'b0};
  localparam dr_t DR_ILLEGAL = '{r1: 1'b1, r0: 1'b1};

  // Boolean value to DATA0/DATA1.
  function automatic dr_t dr_enc(input logic b);
    return b ? DR_DATA1 : DR_DATA0;
  endfunction

  function automatic logic dr_is_data(input dr_t v);
    return v.r1 ^ v.r0;
  endfunction

  function automatic logic dr_is_null(input dr_t v);
    return v == DR_NULL;
  endfunction

  function automatic logic dr_is_illegal(input dr_t v);
    return v == DR_ILLEGAL;
  endfunction

endpackage
