// Shared types and helpers for the reconfigurable approximate adders.
//
// rab_kind_e selects the adder core of a reconfigurable adder/subtractor.
// pg_t is the (generate, propagate) pair that flows through the carry
// look-ahead tree and the parallel-prefix tree. da_width() gives the width
// of a degree-of-approximation (DA) code for an adder of a given width: the
// code counts how many least significant bit positions run approximately,
// from 0 (fully accurate) up to the adder width (every position approximate).
// The design sets the approximation degree at run time through a
// controller; this particular DA encoding is this implementation's choice.
package approx_pkg;

  typedef struct packed {
    logic g;  // group generate
    logic p;  // group propagate
  } pg_t;

  // Adder core of a reconfigurable adder/subtractor block.
  typedef enum logic {
    RAB_RCA = 1'b0,   // dual-mode ripple-carry adder
    RAB_CLA = 1'b1    // dual-mode carry look-ahead adder
  } rab_kind_e;

  // Bits needed to hold the values 0..width.
  function automatic int unsigned da_width(input int unsigned width);
    return $clog2(width + 1);
  endfunction

endpackage
