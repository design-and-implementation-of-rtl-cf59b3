// Dual-mode propagate/generate block, type 1 (DMPGB1): an upper-level node
// of the reconfigurable carry look-ahead tree that merges the group signals
// of a lower half (pa, ga) and an upper half (pb, gb) and also forms the
// carry out of its whole group from the group's carry in.
//
// Accurate mode (app = 0): p = pa & pb, g = gb | (ga & pb).
// Approximate mode (app = 1): p = pa, g = gb.
// In both modes cout = g | (p & cin), using the p and g just selected.
// Equations follow the design's dual-mode block table. Combinational.
module dmpgb1 (
  input  logic pa,   // propagate of the less significant half
  input  logic ga,   // generate of the less significant half
  input  logic pb,   // propagate of the more significant half
  input  logic gb,   // generate of the more significant half
  input  logic cin,  // carry into the group
  input  logic app,
  output logic p,
  output logic g,
  output logic cout
);

  assign p    = app ? pa : (pa & pb);
  assign g    = app ? gb : (gb | (ga & pb));
  assign cout = g | (p & cin);

endmodule
