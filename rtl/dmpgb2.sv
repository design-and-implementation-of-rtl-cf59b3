// Dual-mode propagate/generate block, type 2 (DMPGB2): an upper-level node
// of the reconfigurable carry look-ahead tree that merges the group signals
// of a lower half (pa, ga) and an upper half (pb, gb) without forming a
// carry output.
//
// Accurate mode (app = 0): p = pa & pb, g = gb | (ga & pb).
// Approximate mode (app = 1): p = pa, g = gb.
// Equations follow the design's dual-mode block table. Combinational.
module dmpgb2 (
  input  logic pa,
  input  logic ga,
  input  logic pb,
  input  logic gb,
  input  logic app,
  output logic p,
  output logic g
);

  assign p = app ? pa : (pa & pb);
  assign g = app ? gb : (gb | (ga & pb));

endmodule
