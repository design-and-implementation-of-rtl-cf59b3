// Dual-mode carry look-ahead block, type 2 (DMCLB2): a first-level bit
// cell of the reconfigurable carry look-ahead adder without a carry output
// (the carry out of its bit is formed by a block higher in the tree).
//
// Accurate mode (app = 0): p = a ^ b, g = a & b, s = p ^ cin. Approximate
// mode (app = 1): s = p = b and g = a. Equations follow the design's
// dual-mode block table. Combinational.
module dmclb2 (
  input  logic a,
  input  logic b,
  input  logic cin,
  input  logic app,
  output logic s,
  output logic p,
  output logic g
);

  logic p_acc;

  assign p_acc = a ^ b;

  assign p = app ? b : p_acc;
  assign g = app ? a : (a & b);
  assign s = app ? b : (p_acc ^ cin);

endmodule
