// Dual-mode carry look-ahead block, type 1 (DMCLB1): a first-level bit
// cell of the reconfigurable carry look-ahead adder that also produces the
// carry out of its bit.
//
// Accurate mode (app = 0): p = a ^ b, g = a & b, s = p ^ cin,
// cout = g | (p & cin). Approximate mode (app = 1): s and p are replaced by
// operand b, g and cout by operand a, so the cell no longer depends on cin.
// The equations follow the design's dual-mode block table. Combinational.
module dmclb1 (
  input  logic a,
  input  logic b,
  input  logic cin,
  input  logic app,
  output logic s,
  output logic p,
  output logic g,
  output logic cout
);

  logic p_acc, g_acc;

  assign p_acc = a ^ b;
  assign g_acc = a & b;

  assign p    = app ? b : p_acc;
  assign g    = app ? a : g_acc;
  assign s    = app ? b : (p_acc ^ cin);
  assign cout = app ? a : (g_acc | (p_acc & cin));

endmodule
