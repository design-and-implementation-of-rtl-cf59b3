// Dual-mode full adder (DMFA): one bit cell of a reconfigurable ripple-carry
// adder.
//
// With app = 0 the cell is an ordinary full adder (sum = a ^ b ^ cin,
// cout = majority(a, b, cin)). With app = 1 it runs in its approximate mode,
// sum = b and cout = a, so neither output depends on the incoming carry and
// the ripple chain is cut at this bit. A 2:1 multiplexer per output selects
// between the accurate full adder and the approximate wires. In silicon the
// accurate full adder would be power gated while app = 1; here the gating is
// only modelled by forcing the accurate adder's inputs to zero, which keeps
// it from toggling.
//
// The two mode equations follow the dual-mode block table of the design
// (S = B, Cout = A in approximate mode). Purely combinational.
module dmfa (
  input  logic a,
  input  logic b,
  input  logic cin,
  input  logic app,   // 1 = approximate mode
  output logic sum,
  output logic cout
);

  logic fa_a, fa_b, fa_c;
  logic fa_sum, fa_cout;

  // Operand isolation of the accurate cell while it is not selected.
  assign fa_a = a   & ~app;
  assign fa_b = b   & ~app;
  assign fa_c = cin & ~app;

  assign fa_sum  = fa_a ^ fa_b ^ fa_c;
  assign fa_cout = (fa_a & fa_b) | (fa_b & fa_c) | (fa_a & fa_c);

  // Output multiplexers.
  assign sum  = app ? b : fa_sum;
  assign cout = app ? a : fa_cout;

endmodule
