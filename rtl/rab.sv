// Reconfigurable adder/subtractor block (RAB).
//
// The arithmetic element that replaces an exact adder/subtractor in an
// approximation-tolerant datapath. It wraps one reconfigurable adder core,
// chosen at elaboration time by KIND (dual-mode ripple-carry or dual-mode
// carry look-ahead), and adds the subtract control: with sub = 1 operand b
// is inverted and the carry in is inverted, so the core computes
// a + ~b + 1 = a - b (with cin = 0), or a - b - 1 when cin = 1 is used as a
// borrow in. The degree-of-approximation code da is passed to the core
// unchanged; approximate bit cells then return the (possibly inverted)
// operand b as their sum bit.
//
// Interface: a, b, cin, sub, da -> result, cout (for subtraction cout = 1
// means no borrow). Combinational. That adder/subtractor blocks are built
// from the dual-mode cells follows the design; the subtract control and the
// borrow-in convention are this design's own choice.
module rab #(
  parameter int unsigned         WIDTH = 8,
  parameter approx_pkg::rab_kind_e KIND  = approx_pkg::RAB_RCA,
  parameter int unsigned         DAW   = approx_pkg::da_width(WIDTH)
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  input  logic             sub,    // 1 = a - b
  input  logic [DAW-1:0]   da,
  output logic [WIDTH-1:0] result,
  output logic             cout
);

  logic [WIDTH-1:0] b_eff;
  logic             c_eff;

  assign b_eff = b ^ {WIDTH{sub}};
  assign c_eff = cin ^ sub;

  if (KIND == approx_pkg::RAB_CLA) begin : g_cla
    reconfig_cla #(.WIDTH(WIDTH), .DAW(DAW)) u_core (
      .a (a), .b (b_eff), .cin (c_eff), .da (da), .sum (result), .cout (cout)
    );
  end else begin : g_rca
    reconfig_rca #(.WIDTH(WIDTH), .DAW(DAW)) u_core (
      .a (a), .b (b_eff), .cin (c_eff), .da (da), .sum (result), .cout (cout)
    );
  end

endmodule
