// Reconfigurable approximate arithmetic unit (top level).
//
// The unit holds the three adders of the design side by side:
//  * an 8-bit reconfigurable adder/subtractor block (RAB) built on the
//    dual-mode ripple-carry adder (dual-mode full adders),
//  * an 8-bit RAB built on the dual-mode carry look-ahead adder (dual-mode
//    look-ahead and propagate/generate blocks),
//  * a 16-bit spanning-tree parallel-prefix adder, which is exact.
// The two RABs share one degree-of-approximation input da and one subtract
// control sub: the da least significant bit positions of both run
// approximately
// (da = 0 exact, da = RAB_WIDTH all positions approximate). In a video
// encoder da would come from a quality controller that tunes it per video;
// that controller is outside this unit, so da is a plain input here.
//
// All three adders see the same operands: the reconfigurable adders take the
// low RAB_WIDTH bits of a and b, the spanning-tree adder all STA_WIDTH bits.
// With sub = 1 the RABs compute a - b - cin; the spanning-tree adder always
// adds. The unit is
// combinational; each result is valid one adder delay after its inputs.
// Sharing operands and da between the adders is this design's own choice;
// the adder widths follow the design.
module reconfig_arith_unit #(
  parameter int unsigned RAB_WIDTH = 8,
  parameter int unsigned STA_WIDTH = 16,
  parameter int unsigned DAW       = approx_pkg::da_width(RAB_WIDTH)
) (
  input  logic [STA_WIDTH-1:0] a,
  input  logic [STA_WIDTH-1:0] b,
  input  logic                 cin,
  input  logic                 sub,   // RABs: 1 = a - b
  input  logic [DAW-1:0]       da,
  output logic [RAB_WIDTH-1:0] rca_sum,
  output logic                 rca_cout,
  output logic [RAB_WIDTH-1:0] cla_sum,
  output logic                 cla_cout,
  output logic [STA_WIDTH-1:0] sta_sum,
  output logic                 sta_cout
);

  rab #(.WIDTH(RAB_WIDTH), .KIND(approx_pkg::RAB_RCA), .DAW(DAW)) u_rab_rca (
    .a      (a[RAB_WIDTH-1:0]),
    .b      (b[RAB_WIDTH-1:0]),
    .cin    (cin),
    .sub    (sub),
    .da     (da),
    .result (rca_sum),
    .cout   (rca_cout)
  );

  rab #(.WIDTH(RAB_WIDTH), .KIND(approx_pkg::RAB_CLA), .DAW(DAW)) u_rab_cla (
    .a      (a[RAB_WIDTH-1:0]),
    .b      (b[RAB_WIDTH-1:0]),
    .cin    (cin),
    .sub    (sub),
    .da     (da),
    .result (cla_sum),
    .cout   (cla_cout)
  );

  spanning_tree_adder #(.WIDTH(STA_WIDTH)) u_sta (
    .a    (a),
    .b    (b),
    .cin  (cin),
    .sum  (sta_sum),
    .cout (sta_cout)
  );

endmodule
