// Reconfigurable ripple-carry adder (RCA).
//
// A WIDTH-bit ripple-carry adder whose full adder cells are all dual-mode
// full adders (dmfa). An approximation controller decodes the run-time
// degree-of-approximation code da into one mode select per cell: the da
// least significant cells run approximately (sum = b, carry out = a), the
// others add accurately. Because an approximate cell passes a as its carry,
// the accurate upper part still sees a carry from the approximated part.
// da = 0 gives an exact adder; da >= WIDTH approximates every bit.
//
// Interface: a, b, cin -> sum, cout; da selects the degree of
// approximation and may change every cycle of the surrounding logic. The
// adder is combinational, delay = WIDTH cells of carry ripple in accurate
// mode. Cell equations and the controller come from the design; the DA
// encoding is this design's own choice (see approx_controller).
module reconfig_rca #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DAW   = approx_pkg::da_width(WIDTH)
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  input  logic [DAW-1:0]   da,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  logic [WIDTH-1:0] app;
  logic [WIDTH:0]   c;

  approx_controller #(.WIDTH(WIDTH), .DAW(DAW)) u_ctrl (
    .da  (da),
    .app (app)
  );

  assign c[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_cell
    dmfa u_dmfa (
      .a    (a[i]),
      .b    (b[i]),
      .cin  (c[i]),
      .app  (app[i]),
      .sum  (sum[i]),
      .cout (c[i+1])
    );
  end

  assign cout = c[WIDTH];

endmodule
