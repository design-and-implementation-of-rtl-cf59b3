// Approximation controller: turns a degree-of-approximation (DA) code into
// the per-bit mode selects (APP) of a reconfigurable adder.
//
// The DA code is the number of least significant bit positions that run in
// approximate mode. Bit i of app is 1 when i < da, so the output is a
// thermometer code growing from the LSB; codes above WIDTH saturate to
// "all positions approximate". Only two modes per cell are decoded, which
// keeps the decoder to one comparator per bit.
//
// The existence of the controller and its two-mode decoder follow the
// design; the LSB-first thermometer mapping of the DA code is this design's
// own choice. Purely combinational.
module approx_controller #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DAW   = approx_pkg::da_width(WIDTH)
) (
  input  logic [DAW-1:0]   da,   // number of approximate LSB positions
  output logic [WIDTH-1:0] app   // per-bit approximate-mode select
);

  always_comb begin
    for (int unsigned i = 0; i < WIDTH; i++) begin
      app[i] = (i < 32'(da));
    end
  end

endmodule
